// route_mode_checker: lateral-routability check of the TLAR control logic.
//
// After every topology change the NI decides, for each XY location of its own
// (source) layer, whether XY routing inside the source layer reaches it over
// non-throttled routers only. A location is lateral-first routable when its
// router in the source layer is not throttled and its predecessor on the XY
// route from the source is routable. The check visits one location per cycle
// in the two-step order of the design: step 1 walks the source row along x,
// first eastward from the source to the mesh edge, then westward; step 2 walks
// every column along y from the source row, first northward, then southward.
// Each location's predecessor has been visited before it, so a single "chain"
// flag carries the result along a walk, and the step-1 results seed step 2.
// The whole mesh takes exactly X*Y cycles, as the design states. The result
// of each location is written into the routing mode memory (1 = lateral-first,
// 0 = downward-first) in the cycle it is visited.
//
// Interface: start (a pulse, also restarts a running check), src = this NI's
// coordinates; a read port into the topology table (tt_x/tt_y out, tt_level
// in, combinational); a write port into the RMM; busy is high during the X*Y
// check cycles and done pulses in the cycle after the last one.
// The visiting order within a step (east before west, north before south) is
// this design's own choice.
module route_mode_checker
  import tlar_pkg::*;
#(
  parameter int unsigned X = 8,
  parameter int unsigned Y = 8,
  parameter int unsigned Z = 4,
  localparam int unsigned LW = (Z > 2) ? $clog2(Z) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  coord_t             src,
  output logic [COORD_W-1:0] tt_x,
  output logic [COORD_W-1:0] tt_y,
  input  logic [LW-1:0]      tt_level,
  output logic               rmm_we,
  output logic [COORD_W-1:0] rmm_x,
  output logic [COORD_W-1:0] rmm_y,
  output route_mode_e        rmm_mode,
  output logic               busy,
  output logic               done
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_ROW_EAST,   // step 1, x rising from the source
    S_ROW_WEST,   // step 1, x falling from the source
    S_COL_NORTH,  // step 2, y rising from the source row
    S_COL_SOUTH   // step 2, y falling from the source row
  } state_e;

  localparam logic [COORD_W-1:0] XMAX = COORD_W'(X - 1);
  localparam logic [COORD_W-1:0] YMAX = COORD_W'(Y - 1);

  state_e             state, state_n;
  logic [COORD_W-1:0] cx, cy, cx_n, cy_n;
  logic               chain, chain_n;
  logic [X-1:0]       row_ok, row_ok_n;   // step-1 result for each x of the source row
  logic               ok;                 // current location routable
  logic               fin;

  assign busy     = (state != S_IDLE);
  assign tt_x     = cx;
  assign tt_y     = cy;
  assign ok       = chain && !(int'(src.z) < int'(tt_level));
  assign rmm_we   = busy;
  assign rmm_x    = cx;
  assign rmm_y    = cy;
  assign rmm_mode = ok ? MODE_LATERAL : MODE_DOWNWARD;

  // Step-1 result of column c (0 beyond the mesh edge).
  function automatic logic row_bit(logic [X-1:0] r, logic [COORD_W-1:0] c);
    return (int'(c) < X) ? r[int'(c)] : 1'b0;
  endfunction

  always_comb begin
    logic [COORD_W-1:0] col;
    logic               next_col;
    row_ok_n = row_ok;
    if (state == S_ROW_EAST || state == S_ROW_WEST) row_ok_n[int'(cx)] = ok;

    state_n  = state;
    cx_n     = cx;
    cy_n     = cy;
    chain_n  = ok;
    fin      = 1'b0;
    next_col = 1'b0;
    col      = '0;

    unique case (state)
      S_IDLE: ;
      S_ROW_EAST:
        if (cx == XMAX) begin
          if (src.x != '0) begin
            state_n = S_ROW_WEST;
            cx_n    = src.x - 1'b1;
            chain_n = row_bit(row_ok_n, src.x);
          end else begin
            next_col = 1'b1;
            col      = '0;
          end
        end else begin
          cx_n = cx + 1'b1;
        end
      S_ROW_WEST:
        if (cx == '0) begin
          next_col = 1'b1;
          col      = '0;
        end else begin
          cx_n = cx - 1'b1;
        end
      S_COL_NORTH:
        if (cy == YMAX) begin
          if (src.y != '0) begin
            state_n = S_COL_SOUTH;
            cy_n    = src.y - 1'b1;
            chain_n = row_bit(row_ok_n, cx);
          end else begin
            next_col = 1'b1;
            col      = cx + 1'b1;
          end
        end else begin
          cy_n = cy + 1'b1;
        end
      S_COL_SOUTH:
        if (cy == '0) begin
          next_col = 1'b1;
          col      = cx + 1'b1;
        end else begin
          cy_n = cy - 1'b1;
        end
      default: state_n = S_IDLE;
    endcase

    // Begin step 2 on column 'col', or finish after the last column.
    if (next_col) begin
      cx_n    = col;
      chain_n = row_bit(row_ok_n, col);
      if (int'(col) >= X) begin
        state_n = S_IDLE;
        fin     = 1'b1;
      end else if (src.y != YMAX) begin
        state_n = S_COL_NORTH;
        cy_n    = src.y + 1'b1;
      end else if (src.y != '0) begin
        state_n = S_COL_SOUTH;
        cy_n    = src.y - 1'b1;
      end else begin
        state_n = S_IDLE;   // a single-row mesh has no step 2
        fin     = 1'b1;
      end
    end

    if (start) begin
      state_n = S_ROW_EAST;
      cx_n    = src.x;
      cy_n    = src.y;
      chain_n = 1'b1;
      fin     = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cx     <= '0;
      cy     <= '0;
      chain  <= 1'b0;
      row_ok <= '0;
      done   <= 1'b0;
    end else begin
      state  <= state_n;
      cx     <= cx_n;
      cy     <= cy_n;
      chain  <= chain_n;
      row_ok <= row_ok_n;
      done   <= fin;
    end
  end

endmodule
