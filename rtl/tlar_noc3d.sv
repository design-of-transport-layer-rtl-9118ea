// tlar_noc3d: thermal-aware 3D network-on-chip with Transport Layer Assisted
// Routing, an X x Y x Z mesh of tiles (8 x 8 x 4 by default).
//
// Each tile is a TLAR network interface plus a 7-port dual-mode router
// (tlar_tile). Routers are linked to their six neighbours; layer 0 is the top
// of the stack and layer Z-1 the bottom layer, which the thermal manager never
// throttles. Tile (x,y,z) has index t = (z*Y + y)*X + x in every per-tile port
// array. The processors of the tiles are outside this module: each tile's
// application-layer message ports are brought out. So is the thermal manager:
// a throttling decision enters as a topology-table write (column x,y gets its
// top 'level' layers throttled), broadcast to the topology tables of all
// tiles in the same cycle; every tile then rebuilds its routing modes, and
// the routers whose table entry says so stop. Mesh size and tile structure
// follow the design; the broadcast update port is this design's own choice.
module tlar_noc3d
  import tlar_pkg::*;
#(
  parameter int unsigned X = 8,
  parameter int unsigned Y = 8,
  parameter int unsigned Z = 4,
  localparam int unsigned LW = (Z > 2) ? $clog2(Z) : 1,
  localparam int unsigned NT = X * Y * Z
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   msg_valid       [NT],
  output logic                   msg_ready       [NT],
  input  coord_t                 msg_dst         [NT],
  input  logic [LEN_W-1:0]       msg_len         [NT],
  output logic                   msg_blocked     [NT],
  input  logic                   pl_valid        [NT],
  output logic                   pl_ready        [NT],
  input  logic [FLIT_DATA_W-1:0] pl_data         [NT],
  output logic                   rx_valid        [NT],
  input  logic                   rx_ready        [NT],
  output logic [FLIT_DATA_W-1:0] rx_data         [NT],
  output logic                   rx_last         [NT],
  output coord_t                 rx_src          [NT],
  input  coord_t                 app_q_addr      [NT],
  output logic                   app_q_throttled [NT],
  output logic                   throttled       [NT],
  output logic                   mode_check_busy [NT],
  input  logic                   topo_wr_en,
  input  logic [COORD_W-1:0]     topo_wr_x,
  input  logic [COORD_W-1:0]     topo_wr_y,
  input  logic [LW-1:0]          topo_wr_level
);

  localparam int unsigned NL = NPORTS - 1;   // mesh links per tile: N E S W U D

  // Outgoing side of every tile's mesh links; the incoming side is read from
  // the neighbour's outgoing side.
  flit_t t_out_flit [NT][NL];
  logic  t_out_req  [NT][NL];
  logic  t_in_ack   [NT][NL];

  for (genvar z = 0; z < Z; z++) begin : g_z
    for (genvar y = 0; y < Y; y++) begin : g_y
      for (genvar x = 0; x < X; x++) begin : g_x
        localparam int T = (z * Y + y) * X + x;
        // Neighbour index and existence per link: N E S W U D.
        localparam int NB [NL] = '{T + X, T + 1, T - X, T - 1, T - X * Y, T + X * Y};
        localparam bit HAS[NL] = '{y < Y - 1, x < X - 1, y > 0, x > 0, z > 0, z < Z - 1};
        // The neighbour's link that faces this tile.
        localparam int OPP [NL] = '{2, 3, 0, 1, 5, 4};

        flit_t in_flit [NL];
        logic  in_req  [NL];
        logic  out_ack [NL];
        coord_t addr;

        assign addr = '{x: COORD_W'(x), y: COORD_W'(y), z: COORD_W'(z)};

        for (genvar k = 0; k < NL; k++) begin : g_k
          if (HAS[k]) begin : g_link
            assign in_flit[k] = t_out_flit[NB[k]][OPP[k]];
            assign in_req[k]  = t_out_req[NB[k]][OPP[k]];
            assign out_ack[k] = t_in_ack[NB[k]][OPP[k]];
          end else begin : g_edge
            assign in_flit[k] = '0;
            assign in_req[k]  = 1'b0;
            assign out_ack[k] = 1'b0;
          end
        end

        tlar_tile #(.X(X), .Y(Y), .Z(Z)) u_tile (
          .clk             (clk),
          .rst_n           (rst_n),
          .my_addr         (addr),
          .msg_valid       (msg_valid[T]),
          .msg_ready       (msg_ready[T]),
          .msg_dst         (msg_dst[T]),
          .msg_len         (msg_len[T]),
          .msg_blocked     (msg_blocked[T]),
          .pl_valid        (pl_valid[T]),
          .pl_ready        (pl_ready[T]),
          .pl_data         (pl_data[T]),
          .rx_valid        (rx_valid[T]),
          .rx_ready        (rx_ready[T]),
          .rx_data         (rx_data[T]),
          .rx_last         (rx_last[T]),
          .rx_src          (rx_src[T]),
          .topo_wr_en      (topo_wr_en),
          .topo_wr_x       (topo_wr_x),
          .topo_wr_y       (topo_wr_y),
          .topo_wr_level   (topo_wr_level),
          .app_q_addr      (app_q_addr[T]),
          .app_q_throttled (app_q_throttled[T]),
          .throttled       (throttled[T]),
          .mode_check_busy (mode_check_busy[T]),
          .in_flit         (in_flit),
          .in_req          (in_req),
          .in_ack          (t_in_ack[T]),
          .out_flit        (t_out_flit[T]),
          .out_req         (t_out_req[T]),
          .out_ack         (out_ack)
        );
      end
    end
  end

endmodule
