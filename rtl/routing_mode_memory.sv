// routing_mode_memory: reduced routing mode memory (RMM) of the TLAR network
// interface.
//
// All destinations in one XY column share the same lateral-first path in the
// source layer, so they share one routing-mode bit: the memory holds X*Y bits
// instead of X*Y*Z, as the design's reduced RMM prescribes. Bit g(x,y) = 0
// selects downward-first routing, 1 selects lateral-first routing.
//
// Interface: one write port, driven by the routability checker, and one
// combinational read port, addressed by the destination's (x,y).
// Timing: a write is visible on the read port in the next cycle. Reset loads
// downward-first everywhere, the mode that is always routable; this reset
// value is this design's own choice.
module routing_mode_memory
  import tlar_pkg::*;
#(
  parameter int unsigned X = 8,
  parameter int unsigned Y = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [COORD_W-1:0] wr_x,
  input  logic [COORD_W-1:0] wr_y,
  input  route_mode_e        wr_mode,
  input  logic [COORD_W-1:0] rd_x,
  input  logic [COORD_W-1:0] rd_y,
  output route_mode_e        rd_mode
);

  route_mode_e g [X*Y];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < X*Y; i++) g[i] <= MODE_DOWNWARD;
    end else if (wr_en && (int'(wr_x) < X) && (int'(wr_y) < Y)) begin
      g[int'(wr_y) * X + int'(wr_x)] <= wr_mode;
    end
  end

  always_comb begin
    if ((int'(rd_x) < X) && (int'(rd_y) < Y)) rd_mode = g[int'(rd_y) * X + int'(rd_x)];
    else                                      rd_mode = MODE_DOWNWARD;
  end

endmodule
