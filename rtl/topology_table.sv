// topology_table: reduced topology table (TT) of the TLAR network interface.
//
// Thermal throttling in this network always removes a column of routers from
// the top down: the bottom layer is never throttled, and a throttled router
// has only throttled routers above it. The table therefore keeps, for each of
// the X*Y columns, one log2(Z)-bit number f(x,y): the count of throttled
// layers at the top of that column. Router (x,y,z) is throttled exactly when
// z < f(x,y) (layer 0 is the top). This cuts the table from X*Y*Z bits to
// X*Y*log2(Z) bits; both the encoding and the "z < f" test follow the
// design's description of the reduced table.
//
// Interface: one write port (wr_en, wr_x, wr_y, wr_level), written when the
// thermal manager changes the topology, and NRD independent combinational read
// ports that return f(x,y) and the throttled flag of (x,y,z). Reading a
// coordinate outside the mesh returns level 0 (not throttled).
// Timing: a write is seen by the read ports in the next cycle. Reset clears
// every entry (no router throttled), which is this design's own choice.
module topology_table
  import tlar_pkg::*;
#(
  parameter int unsigned X   = 8,
  parameter int unsigned Y   = 8,
  parameter int unsigned Z   = 4,
  parameter int unsigned NRD = 3,
  localparam int unsigned LW = (Z > 2) ? $clog2(Z) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [COORD_W-1:0] wr_x,
  input  logic [COORD_W-1:0] wr_y,
  input  logic [LW-1:0]      wr_level,
  input  logic [COORD_W-1:0] rd_x         [NRD],
  input  logic [COORD_W-1:0] rd_y         [NRD],
  input  logic [COORD_W-1:0] rd_z         [NRD],
  output logic [LW-1:0]      rd_level     [NRD],
  output logic               rd_throttled [NRD]
);

  logic [LW-1:0] f [X*Y];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < X*Y; i++) f[i] <= '0;
    end else if (wr_en && (int'(wr_x) < X) && (int'(wr_y) < Y)) begin
      f[int'(wr_y) * X + int'(wr_x)] <= wr_level;
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      if ((int'(rd_x[r]) < X) && (int'(rd_y[r]) < Y))
        rd_level[r] = f[int'(rd_y[r]) * X + int'(rd_x[r])];
      else
        rd_level[r] = '0;
      rd_throttled[r] = (int'(rd_z[r]) < int'(rd_level[r]));
    end
  end

  // The bottom layer is never throttled, so no column may claim all Z layers.
  a_bottom_free: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_en |-> (int'(wr_level) < Z));

endmodule
