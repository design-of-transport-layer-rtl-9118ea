// tb_topology_table: self-checking test of the reduced topology table at the
// default 8x8x4 size. Random column writes are mirrored in a reference array;
// every cycle all four read ports are probed at random (x,y,z) and must
// return the stored level and "throttled = z < level". A write must be
// visible in the cycle after it.
module tb_topology_table;
  import tlar_pkg::*;
  localparam int X = 8, Y = 8, Z = 4, NRD = 4, LW = 2;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [COORD_W-1:0] wr_x, wr_y;
  logic [LW-1:0] wr_level;
  logic [COORD_W-1:0] rd_x [NRD], rd_y [NRD], rd_z [NRD];
  logic [LW-1:0] rd_level [NRD];
  logic rd_throttled [NRD];
  int checks = 0, failures = 0;
  int ref_f [X][Y];
  int nthr = 0;

  topology_table #(.X(X), .Y(Y), .Z(Z), .NRD(NRD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_f[i, j]) ref_f[i][j] = 0;
    wr_en = 0; wr_x = 0; wr_y = 0; wr_level = 0;
    for (int r = 0; r < NRD; r++) begin rd_x[r] = 0; rd_y[r] = 0; rd_z[r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // after reset nothing is throttled
    for (int x = 0; x < X; x++) for (int y = 0; y < Y; y++) begin
      @(negedge clk);
      rd_x[0] = x; rd_y[0] = y; rd_z[0] = 0;
      #1 check(rd_level[0] == 0 && !rd_throttled[0], "reset value");
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      wr_en = ($urandom_range(0, 3) == 0);
      wr_x = $urandom_range(0, X - 1);
      wr_y = $urandom_range(0, Y - 1);
      wr_level = $urandom_range(0, Z - 1);
      for (int r = 0; r < NRD; r++) begin
        rd_x[r] = $urandom_range(0, X - 1);
        rd_y[r] = $urandom_range(0, Y - 1);
        rd_z[r] = $urandom_range(0, Z - 1);
      end
      if (cyc % 7 == 0) begin rd_x[0] = wr_x; rd_y[0] = wr_y; end
      #1;
      for (int r = 0; r < NRD; r++) begin
        check(int'(rd_level[r]) == ref_f[rd_x[r]][rd_y[r]], "level read");
        check(rd_throttled[r] == (int'(rd_z[r]) < ref_f[rd_x[r]][rd_y[r]]), "throttled read");
        if (rd_throttled[r]) nthr++;
      end
      @(posedge clk);
      if (wr_en) ref_f[wr_x][wr_y] = wr_level;
    end
    check(nthr > 0, "throttled routers seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
