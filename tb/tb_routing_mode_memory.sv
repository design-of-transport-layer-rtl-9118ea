// tb_routing_mode_memory: self-checking test of the X*Y-bit routing mode
// memory at 8x8. Checks the downward-first reset value of every entry, then
// random writes against a reference array with a random read every cycle.
module tb_routing_mode_memory;
  import tlar_pkg::*;
  localparam int X = 8, Y = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [COORD_W-1:0] wr_x, wr_y, rd_x, rd_y;
  route_mode_e wr_mode, rd_mode;
  int checks = 0, failures = 0;
  route_mode_e ref_g [X][Y];

  routing_mode_memory #(.X(X), .Y(Y)) dut (.*);

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
    foreach (ref_g[i, j]) ref_g[i][j] = MODE_DOWNWARD;
    wr_en = 0; wr_x = 0; wr_y = 0; wr_mode = MODE_DOWNWARD; rd_x = 0; rd_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int x = 0; x < X; x++) for (int y = 0; y < Y; y++) begin
      @(negedge clk); rd_x = x; rd_y = y;
      #1 check(rd_mode == MODE_DOWNWARD, "reset value");
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      wr_en   = $urandom_range(0, 1);
      wr_x    = $urandom_range(0, X - 1);
      wr_y    = $urandom_range(0, Y - 1);
      wr_mode = route_mode_e'($urandom_range(0, 1));
      rd_x    = $urandom_range(0, X - 1);
      rd_y    = $urandom_range(0, Y - 1);
      #1 check(rd_mode == ref_g[rd_x][rd_y], "mode read");
      @(posedge clk);
      if (wr_en) ref_g[wr_x][wr_y] = wr_mode;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
