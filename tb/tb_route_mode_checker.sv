// tb_route_mode_checker: self-checking test of the two-step lateral
// routability check at 8x8x4. For random sources and random column
// throttling levels (plus the corner sources), the test models the topology
// table, collects the RMM writes and compares each location's mode with a
// reference that walks the full XY route from the source in the source layer
// and asks whether every router on it is free. It also checks that busy lasts
// exactly X*Y cycles, that every location is written exactly once, and that
// done pulses once at the end.
module tb_route_mode_checker;
  import tlar_pkg::*;
  localparam int X = 8, Y = 8, Z = 4, LW = 2;
  logic clk = 0, rst_n = 0;
  logic start, rmm_we, busy, done;
  coord_t src;
  logic [COORD_W-1:0] tt_x, tt_y, rmm_x, rmm_y;
  logic [LW-1:0] tt_level;
  route_mode_e rmm_mode;
  int checks = 0, failures = 0;
  int f [X][Y];
  int got [X][Y];
  int nwr [X][Y];
  int n_lat = 0, n_down = 0;

  route_mode_checker #(.X(X), .Y(Y), .Z(Z)) dut (.*);

  assign tt_level = LW'(f[tt_x][tt_y]);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit thr(int x, int y);
    return int'(src.z) < f[x][y];
  endfunction

  // Reference: XY route from the source to (dx,dy) in the source layer.
  function automatic bit lateral_ok(int dx, int dy);
    int x = src.x, y = src.y;
    if (thr(x, y)) return 0;
    while (x != dx) begin x += (dx > x) ? 1 : -1; if (thr(x, y)) return 0; end
    while (y != dy) begin y += (dy > y) ? 1 : -1; if (thr(x, y)) return 0; end
    return 1;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && rmm_we) begin
    got[rmm_x][rmm_y] = int'(rmm_mode);
    nwr[rmm_x][rmm_y]++;
  end

  initial begin
    int cycles, ndone;
    start = 0; src = '0;
    foreach (f[i, j]) f[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      @(negedge clk);
      case (trial)
        0: src = '{x: 0, y: 0, z: 0};
        1: src = '{x: 7, y: 7, z: 0};
        2: src = '{x: 0, y: 7, z: 1};
        3: src = '{x: 7, y: 0, z: 3};
        default: src = '{x: $urandom_range(0, X-1), y: $urandom_range(0, Y-1), z: $urandom_range(0, Z-1)};
      endcase
      foreach (f[i, j]) f[i][j] = ($urandom_range(0, 9) < 2) ? $urandom_range(1, Z-1) : 0;
      if (trial % 5 == 4) f[src.x][src.y] = Z - 1;   // sometimes the source itself is throttled
      foreach (nwr[i, j]) nwr[i][j] = 0;
      start = 1;
      @(negedge clk);
      start = 0;
      cycles = 0; ndone = 0;
      while (busy) begin
        @(negedge clk);
        cycles++;
        if (done) ndone++;
        if (cycles > 1000) break;
      end
      check(cycles == X * Y, $sformatf("check takes X*Y cycles (%0d)", cycles));
      check(done && ndone == 1, "done pulses once");
      for (int x = 0; x < X; x++) for (int y = 0; y < Y; y++) begin
        check(nwr[x][y] == 1, "each location written once");
        check(got[x][y] == int'(lateral_ok(x, y)), $sformatf("mode of (%0d,%0d)", x, y));
        if (lateral_ok(x, y)) n_lat++; else n_down++;
      end
    end
    // a restart while busy begins the check again
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    cycles = 0;
    while (busy && cycles < 1000) begin @(negedge clk); cycles++; end
    check(cycles == X * Y, "restart runs a full check");
    check(n_lat > 0 && n_down > 0, "both modes produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
