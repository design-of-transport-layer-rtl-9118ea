// tb_ni_control: self-checking test of the NI control logic (with its
// routability checker) on a 4x4x4 mesh. The topology table and routing mode
// memory are modelled in the test. It checks that a check of X*Y cycles runs
// after reset and after each topology write, that no message is admitted
// while it runs, that messages towards a throttled destination or from a
// throttled source are held (msg_blocked) and admitted once the throttling is
// lifted, and that an admitted message carries the RMM mode of the
// destination column and this NI's address as source.
module tb_ni_control;
  import tlar_pkg::*;
  localparam int X = 4, Y = 4, Z = 4, LW = 2;
  logic clk = 0, rst_n = 0;
  coord_t my_addr, msg_dst, cmd_dst, cmd_src;
  logic msg_valid, msg_ready, msg_blocked, self_thr, dst_thr;
  logic [LEN_W-1:0] msg_len, cmd_len;
  logic [COORD_W-1:0] rmm_x, rmm_y, chk_tt_x, chk_tt_y, chk_rmm_x, chk_rmm_y;
  route_mode_e rmm_mode, chk_rmm_mode, cmd_mode;
  logic topo_wr_en, chk_rmm_we, check_busy, cmd_valid, cmd_ready;
  logic [LW-1:0] chk_tt_level;
  int checks = 0, failures = 0;
  int f [X][Y];
  route_mode_e g [X][Y];
  int n_blocked = 0, n_lat = 0, n_down = 0, n_checks = 0;

  ni_control #(.X(X), .Y(Y), .Z(Z)) dut (.*);

  // models of the topology table and routing mode memory
  assign chk_tt_level = LW'(f[chk_tt_x][chk_tt_y]);
  assign self_thr = int'(my_addr.z) < f[my_addr.x][my_addr.y];
  assign dst_thr  = int'(msg_dst.z) < f[msg_dst.x][msg_dst.y];
  assign rmm_mode = g[rmm_x][rmm_y];
  always @(posedge clk) if (chk_rmm_we) g[chk_rmm_x][chk_rmm_y] <= chk_rmm_mode;

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit lateral_ok(int dx, int dy);
    int x = my_addr.x, y = my_addr.y;
    if (int'(my_addr.z) < f[x][y]) return 0;
    while (x != dx) begin x += (dx > x) ? 1 : -1; if (int'(my_addr.z) < f[x][y]) return 0; end
    while (y != dy) begin y += (dy > y) ? 1 : -1; if (int'(my_addr.z) < f[x][y]) return 0; end
    return 1;
  endfunction

  // admission monitor
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid) begin
      check(!check_busy, "nothing admitted during a check");
      check(!self_thr && !dst_thr, "admitted only when both ends are free");
      check(cmd_dst == msg_dst && cmd_src == my_addr && cmd_len == msg_len, "command fields");
      check(cmd_mode == (lateral_ok(msg_dst.x, msg_dst.y) ? MODE_LATERAL : MODE_DOWNWARD),
            "mode from RMM");
      if (cmd_mode == MODE_LATERAL) n_lat++; else n_down++;
    end
    if (msg_blocked) n_blocked++;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_check();
    int c = 0, w = 0;
    @(negedge clk);
    while (!check_busy && w < 3) begin @(negedge clk); w++; end
    check(check_busy && w <= 1, "check started within two cycles");
    while (check_busy && c < 100) begin @(negedge clk); c++; end
    check(c == X * Y, $sformatf("check took X*Y cycles (%0d)", c));
    n_checks++;
  endtask

  task automatic topo_write(int x, int y, int lvl);
    @(negedge clk);
    topo_wr_en = 1;
    @(posedge clk);
    f[x][y] = lvl;
    #1 topo_wr_en = 0;
    wait_check();
  endtask

  initial begin
    foreach (f[i, j]) f[i][j] = 0;
    foreach (g[i, j]) g[i][j] = MODE_DOWNWARD;
    my_addr = '{x: 1, y: 1, z: 0};
    msg_valid = 0; msg_dst = '0; msg_len = 4'd2; topo_wr_en = 0; cmd_ready = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait_check();                              // check after reset
    // throttle column (2,1) fully above the bottom layer, and (1,3) at layer 0
    topo_write(2, 1, 3);
    topo_write(1, 3, 1);
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      msg_valid = 1;
      msg_dst   = '{x: $urandom_range(0, X-1), y: $urandom_range(0, Y-1), z: $urandom_range(0, Z-1)};
      msg_len   = LEN_W'($urandom_range(1, 9));
      cmd_ready = $urandom_range(0, 3) != 0;
      #1;
      check(msg_blocked == (int'(msg_dst.z) < f[msg_dst.x][msg_dst.y]), "blocked flag");
      check(msg_ready == (!msg_blocked && cmd_ready), "ready when admissible");
      if (msg_ready != (!msg_blocked && cmd_ready)) $display("dbg busy=%0b dst=%p f=%0d", check_busy, msg_dst, f[msg_dst.x][msg_dst.y]);
    end
    // a held message is admitted when its destination is released
    @(negedge clk);
    msg_dst = '{x: 2, y: 1, z: 0}; cmd_ready = 1;
    #1 check(msg_blocked && !msg_ready, "held towards throttled destination");
    topo_write(2, 1, 0);
    #1 check(!msg_blocked && msg_ready, "admitted after release");
    // source throttled: everything is held
    topo_write(1, 1, 1);
    @(negedge clk);
    msg_dst = '{x: 3, y: 3, z: 3};
    #1 check(!msg_ready && !cmd_valid, "held while source is throttled");
    @(negedge clk);
    msg_valid = 0;
    check(n_blocked > 0 && n_lat > 0 && n_down > 0 && n_checks == 5, "mechanisms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
