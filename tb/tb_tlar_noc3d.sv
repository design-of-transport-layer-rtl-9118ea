// tb_tlar_noc3d: end-to-end test of the thermal-aware 3D NoC (4x4x4 mesh).
//
// Every tile's application side is driven by the test. The test first
// throttles some columns through the broadcast topology port (a 2x1x3 pillar plus two shorter columns),
// waits for all NIs to rebuild their routing modes, then lets every tile send
// 8 messages of 1..9 words to random destinations, some of them inside
// the throttled region. Messages to routable destinations must be delivered;
// those to throttled routers (and those from throttled tiles) must wait in
// their NI, flagged msg_blocked. After 1500 cycles the throttling is lifted
// and the waiting messages must go through. Each delivered word is checked
// against its source, message number, position and length, each message must
// arrive exactly once at its own destination, and the test counts how often
// each mechanism happened: lateral-first and downward-first messages (by the
// reference rule), messages held by throttling, throttled routers, mode
// rebuilds, application back-pressure and injection stalls. A mechanism that
// never happened counts as a failure.
module tb_tlar_noc3d;
  import tlar_pkg::*;
  localparam int X = 4, Y = 4, Z = 4, LW = (Z > 2) ? $clog2(Z) : 1;
  localparam int NT = X * Y * Z;
  localparam int NMSG = 8;
  localparam int TREL = 1500;
  logic clk = 0, rst_n = 0;
  logic msg_valid [NT], msg_ready [NT], msg_blocked [NT];
  coord_t msg_dst [NT], rx_src [NT], app_q_addr [NT];
  logic [LEN_W-1:0] msg_len [NT];
  logic pl_valid [NT], pl_ready [NT], rx_valid [NT], rx_ready [NT], rx_last [NT];
  logic [FLIT_DATA_W-1:0] pl_data [NT], rx_data [NT];
  logic app_q_throttled [NT], throttled [NT], mode_check_busy [NT];
  logic topo_wr_en;
  logic [COORD_W-1:0] topo_wr_x, topo_wr_y;
  logic [LW-1:0] topo_wr_level;
  int checks = 0, failures = 0;
  int f [X][Y];
  int exp_dst [NT][NMSG];
  int n_deliv [NT][NMSG];
  int rx_k [NT];
  int n_sent = 0, n_recv = 0;
  int n_lat = 0, n_down = 0, n_held = 0, n_thr = 0, n_modechk = 0, n_rxstall = 0, n_txstall = 0;
  bit released = 0;
  int cyc = 0;

  tlar_noc3d #(.X(X), .Y(Y), .Z(Z)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic coord_t coord_of(int t);
    return '{x: COORD_W'(t % X), y: COORD_W'((t / X) % Y), z: COORD_W'(t / (X * Y))};
  endfunction

  function automatic bit thr(coord_t c);
    return int'(c.z) < f[c.x][c.y];
  endfunction

  function automatic bit lateral_ok(coord_t s, coord_t d);
    int x = s.x, y = s.y;
    if (int'(s.z) < f[x][y]) return 0;
    while (x != d.x) begin x += (d.x > x) ? 1 : -1; if (int'(s.z) < f[x][y]) return 0; end
    while (y != d.y) begin y += (d.y > y) ? 1 : -1; if (int'(s.z) < f[x][y]) return 0; end
    return 1;
  endfunction

  task automatic topo(int x, int y, int lvl);
    @(negedge clk);
    topo_wr_en = 1; topo_wr_x = x; topo_wr_y = y; topo_wr_level = lvl;
    @(negedge clk);
    topo_wr_en = 0;
    f[x][y] = lvl;
  endtask

  // ---- senders, one per tile ----
  bit go = 0;
  for (genvar t = 0; t < NT; t++) begin : g_send
    initial begin
      msg_valid[t] = 0; msg_dst[t] = '0; msg_len[t] = '0; pl_valid[t] = 0; pl_data[t] = '0;
      app_q_addr[t] = coord_of(t);
      wait (go);
      for (int m = 0; m < NMSG; m++) begin
        int d, len;
        bit was_held;
        do d = $urandom_range(0, NT - 1); while (d == t);
        len = $urandom_range(1, 9);
        exp_dst[t][m] = d;
        for (int k = 0; k < len; k++) begin
          @(negedge clk);
          pl_valid[t] = 1; pl_data[t] = {8'(t), 8'(m), 8'(k), 8'(len)};
          #1;
          while (!pl_ready[t]) begin @(negedge clk); #1; end
        end
        @(negedge clk);
        pl_valid[t] = 0;
        msg_valid[t] = 1; msg_dst[t] = coord_of(d); msg_len[t] = LEN_W'(len);
        was_held = 0;
        #1;
        while (!msg_ready[t]) begin
          if (msg_blocked[t]) was_held = 1;
          else if (!mode_check_busy[t]) n_txstall++;
          @(negedge clk); #1;
        end
        if (was_held) n_held++;
        if (lateral_ok(coord_of(t), coord_of(d))) n_lat++; else n_down++;
        n_sent++;
        @(negedge clk);
        msg_valid[t] = 0;
        repeat ($urandom_range(0, 20)) @(negedge clk);
      end
    end
  end

  // ---- receivers and monitors ----
  always @(negedge clk) begin
    for (int t = 0; t < NT; t++) rx_ready[t] = $urandom_range(0, 7) != 0;
    #1;
    cyc++;
    if (rst_n) begin
      for (int t = 0; t < NT; t++) begin
        if (throttled[t]) n_thr++;
        if (mode_check_busy[t]) n_modechk++;
        if (rx_valid[t] && !rx_ready[t]) n_rxstall++;
        if (rx_valid[t] && rx_ready[t]) begin
          int s, m, k, len;
          s = rx_data[t][31:24]; m = rx_data[t][23:16]; k = rx_data[t][15:8]; len = rx_data[t][7:0];
          check(s < NT && m < NMSG, "word from a known message");
          check(rx_src[t] == coord_of(s), "source address");
          check(k == rx_k[t], "word order");
          check(rx_last[t] == (k == len - 1), "last word flag");
          rx_k[t] = rx_last[t] ? 0 : k + 1;
          if (rx_last[t] && s < NT && m < NMSG) begin
            check(exp_dst[s][m] == t, "message reached its destination");
            n_deliv[s][m]++;
            n_recv++;
          end
        end
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired: sent %0d received %0d", n_sent, n_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (f[i, j]) f[i][j] = 0;
    foreach (n_deliv[i, j]) n_deliv[i][j] = 0;
    foreach (rx_k[i]) rx_k[i] = 0;
    topo_wr_en = 0; topo_wr_x = 0; topo_wr_y = 0; topo_wr_level = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    topo(1, 1, 3);
    topo(2, 1, 3);
    topo(1, 2, 2);
    topo(2, 2, 1);
    repeat (X * Y + 4) @(negedge clk);
    for (int t = 0; t < NT; t++) check(!mode_check_busy[t], "routing modes rebuilt");
    for (int t = 0; t < NT; t++) check(throttled[t] == thr(coord_of(t)), "router throttle matches table");
    go = 1;
    repeat (TREL) @(negedge clk);
    // lift the throttling; held messages must now be delivered
    released = 1;
    for (int x = 0; x < X; x++) for (int y = 0; y < Y; y++) if (f[x][y] != 0) topo(x, y, 0);
    while (n_recv < NT * NMSG) @(negedge clk);
    repeat (50) @(negedge clk);
    foreach (n_deliv[s, m]) check(n_deliv[s][m] == 1, "each message delivered once");
    check(n_recv == NT * NMSG, "message count");
    $display("delivered %0d messages in %0d cycles: lateral-first %0d, downward-first %0d, held %0d",
             n_recv, cyc, n_lat, n_down, n_held);
    $display("throttled router-cycles %0d, mode-check cycles %0d, rx stalls %0d, tx stalls %0d",
             n_thr, n_modechk, n_rxstall, n_txstall);
    check(n_lat > 0, "lateral-first messages");
    check(n_down > 0, "downward-first messages");
    check(n_held > 0, "messages held by throttling");
    check(n_thr > 0, "throttled routers");
    check(n_modechk > 0, "routing mode rebuilds");
    check(n_rxstall > 0, "application back-pressure");
    check(n_txstall > 0, "injection stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
