// tb_latency_sweep: message latency against injection rate on a throttled mesh.
//
// A reduced 4x4x4 mesh has one throttled region: two neighbouring columns
// throttled three layers deep, so only their bottom routers work. Every
// working tile sends uniform random traffic to working destinations. Each
// message carries 1..9 payload words (2..10 flits with the head). Messages
// are created open-loop: each tile draws a random gap between creation
// times, whose mean sets the injection rate, so a message that cannot leave
// at once waits in its sender, and the wait counts in its latency.
// Latency runs from creation to the cycle its last word is taken at the
// destination. The test runs three rates one after another (5, 15 and 30
// messages per tile per 1000 cycles) and drains the mesh between them.
//
// It checks the following:
//  * every word arrives intact, in order, at the right tile, exactly once;
//  * no message is faster than its hop count allows (three cycles per
//    router on the path);
//  * the average latency at the highest rate is not below the one at the
//    lowest rate;
//  * both routing modes are used.
//
// It prints the average latency for each rate. The rates, the mesh size and
// the length of each run are this bench's choice. The shape of the
// experiment follows the usual latency-against-load sweep for such networks.
module tb_latency_sweep;
  import tlar_pkg::*;
  localparam int X = 4, Y = 4, Z = 4, LW = (Z > 2) ? $clog2(Z) : 1;
  localparam int NT = X * Y * Z;
  localparam int NRATE = 3;
  localparam int NMSG = 6;                      // messages per working tile and rate
  localparam int RATE_PER_K [NRATE] = '{5, 15, 30};

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
  int cyc = 0;
  int rate_idx = 0;
  int born [NT][NMSG];                          // creation cycle per message
  int dest [NT][NMSG];
  int n_deliv [NT][NMSG];
  int rx_k [NT];
  int n_recv = 0, n_expected = 0, n_lat = 0, n_down = 0;
  longint lat_sum [NRATE];
  int lat_cnt [NRATE];
  bit go [NRATE];
  int senders_done = 0;

  tlar_noc3d #(.X(X), .Y(Y), .Z(Z)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic coord_t coord_of(int t);
    return '{x: COORD_W'(t % X), y: COORD_W'((t / X) % Y), z: COORD_W'(t / (X * Y))};
  endfunction

  function automatic bit thr(int t);
    coord_t c = coord_of(t);
    return int'(c.z) < f[c.x][c.y];
  endfunction

  function automatic bit lateral_ok(coord_t s, coord_t d);
    int x = s.x, y = s.y;
    while (x != d.x) begin x += (d.x > x) ? 1 : -1; if (int'(s.z) < f[x][y]) return 0; end
    while (y != d.y) begin y += (d.y > y) ? 1 : -1; if (int'(s.z) < f[x][y]) return 0; end
    return 1;
  endfunction

  // Routers a packet passes on its path, ejecting router included.
  function automatic int path_routers(coord_t s, coord_t d, bit lat);
    int dx = (s.x > d.x) ? s.x - d.x : d.x - s.x;
    int dy = (s.y > d.y) ? s.y - d.y : d.y - s.y;
    if (lat) return dx + dy + ((s.z > d.z) ? s.z - d.z : d.z - s.z) + 1;
    return dx + dy + (Z - 1 - s.z) + (Z - 1 - d.z) + 1;
  endfunction

  task automatic topo(int x, int y, int lvl);
    @(negedge clk);
    topo_wr_en = 1; topo_wr_x = x; topo_wr_y = y; topo_wr_level = lvl;
    @(negedge clk);
    topo_wr_en = 0;
    f[x][y] = lvl;
  endtask

  // ---- senders, one per tile; throttled tiles stay silent ----
  for (genvar t = 0; t < NT; t++) begin : g_send
    initial begin
      msg_valid[t] = 0; msg_dst[t] = '0; msg_len[t] = '0; pl_valid[t] = 0; pl_data[t] = '0;
      app_q_addr[t] = coord_of(t);
      for (int r = 0; r < NRATE; r++) begin
        int next;
        wait (go[r]);
        next = cyc;
        for (int m = 0; m < NMSG && !thr(t); m++) begin
          int d, len;
          next += $urandom_range(0, 2 * 1000 / RATE_PER_K[r]);
          while (cyc < next) @(negedge clk);
          do d = $urandom_range(0, NT - 1); while (d == t || thr(d));
          len = $urandom_range(1, 9);
          born[t][m] = next;
          dest[t][m] = d;
          if (lateral_ok(coord_of(t), coord_of(d))) n_lat++; else n_down++;
          for (int k = 0; k < len; k++) begin
            @(negedge clk);
            pl_valid[t] = 1; pl_data[t] = {8'(t), 8'(m), 8'(k), 8'(len)};
            #1;
            while (!pl_ready[t]) begin @(negedge clk); #1; end
          end
          @(negedge clk);
          pl_valid[t] = 0;
          msg_valid[t] = 1; msg_dst[t] = coord_of(d); msg_len[t] = LEN_W'(len);
          #1;
          while (!msg_ready[t]) begin @(negedge clk); #1; end
          @(negedge clk);
          msg_valid[t] = 0;
        end
        senders_done++;
      end
    end
  end

  // ---- receivers: always ready, so latency is the network's own ----
  always @(negedge clk) begin
    for (int t = 0; t < NT; t++) rx_ready[t] = 1;
    #1;
    cyc++;
    if (rst_n) begin
      for (int t = 0; t < NT; t++) begin
        if (rx_valid[t] && rx_ready[t]) begin
          int s, m, k, len;
          s = rx_data[t][31:24]; m = rx_data[t][23:16]; k = rx_data[t][15:8]; len = rx_data[t][7:0];
          check(s < NT && m < NMSG, "word from a known message");
          check(rx_src[t] == coord_of(s), "source address");
          check(k == rx_k[t], "word order");
          check(rx_last[t] == (k == len - 1), "last word flag");
          rx_k[t] = rx_last[t] ? 0 : k + 1;
          if (rx_last[t] && s < NT && m < NMSG) begin
            int lat, hops;
            bit mode;
            lat = cyc - born[s][m];
            mode = lateral_ok(coord_of(s), coord_of(t));
            hops = path_routers(coord_of(s), coord_of(t), mode);
            check(dest[s][m] == t, "message reached its destination");
            check(lat >= 3 * hops + len, "latency not below the path's minimum");
            n_deliv[s][m]++;
            lat_sum[rate_idx] += lat;
            lat_cnt[rate_idx]++;
            n_recv++;
          end
        end
      end
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired: received %0d of %0d", n_recv, n_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int working;
    foreach (f[i, j]) f[i][j] = 0;
    foreach (rx_k[i]) rx_k[i] = 0;
    foreach (go[r]) go[r] = 0;
    foreach (lat_sum[r]) begin lat_sum[r] = 0; lat_cnt[r] = 0; end
    topo_wr_en = 0; topo_wr_x = 0; topo_wr_y = 0; topo_wr_level = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    topo(1, 1, 3);
    topo(2, 1, 3);
    repeat (X * Y + 4) @(negedge clk);
    working = 0;
    for (int t = 0; t < NT; t++) if (!thr(t)) working++;
    for (int r = 0; r < NRATE; r++) begin
      foreach (n_deliv[i, j]) n_deliv[i][j] = 0;
      rate_idx = r;
      n_expected += working * NMSG;
      go[r] = 1;
      while (senders_done < (r + 1) * NT || n_recv < n_expected) @(negedge clk);
      repeat (20) @(negedge clk);
      for (int t = 0; t < NT; t++)
        if (!thr(t)) for (int m = 0; m < NMSG; m++) check(n_deliv[t][m] == 1, "each message delivered once");
      check(lat_cnt[r] == working * NMSG, "message count for this rate");
      $display("rate %0d msg/tile/1000 cycles: %0d messages, average latency %0d.%0d cycles",
               RATE_PER_K[r], lat_cnt[r], lat_sum[r] / lat_cnt[r], (lat_sum[r] * 10 / lat_cnt[r]) % 10);
    end
    check(lat_sum[NRATE-1] * lat_cnt[0] >= lat_sum[0] * lat_cnt[NRATE-1],
          "latency does not fall as the load rises");
    check(n_lat > 0, "lateral-first messages");
    check(n_down > 0, "downward-first messages");
    $display("lateral-first %0d, downward-first %0d", n_lat, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
