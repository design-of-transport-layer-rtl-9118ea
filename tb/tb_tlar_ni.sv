// tb_tlar_ni: self-checking test of the TLAR network interface at the
// default 8x8x4 size, with the test standing in for the router and the
// application. The NI sits at (2,3,1). After reset the test throttles a few
// columns through the topology port, then sends random messages (1..9 words)
// to random destinations. Every packet leaving the NI must carry this NI's
// address, the destination, the length and the routing mode an independent
// model of the lateral-routability rule gives, followed by the payload in
// order with a tail on the last word. Messages towards throttled routers
// must be held (msg_blocked) and sent only after the throttling is lifted;
// no packet may leave while the routing modes are being rebuilt. Packets
// fed into the receive side must reach the application intact with their
// source. The application table query is checked too.
module tb_tlar_ni;
  import tlar_pkg::*;
  localparam int X = 8, Y = 8, Z = 4, LW = 2;
  localparam coord_t ME = '{x: 2, y: 3, z: 1};
  logic clk = 0, rst_n = 0;
  coord_t my_addr, msg_dst, rx_src, app_q_addr;
  logic msg_valid, msg_ready, msg_blocked, pl_valid, pl_ready, rx_valid, rx_ready, rx_last;
  logic [LEN_W-1:0] msg_len;
  logic [FLIT_DATA_W-1:0] pl_data, rx_data;
  logic topo_wr_en, app_q_throttled, self_throttled, mode_check_busy;
  logic [COORD_W-1:0] topo_wr_x, topo_wr_y;
  logic [LW-1:0] topo_wr_level;
  flit_t net_tx_flit, net_rx_flit;
  logic net_tx_req, net_tx_ack, net_rx_req, net_rx_ack;
  int checks = 0, failures = 0;
  int f [X][Y];
  typedef struct { coord_t dst; int len; route_mode_e mode; logic [31:0] w [9]; } msg_t;
  msg_t txq [$];     // messages admitted, in order
  int tx_k = -1;     // position inside the current outgoing packet
  msg_t cur_tx;
  int n_lat = 0, n_down = 0, n_blocked_cycles = 0, n_rx = 0, n_tx = 0;
  typedef struct { logic [31:0] w; coord_t src; bit last; } rxexp_t;
  rxexp_t rxq [$];

  tlar_ni #(.X(X), .Y(Y), .Z(Z)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit thr(coord_t c);
    return int'(c.z) < f[c.x][c.y];
  endfunction

  function automatic route_mode_e ref_mode(coord_t d);
    int x = ME.x, y = ME.y;
    if (int'(ME.z) < f[x][y]) return MODE_DOWNWARD;
    while (x != d.x) begin x += (d.x > x) ? 1 : -1; if (int'(ME.z) < f[x][y]) return MODE_DOWNWARD; end
    while (y != d.y) begin y += (d.y > y) ? 1 : -1; if (int'(ME.z) < f[x][y]) return MODE_DOWNWARD; end
    return MODE_LATERAL;
  endfunction

  // router side of the transmit channel, sampled after the falling edge
  always @(negedge clk) begin
    net_tx_ack = $urandom_range(0, 3) != 0;
    #1;
    if (rst_n && net_tx_req && net_tx_ack) begin
      if (tx_k < 0) begin
        head_t h;
        h = head_t'(net_tx_flit.data);
        check(net_tx_flit.ftype == FT_HEAD, "head first");
        check(txq.size() > 0, "packet was admitted");
        check(!mode_check_busy, "no packet during a mode check");
        if (txq.size() > 0) begin
          cur_tx = txq.pop_front();
          check(h.dst == cur_tx.dst && h.src == ME && int'(h.len) == cur_tx.len, "head fields");
          check(h.mode == cur_tx.mode, "routing mode");
          if (h.mode == MODE_LATERAL) n_lat++; else n_down++;
        end
        tx_k = 0;
      end else begin
        check(net_tx_flit.data == cur_tx.w[tx_k], "payload word");
        check((net_tx_flit.ftype == FT_TAIL) == (tx_k == cur_tx.len - 1), "tail flag");
        tx_k++;
        if (tx_k == cur_tx.len) begin tx_k = -1; n_tx++; end
      end
    end
    if (rst_n && rx_valid && rx_ready) begin
      rxexp_t e;
      check(rxq.size() > 0, "rx word expected");
      if (rxq.size() > 0) begin
        e = rxq.pop_front();
        check(rx_data == e.w && rx_src == e.src && rx_last == e.last, "received word");
        if (e.last) n_rx++;
      end
    end
    if (rst_n && msg_blocked) n_blocked_cycles++;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic topo(int x, int y, int lvl);
    @(negedge clk);
    topo_wr_en = 1; topo_wr_x = x; topo_wr_y = y; topo_wr_level = lvl;
    @(negedge clk);
    topo_wr_en = 0;
    f[x][y] = lvl;
  endtask

  // one message: payload pushed first, then the request held until accepted
  task automatic send_msg(coord_t d, int len);
    msg_t m;
    m.dst = d; m.len = len;
    for (int k = 0; k < len; k++) begin
      m.w[k] = $urandom;
      @(negedge clk);
      pl_valid = 1; pl_data = m.w[k];
      #1;
      while (!pl_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      pl_valid = 0;
    end
    msg_valid = 1; msg_dst = d; msg_len = LEN_W'(len);
    #1;
    while (!msg_ready) begin @(negedge clk); #1; end
    m.mode = ref_mode(d);
    txq.push_back(m);
    @(negedge clk);
    msg_valid = 0;
  endtask

  // receive side: inject packets towards this NI
  initial begin
    net_rx_req = 0; net_rx_flit = '0;
    @(posedge rst_n);
    for (int p = 0; p < 60; p++) begin
      coord_t s; int len;
      s = '{x: $urandom_range(0, X-1), y: $urandom_range(0, Y-1), z: $urandom_range(0, Z-1)};
      len = $urandom_range(1, 9);
      for (int k = 0; k <= len; k++) begin
        @(negedge clk);
        if (k == 0) net_rx_flit = make_head(ME, s, MODE_LATERAL, LEN_W'(len));
        else begin
          net_rx_flit = '{ftype: (k == len) ? FT_TAIL : FT_BODY, data: $urandom};
          rxq.push_back('{w: net_rx_flit.data, src: s, last: (k == len)});
        end
        net_rx_req = 1;
        #1;
        while (!net_rx_ack) begin @(negedge clk); #1; end
      end
      @(negedge clk);
      net_rx_req = 0;
    end
  end

  always @(negedge clk) rx_ready = $urandom_range(0, 3) != 0;

  initial begin
    my_addr = ME;
    foreach (f[i, j]) f[i][j] = 0;
    msg_valid = 0; msg_dst = '0; msg_len = '0; pl_valid = 0; pl_data = '0;
    topo_wr_en = 0; topo_wr_x = 0; topo_wr_y = 0; topo_wr_level = 0; app_q_addr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // throttle: (3,3) two top layers, (2,5) one layer, (6,1) three layers
    topo(3, 3, 2);
    topo(2, 5, 1);
    topo(6, 1, 3);
    // table queries from the application
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      app_q_addr = '{x: $urandom_range(0, X-1), y: $urandom_range(0, Y-1), z: $urandom_range(0, Z-1)};
      #1 check(app_q_throttled == thr(app_q_addr), "application table query");
    end
    check(!self_throttled, "NI router free");
    for (int n = 0; n < 120; n++) begin
      coord_t d;
      do d = '{x: $urandom_range(0, X-1), y: $urandom_range(0, Y-1), z: $urandom_range(0, Z-1)};
      while (thr(d) || d == ME);
      send_msg(d, $urandom_range(1, 9));
    end
    // a message towards a throttled router waits until it is released
    fork
      send_msg('{x: 6, y: 1, z: 0}, 3);
      begin
        repeat (40) @(negedge clk);
        check(msg_blocked && msg_valid, "message held while destination throttled");
        topo(6, 1, 0);
      end
    join
    // own router throttled: self_throttled and nothing admitted
    topo(2, 3, 2);
    #1 check(self_throttled, "own router throttled");
    repeat (200) @(negedge clk);
    check(txq.size() == 0 && tx_k < 0 && rxq.size() == 0, "all traffic finished");
    check(n_lat > 0 && n_down > 0 && n_blocked_cycles > 0 && n_rx == 60 && n_tx == 121,
          $sformatf("mechanisms: lat=%0d down=%0d blocked=%0d rx=%0d tx=%0d", n_lat, n_down,
                    n_blocked_cycles, n_rx, n_tx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
