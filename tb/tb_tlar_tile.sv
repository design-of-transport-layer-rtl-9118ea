// tb_tlar_tile: self-checking test of one tile (NI + router) at (1,1,1) of
// a 4x4x4 mesh, with the test driving the six mesh links. It checks that:
// a message to a lateral-first-routable destination leaves eastward with
// mode lateral-first; after column (2,1) is throttled at layer 1 the same
// destination is sent downward-first and leaves through D; a packet entering
// from W for this tile reaches the application; a packet entering from N
// for another router passes through to S; and when the tile's own column is
// throttled, its router acknowledges nothing. Packets are checked word by
// word.
module tb_tlar_tile;
  import tlar_pkg::*;
  localparam int X = 4, Y = 4, Z = 4, LW = 2, NL = 6;
  localparam int LN = 0, LE = 1, LS = 2, LW_ = 3, LU = 4, LD = 5;
  localparam coord_t ME = '{x: 1, y: 1, z: 1};
  logic clk = 0, rst_n = 0;
  coord_t my_addr, msg_dst, rx_src, app_q_addr;
  logic msg_valid, msg_ready, msg_blocked, pl_valid, pl_ready, rx_valid, rx_ready, rx_last;
  logic [LEN_W-1:0] msg_len;
  logic [FLIT_DATA_W-1:0] pl_data, rx_data;
  logic topo_wr_en, app_q_throttled, throttled, mode_check_busy;
  logic [COORD_W-1:0] topo_wr_x, topo_wr_y;
  logic [LW-1:0] topo_wr_level;
  flit_t in_flit [NL], out_flit [NL];
  logic in_req [NL], in_ack [NL], out_req [NL], out_ack [NL];
  int checks = 0, failures = 0;
  flit_t got [NL][$];
  logic [31:0] rx_words [$];
  coord_t rx_srcs [$];

  tlar_tile #(.X(X), .Y(Y), .Z(Z)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      for (int k = 0; k < NL; k++) if (out_req[k] && out_ack[k]) got[k].push_back(out_flit[k]);
      if (rx_valid && rx_ready) begin rx_words.push_back(rx_data); rx_srcs.push_back(rx_src); end
    end
  end

  initial begin
    #10000000;
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
    repeat (X * Y + 3) @(negedge clk);
  endtask

  task automatic send_msg(coord_t d, logic [31:0] base, int len);
    for (int k = 0; k < len; k++) begin
      @(negedge clk); pl_valid = 1; pl_data = base + k;
    end
    @(negedge clk); pl_valid = 0;
    msg_valid = 1; msg_dst = d; msg_len = LEN_W'(len);
    #1;
    while (!msg_ready) begin @(negedge clk); #1; end
    @(negedge clk); msg_valid = 0;
  endtask

  task automatic inject(int k, coord_t s, coord_t d, logic [31:0] base, int len);
    for (int n = 0; n <= len; n++) begin
      @(negedge clk);
      in_flit[k] = (n == 0) ? make_head(d, s, MODE_LATERAL, LEN_W'(len))
                            : '{ftype: (n == len) ? FT_TAIL : FT_BODY, data: base + n - 1};
      in_req[k] = 1;
      #1;
      while (!in_ack[k]) begin @(negedge clk); #1; end
    end
    @(negedge clk); in_req[k] = 0;
  endtask

  task automatic expect_pkt(int k, coord_t d, route_mode_e mode, logic [31:0] base, int len);
    head_t h;
    check(got[k].size() == len + 1, $sformatf("packet length on link %0d (%0d)", k, got[k].size()));
    if (got[k].size() == len + 1) begin
      h = head_t'(got[k][0].data);
      check(got[k][0].ftype == FT_HEAD && h.dst == d && h.mode == mode, "head on link");
      for (int n = 1; n <= len; n++)
        check(got[k][n].data == base + n - 1 && (got[k][n].ftype == FT_TAIL) == (n == len), "payload on link");
    end
    got[k].delete();
  endtask

  initial begin
    my_addr = ME;
    msg_valid = 0; msg_dst = '0; msg_len = '0; pl_valid = 0; pl_data = '0; rx_ready = 1;
    topo_wr_en = 0; topo_wr_x = 0; topo_wr_y = 0; topo_wr_level = 0; app_q_addr = ME;
    for (int k = 0; k < NL; k++) begin in_flit[k] = '0; in_req[k] = 0; out_ack[k] = 1; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (X * Y + 3) @(negedge clk);
    // lateral-first: east
    send_msg('{x: 3, y: 1, z: 0}, 32'h100, 4);
    repeat (20) @(negedge clk);
    expect_pkt(LE, '{x: 3, y: 1, z: 0}, MODE_LATERAL, 32'h100, 4);
    // (2,1) throttled at layer 1: downward-first, leaves through D
    topo(2, 1, 2);
    send_msg('{x: 3, y: 1, z: 0}, 32'h200, 3);
    repeat (20) @(negedge clk);
    expect_pkt(LD, '{x: 3, y: 1, z: 0}, MODE_DOWNWARD, 32'h200, 3);
    // packet for this tile from W
    inject(LW_, '{x: 0, y: 1, z: 1}, ME, 32'h300, 5);
    repeat (20) @(negedge clk);
    check(rx_words.size() == 5, "delivered to application");
    for (int n = 0; n < rx_words.size(); n++)
      check(rx_words[n] == 32'h300 + n && rx_srcs[n] == '{x: 0, y: 1, z: 1}, "received word and source");
    // pass-through N -> S
    inject(LN, '{x: 1, y: 3, z: 1}, '{x: 1, y: 0, z: 1}, 32'h400, 2);
    repeat (20) @(negedge clk);
    expect_pkt(LS, '{x: 1, y: 0, z: 1}, MODE_LATERAL, 32'h400, 2);
    // own column throttled above layer 2: this router stops
    topo(1, 1, 2);
    check(throttled && app_q_throttled, "tile reports throttled");
    for (int k = 0; k < NL; k++) check(!in_ack[k], "throttled router acknowledges nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
