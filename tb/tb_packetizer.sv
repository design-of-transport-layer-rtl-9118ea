// tb_packetizer: self-checking test of the packetizer. Random messages
// (1..9 payload words, i.e. 2..10-flit packets) with random destinations and
// modes are issued while the test fills a reference payload queue at random
// and acknowledges flits at random. Every packet must be a head flit with the
// command's fields followed by exactly len payload flits in order, the last
// marked tail; an unacknowledged flit must stay put. With the payload ready
// and the channel always acknowledging, a packet of n flits must take n
// cycles and the head must appear one cycle after the command is accepted.
module tb_packetizer;
  import tlar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, pl_empty, pl_pop, out_req, out_ack;
  coord_t cmd_dst, cmd_src;
  route_mode_e cmd_mode;
  logic [LEN_W-1:0] cmd_len;
  logic [FLIT_DATA_W-1:0] pl_data;
  flit_t out_flit;
  int checks = 0, failures = 0;
  logic [31:0] plq [$];          // payload queue model
  logic [31:0] expq [$];         // payload words expected on the channel
  head_t hexp [$];               // heads expected
  int remaining = 0;
  bit ack_always = 0;
  int n_pkts = 0, n_stalls = 0;

  packetizer dut (.*);

  int rd_idx = 0;               // read pointer into plq (entries are never removed)
  assign pl_empty = (rd_idx >= plq.size());
  assign pl_data  = pl_empty ? '0 : plq[rd_idx];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // channel monitor
  flit_t held; bit was_stalled = 0;
  always @(posedge clk) if (rst_n) begin
    if (was_stalled) check(out_req && out_flit == held, "flit held while not acknowledged");
    was_stalled = out_req && !out_ack;
    held = out_flit;
    if (out_req && !out_ack) n_stalls++;
    if (out_req && out_ack) begin
      if (remaining == 0) begin
        head_t h, e;
        h = head_t'(out_flit.data);
        check(out_flit.ftype == FT_HEAD, "head flit type");
        check(hexp.size() > 0, "head expected");
        if (hexp.size() > 0) begin
          e = hexp.pop_front();
          check(h.dst == e.dst && h.src == e.src && h.mode == e.mode && h.len == e.len, "head fields");
          remaining = e.len;
        end
      end else begin
        check(out_flit.data == expq.pop_front(), "payload data in order");
        check(out_flit.ftype == ((remaining == 1) ? FT_TAIL : FT_BODY), "body/tail type");
        remaining--;
        if (remaining == 0) n_pkts++;
      end
    end
  end

  always @(posedge clk) if (rst_n && pl_pop) rd_idx <= rd_idx + 1;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int len, bit preload);
    head_t e;
    logic [31:0] w;
    cmd_dst  = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, 3)};
    cmd_src  = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, 3)};
    cmd_mode = route_mode_e'($urandom_range(0, 1));
    cmd_len  = LEN_W'(len);
    e = '{rsvd: '0, len: cmd_len, mode: cmd_mode, src: cmd_src, dst: cmd_dst};
    hexp.push_back(e);
    for (int k = 0; k < len; k++) begin
      w = $urandom;
      expq.push_back(w);
      if (preload) plq.push_back(w);
      else pendq.push_back(w);
    end
  endtask

  int pend;  // words of the current message not yet put into the payload queue
  logic [31:0] pendq [$];

  initial begin
    cmd_valid = 0; out_ack = 0; cmd_dst = '0; cmd_src = '0; cmd_mode = MODE_DOWNWARD; cmd_len = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random phase
    for (int m = 0; m < 300; m++) begin
      int len = $urandom_range(1, 9);
      @(negedge clk);
      send(len, 0);
      pend = len;
      cmd_valid = 1;
      // wait until accepted
      while (1) begin
        out_ack = $urandom_range(0, 2) != 0;
        if (pend > 0 && $urandom_range(0, 1)) begin plq.push_back(pendq.pop_front()); pend--; end
        #1;
        if (cmd_ready) break;
        @(negedge clk);
      end
      @(posedge clk);
      #1 cmd_valid = 0;
      while (pend > 0) begin
        @(negedge clk);
        out_ack = $urandom_range(0, 2) != 0;
        if ($urandom_range(0, 1)) begin plq.push_back(pendq.pop_front()); pend--; end
      end
    end
    // drain
    @(negedge clk); out_ack = 1;
    repeat (40) @(negedge clk);
    check(expq.size() == 0 && hexp.size() == 0 && remaining == 0, "all packets sent");
    // rate: a 10-flit packet with payload ready and ack always high takes 10 cycles
    begin
      int t_acc, t_head, t_tail;
      @(negedge clk);
      send(9, 1);
      cmd_valid = 1;
      @(posedge clk); t_acc = $time;
      #1 cmd_valid = 0;
      @(posedge clk);
      while (!(out_req && out_flit.ftype == FT_HEAD)) @(posedge clk);
      t_head = $time;
      while (!(out_req && out_flit.ftype == FT_TAIL)) @(posedge clk);
      t_tail = $time;
      check(t_head - t_acc == 10, $sformatf("head one cycle after acceptance (%0d)", t_head - t_acc));
      check(t_tail - t_head == 90, $sformatf("10 flits in 10 cycles (%0d)", t_tail - t_head));
    end
    repeat (5) @(negedge clk);
    check(n_pkts == 301 && n_stalls > 0, "packets counted, back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
