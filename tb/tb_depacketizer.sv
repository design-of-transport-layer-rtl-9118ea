// tb_depacketizer: self-checking test of the de-packetizer. Random packets
// (head + 1..9 payload flits) from random sources are placed in a model of
// the Rx packet queue, arriving at random times; the application side is
// ready at random. Every payload word must come out once, in order, with the
// source of its packet and rx_last on the tail word only; head flits must
// never reach the application, and must cost exactly one cycle.
module tb_depacketizer;
  import tlar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic q_empty, q_pop, rx_valid, rx_ready, rx_last;
  flit_t q_flit;
  logic [FLIT_DATA_W-1:0] rx_data;
  coord_t rx_src;
  int checks = 0, failures = 0;
  flit_t q [$];
  int rd_idx = 0;
  typedef struct { logic [31:0] w; coord_t src; bit last; } exp_t;
  exp_t expq [$];
  int n_words = 0, n_stall = 0;

  depacketizer dut (.*);

  assign q_empty = (rd_idx >= q.size());
  assign q_flit  = q_empty ? '0 : q[rd_idx];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (q_pop) rd_idx <= rd_idx + 1;
    if (rx_valid && !rx_ready) n_stall++;
    if (rx_valid && rx_ready) begin
      exp_t e;
      check(expq.size() > 0, "word expected");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(rx_data == e.w, "payload word");
        check(rx_src == e.src, "source address");
        check(rx_last == e.last, "last flag");
        n_words++;
      end
    end
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add_packet(int len);
    coord_t s;
    logic [31:0] w;
    s = '{x: $urandom_range(0, 7), y: $urandom_range(0, 7), z: $urandom_range(0, 3)};
    q.push_back(make_head('0, s, MODE_LATERAL, LEN_W'(len)));
    for (int k = 0; k < len; k++) begin
      w = $urandom;
      q.push_back('{ftype: (k == len - 1) ? FT_TAIL : FT_BODY, data: w});
      expq.push_back('{w: w, src: s, last: (k == len - 1)});
    end
  endtask

  initial begin
    rx_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < 400; m++) begin
      @(negedge clk);
      rx_ready = $urandom_range(0, 3) != 0;
      if ($urandom_range(0, 2) == 0) add_packet($urandom_range(1, 9));
    end
    @(negedge clk); rx_ready = 1;
    repeat (4000) @(negedge clk);
    check(expq.size() == 0 && rd_idx == q.size(), "everything delivered");
    // timing: one head + 3 words with the application always ready: 4 cycles
    begin
      int t0, n;
      @(negedge clk);
      add_packet(3);
      t0 = 0; n = 0;
      while (n < 3) begin @(posedge clk); t0++; if (rx_valid && rx_ready) n++; end
      check(t0 == 4, $sformatf("head costs one cycle (%0d)", t0));
    end
    check(n_words > 500 && n_stall > 0, "words delivered, application stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
