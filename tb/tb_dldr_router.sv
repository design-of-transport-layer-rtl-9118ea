// tb_dldr_router: self-checking test of one 7-port DLDR router (16-flit
// queues) placed at (2,2,1) in a 4-layer stack. All seven inputs send random
// packets (2..10 flits, random modes and addresses, never asking to go back
// where they came from) while every output acknowledges at random. The test
// checks that each packet leaves through the port an independent model of
// the DLDR routing rule predicts, whole and in order, never interleaved with
// another packet on the same output (wormhole), and that packets from one
// input keep their order. It measures the zero-load latency of a head flit
// (three cycles from entering the input queue to being offered downstream),
// checks one flit per cycle for the body, and checks that a throttled router
// neither accepts nor sends anything and resumes afterwards.
module tb_dldr_router;
  import tlar_pkg::*;
  localparam int Z = 4;
  localparam coord_t ME = '{x: 2, y: 2, z: 1};
  logic clk = 0, rst_n = 0;
  coord_t my_addr;
  logic throttle;
  flit_t in_flit [NPORTS];
  logic in_req [NPORTS], in_ack [NPORTS];
  flit_t out_flit [NPORTS];
  logic out_req [NPORTS], out_ack [NPORTS];
  int checks = 0, failures = 0;

  typedef struct { head_t h; int len; port_e exp_out; } pkt_t;
  pkt_t sent [NPORTS][$];           // by input, indexed by sequence number
  int next_seq_out [NPORTS];        // next sequence expected from each input
  // per-output reception state
  bit rx_busy [NPORTS]; head_t rx_head [NPORTS]; int rx_in [NPORTS], rx_seq [NPORTS], rx_k [NPORTS];
  int n_recv = 0, n_contention = 0, n_stall = 0, total_sent = 0;
  bit random_ack = 1;
  bit senders_on = 1;

  dldr_router #(.Z(Z)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic port_e ref_port(coord_t c, head_t h);
    bit lat;
    if (c == h.dst) return P_L;
    if (c.x == h.dst.x && c.y == h.dst.y) return (h.dst.z < c.z) ? P_U : P_D;
    lat = (c.z == Z - 1) || (h.mode == MODE_LATERAL && c.z == h.src.z);
    if (!lat) return P_D;
    if (h.dst.x != c.x) return (h.dst.x > c.x) ? P_E : P_W;
    return (h.dst.y > c.y) ? P_N : P_S;
  endfunction

  // ---- senders ----
  for (genvar i = 0; i < NPORTS; i++) begin : g_src
    initial begin
      in_req[i] = 0; in_flit[i] = '0;
      @(posedge rst_n);
      while (1) begin
        pkt_t p; int seq;
        @(negedge clk);
        if (!senders_on || $urandom_range(0, 3) != 0) continue;
        do begin
          p.h = '{rsvd: 0, len: 0, mode: route_mode_e'($urandom_range(0, 1)),
                  src: '{x: $urandom_range(0, 4), y: $urandom_range(0, 4), z: $urandom_range(0, Z-1)},
                  dst: '{x: $urandom_range(0, 4), y: $urandom_range(0, 4), z: $urandom_range(0, Z-1)}};
          p.exp_out = ref_port(ME, p.h);
        end while (int'(p.exp_out) == i);
        p.len = $urandom_range(1, 9);
        p.h.len = LEN_W'(p.len);
        seq = sent[i].size();
        sent[i].push_back(p);
        total_sent++;
        for (int k = 0; k <= p.len; k++) begin
          in_flit[i] = (k == 0) ? flit_t'({FT_HEAD, p.h}) :
                       '{ftype: (k == p.len) ? FT_TAIL : FT_BODY,
                         data: {4'(i), 12'(seq), 16'(k)}};
          in_req[i] = 1;
          // the acknowledge is sampled half a cycle before the edge it acts on
          #1;
          while (!in_ack[i]) begin @(negedge clk); #1; end
          @(negedge clk);
          in_req[i] = 0;
          if ($urandom_range(0, 4) == 0) @(negedge clk);
        end
      end
    end
  end

  // ---- sinks ----
  // Acknowledges change at the falling edge; transfers are recorded just
  // after it, when everything that decides the next rising edge is settled.
  always @(negedge clk) begin
    for (int o = 0; o < NPORTS; o++) out_ack[o] = random_ack ? ($urandom_range(0, 3) != 0) : 1'b1;
    #1;
    if (rst_n) for (int o = 0; o < NPORTS; o++) begin
      if (out_req[o] && !out_ack[o]) n_stall++;
      if (out_req[o] && out_ack[o]) begin
        flit_t fl;
        fl = out_flit[o];
        if (!rx_busy[o]) begin
          check(fl.ftype == FT_HEAD, "packet starts with head");
          rx_busy[o] = 1; rx_head[o] = head_t'(fl.data); rx_k[o] = 1;
        end else begin
          int in, seq;
          check(fl.ftype != FT_HEAD, "no head inside a packet (wormhole)");
          in = fl.data[31:28]; seq = fl.data[27:16];
          if (rx_k[o] == 1) begin
            rx_in[o] = in; rx_seq[o] = seq;
            check(in < NPORTS && seq < sent[in].size(), "known packet");
            if (in < NPORTS && seq < sent[in].size()) begin
              check(seq == next_seq_out[in], "packets of one input keep order");
              next_seq_out[in] = seq + 1;
              check(sent[in][seq].h == rx_head[o], "head delivered intact");
              check(sent[in][seq].exp_out == port_e'(o), "routed to predicted port");
            end
          end else begin
            check(in == rx_in[o] && seq == rx_seq[o], "flits of one packet stay together");
          end
          check(int'(fl.data[15:0]) == rx_k[o], "flit order");
          if (rx_in[o] < NPORTS && rx_seq[o] < sent[rx_in[o]].size())
            check((fl.ftype == FT_TAIL) == (rx_k[o] == sent[rx_in[o]][rx_seq[o]].len), "tail position");
          rx_k[o]++;
          if (fl.ftype == FT_TAIL) begin rx_busy[o] = 0; n_recv++; end
        end
      end
    end
  end

  // contention: two inputs hold head flits for the same output
  always @(negedge clk) if (rst_n) begin
    #1;
    for (int o = 0; o < NPORTS; o++) begin
      int c;
      c = 0;
      for (int i = 0; i < NPORTS; i++)
        if (dut.sa_req[i] && dut.rc_port[i] == port_e'(o)) c++;
      if (c > 1) n_contention++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    my_addr = ME; throttle = 0;
    for (int p = 0; p < NPORTS; p++) begin rx_busy[p] = 0; next_seq_out[p] = 0; out_ack[p] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3000) @(posedge clk);
    // throttle: nothing accepted or offered
    @(negedge clk); throttle = 1;
    repeat (50) begin
      @(negedge clk);
      for (int p = 0; p < NPORTS; p++) check(!in_ack[p] && !out_req[p], "throttled router is silent");
    end
    throttle = 0;
    repeat (2000) @(posedge clk);
    // drain
    senders_on = 0; random_ack = 0;
    repeat (500) @(posedge clk);
    check(n_recv == total_sent, $sformatf("all packets delivered (%0d of %0d)", n_recv, total_sent));
    check(n_contention > 0 && n_stall > 0, "contention and back-pressure seen");
    // zero-load latency and rate: one packet L -> E
    begin
      head_t h; int t_in, t_out, t_tail;
      h = '{rsvd: 0, len: 4'd4, mode: MODE_LATERAL, src: ME, dst: '{x: 4, y: 2, z: 1}};
      @(negedge clk);
      sent[P_L].push_back('{h: h, len: 4, exp_out: P_E});
      total_sent++;
      in_flit[P_L] = flit_t'({FT_HEAD, h}); in_req[P_L] = 1;
      for (int k = 1; k <= 4; k++) begin
        @(negedge clk);
        in_flit[P_L] = '{ftype: (k == 4) ? FT_TAIL : FT_BODY,
                         data: {4'(P_L), 12'(sent[P_L].size() - 1), 16'(k)}};
      end
      @(negedge clk);
      in_req[P_L] = 0;
    end
    repeat (20) @(posedge clk);
    check(n_recv == total_sent, "latency packet delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency probe for the last packet: head enters at cycle 0, offered at 3
  int lat_cnt = -1, tail_at = -1;
  always @(negedge clk) if (rst_n && !senders_on && !random_ack) begin
    #1;
    if (in_req[P_L] && in_ack[P_L] && in_flit[P_L].ftype == FT_HEAD) lat_cnt = 0;
    else if (lat_cnt >= 0) lat_cnt++;
    if (lat_cnt >= 0 && out_req[P_E] && out_flit[P_E].ftype == FT_HEAD) begin
      checks++;
      if (lat_cnt != 3) begin failures++; $display("FAIL head latency %0d cycles", lat_cnt); end
    end
    if (lat_cnt >= 0 && out_req[P_E] && out_flit[P_E].ftype == FT_TAIL) begin
      checks++;
      if (lat_cnt != 7) begin failures++; $display("FAIL tail at %0d cycles", lat_cnt); end
      lat_cnt = -1;
    end
  end
endmodule
