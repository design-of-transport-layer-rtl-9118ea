// tb_switch_allocator: self-checking test of wormhole switch allocation.
// Random head-flit requests and tail releases drive the allocator; an
// independent model (per-output lock, owner and round-robin pointer) predicts
// out_busy, out_owner and in_active every cycle. A directed phase checks
// that two inputs competing for one output are served alternately.
module tb_switch_allocator;
  import tlar_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid [NPORTS];
  port_e req_port [NPORTS];
  logic release_o [NPORTS];
  logic out_busy [NPORTS];
  port_e out_owner [NPORTS];
  logic in_active [NPORTS];
  int checks = 0, failures = 0;
  // model
  bit m_busy [NPORTS];
  int m_owner [NPORTS];
  bit m_active [NPORTS];
  int m_last [NPORTS];
  int n_grant = 0, n_conflict = 0;

  switch_allocator dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic model_step();
    bit nb [NPORTS]; int no [NPORTS]; bit na [NPORTS];
    nb = m_busy; no = m_owner; na = m_active;
    for (int o = 0; o < NPORTS; o++) begin
      if (m_busy[o]) begin
        if (release_o[o]) begin nb[o] = 0; na[m_owner[o]] = 0; end
      end else begin
        int cnt = 0;
        for (int k = 1; k <= NPORTS; k++) begin
          int i = (m_last[o] + k) % NPORTS;
          if (req_valid[i] && !m_active[i] && int'(req_port[i]) == o && i != o) begin
            cnt++;
            if (cnt == 1) begin nb[o] = 1; no[o] = i; na[i] = 1; m_last[o] = i; n_grant++; end
          end
        end
        if (cnt > 1) n_conflict++;
      end
    end
    m_busy = nb; m_owner = no; m_active = na;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      req_valid[p] = 0; req_port[p] = P_N; release_o[p] = 0;
      m_busy[p] = 0; m_owner[p] = 0; m_active[p] = 0; m_last[p] = NPORTS - 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NPORTS; i++) begin
        req_valid[i] = $urandom_range(0, 1);
        do req_port[i] = port_e'($urandom_range(0, NPORTS - 1)); while (int'(req_port[i]) == i);
      end
      for (int o = 0; o < NPORTS; o++) release_o[o] = m_busy[o] && ($urandom_range(0, 3) == 0);
      @(posedge clk);
      model_step();
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        check(out_busy[p] == m_busy[p], "out_busy");
        if (m_busy[p]) check(int'(out_owner[p]) == m_owner[p], "out_owner");
        check(in_active[p] == m_active[p], "in_active");
      end
    end
    // fairness: inputs N and E both keep asking for output L
    @(negedge clk);
    for (int i = 0; i < NPORTS; i++) begin req_valid[i] = 0; release_o[i] = 0; end
    for (int o = 0; o < NPORTS; o++) release_o[o] = out_busy[o];
    @(negedge clk);
    for (int o = 0; o < NPORTS; o++) release_o[o] = 0;
    begin
      int prev = -1, alternations = 0;
      for (int n = 0; n < 6; n++) begin
        req_valid[P_N] = 1; req_port[P_N] = P_L;
        req_valid[P_E] = 1; req_port[P_E] = P_L;
        @(negedge clk);
        check(out_busy[P_L], "fairness grant");
        if (prev >= 0 && int'(out_owner[P_L]) != prev) alternations++;
        prev = int'(out_owner[P_L]);
        release_o[P_L] = 1;
        @(negedge clk);
        release_o[P_L] = 0;
      end
      check(alternations == 5, "round-robin alternation");
    end
    check(n_grant > 100 && n_conflict > 10, "grants and conflicts exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
