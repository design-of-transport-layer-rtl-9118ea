// rr_arbiter: round-robin arbiter, a helper of the switch allocator.
//
// Grants one of N requesters. The search starts just after the requester that
// was granted last, so every requester that keeps asking is served within N
// grants. The grant is combinational from req; the priority pointer moves
// in the clock edge after a cycle in which 'advance' is high and a grant was
// made. Round-robin is this design's choice: the arbitration policy of the
// switch allocator is not specified.
module rr_arbiter #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  logic [$clog2(N)-1:0] last;

  always_comb begin
    int unsigned idx;
    logic        found;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (!found && req[idx]) begin
        gnt[idx] = 1'b1;
        found    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= $clog2(N)'(N - 1);
    end else if (advance && |gnt) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) last <= $clog2(N)'(i);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
