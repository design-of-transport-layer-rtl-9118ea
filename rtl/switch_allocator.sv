// switch_allocator: wormhole switch allocation (SA) of the 7-port router.
//
// An input port whose queue shows a head flit that has not yet been given an
// output asks for the output port its routing computation chose. Every free
// output runs a round-robin arbiter over the inputs asking for it and, at the
// clock edge, locks itself to the winner. The lock holds for the whole packet
// and is released at the edge after the tail flit has crossed the switch,
// which is wormhole flow control as the design uses it. Since each input asks
// for one output only, per-output arbitration is enough.
//
// Interface: req_valid/req_port per input; release per output (its tail flit
// crosses in this cycle). State outputs: out_busy/out_owner per output,
// in_active per input. A grant made in cycle t lets the head flit cross the
// switch in cycle t+1: SA is the first of the router's two pipeline stages.
// A released output can be granted again from the following cycle.
module switch_allocator
  import tlar_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid [NPORTS],
  input  port_e req_port  [NPORTS],
  input  logic  release_o [NPORTS],
  output logic  out_busy  [NPORTS],
  output port_e out_owner [NPORTS],
  output logic  in_active [NPORTS]
);

  logic [NPORTS-1:0] arb_req [NPORTS];
  logic [NPORTS-1:0] arb_gnt [NPORTS];

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NPORTS; i++)
        arb_req[o][i] = req_valid[i] && !in_active[i] && (req_port[i] == port_e'(o)) &&
                        (i != o) && !out_busy[o];
    end

    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (arb_req[o]),
      .advance (1'b1),
      .gnt     (arb_gnt[o])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        out_busy[p]  <= 1'b0;
        out_owner[p] <= P_L;
        in_active[p] <= 1'b0;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (out_busy[o] && release_o[o]) begin
          out_busy[o]                 <= 1'b0;
          in_active[int'(out_owner[o])] <= 1'b0;
        end else if (!out_busy[o]) begin
          for (int i = 0; i < NPORTS; i++) begin
            if (arb_gnt[o][i]) begin
              out_busy[o]  <= 1'b1;
              out_owner[o] <= port_e'(i);
              in_active[i] <= 1'b1;
            end
          end
        end
      end
    end
  end

  // The routing computation never sends a packet back where it came from.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_no_uturn: assert property (@(posedge clk) disable iff (!rst_n)
                                 req_valid[i] |-> (req_port[i] != port_e'(i)));
  end

endmodule
