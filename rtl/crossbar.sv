// crossbar: 7x7 crossbar switch (CS) of the DLDR router.
//
// Each output is a 6:1 multiplexer over the six other ports' input queues:
// a flit never leaves through the port it came in by, so the own port is left
// out of each multiplexer, as in the design's router drawing. sel[o] names the
// input (a port number other than o); it is turned into the 6-way code by
// skipping o. Purely combinational: the output register after it forms the
// router's second pipeline stage.
module crossbar
  import tlar_pkg::*;
(
  input  flit_t in_flit  [NPORTS],
  input  port_e sel      [NPORTS],
  output flit_t out_flit [NPORTS]
);

  for (genvar o = 0; o < NPORTS; o++) begin : g_mux
    flit_t                cand [NPORTS-1];
    logic [PORT_W-1:0]    code;

    // Candidate k is input k for k < o and input k+1 otherwise.
    for (genvar k = 0; k < NPORTS - 1; k++) begin : g_cand
      assign cand[k] = in_flit[(k < o) ? k : k + 1];
    end

    assign code        = (sel[o] > port_e'(o)) ? PORT_W'(sel[o]) - 1'b1 : PORT_W'(sel[o]);
    assign out_flit[o] = (int'(code) < NPORTS - 1) ? cand[code] : cand[0];
  end

endmodule
