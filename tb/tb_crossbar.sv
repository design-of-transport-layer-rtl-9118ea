// tb_crossbar: self-checking test of the 7x7 crossbar. Random flits on all
// inputs and a random legal select (any port but the output's own) for each
// output; every output must carry the selected input's flit.
module tb_crossbar;
  import tlar_pkg::*;
  flit_t in_flit [NPORTS];
  port_e sel [NPORTS];
  flit_t out_flit [NPORTS];
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < NPORTS; i++) begin
        in_flit[i] = '{ftype: flit_type_e'($urandom_range(0, 3)), data: $urandom};
        do sel[i] = port_e'($urandom_range(0, NPORTS - 1)); while (int'(sel[i]) == i);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        checks++;
        if (out_flit[o] != in_flit[int'(sel[o])]) begin
          failures++;
          $display("FAIL output %0d sel %0d", o, sel[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
