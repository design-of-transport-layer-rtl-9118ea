// tb_sync_fifo: self-checking test of sync_fifo at its default size
// (34-bit x 16). Random pushes and pops, including pushes into a full queue
// and pops from an empty one being withheld by the test, are compared with a
// reference queue: data order, full, empty and count after every cycle.
module tb_sync_fifo;
  localparam int W = 34, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int max_seen = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      // bias towards filling in the first half, draining in the second
      @(negedge clk);
      wr_en   = ($urandom_range(0, 99) < ((cyc % 1000) < 500 ? 70 : 30)) && !full;
      rd_en   = ($urandom_range(0, 99) < ((cyc % 1000) < 500 ? 30 : 70)) && !empty;
      wr_data = {$urandom, $urandom};
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(rd_data == model[0], "head data");
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      if (model.size() > max_seen) max_seen = model.size();
    end
    check(max_seen == D, "queue reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
