`timescale 1ps/1ps
// tb_out_chain: parallel capture of the 64 outputs, then serial shift-out
// with bit 0 first.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_out_chain;
  localparam int W = 64;
  logic clk = 0, load, q; logic [W-1:0] d, word;
  int checks = 0, failures = 0;

  out_chain #(.WIDTH(W)) dut (.clk_i(clk), .load_i(load), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 5; rep++) begin
      word = {$urandom, $urandom};
      @(negedge clk); load = 1; d = word;
      @(negedge clk); load = 0; d = ~word;
      for (int b = 0; b < W; b++) begin
        checks++;
        if (q !== word[b]) begin failures++; $display("FAIL bit %0d", b); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
