`timescale 1ps/1ps
// tb_rb_chain: parallel load of a row, then serial read-out with bit 0
// first.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_rb_chain;
  localparam int BITS = 113;
  logic clk = 0, load, q; logic [BITS-1:0] row, word;
  int checks = 0, failures = 0;

  rb_chain #(.BITS(BITS)) dut (.clk_i(clk), .load_i(load), .row_i(row), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 5; rep++) begin
      word = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); load = 1; row = word;
      @(negedge clk); load = 0; row = ~word;
      for (int b = 0; b < BITS; b++) begin
        checks++;
        if (q !== word[b]) begin failures++; $display("FAIL bit %0d", b); end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
