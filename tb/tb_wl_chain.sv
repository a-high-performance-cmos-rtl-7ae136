`timescale 1ps/1ps
// tb_wl_chain: a single pulse walks through all word lines, exactly one
// line high per clock; reset clears all lines at once.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_wl_chain;
  localparam int ROWS = 64;
  logic clk = 0, rst, d; logic [ROWS-1:0] wl;
  int checks = 0, failures = 0;

  wl_chain #(.ROWS(ROWS)) dut (.clk_i(clk), .rst_i(rst), .d_i(d), .wl_o(wl));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 0;
    #3; checks++; if (wl !== '0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst = 0; d = 1;
    @(negedge clk); d = 0;
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (wl !== (64'd1 << r)) begin failures++; $display("FAIL row %0d wl=%h", r, wl); end
      @(negedge clk);
    end
    checks++;
    if (wl !== '0) begin failures++; $display("FAIL after last row"); end
    d = 1; @(negedge clk); d = 0; @(negedge clk); @(negedge clk);
    rst = 1; #1;
    checks++;
    if (wl !== '0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
