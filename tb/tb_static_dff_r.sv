`timescale 1ps/1ps
// tb_static_dff_r: capture on the rising edge, hold otherwise, and an
// asynchronous reset that clears the output between clock edges.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_static_dff_r;
  logic clk = 0, rst, d, q;
  int checks = 0, failures = 0;
  logic exp;

  static_dff_r dut (.clk_i(clk), .rst_i(rst), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; d = 1;
    #2; checks++; if (q !== 0) failures++;
    @(negedge clk); rst = 0;
    exp = 0;
    for (int i = 0; i < 100; i++) begin
      d = 1'($urandom);
      @(posedge clk); #1;
      exp = d;
      checks++;
      if (q !== exp) begin failures++; $display("FAIL capture q=%b exp=%b", q, exp); end
      if (i % 10 == 5) begin
        d = 1; @(posedge clk); #1;       // make q = 1
        #2 rst = 1; #1;                  // reset in mid-cycle
        checks++;
        if (q !== 0) begin failures++; $display("FAIL async reset"); end
        @(negedge clk); rst = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
