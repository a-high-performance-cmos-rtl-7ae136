`timescale 1ps/1ps
// tb_static_dff: the flip-flop takes d on the rising edge only and holds
// through the rest of the period.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_static_dff;
  logic clk = 0, d, q;
  int checks = 0, failures = 0;

  static_dff dut (.clk_i(clk), .d_i(d), .q_o(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic v;
      @(negedge clk);
      v = 1'($urandom);
      d = v;
      @(posedge clk); #1;
      d = !v;                       // change d after the edge
      #2;
      checks++;
      if (q !== v) begin failures++; $display("FAIL q=%b exp=%b", q, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
