`timescale 1ps/1ps
// tb_sdff_column: the column samples all outputs on the rising clock edge
// (zero setup: data arriving just before the edge is taken) and holds
// them until the next rising edge.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_sdff_column;
  localparam int W = 64;
  logic clk = 0; logic [W-1:0] d, q, v;
  int checks = 0, failures = 0;

  sdff_column #(.WIDTH(W)) dut (.clk_i(clk), .d_i(d), .q_o(q));

  always #500 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      #499 v = {$urandom, $urandom}; d = v;   // 1 ps before the rising edge
      @(posedge clk); #1;
      d = ~v;
      #700;                                    // through the falling edge
      checks++;
      if (q !== v) begin failures++; $display("FAIL q=%h exp=%h", q, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
