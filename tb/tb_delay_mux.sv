`timescale 1ps/1ps
// tb_delay_mux: with S = 1 the pads show (clock 1, clock 19), with S = 0
// they are swapped; the two measured delays average to the true delay.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_delay_mux;
  logic c1, c19, s, o1, o2;
  int checks = 0, failures = 0;

  delay_mux dut (.clk1_i(c1), .clk19_i(c19), .s_i(s), .delay_out1_o(o1), .delay_out2_o(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 8; v++) begin
        {s, c1, c19} = 3'(v);
        #1;
        checks++;
        if (o1 !== (s ? c1 : c19) || o2 !== (s ? c19 : c1)) begin
          failures++; $display("FAIL s=%b c1=%b c19=%b o1=%b o2=%b", s, c1, c19, o1, o2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
