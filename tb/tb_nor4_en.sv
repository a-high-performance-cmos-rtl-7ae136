`timescale 1ps/1ps
// tb_nor4_en: exhaustive check of the first-level NOR4 with enables.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_nor4_en;
  logic [3:0] in, en; logic out;
  int checks = 0, failures = 0;

  nor4_en dut (.in_i(in), .en_i(en), .out_o(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic exp;
      {en, in} = 8'(v);
      #1;
      exp = 1'b1;
      for (int i = 0; i < 4; i++) if (en[i] && in[i]) exp = 1'b0;
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL en=%b in=%b out=%b", en, in, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
