`timescale 1ps/1ps
// tb_inv_en: exhaustive check of the inverter with enable; a disabled
// inverter must output 0 whatever its input.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_inv_en;
  logic in, en, out;
  int checks = 0, failures = 0;

  inv_en dut (.in_i(in), .en_i(en), .out_o(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 4; v++) begin
        {en, in} = 2'(v);
        #1;
        checks++;
        if (out !== (en ? !in : 1'b0)) begin
          failures++;
          $display("FAIL en=%b in=%b out=%b", en, in, out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
