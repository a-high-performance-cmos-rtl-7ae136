`timescale 1ps/1ps
// tb_opt_inv: exhaustive check of the optional inverter against its three
// states (pass, invert, disabled low).
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_opt_inv;
  import opl_pkg::*;
  logic in; opt_inv_cfg_t cfg; logic out;
  int checks = 0, failures = 0;

  opt_inv dut (.in_i(in), .cfg_i(cfg), .out_o(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 8; v++) begin
        logic exp;
        {cfg.s1, cfg.s0, in} = 3'(v);
        #1;
        case ({cfg.s1, cfg.s0})
          2'b11: exp = in;
          2'b10: exp = !in;
          default: exp = 1'b0;
        endcase
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL s1=%b s0=%b in=%b out=%b exp=%b", cfg.s1, cfg.s0, in, out, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
