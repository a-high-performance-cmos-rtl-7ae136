`timescale 1ps/1ps
// tb_ptg_array: product terms as ANDs of chosen track literals; includes a
// full AND8 and random settings compared with the Boolean definition.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_ptg_array;
  import opl_pkg::*;
  logic [7:0] trk; opt_inv_cfg_t [7:0][7:0] cfg; logic [7:0] pt;
  int checks = 0, failures = 0;

  ptg_array dut (.track_i(trk), .cfg_i(cfg), .pt_o(pt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // AND8 of all true literals in term 0, AND8 of all complements in term 1
    for (int v = 0; v < 256; v++) begin
      cfg = '0;
      for (int j = 0; j < 8; j++) begin cfg[0][j] = OPT_TRUE; cfg[1][j] = OPT_COMP; end
      trk = 8'(v);
      #1;
      checks++;
      if (pt[0] !== (&trk) || pt[1] !== (trk == 8'h00) || pt[7:2] !== 6'h3f) begin
        failures++;
        $display("FAIL and8 trk=%h pt=%b", trk, pt);
      end
    end
    for (int it = 0; it < 500; it++) begin
      logic [7:0] exp;
      for (int p = 0; p < 8; p++) for (int j = 0; j < 8; j++) cfg[p][j] = opt_inv_cfg_t'($urandom_range(0, 3));
      trk = 8'($urandom);
      #1;
      for (int p = 0; p < 8; p++) begin
        exp[p] = 1'b1;
        for (int j = 0; j < 8; j++)
          if (cfg[p][j].s1) exp[p] &= cfg[p][j].s0 ? trk[j] : !trk[j];
      end
      checks++;
      if (pt !== exp) begin
        failures++;
        $display("FAIL rand trk=%h pt=%b exp=%b", trk, pt, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
