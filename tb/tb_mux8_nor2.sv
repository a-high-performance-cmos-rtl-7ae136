`timescale 1ps/1ps
// tb_mux8_nor2: checks the OPL multiplexer in its three uses (inverting 8:1
// multiplexer, NOR2, AND2) and on random settings with at most two enabled
// inputs; an assertion flags settings that break that mapping rule.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_mux8_nor2;
  import opl_pkg::*;
  logic [7:0] in; opt_inv_cfg_t [7:0] cfg; logic out;
  int checks = 0, failures = 0;
  int n_mux = 0, n_nor2 = 0, n_and2 = 0;

  mux8_nor2 dut (.in_i(in), .cfg_i(cfg), .out_o(out));

  function automatic int enabled_count(opt_inv_cfg_t [7:0] c);
    int n = 0;
    for (int j = 0; j < 8; j++) n += int'(c[j].s1);
    return n;
  endfunction

  task automatic check(logic exp, string what);
    #1;
    checks++;
    assert (enabled_count(cfg) <= 2) else $error("more than two inputs enabled");
    if (out !== exp) begin
      failures++;
      $display("FAIL %s in=%b out=%b exp=%b", what, in, out, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      int a, b;
      in = 8'($urandom);
      a = $urandom_range(0, 7);
      b = (a + 1 + $urandom_range(0, 6)) % 8;
      // 8:1 multiplexer: output is the complement of the selected input
      cfg = '0; cfg[a] = OPT_TRUE;
      check(!in[a], "mux"); n_mux++;
      // NOR2
      cfg = '0; cfg[a] = OPT_TRUE; cfg[b] = OPT_TRUE;
      check(!(in[a] | in[b]), "nor2"); n_nor2++;
      // AND2 from complemented inputs
      cfg = '0; cfg[a] = OPT_COMP; cfg[b] = OPT_COMP;
      check(in[a] & in[b], "and2"); n_and2++;
      // nothing enabled: precharged output stays 1
      cfg = '0;
      check(1'b1, "none");
    end
    if (n_mux == 0 || n_nor2 == 0 || n_and2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
