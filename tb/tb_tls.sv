`timescale 1ps/1ps
// tb_tls: one TLS. A NOR of 16 product terms assembled from four HLRBs on
// one long track (wired NOR4 of first-level NOR4s), and random
// configurations against the reference model.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_tls;
  import opl_pkg::*;
  import opl_tb_pkg::*;
  logic [63:0] in, out; hlrb_row_cfg_t [63:0] cfg;
  int checks = 0, failures = 0;

  tls dut (.in_i(in), .cfg_i(cfg), .out_o(out));

  function automatic logic [63:0] model();
    hlrb_row_cfg_t c [64];
    for (int r = 0; r < 64; r++) c[r] = cfg[r];
    return ref_tls(in, c);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Track 3 collects output 0 of HLRBs 0..3. Each HLRB makes four
    // single-literal terms: term q of HLRB h = in[4h+q] (track 4h+q is in
    // MUX (4h+q)%8). Track 3 = NOR of in[15:0].
    cfg = '0;
    for (int h = 0; h < 4; h++) begin
      for (int q = 0; q < 4; q++) begin
        int t, m;
        t = 4*h + q; m = t % 8;
        cfg[8*h+m].mux[t/8] = OPT_COMP;        // local track m = in[t]
        cfg[8*h+q].ptg[m]   = OPT_TRUE;        // term q = in[t]
      end
      cfg[8*h].nor_en = 4'b1111;
      cfg[8*h].inv_en = 1'b1;
    end
    for (int it = 0; it < 300; it++) begin
      in = {$urandom, $urandom};
      if (it % 4 == 0) in[15:0] = '0;
      if (it % 4 == 1) in[15:0] = 16'(1 << (it % 16));
      #1;
      checks++;
      if (out[3] !== (in[15:0] == 0) || out !== model()) begin
        failures++;
        $display("FAIL nor16 in=%h out3=%b", in[15:0], out[3]);
      end
    end
    for (int it = 0; it < 300; it++) begin
      for (int r = 0; r < 64; r++) begin
        cfg[r] = rand_row_mapped();
        cfg[r].inv_en = ($urandom_range(0, 3) == 0);
      end
      in = {$urandom, $urandom};
      #1;
      checks++;
      if (out !== model()) begin
        failures++;
        $display("FAIL random out=%h exp=%h", out, model());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
