`timescale 1ps/1ps
// tb_hlrb: HLRB mappings. The XOR example (two AND2 selectors, a product
// term of their outputs, the NOR levels as a pass path), an AND16 made of
// eight AND2 selectors and one AND8 product term, a NOR of product terms
// over both groups, and random configurations against the reference model.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_hlrb;
  import opl_pkg::*;
  import opl_tb_pkg::*;
  logic [63:0] in; hlrb_row_cfg_t [7:0] cfg; logic [7:0] drv;
  int checks = 0, failures = 0;

  hlrb dut (.in_i(in), .cfg_i(cfg), .drv_o(drv));

  function automatic logic [7:0] model();
    hlrb_row_cfg_t c [8];
    for (int r = 0; r < 8; r++) c[r] = cfg[r];
    return ref_hlrb(in, c);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // XOR of A and B. A MUX only sees its own tracks, so A and B are put
    // on tracks 0 and 8 (both reach MUX 0) and on tracks 1 and 9 (MUX 1).
    cfg = '0;
    cfg[0].mux[0] = OPT_TRUE;  cfg[0].mux[1] = OPT_COMP;   // NOR(A, B') = A'B
    cfg[1].mux[0] = OPT_COMP;  cfg[1].mux[1] = OPT_TRUE;   // NOR(A', B) = AB'
    cfg[0].ptg[0] = OPT_COMP;  cfg[0].ptg[1] = OPT_COMP;   // term 0 = NOR(A'B, AB') = XNOR
    cfg[0].nor_en = 4'b0001;   cfg[0].inv_en = 1'b1;        // drv[0] = XNOR
    for (int v = 0; v < 4; v++) begin
      logic a, b;
      {a, b} = 2'(v);
      in = {$urandom, $urandom};
      in[0] = a; in[8] = b; in[1] = a; in[9] = b;
      #1;
      checks++;
      if (drv[0] !== !(a ^ b) || drv[7:1] !== '0) begin
        failures++;
        $display("FAIL xor a=%b b=%b drv=%b", a, b, drv);
      end
    end
    // AND16 of complemented a0..a15 (row decoder output for address 0)
    // plus an address-dependent variant; a_i sits on track i.
    for (int it = 0; it < 200; it++) begin
      logic [15:0] addr, match;
      match = (it < 100) ? 16'h0000 : 16'($urandom);
      cfg = '0;
      for (int m = 0; m < 8; m++) begin
        cfg[m].mux[0] = match[m]   ? OPT_COMP : OPT_TRUE;
        cfg[m].mux[1] = match[m+8] ? OPT_COMP : OPT_TRUE;
        cfg[3].ptg[m] = OPT_TRUE;
      end
      cfg[2].nor_en = 4'b1000; cfg[2].inv_en = 1'b1;   // NOR4_EN row 2 reads term 3
      addr = (it % 3 == 0) ? match : 16'($urandom);
      in = {$urandom, $urandom};
      in[15:0] = addr;
      #1;
      checks++;
      if (drv[2] !== (addr == match) || drv !== model()) begin
        failures++;
        $display("FAIL and16 addr=%h match=%h drv=%b", addr, match, drv);
      end
    end
    // group 1: NOR4_EN rows 4..7 read terms 4..7 only
    cfg = '0;
    cfg[4].ptg[0] = OPT_TRUE; cfg[5].ptg[1] = OPT_TRUE; cfg[0].ptg[2] = OPT_TRUE;
    for (int m = 0; m < 8; m++) cfg[m].mux[0] = OPT_TRUE;
    cfg[6].nor_en = 4'b1111; cfg[6].inv_en = 1'b1;
    cfg[1].nor_en = 4'b1111; cfg[1].inv_en = 1'b0;
    for (int v = 0; v < 8; v++) begin
      in = '0; in[2:0] = 3'(v);
      #1;
      checks++;
      // local track m = ~in[m]; term4 = ~in0, term5 = ~in1; terms 6,7 empty = 1
      if (drv[6] !== 1'b1 || drv[1] !== 1'b0) begin
        failures++;
        $display("FAIL group drv=%b", drv);
      end
    end
    cfg[6].nor_en = 4'b0011;
    for (int v = 0; v < 8; v++) begin
      in = '0; in[2:0] = 3'(v);
      #1;
      checks++;
      if (drv[6] !== (!in[0] | !in[1])) begin
        failures++;
        $display("FAIL group1 or drv=%b in=%b", drv, in[2:0]);
      end
    end
    // random configurations against the reference model
    for (int it = 0; it < 2000; it++) begin
      for (int r = 0; r < 8; r++) cfg[r] = (it % 2) ? rand_row() : rand_row_mapped();
      in = {$urandom, $urandom};
      #1;
      checks++;
      if (drv !== model()) begin
        failures++;
        $display("FAIL random drv=%b exp=%b", drv, model());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
