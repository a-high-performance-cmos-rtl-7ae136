`timescale 1ps/1ps
// tb_opl_plc_chip: end-to-end test of the logic core test chip at its
// default size (three TLSs, 64 rows, 113-bit configuration rows).
//
// 1. Programs all 64 configuration rows through the word-line and bit-line
//    chains, then reads rows back through the read-back chain.
// 2. Runs a mapping that crosses all three TLSs:
//      TLS 0: XOR of A and B made with two AND2 selectors and one product
//             term (the XOR mapping example), on track 0;
//      TLS 1: passes track 0 (inverting buffer);
//      TLS 2: passes track 0 again (po[0] = A ^ B); joins on track 1, by
//             the wired NOR4, the same path with a primary input P brought
//             in on track 40 of the group in front of TLS 2
//             (po[1] = (A ^ B) & ~P); and decodes a 16-bit address brought
//             in on tracks 16..31 with one AND16 (po[36] = ~(addr == M)).
// 3. Checks that results appear only at the capture phase (the 19th, 1470
//    ps after clock 1 with nominal separations), shifts them out through the
//    output chain, and measures the clock-1-to-capture delay on the two
//    delay pads in both multiplexer settings.
// Each mechanism is counted; one that never happened is a failure.
// Programming clocks are 40 ps pulses of their own; the core clock has a
// 4 ns period with inputs changed on its falling edge. The blocks exercised
// follow the published test chip; the mapping is this testbench's own.
module tb_opl_plc_chip;
  import opl_pkg::*;
  localparam int N = 3;
  localparam int RB = ROW_CFG_BITS * N + N - 1;

  logic clk_in = 0;
  logic [N-1:0][63:0] pi;
  logic wl_clk = 0, wl_rst, wl_d, bl_clk = 0, bl_s, bl_d, rb_clk = 0, rb_load, rb_q;
  logic oc_clk = 0, oc_load, oc_q, dly_s, d1, d2;
  logic [63:0] po_q;
  logic [6*N:0] ph;

  int checks = 0, failures = 0;
  int n_rows_written = 0, n_readback = 0, n_xor = 0, n_pass = 0, n_prim = 0;
  int n_wired = 0, n_and16 = 0, n_capture_wait = 0, n_shift_out = 0, n_dly_pos = 0, n_dly_neg = 0;

  opl_plc_chip dut (
    .clk_in_i(clk_in), .pi_i(pi),
    .wl_clk_i(wl_clk), .wl_rst_i(wl_rst), .wl_d_i(wl_d),
    .bl_clk_i(bl_clk), .bl_s_i(bl_s), .bl_d_i(bl_d),
    .rb_clk_i(rb_clk), .rb_load_i(rb_load), .rb_q_o(rb_q),
    .oc_clk_i(oc_clk), .oc_load_i(oc_load), .oc_q_o(oc_q),
    .dly_s_i(dly_s), .delay_out1_o(d1), .delay_out2_o(d2),
    .po_q_o(po_q), .clk_ph_o(ph)
  );

  hlrb_row_cfg_t cfg [N][64];
  logic          sel [N][64];
  logic [RB-1:0] rows [64];

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic pulse_wl(); #20 wl_clk = 1; #20 wl_clk = 0; endtask
  task automatic pulse_bl(); #20 bl_clk = 1; #20 bl_clk = 0; endtask
  task automatic pulse_rb(); #20 rb_clk = 1; #20 rb_clk = 0; endtask
  task automatic pulse_oc(); #20 oc_clk = 1; #20 oc_clk = 0; endtask

  task automatic open_row(int r);
    wl_rst = 1; #20 wl_rst = 0;
    wl_d = 1; pulse_wl(); wl_d = 0;
    repeat (r) pulse_wl();
  endtask

  task automatic program_all();
    open_row(0);
    for (int r = 0; r < 64; r++) begin
      bl_s = 0;
      for (int b = 0; b < RB; b++) begin bl_d = rows[r][b]; pulse_bl(); end
      bl_s = 1; pulse_bl(); bl_s = 0;
      n_rows_written++;
      pulse_wl();
    end
    wl_rst = 1; #20 wl_rst = 0;
  endtask

  task automatic readback(int r);
    open_row(r);
    rb_load = 1; pulse_rb(); rb_load = 0;
    for (int b = 0; b < RB; b++) begin
      checks++;
      if (rb_q !== rows[r][b]) begin fail($sformatf("readback row %0d bit %0d", r, b)); break; end
      pulse_rb();
    end
    n_readback++;
    wl_rst = 1; #20 wl_rst = 0;
  endtask

  localparam logic [15:0] MATCH = 16'hA5C3;

  task automatic build_config();
    foreach (cfg[t, r]) begin cfg[t][r] = '0; sel[t][r] = 1'b0; end
    // TLS 0, HLRB 0: XOR of A (tracks 0, 1) and B (tracks 8, 9)
    cfg[0][0].mux[0] = OPT_TRUE;  cfg[0][0].mux[1] = OPT_COMP;   // A'B
    cfg[0][1].mux[0] = OPT_COMP;  cfg[0][1].mux[1] = OPT_TRUE;   // AB'
    cfg[0][0].ptg[0] = OPT_COMP;  cfg[0][0].ptg[1] = OPT_COMP;   // XNOR
    cfg[0][0].nor_en = 4'b0001;   cfg[0][0].inv_en = 1'b1;       // track 0 = XOR
    // TLS 1 and 2, HLRB 0: track 0 -> term -> track 0 (inverting)
    for (int t = 1; t < N; t++) begin
      cfg[t][0].mux[0] = OPT_COMP;
      cfg[t][0].ptg[0] = OPT_TRUE;
      cfg[t][0].nor_en = 4'b0001;
      cfg[t][0].inv_en = 1'b1;
    end
    // TLS 2, HLRB 1 row 0: primary input on track 40 (MUX 0, candidate 5)
    sel[2][40] = 1'b1;
    cfg[2][8].mux[5] = OPT_COMP;
    cfg[2][8].ptg[0] = OPT_TRUE;
    cfg[2][8].nor_en = 4'b0001;
    cfg[2][8].inv_en = 1'b1;                                     // tracks 1..4
    // TLS 2, HLRB 4: AND16 of address tracks 16..31 equal to MATCH,
    // product term 4, NOR4_EN/INV_EN row 4 -> tracks 36..39
    for (int m = 0; m < 8; m++) begin
      sel[2][16+m] = 1'b1; sel[2][24+m] = 1'b1;
      cfg[2][32+m].mux[2] = MATCH[m]   ? OPT_COMP : OPT_TRUE;
      cfg[2][32+m].mux[3] = MATCH[m+8] ? OPT_COMP : OPT_TRUE;
      cfg[2][36].ptg[m]   = OPT_TRUE;
    end
    cfg[2][36].nor_en = 4'b0001;
    cfg[2][36].inv_en = 1'b1;
    for (int r = 0; r < 64; r++) begin
      for (int t = 0; t < N; t++) rows[r][ROW_CFG_BITS*t +: ROW_CFG_BITS] = cfg[t][r];
      for (int t = 1; t < N; t++) rows[r][ROW_CFG_BITS*N + t - 1] = sel[t][r];
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t1, t2;
    logic [63:0] prev;
    wl_rst = 1; wl_d = 0; bl_s = 0; bl_d = 0; rb_load = 0; oc_load = 0; dly_s = 1; pi = '0;
    #100;
    build_config();
    program_all();
    for (int r = 0; r < 64; r += 9) readback(r);
    readback(63);

    // logic operation: clk_in period 4 ns, inputs change on its falling edge
    for (int it = 0; it < 200; it++) begin
      logic a, b, p; logic [15:0] addr; logic [63:0] exp;
      a = 1'($urandom); b = 1'($urandom); p = 1'($urandom);
      addr = (it % 4 == 0) ? MATCH : 16'($urandom);
      pi = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      pi[0][0] = a; pi[0][1] = a; pi[0][8] = b; pi[0][9] = b;
      pi[2][40] = p;
      pi[2][31:16] = addr;
      // next capture
      prev = po_q;
      #10 clk_in = 1; t1 = $time;
      // just after the phase before the capture phase: outputs not yet taken
      @(posedge ph[6*N-1]); #1;
      checks++; n_capture_wait++;
      if (po_q !== prev) fail("outputs changed before the capture phase");
      @(posedge ph[6*N]); t2 = $time;
      #1;
      checks++;
      if (t2 - t1 != 1470) fail($sformatf("capture phase at +%0t", t2 - t1));
      checks++;
      if (po_q[0] !== (a ^ b)) fail("xor path"); else begin n_xor++; n_pass++; end
      checks++;
      if (po_q[1] !== ((a ^ b) & !p)) fail("wired nor4");
      else begin n_prim++; if ((a ^ b) && p) n_wired++; end
      checks++;
      if (po_q[36] !== !(addr == MATCH)) fail("and16 decode");
      else if (addr == MATCH) n_and16++;
      #2000 clk_in = 0;
      #989;
      // shift the captured outputs out every 20th operation
      if (it % 20 == 0) begin
        exp = po_q;
        oc_load = 1; pulse_oc(); oc_load = 0;
        for (int k = 0; k < 64; k++) begin
          checks++;
          if (oc_q !== exp[k]) begin fail($sformatf("output chain bit %0d", k)); break; end
          pulse_oc();
        end
        n_shift_out++;
      end
    end

    // delay measurement with both multiplexer settings
    for (int s = 1; s >= 0; s--) begin
      time e1, e2;
      dly_s = 1'(s);
      #100 clk_in = 1;
      fork
        begin @(posedge d1); e1 = $time; end
        begin @(posedge d2); e2 = $time; end
      join
      checks++;
      if (s == 1) begin
        if (e2 - e1 == 1470) n_dly_pos++; else fail("delay pads S=1");
      end else begin
        if (e1 - e2 == 1470) n_dly_neg++; else fail("delay pads S=0");
      end
      #3000 clk_in = 0; #2000;
    end

    $display("mechanisms: rows_written=%0d readback=%0d xor=%0d pass=%0d primary_in=%0d wired_nor4=%0d and16=%0d capture_wait=%0d shift_out=%0d delay_pos=%0d delay_neg=%0d",
             n_rows_written, n_readback, n_xor, n_pass, n_prim, n_wired, n_and16, n_capture_wait, n_shift_out, n_dly_pos, n_dly_neg);
    if (n_rows_written == 0) fail("no row written");
    if (n_readback == 0) fail("no read-back");
    if (n_xor == 0) fail("xor never seen");
    if (n_pass == 0) fail("pass never seen");
    if (n_prim == 0) fail("primary input never used");
    if (n_wired == 0) fail("wired nor never pulled by second driver");
    if (n_and16 == 0) fail("and16 never matched");
    if (n_capture_wait == 0) fail("capture timing never checked");
    if (n_shift_out == 0) fail("output chain never used");
    if (n_dly_pos == 0 || n_dly_neg == 0) fail("delay pads not measured in both settings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
