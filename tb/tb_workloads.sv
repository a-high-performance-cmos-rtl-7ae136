`timescale 1ps/1ps
// tb_workloads: runs the logic functions used to evaluate the core on the
// three-TLS logic array (plc_array at its default size), each mapped by
// hand onto selectors, product terms, NOR4 gates and long tracks, and each
// compared with a Boolean reference written directly from its equation.
//
//   XOR2            one product term of two AND2 selectors (track 0 = A^B)
//   MUX16-1         16 AND5 terms in four HLRBs, OR16 on one long track
//                   (track 3 = ~F)
//   16-bit decoder  the two-level NOR form: each selector is a NOR2 of two
//                   address literals, each product term picks one selector
//                   output in complement, a NOR4 gate ORs four terms and the
//                   wired NOR of two HLRBs gives the AND16; four decoders
//                   with different addresses in one TLS (tracks 1, 11, 21, 31)
//   9-bit parity    two TLSs: A, B, C (XOR3 as four AND3 terms) in the
//                   first, A^B^C in the second (even-parity terms, so the
//                   track carries F itself)
//   4-bit CLA adder the low bits of the carry-lookahead adder scheme in two
//                   TLSs: generate/propagate from the selectors, carries and
//                   half sums in the first TLS, sums and carry-out in the
//                   second (checked exhaustively)
//   random logic    the ten-input, nine-term example (x on track 1 from
//                   two HLRBs, y on track 34 from two HLRBs); the terms are
//                   taken from its truth table (track 1 = ~x, track 34 = ~y)
//
// Single-level functions sit in the last TLS and get their inputs from the
// primary-input select of its track group; the parity tree uses the last
// two TLSs, as do the adder bits. The full 16-bit adder and the multiplier are
// not run (see README).
// Every mapped output is a track, so it is the complement of the OR of the
// product terms driving it; that is why several outputs are checked as ~F.
// The functions come from the published evaluation; the mappings onto this
// design's track and selector pattern are its own, and outputs are checked
// after a 1 ps settling step since the array is combinational.
module tb_workloads;
  import opl_pkg::*;
  import opl_tb_pkg::*;
  localparam int N = 3;

  logic          [N-1:0][TRACKS-1:0] pi;
  hlrb_row_cfg_t [N-1:0][ROWS-1:0]   cfg;
  logic          [N-1:1][TRACKS-1:0] sel;
  logic          [TRACKS-1:0]        po;

  int checks = 0, failures = 0;
  int n_xor = 0, n_mux = 0, n_dec = 0, n_par = 0, n_rnd = 0, n_add = 0;

  plc_array #(.NUM_TLS(N)) dut (.pi_i(pi), .cfg_i(cfg), .in_sel_i(sel), .po_o(po));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear();
    cfg = '0; sel = '0; pi = '0;
  endtask

  // selector m of HLRB h in TLS t passes track 8j+m unchanged to the
  // product-term stage (complementing inverter + NOR = the value itself)
  task automatic mux_in(int t, int h, int m, int j);
    cfg[t][8*h + m].mux[j] = OPT_COMP;
  endtask

  // literal of selector m in product term p: pol 1 = true, 0 = complement
  task automatic term_lit(int t, int h, int p, int m, bit pol);
    cfg[t][8*h + p].ptg[m] = pol ? OPT_TRUE : OPT_COMP;
  endtask

  task automatic out_row(int t, int h, int k, logic [3:0] en);
    cfg[t][8*h + k].nor_en = en;
    cfg[t][8*h + k].inv_en = 1'b1;
  endtask

  task automatic check(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  localparam logic [15:0] DEC_ADDR [4] = '{16'h0000, 16'hFFFF, 16'h1234, 16'hBEEF};
  localparam int          DEC_TRK  [4] = '{1, 11, 21, 31};

  initial begin
    // ---------------------------------------------------------------- XOR2
    clear();
    sel[2] = '1;
    cfg[2][0].mux[0] = OPT_TRUE; cfg[2][0].mux[1] = OPT_COMP;   // ~A & B
    cfg[2][1].mux[0] = OPT_COMP; cfg[2][1].mux[1] = OPT_TRUE;   // A & ~B
    term_lit(2, 0, 0, 0, 0); term_lit(2, 0, 0, 1, 0);
    out_row(2, 0, 0, 4'b0001);
    for (int v = 0; v < 4; v++) begin
      bit a, b;
      {a, b} = 2'(v);
      pi[2] = '0; pi[2][0] = a; pi[2][1] = a; pi[2][8] = b; pi[2][9] = b;
      #1;
      check(po[0], a ^ b, "xor"); n_xor++;
    end

    // ------------------------------------------------------------- MUX16-1
    // S0..S3 on tracks 0..3, A(4h+q) on track 8(1+h)+4+q; HLRB h holds
    // the terms of A(4h)..A(4h+3) in product terms 0..3.
    clear();
    sel[2] = '1;
    for (int h = 0; h < 4; h++) begin
      for (int m = 0; m < 4; m++) mux_in(2, h, m, 0);
      for (int q = 0; q < 4; q++) mux_in(2, h, 4 + q, 1 + h);
      for (int q = 0; q < 4; q++) begin
        int i;
        i = 4 * h + q;
        for (int b = 0; b < 4; b++) term_lit(2, h, q, b, i[b]);
        term_lit(2, h, q, 4 + q, 1'b1);
      end
      out_row(2, h, 0, 4'b1111);
    end
    for (int it = 0; it < 4000; it++) begin
      logic [3:0] s; logic [15:0] a;
      s = 4'(it); a = 16'($urandom);
      pi[2] = {$urandom, $urandom};
      pi[2][3:0] = s;
      for (int i = 0; i < 16; i++) pi[2][8 * (1 + i / 4) + 4 + i % 4] = a[i];
      #1;
      check(po[3], !a[s], "mux16"); n_mux++;
    end

    // ------------------------------------------------------ 16-bit decoder
    // address bit i on track i; selector m of HLRB h = NOR2 of the mismatch
    // literals of bits m and m+8; HLRB 2d uses selectors 0..3, HLRB 2d+1
    // selectors 4..7, both on NOR4 row d.
    clear();
    sel[2] = '1;
    for (int d = 0; d < 4; d++) begin
      for (int e = 0; e < 2; e++) begin
        int h;
        h = 2 * d + e;
        for (int m = 0; m < 8; m++) begin
          cfg[2][8*h + m].mux[0] = DEC_ADDR[d][m]     ? OPT_COMP : OPT_TRUE;
          cfg[2][8*h + m].mux[1] = DEC_ADDR[d][m + 8] ? OPT_COMP : OPT_TRUE;
        end
        for (int p = 0; p < 4; p++) term_lit(2, h, p, 4 * e + p, 1'b0);
        out_row(2, h, d, 4'b1111);
      end
    end
    for (int it = 0; it < 2000; it++) begin
      logic [15:0] addr;
      addr = (it % 5 == 0) ? DEC_ADDR[(it / 5) % 4] : 16'($urandom);
      if (it % 7 == 0) addr = DEC_ADDR[it % 4] ^ (16'h1 << (it % 16));
      pi[2] = {$urandom, $urandom};
      pi[2][15:0] = addr;
      #1;
      for (int d = 0; d < 4; d++) check(po[DEC_TRK[d]], addr == DEC_ADDR[d], "decoder");
      n_dec++;
    end

    // ------------------------------------------------------ 9-bit parity
    // a1..a9 on tracks 1..9 of the group in front of TLS 1.
    clear();
    sel[1] = '1;
    // A = a9^a8^a7 in HLRB 0 (selectors 7, 0, 1), row 0 -> track 0 = ~A
    mux_in(1, 0, 7, 0); mux_in(1, 0, 0, 1); mux_in(1, 0, 1, 1);
    // B = a6^a5^a4 in HLRB 4 (selectors 6, 5, 4), row 0 -> track 4 = ~B
    mux_in(1, 4, 6, 0); mux_in(1, 4, 5, 0); mux_in(1, 4, 4, 0);
    // C = a3^a2^a1 in HLRB 2 (selectors 3, 2, 1), row 2 -> track 18 = ~C
    mux_in(1, 2, 3, 0); mux_in(1, 2, 2, 0); mux_in(1, 2, 1, 0);
    for (int p = 0; p < 4; p++) begin
      // odd-parity minterms x y z: 111, 001, 010, 100
      logic [2:0] mt;
      mt = (p == 0) ? 3'b111 : (p == 1) ? 3'b001 : (p == 2) ? 3'b010 : 3'b100;
      term_lit(1, 0, p, 1, mt[2]); term_lit(1, 0, p, 0, mt[1]); term_lit(1, 0, p, 7, mt[0]);
      term_lit(1, 4, p, 6, mt[2]); term_lit(1, 4, p, 5, mt[1]); term_lit(1, 4, p, 4, mt[0]);
      term_lit(1, 2, p, 3, mt[2]); term_lit(1, 2, p, 2, mt[1]); term_lit(1, 2, p, 1, mt[0]);
    end
    out_row(1, 0, 0, 4'b1111); out_row(1, 4, 0, 4'b1111); out_row(1, 2, 2, 4'b1111);
    // second level, HLRB 0: ~A (track 0, selector 0), ~B (track 4,
    // selector 4), ~C (track 18, selector 2); true-polarity inverter gives
    // A, B, C. Even-parity terms so that the track carries F.
    cfg[2][0].mux[0] = OPT_TRUE; cfg[2][4].mux[0] = OPT_TRUE; cfg[2][2].mux[2] = OPT_TRUE;
    for (int p = 0; p < 4; p++) begin
      logic [2:0] mt;
      mt = (p == 0) ? 3'b000 : (p == 1) ? 3'b011 : (p == 2) ? 3'b101 : 3'b110;
      term_lit(2, 0, p, 0, mt[2]); term_lit(2, 0, p, 4, mt[1]); term_lit(2, 0, p, 2, mt[0]);
    end
    out_row(2, 0, 0, 4'b1111);
    for (int v = 0; v < 512; v++) begin
      logic [9:1] a;
      a = 9'(v);
      pi[1] = {$urandom, $urandom};
      pi[1][9:1] = a;
      #1;
      check(po[0], ^a, "parity"); n_par++;
    end

    // ------------------------------------------------------ random logic
    // a..j on tracks 0..9. HLRB 0: m n o p (terms 0-3, row 0) and r s
    // (terms 4-5, row 4); HLRB 1: q (term 0, row 0); HLRB 2: t u
    // (terms 4-5, row 4). Track 1 = ~x, track 34 = ~y.
    clear();
    sel[2] = '1;
    for (int m = 0; m < 8; m++) begin mux_in(2, 0, m, 0); mux_in(2, 1, m, 0); end
    mux_in(2, 2, 5, 0); mux_in(2, 2, 6, 0); mux_in(2, 2, 7, 0);
    mux_in(2, 2, 0, 1); mux_in(2, 2, 1, 1);
    begin
      // rows of the truth table over a..j: '0', '1', or '-' (don't care)
      string tt [9];
      tt = '{"01-00-----", "--00-11---", "---0-01---", "1--0--0---", "1-10011---",
             "-010001---", "-1000-1---", "-----10010", "-----11111"};
      for (int r = 0; r < 9; r++) begin
        int h, p;
        h = (r < 4 || r == 5 || r == 6) ? 0 : (r == 4) ? 1 : 2;
        p = (r < 4) ? r : (r == 4) ? 0 : (r == 5 || r == 7) ? 4 : 5;
        for (int c = 0; c < 10; c++) begin
          int m;
          m = c % 8;     // i and j are selectors 0 and 1 (candidate 1)
          if (tt[r][c] != "-") term_lit(2, h, p, m, tt[r][c] == "1");
        end
      end
      out_row(2, 0, 0, 4'b1111); out_row(2, 1, 0, 4'b0001);
      out_row(2, 0, 4, 4'b0011); out_row(2, 2, 4, 4'b0011);
    end
    for (int v = 0; v < 1024; v++) begin
      bit a, b, c, d, e, f, g, h, i, j, x, y;
      {j, i, h, g, f, e, d, c, b, a} = 10'(v);
      pi[2] = {$urandom, $urandom};
      pi[2][9:0] = 10'(v);
      // terms from the truth table
      x = (!a && b && !d && !e) || (!c && !d && f && g) || (!d && !f && g) ||
          (a && !d && !g) || (a && c && !d && !e && f && g);
      y = (!b && c && !d && !e && !f && g) || (b && !c && !d && !e && g) ||
          (f && !g && !h && i && !j) || (f && g && h && i && j);
      #1;
      check(po[1], !x, "random x"); check(po[34], !y, "random y"); n_rnd++;
    end

    // ------------------------------------------- 4-bit carry-lookahead adder
    // The lower four bits of the published adder scheme in two TLSs.
    // Level 1 (TLS 1, inputs from the primary-input select):
    //   selectors 0-3 form G(i) = a(i)&b(i) (AND2, a(i) on track i, b(i) on
    //   track 8+i); selectors 4-6 form ~P(1..3) and selector 7 ~P(0)
    //   (NOR2, a on track 16+m, b on track 24+m), identical in HLRBs 0, 1.
    //   HLRB 0: C4 (4 terms, row 0), C3 (3 terms, row 4), C1 (row 5);
    //   HLRB 1: C2 (2 terms, row 1) and half sums H(i) = P(i)&~G(i)
    //   (rows 4-7). Tracks: ~C4 0, ~C2 12, ~C3 32, ~H0 36, ~C1 40, ~H1 44,
    //   ~H2 49, ~H3 60.
    // Level 2 (TLS 2): S0 = H0 on track 0, C4 on track 9, S(i) = H(i)^C(i)
    //   as XNOR terms of two selectors in HLRBs 2, 3, 4 (tracks 21, 30, 39).
    clear();
    sel[1] = '1;
    for (int h = 0; h < 2; h++) begin
      for (int m = 0; m < 4; m++) begin
        cfg[1][8*h + m].mux[0] = OPT_COMP; cfg[1][8*h + m].mux[1] = OPT_COMP;
      end
      for (int m = 4; m < 8; m++) begin
        cfg[1][8*h + m].mux[2] = OPT_TRUE; cfg[1][8*h + m].mux[3] = OPT_TRUE;
      end
    end
    // HLRB 0: C4 = G3 + P3G2 + P3P2G1 + P3P2P1G0 (terms 0-3, row 0)
    term_lit(1, 0, 0, 3, 1);
    term_lit(1, 0, 1, 6, 0); term_lit(1, 0, 1, 2, 1);
    term_lit(1, 0, 2, 6, 0); term_lit(1, 0, 2, 5, 0); term_lit(1, 0, 2, 1, 1);
    term_lit(1, 0, 3, 6, 0); term_lit(1, 0, 3, 5, 0); term_lit(1, 0, 3, 4, 0); term_lit(1, 0, 3, 0, 1);
    out_row(1, 0, 0, 4'b1111);
    // C3 = G2 + P2G1 + P2P1G0 (terms 4-6, row 4); C1 = G0 (term 7, row 5)
    term_lit(1, 0, 4, 2, 1);
    term_lit(1, 0, 5, 5, 0); term_lit(1, 0, 5, 1, 1);
    term_lit(1, 0, 6, 5, 0); term_lit(1, 0, 6, 4, 0); term_lit(1, 0, 6, 0, 1);
    out_row(1, 0, 4, 4'b0111);
    term_lit(1, 0, 7, 0, 1);
    out_row(1, 0, 5, 4'b1000);
    // HLRB 1: C2 = G1 + P1G0 (terms 0-1, row 1); H(i) in terms 4-7, rows 4-7
    term_lit(1, 1, 0, 1, 1);
    term_lit(1, 1, 1, 4, 0); term_lit(1, 1, 1, 0, 1);
    out_row(1, 1, 1, 4'b0011);
    for (int i = 0; i < 4; i++) begin
      term_lit(1, 1, 4 + i, (i == 0) ? 7 : i + 3, 0);   // P(i)
      term_lit(1, 1, 4 + i, i, 0);                      // ~G(i)
      out_row(1, 1, 4 + i, 4'(1 << i));
    end
    // level 2: a selector with one true-polarity input turns ~X back into X
    cfg[2][0 + 4].mux[4] = OPT_TRUE;  term_lit(2, 0, 0, 4, 0);          // ~H0
    out_row(2, 0, 0, 4'b0001);                                         // track 0 = S0
    cfg[2][0 + 0].mux[0] = OPT_TRUE;  term_lit(2, 0, 1, 0, 0);          // ~C4
    out_row(2, 0, 1, 4'b0010);                                         // track 9 = C4
    cfg[2][16 + 4].mux[5] = OPT_TRUE; cfg[2][16 + 0].mux[5] = OPT_TRUE; // H1 (44), C1 (40)
    cfg[2][24 + 1].mux[6] = OPT_TRUE; cfg[2][24 + 4].mux[1] = OPT_TRUE; // H2 (49), C2 (12)
    cfg[2][32 + 4].mux[7] = OPT_TRUE; cfg[2][32 + 0].mux[4] = OPT_TRUE; // H3 (60), C3 (32)
    begin
      int hh [3], mh [3], mc [3], pp [3];
      hh = '{2, 3, 4}; mh = '{4, 1, 4}; mc = '{0, 4, 0}; pp = '{0, 0, 4};
      for (int q = 0; q < 3; q++) begin
        term_lit(2, hh[q], pp[q],     mh[q], 1); term_lit(2, hh[q], pp[q],     mc[q], 1);
        term_lit(2, hh[q], pp[q] + 1, mh[q], 0); term_lit(2, hh[q], pp[q] + 1, mc[q], 0);
        out_row(2, hh[q], hh[q], 4'b0011);
      end
    end
    for (int v = 0; v < 256; v++) begin
      logic [3:0] a, b; logic [4:0] sum;
      {a, b} = 8'(v);
      sum = {1'b0, a} + {1'b0, b};
      pi[1] = {$urandom, $urandom};
      for (int i = 0; i < 4; i++) begin
        pi[1][i] = a[i]; pi[1][8 + i] = b[i];
      end
      for (int m = 4; m < 8; m++) begin
        int i;
        i = (m == 7) ? 0 : m - 3;
        pi[1][16 + m] = a[i]; pi[1][24 + m] = b[i];
      end
      #1;
      check(po[0],  sum[0], "adder S0");
      check(po[21], sum[1], "adder S1");
      check(po[30], sum[2], "adder S2");
      check(po[39], sum[3], "adder S3");
      check(po[9],  sum[4], "adder C4");
      n_add++;
    end

    $display("workloads: xor=%0d mux16=%0d decoder=%0d parity=%0d random=%0d adder4=%0d",
             n_xor, n_mux, n_dec, n_par, n_rnd, n_add);
    if (n_xor == 0 || n_mux == 0 || n_dec == 0 || n_par == 0 || n_rnd == 0 || n_add == 0) begin
      failures++;
      $display("FAIL a workload was not run");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
