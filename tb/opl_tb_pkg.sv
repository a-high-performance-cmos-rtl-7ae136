`timescale 1ps/1ps
// opl_tb_pkg: reference model and mapping helpers shared by the testbenches
// of the OPL logic core.
//
// The reference model is written from the Boolean view of the core rather
// than from its gates: an HLRB input selector yields the NOR of its enabled
// literals, a product term is the AND of its enabled local-track literals
// (true polarity for s0 = 1), a first-level output is the OR of the enabled
// product terms of its group, and a long track is the complement of the OR
// of its four drivers. The helpers build configuration words for the
// mappings used in the tests.
// The Boolean view follows the published gate functions; the helpers and
// the track pattern they mirror are this design's.
package opl_tb_pkg;
  import opl_pkg::*;

  typedef hlrb_row_cfg_t hlrb_cfg_t [HLRB_ROWS];

  function automatic logic [HLRB_ROWS-1:0] ref_hlrb(logic [TRACKS-1:0] in, hlrb_row_cfg_t cfg [HLRB_ROWS]);
    logic [FANIN-1:0] lt, pt;
    logic [HLRB_ROWS-1:0] drv;
    for (int m = 0; m < FANIN; m++) begin
      logic any;
      any = 1'b0;
      for (int j = 0; j < FANIN; j++)
        if (cfg[m].mux[j].s1)
          any |= cfg[m].mux[j].s0 ? in[8*j+m] : !in[8*j+m];
      lt[m] = !any;
    end
    for (int p = 0; p < FANIN; p++) begin
      logic all;
      all = 1'b1;
      for (int j = 0; j < FANIN; j++)
        if (cfg[p].ptg[j].s1)
          all &= cfg[p].ptg[j].s0 ? lt[j] : !lt[j];
      pt[p] = all;
    end
    for (int k = 0; k < HLRB_ROWS; k++) begin
      logic orv;
      orv = 1'b0;
      for (int i = 0; i < 4; i++)
        if (cfg[k].nor_en[i]) orv |= pt[(k/4)*4 + i];
      drv[k] = cfg[k].inv_en & orv;
    end
    return drv;
  endfunction

  // Track t is driven by copy c of output k of HLRB h where
  // h = (t - c) mod 8 and k = ((t - c - h) mod 64) / 8.
  function automatic logic [TRACKS-1:0] ref_tracks(logic [HLRBS-1:0][HLRB_ROWS-1:0] drv);
    logic [TRACKS-1:0] tr;
    for (int t = 0; t < TRACKS; t++) begin
      logic orv;
      orv = 1'b0;
      for (int c = 0; c < 4; c++) begin
        int h, k;
        h = (t - c + 64) % 8;
        k = ((t - c - h + 128) % 64) / 8;
        orv |= drv[h][k];
      end
      tr[t] = !orv;
    end
    return tr;
  endfunction

  function automatic logic [TRACKS-1:0] ref_tls(logic [TRACKS-1:0] in, hlrb_row_cfg_t cfg [ROWS]);
    logic [HLRBS-1:0][HLRB_ROWS-1:0] drv;
    hlrb_row_cfg_t c8 [HLRB_ROWS];
    for (int h = 0; h < HLRBS; h++) begin
      for (int r = 0; r < HLRB_ROWS; r++) c8[r] = cfg[8*h+r];
      drv[h] = ref_hlrb(in, c8);
    end
    return ref_tracks(drv);
  endfunction

  function automatic hlrb_row_cfg_t rand_row();
    hlrb_row_cfg_t r;
    r = hlrb_row_cfg_t'({$urandom, $urandom});
    return r;
  endfunction

  // Random row whose selectors have at most two enabled inputs (the mapping
  // rule) and whose product terms use about half of the tracks.
  function automatic hlrb_row_cfg_t rand_row_mapped();
    hlrb_row_cfg_t r;
    int a, b;
    r = rand_row();
    for (int j = 0; j < FANIN; j++) r.mux[j].s1 = 1'b0;
    a = $urandom_range(0, 7);
    b = $urandom_range(0, 7);
    r.mux[a].s1 = 1'b1;
    if ($urandom_range(0, 1) == 1) r.mux[b].s1 = 1'b1;
    return r;
  endfunction

  function automatic opt_inv_cfg_t lit(bit enable, bit true_pol);
    opt_inv_cfg_t c;
    c.s1 = enable;
    c.s0 = true_pol;
    return c;
  endfunction

endpackage
