`timescale 1ps/1ps
// tls: one three-level structure of the OPL logic core.
//
// Eight HLRBs in parallel all read the same group of 64 input tracks. Their
// 8 x 8 outputs drive the 64 long output tracks, where each track forms the
// wired NOR4 of four drivers from four different HLRBs. One TLS therefore
// computes, per output track, the NOR of up to 16 product terms of up to 16
// inputs each. Logic rows 8h..8h+7 of cfg_i belong to HLRB h.
// Combinational; in silicon its eight gate levels evaluate on six clock
// phases within one clock period.
// Follows the published TLS; the row numbering is this design's choice.
module tls
  import opl_pkg::*;
(
  input  logic          [TRACKS-1:0] in_i,
  input  hlrb_row_cfg_t [ROWS-1:0]   cfg_i,
  output logic          [TRACKS-1:0] out_o
);

  logic [HLRBS-1:0][HLRB_ROWS-1:0] drv;

  for (genvar h = 0; h < HLRBS; h++) begin : g_hlrb
    hlrb u_hlrb (
      .in_i  (in_i),
      .cfg_i (cfg_i[h*HLRB_ROWS +: HLRB_ROWS]),
      .drv_o (drv[h])
    );
  end

  nor4_dist_tracks u_tracks (.drv_i(drv), .track_o(out_o));

endmodule
