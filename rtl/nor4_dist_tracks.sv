`timescale 1ps/1ps
// nor4_dist_tracks: the 64 long output tracks of one TLS and their
// distributed second-level NOR4 drivers (NOR4_DIST).
//
// Each HLRB output k (an INV_EN output) feeds four OPL inverter drivers on
// four neighbouring tracks. Each track is precharged high and is pulled low
// by any of its drivers whose input is high, so a track is the wired NOR of
// its four drivers, which come from four different HLRBs:
//   track[t] = ~|{ drv[h][k] : dist_track(h, k, c) == t }
// dist_track(h, k, c) = (8k + h + c) mod 64 is this design's wiring pattern;
// it meets the published rules (groups of four neighbouring identical
// outputs, four different HLRBs per track, no HLRB twice on one track).
// A track with no active driver reads 1. Combinational.
// Precharged tracks and four drivers per track follow the published
// design; the exact pattern above is this design's choice.
module nor4_dist_tracks
  import opl_pkg::*;
(
  input  logic [HLRBS-1:0][HLRB_ROWS-1:0] drv_i,    // [hlrb][output]
  output logic [TRACKS-1:0]               track_o
);

  always_comb begin
    logic [TRACKS-1:0] pull;
    pull = '0;
    for (int h = 0; h < HLRBS; h++)
      for (int k = 0; k < HLRB_ROWS; k++)
        for (int c = 0; c < DIST_COPIES; c++)
          pull[dist_track(h, k, c)] |= drv_i[h][k];
    track_o = ~pull;
  end

endmodule
