`timescale 1ps/1ps
// hlrb: hybrid logic-routing block, the configurable logic block of a TLS.
//
// Data flow (AND/NOR-AND-NOR, three levels):
//   1. eight MUX8/NOR2 selectors; MUX m chooses among input tracks
//      m, m+8, ..., m+56 and can also form a NOR2/AND2 of two of them,
//      so up to 16 of the 64 inputs enter the block;
//   2. PTG: eight product terms, each an AND of up to eight of the eight
//      local tracks in either polarity (with the MUX AND2s: up to AND16);
//   3. eight first-level NOR4_EN gates, those of rows 0-3 reading product
//      terms 0-3 and those of rows 4-7 reading terms 4-7, each followed by
//      an INV_EN. drv_o[k] is the INV_EN output of row k, i.e. the OR of the
//      enabled product terms of its group, or 0 when disabled. The TLS wires
//      each drv_o[k] to four long-track NOR4_DIST drivers.
// Row r of cfg_i configures MUX r, product term r, NOR4_EN r and INV_EN r.
// Combinational.
// The three-level structure and its gate counts follow the published HLRB;
// the selector-to-track pattern, the fixed split of the NOR4 rows between
// the two product-term groups and the row-wise configuration layout are
// this design's choices.
module hlrb
  import opl_pkg::*;
(
  input  logic          [TRACKS-1:0]    in_i,
  input  hlrb_row_cfg_t [HLRB_ROWS-1:0] cfg_i,
  output logic          [HLRB_ROWS-1:0] drv_o
);

  logic         [FANIN-1:0]            local_trk;
  logic         [FANIN-1:0]            pt;
  opt_inv_cfg_t [FANIN-1:0][FANIN-1:0] ptg_cfg;

  for (genvar m = 0; m < FANIN; m++) begin : g_mux
    logic [FANIN-1:0] cand;
    for (genvar j = 0; j < FANIN; j++) begin : g_cand
      assign cand[j] = in_i[mux_track(m, j)];
    end
    mux8_nor2 u_mux (.in_i(cand), .cfg_i(cfg_i[m].mux), .out_o(local_trk[m]));
    assign ptg_cfg[m] = cfg_i[m].ptg;
  end

  ptg_array u_ptg (.track_i(local_trk), .cfg_i(ptg_cfg), .pt_o(pt));

  for (genvar k = 0; k < HLRB_ROWS; k++) begin : g_out
    localparam int unsigned GRP = (k < HLRB_ROWS / 2) ? 0 : 4;
    logic nor1;
    nor4_en u_nor (.in_i(pt[GRP +: 4]), .en_i(cfg_i[k].nor_en), .out_o(nor1));
    inv_en  u_inv (.in_i(nor1), .en_i(cfg_i[k].inv_en), .out_o(drv_o[k]));
  end

endmodule
