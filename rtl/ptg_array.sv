`timescale 1ps/1ps
// ptg_array: the product-term generator (PTG) part of an HLRB.
//
// The eight local tracks (the outputs of the eight MUX8/NOR2 selectors) are
// each buffered by an OPL inverter. Product term p is then the NOR of eight
// optional inverters, one per buffered track, configured by cfg_i[p]. Since
// the buffer inverts, an OPT_INV set to "true" contributes the complement
// of the track to the NOR, i.e. the track itself as an AND literal:
//   pt[p] = AND over enabled j of (cfg[p][j].s0 ? track[j] : ~track[j])
// All eight product terms share the same eight tracks, as in the published
// PTG. With no input enabled a product term is 1. Combinational.
// The structure follows the published PTG; product term p taking its
// settings from logic row p is this design's choice.
module ptg_array
  import opl_pkg::*;
(
  input  logic         [FANIN-1:0]            track_i,
  input  opt_inv_cfg_t [FANIN-1:0][FANIN-1:0] cfg_i,   // [term][track]
  output logic         [FANIN-1:0]            pt_o
);

  logic [FANIN-1:0] buf_n;   // outputs of the OPL inverters

  assign buf_n = ~track_i;

  for (genvar p = 0; p < FANIN; p++) begin : g_term
    logic [FANIN-1:0] lit;
    for (genvar j = 0; j < FANIN; j++) begin : g_opt
      opt_inv u_opt (.in_i(buf_n[j]), .cfg_i(cfg_i[p][j]), .out_o(lit[j]));
    end
    assign pt_o[p] = ~|lit;   // the NOR8 of the PTG
  end

endmodule
