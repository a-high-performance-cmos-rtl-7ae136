`timescale 1ps/1ps
// mux8_nor2: the OPL multiplexer (MUX8/NOR2) of an HLRB.
//
// Eight optional inverters feed one eight-input NOR. The enables sit in the
// optional inverters, off the NOR's critical path. Uses:
//   one input enabled, true polarity   : inverting 8:1 multiplexer
//   two inputs enabled, true polarity  : NOR2
//   two inputs enabled, complemented   : AND2  (NOR of complements)
//   none enabled                       : output 1
// The mapping rule of at most two enabled inputs is not enforced here.
// Combinational; out_o follows in_i and cfg_i.
// The gate and its uses follow the published OPL multiplexer.
module mux8_nor2
  import opl_pkg::*;
(
  input  logic         [FANIN-1:0] in_i,
  input  opt_inv_cfg_t [FANIN-1:0] cfg_i,
  output logic                     out_o
);

  logic [FANIN-1:0] sel;

  for (genvar j = 0; j < FANIN; j++) begin : g_opt
    opt_inv u_opt (.in_i(in_i[j]), .cfg_i(cfg_i[j]), .out_o(sel[j]));
  end

  assign out_o = ~|sel;

endmodule
