`timescale 1ps/1ps
// opt_inv: optional inverter (OPT_INV) of the OPL logic core.
//
// Passes its input unchanged, passes its complement, or holds its output
// low, as set by two configuration bits:
//   cfg.s1 = 1, cfg.s0 = 1 : out = in
//   cfg.s1 = 1, cfg.s0 = 0 : out = ~in
//   cfg.s1 = 0             : out = 0 (disabled)
// The disabled state is what lets a following wide NOR act as a multiplexer
// or as a NOR/AND of the few inputs left enabled. In silicon this is a
// clocked OPL-dynamic gate with nMOS pass transistors; here only its
// evaluated logic value is modelled, so the cell is combinational.
// The three states follow the published OPT_INV; the encoding of the two
// bits is this design's choice.
module opt_inv
  import opl_pkg::*;
(
  input  logic         in_i,
  input  opt_inv_cfg_t cfg_i,
  output logic         out_o
);

  always_comb begin
    if (!cfg_i.s1)     out_o = 1'b0;
    else if (cfg_i.s0) out_o = in_i;
    else               out_o = ~in_i;
  end

endmodule
