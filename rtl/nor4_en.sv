`timescale 1ps/1ps
// nor4_en: first-level NOR4 with per-input enables (NOR4_EN).
//
// Each leg of the dynamic NOR has the input and its enable in series, so
//   out = ~|(in & en)
// A disabled leg never pulls the output low; with all legs disabled the
// output stays at its precharged 1. In an HLRB each NOR4_EN reads the four
// product terms of one of the two PTG groups. Combinational.
// Follows the published NOR4_EN gate.
module nor4_en (
  input  logic [3:0] in_i,
  input  logic [3:0] en_i,
  output logic       out_o
);

  assign out_o = ~|(in_i & en_i);

endmodule
