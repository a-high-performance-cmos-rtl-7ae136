`timescale 1ps/1ps
// inv_en: inverter with enable (INV_EN) between the two NOR levels.
//
// Enabled it inverts; disabled its output is held low so that the four
// long-track drivers it feeds never pull their tracks down:
//   out = en & ~in
// Moving the enable here keeps it out of the large track drivers.
// Combinational.
// Follows the published INV_EN; its fanout of four track drivers is taken
// from the published description of its fanout.
module inv_en (
  input  logic in_i,
  input  logic en_i,
  output logic out_o
);

  assign out_o = en_i & ~in_i;

endmodule
