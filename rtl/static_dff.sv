`timescale 1ps/1ps
// static_dff: rising-edge static master-slave D flip-flop without reset.
//
// Two transmission-gate latches in series; q_o takes d_i at each rising
// clock edge and holds it otherwise. Its power-up value is undefined.
// Used in the bit-line, read-back and output shift-register chains.
// Follows the published flip-flop's function.
module static_dff (
  input  logic clk_i,
  input  logic d_i,
  output logic q_o
);

  always_ff @(posedge clk_i)
    q_o <= d_i;

endmodule
