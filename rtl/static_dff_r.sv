`timescale 1ps/1ps
// static_dff_r: rising-edge static D flip-flop with asynchronous reset.
//
// rst_i = 1 forces q_o low at once, whatever the clock does; otherwise q_o
// takes d_i at each rising clock edge. Used in the word-line chain, where
// the reset guarantees that no word line is active while the logic runs.
// Follows the published flip-flop's function (reset high gives output
// low).
module static_dff_r (
  input  logic clk_i,
  input  logic rst_i,
  input  logic d_i,
  output logic q_o
);

  always_ff @(posedge clk_i or posedge rst_i)
    if (rst_i) q_o <= 1'b0;
    else       q_o <= d_i;

endmodule
