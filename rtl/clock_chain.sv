`timescale 1ps/1ps
// clock_chain: behavioural model of the OPL clock chain.
// Not synthesizable: it is built from the behavioural RSB model.
//
// OPL gates are clocked per logic level: every gate evaluates when its
// own clock phase rises, so the time between successive phases is the
// delay budget of that level. The chain derives 6*NUM_TLS + 1 phases from
// the off-chip clock: phase 1 is clk_in_i itself, and phase i+1 is phase i
// delayed by one RSB whose delay is the separation SEPn for that position
// (n = 1..6, repeating for every TLS). The last phase clocks the capture
// flip-flops. With the default separations (90, 60, 60, 70, 100, 110 ps,
// 490 ps per TLS) the capture phase follows phase 1 by 1470 ps in a
// three-TLS core. clk_ph_o[0] is phase 1. The static buffer trees that
// distribute each phase are folded into the RSB delays.
// The six separations per TLS and the extra capture phase follow the
// published core; cascading the buffers, and falling-edge separations equal
// to the rising ones, are this design's choices.
module clock_chain #(
  parameter int unsigned NUM_TLS = 3,
  parameter int unsigned SEP1_PS = 90,
  parameter int unsigned SEP2_PS = 60,
  parameter int unsigned SEP3_PS = 60,
  parameter int unsigned SEP4_PS = 70,
  parameter int unsigned SEP5_PS = 100,
  parameter int unsigned SEP6_PS = 110
) (
  input  logic                 clk_in_i,
  output logic [6*NUM_TLS:0]   clk_ph_o
);

  localparam int unsigned SEP [6] = '{SEP1_PS, SEP2_PS, SEP3_PS, SEP4_PS, SEP5_PS, SEP6_PS};

  assign clk_ph_o[0] = clk_in_i;

  for (genvar i = 0; i < 6 * NUM_TLS; i++) begin : g_phase
    rsb #(.RISE_PS(SEP[i % 6]), .FALL_PS(SEP[i % 6])) u_rsb (
      .clk_i (clk_ph_o[i]),
      .clk_o (clk_ph_o[i+1])
    );
  end

endmodule
