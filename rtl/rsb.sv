`timescale 1ps/1ps
// rsb: behavioural model of the reduced-swing clock buffer (RSB).
// Not synthesizable: the real part is an analog circuit.
//
// The RSB is a fast non-inverting clock buffer. In silicon two off-chip
// voltages tune it after fabrication: Vcn sets the delay of the rising
// (evaluation) edge and Vcp that of the falling (precharge) edge. Here the
// two tuned delays are the parameters RISE_PS and FALL_PS, applied as
// transport delays, so clk_o repeats clk_i shifted by those amounts. The
// model assumes clk_i starts low.
// The default of 90 ps is the first nominal separation of the OPL clock
// chain.
// The two tuned edges follow the published RSB; the delay model itself
// is this design's, as the analog circuit has no logic description.
module rsb #(
  parameter int unsigned RISE_PS = 90,
  parameter int unsigned FALL_PS = 90
) (
  input  logic clk_i,
  output logic clk_o
);

  // Each delayed input edge toggles one of two event flags; the output is
  // high between a delayed rising edge and the next delayed falling edge.
  logic rise_evt, fall_evt;

  initial begin
    rise_evt = 1'b0;
    fall_evt = 1'b0;
  end

  always @(posedge clk_i) rise_evt <= #(RISE_PS) ~rise_evt;
  always @(negedge clk_i) fall_evt <= #(FALL_PS) ~fall_evt;

  assign clk_o = rise_evt ^ fall_evt;

endmodule
