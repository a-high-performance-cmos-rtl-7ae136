`timescale 1ps/1ps
// delay_mux: the pair of 2:1 multiplexers in front of the two delay pads.
//
// The core's delay is the time from the 1st clock phase to the capture
// phase (the 19th). With s_i = 1 pad 1 shows clock 1 and pad 2 the capture
// clock; with s_i = 0 the two are swapped. Measuring pad 2 minus pad 1 in
// both settings and averaging the magnitudes cancels any mismatch added
// after the multiplexers (pads, probes). Combinational.
// The multiplexer inputs and the swap follow the published test chip.
module delay_mux (
  input  logic clk1_i,
  input  logic clk19_i,
  input  logic s_i,
  output logic delay_out1_o,
  output logic delay_out2_o
);

  assign delay_out1_o = s_i ? clk1_i  : clk19_i;
  assign delay_out2_o = s_i ? clk19_i : clk1_i;

endmodule
