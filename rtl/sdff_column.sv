`timescale 1ps/1ps
// sdff_column: the column of semi-dynamic flip-flops that captures the
// output tracks of the last TLS.
//
// The flip-flops are pulse-triggered with zero setup time and are clocked
// by the clock phase that follows the last TLS's phases (the 19th phase in
// the three-TLS core), so a correct capture shows that the whole chain
// evaluated within the separation times. Modelled as rising-edge
// flip-flops; the pulse generation of the real cell is not modelled.
// The capture phase and zero setup time follow the published test chip;
// the published text mentions both a rising-edge and a falling-edge
// capture, and the rising edge is used here because the delay measurement
// relies on it.
module sdff_column #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk_i,
  input  logic [WIDTH-1:0] d_i,
  output logic [WIDTH-1:0] q_o
);

  always_ff @(posedge clk_i)
    q_o <= d_i;

endmodule
