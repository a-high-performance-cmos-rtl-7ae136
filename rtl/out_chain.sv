`timescale 1ps/1ps
// out_chain: output shift-register chain that carries the captured core
// outputs off chip through one pin.
//
// WIDTH static flip-flops, each with a 2:1 MUX in front. load_i = 1 is the
// parallel-input mode: a rising clock edge copies d_i into the chain.
// load_i = 0 is the serial-output mode: each edge shifts toward stage 0,
// which drives q_o, so output bit 0 is seen first. Runs on its own slow
// clock.
// The chain and its two modes follow the published test chip; the shift
// direction is this design's choice.
module out_chain #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk_i,
  input  logic             load_i,
  input  logic [WIDTH-1:0] d_i,
  output logic             q_o
);

  logic [WIDTH-1:0] q;

  for (genvar b = 0; b < WIDTH; b++) begin : g_stage
    logic nxt;
    if (b == WIDTH - 1) begin : g_head
      assign nxt = load_i ? d_i[b] : 1'b0;
    end else begin : g_body
      assign nxt = load_i ? d_i[b] : q[b+1];
    end
    static_dff u_ff (.clk_i(clk_i), .d_i(nxt), .q_o(q[b]));
  end

  assign q_o = q[0];

endmodule
