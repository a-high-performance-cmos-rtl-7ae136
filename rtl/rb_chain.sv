`timescale 1ps/1ps
// rb_chain: read-back shift-register chain of the configuration memory.
//
// A debug path. With load_i = 1 a rising clock edge copies row_i (the
// bits of the memory row whose word line is high) into the chain; with
// load_i = 0 each edge shifts the chain one stage toward stage 0, whose
// content is q_o. Bit 0 of the row therefore appears first, bit BITS-1
// last. Built from static flip-flops with a 2:1 MUX in front of each.
// The read-back chain is described only by its function in the published
// test chip; the parallel-load shift register is this design's choice.
module rb_chain #(
  parameter int unsigned BITS = 113
) (
  input  logic            clk_i,
  input  logic            load_i,
  input  logic [BITS-1:0] row_i,
  output logic            q_o
);

  logic [BITS-1:0] q;

  for (genvar b = 0; b < BITS; b++) begin : g_stage
    logic nxt;
    if (b == BITS - 1) begin : g_head
      assign nxt = load_i ? row_i[b] : 1'b0;
    end else begin : g_body
      assign nxt = load_i ? row_i[b] : q[b+1];
    end
    static_dff u_ff (.clk_i(clk_i), .d_i(nxt), .q_o(q[b]));
  end

  assign q_o = q[0];

endmodule
