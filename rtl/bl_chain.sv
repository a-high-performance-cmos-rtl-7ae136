`timescale 1ps/1ps
// bl_chain: bit-line shift-register chain of the configuration memory.
//
// BITS static flip-flops (no reset), each followed by a DEMUX controlled by
// S. With S = 0 the chain shifts: d_i enters stage BITS-1 and every stage
// passes its bit to the next lower stage on each rising clock edge, so after
// BITS clocks the first bit shifted in sits in stage 0. With S = 1 the DEMUX
// turns the stage outputs to the bit lines (bl_drive_o = 1) and the chain
// holds; the memory row whose word line is high is then written.
// The chain and its S-controlled DEMUX follow the published design; that the
// chain holds while S = 1 and the shift direction are this design's choices.
module bl_chain #(
  parameter int unsigned BITS = 113
) (
  input  logic            clk_i,
  input  logic            s_i,
  input  logic            d_i,
  output logic [BITS-1:0] bl_o,
  output logic            bl_drive_o
);

  logic [BITS-1:0] q;

  for (genvar b = 0; b < BITS; b++) begin : g_stage
    logic nxt;
    if (b == BITS - 1) begin : g_head
      assign nxt = s_i ? q[b] : d_i;
    end else begin : g_body
      assign nxt = s_i ? q[b] : q[b+1];
    end
    static_dff u_ff (.clk_i(clk_i), .d_i(nxt), .q_o(q[b]));
  end

  assign bl_o       = q;
  assign bl_drive_o = s_i;

endmodule
