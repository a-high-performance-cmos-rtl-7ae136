`timescale 1ps/1ps
// wl_chain: word-line shift-register chain of the configuration memory.
//
// ROWS reset-able static flip-flops in series, clocked by their own slow
// programming clock. A single 1 pulse applied at d_i walks down the chain,
// so word line r is high during the (r+1)-th clock period after the pulse
// entered; no address decoder is needed because rows are always written in
// order. rst_i (asynchronous) clears every word line, which keeps the
// memory closed while the logic core operates.
// Follows the published word-line chain; row 0 being the first stage is
// this design's choice.
module wl_chain #(
  parameter int unsigned ROWS = 64
) (
  input  logic            clk_i,
  input  logic            rst_i,
  input  logic            d_i,
  output logic [ROWS-1:0] wl_o
);

  logic [ROWS:0] chain;   // chain[0] is the serial input

  assign chain[0] = d_i;

  for (genvar r = 0; r < ROWS; r++) begin : g_stage
    static_dff_r u_ff (.clk_i(clk_i), .rst_i(rst_i), .d_i(chain[r]), .q_o(chain[r+1]));
  end

  assign wl_o = chain[ROWS:1];

endmodule
