`timescale 1ps/1ps
// opl_plc_chip: the OPL programmable logic core test chip.
//
// A product-term programmable logic core built from output-prediction-logic
// (OPL) dynamic gates: NUM_TLS three-level structures in series (the logic
// array), configured by SRAM cells and timed by a chain of finely spaced
// clock phases. Around the array sit the test circuits of the chip:
//   - configuration: a word-line chain opens one memory row at a time, the
//     bit-line chain shifts that row in serially and then drives it in
//     parallel (S = 1); a read-back chain shifts a row back out;
//   - timing: the clock chain makes phases 1..6*NUM_TLS+1 from clk_in_i;
//   - results: the semi-dynamic flip-flop column captures the 64 output
//     tracks on the last phase, the output chain shifts them out serially,
//     and the delay multiplexers bring phase 1 and the capture phase to two
//     pads with a swap control.
//
// Configuration row word (ROW_BITS = 37*NUM_TLS + NUM_TLS-1 bits), row r:
//   [37t +: 37]         logic row r of TLS t (opl_pkg::hlrb_row_cfg_t)
//   [37*NUM_TLS + t-1]  input select of track r in front of TLS t, t >= 1
// Programming: reset the word-line chain and clock a single 1 into it, so
// row 0 is open. For each row, shift ROW_BITS bits into the bit-line chain
// with bl_s_i = 0 (the first bit shifted ends up in bit 0), give one
// bl_clk_i edge with bl_s_i = 1 to write the row, then clock the word-line
// chain once to open the next row. Clear the word lines with wl_rst_i before
// running the logic. Read-back: open a row the same way, load the read-back
// chain (rb_load_i = 1, one rb_clk_i edge), then shift bit 0 out first.
// Operation: primary inputs are applied to pi_i; the outputs are valid at
// po_q_o after the next rising edge of the capture phase, which follows the
// rising edge of clk_in_i by the sum of the phase separations (1470 ps with
// the nominal ones). The output chain then loads po_q_o and shifts bit 0
// out first.
// The blocks, the three TLSs, the 64 rows, the chains and the delay pads
// follow the document; the row word layout, the per-track input select bits
// and separate control ports for each chain are this design's own choices.
// Only the clock chain is behavioural; everything else is synthesizable.
module opl_plc_chip
  import opl_pkg::*;
#(
  parameter int unsigned NUM_TLS = 3
) (
  input  logic                             clk_in_i,
  input  logic [NUM_TLS-1:0][TRACKS-1:0]   pi_i,
  // word-line chain
  input  logic                             wl_clk_i,
  input  logic                             wl_rst_i,
  input  logic                             wl_d_i,
  // bit-line chain
  input  logic                             bl_clk_i,
  input  logic                             bl_s_i,
  input  logic                             bl_d_i,
  // read-back chain
  input  logic                             rb_clk_i,
  input  logic                             rb_load_i,
  output logic                             rb_q_o,
  // output chain
  input  logic                             oc_clk_i,
  input  logic                             oc_load_i,
  output logic                             oc_q_o,
  // delay measurement
  input  logic                             dly_s_i,
  output logic                             delay_out1_o,
  output logic                             delay_out2_o,
  // observation
  output logic [TRACKS-1:0]                po_q_o,
  output logic [6*NUM_TLS:0]               clk_ph_o
);

  localparam int unsigned ROW_BITS = ROW_CFG_BITS * NUM_TLS + NUM_TLS - 1;

  logic [ROWS-1:0]               wl;
  logic [ROW_BITS-1:0]           bl;
  logic                          bl_drive;
  logic [ROWS-1:0][ROW_BITS-1:0] mem;
  logic [ROW_BITS-1:0]           rd_row;

  hlrb_row_cfg_t [NUM_TLS-1:0][ROWS-1:0] cfg;
  logic          [NUM_TLS-1:1][TRACKS-1:0] in_sel;
  logic          [TRACKS-1:0]              po;

  // ---------------- configuration memory and its chains ----------------
  wl_chain #(.ROWS(ROWS)) u_wl (
    .clk_i(wl_clk_i), .rst_i(wl_rst_i), .d_i(wl_d_i), .wl_o(wl)
  );

  bl_chain #(.BITS(ROW_BITS)) u_bl (
    .clk_i(bl_clk_i), .s_i(bl_s_i), .d_i(bl_d_i), .bl_o(bl), .bl_drive_o(bl_drive)
  );

  spb_array #(.ROWS(ROWS), .ROW_BITS(ROW_BITS)) u_spb (
    .wr_clk_i(bl_clk_i), .wl_i(wl), .bl_i(bl), .bl_drive_i(bl_drive),
    .mem_o(mem), .rd_row_o(rd_row)
  );

  rb_chain #(.BITS(ROW_BITS)) u_rb (
    .clk_i(rb_clk_i), .load_i(rb_load_i), .row_i(rd_row), .q_o(rb_q_o)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar t = 0; t < NUM_TLS; t++) begin : g_t
      assign cfg[t][r] = mem[r][ROW_CFG_BITS*t +: ROW_CFG_BITS];
      if (t > 0) begin : g_sel
        assign in_sel[t][r] = mem[r][ROW_CFG_BITS*NUM_TLS + t - 1];
      end
    end
  end

  // ---------------- logic array ----------------
  plc_array #(.NUM_TLS(NUM_TLS)) u_array (
    .pi_i(pi_i), .cfg_i(cfg), .in_sel_i(in_sel), .po_o(po)
  );

  // ---------------- clocks, capture and read-out ----------------
  clock_chain #(.NUM_TLS(NUM_TLS)) u_clk (.clk_in_i(clk_in_i), .clk_ph_o(clk_ph_o));

  sdff_column #(.WIDTH(TRACKS)) u_cap (
    .clk_i(clk_ph_o[6*NUM_TLS]), .d_i(po), .q_o(po_q_o)
  );

  out_chain #(.WIDTH(TRACKS)) u_oc (
    .clk_i(oc_clk_i), .load_i(oc_load_i), .d_i(po_q_o), .q_o(oc_q_o)
  );

  delay_mux u_dly (
    .clk1_i(clk_ph_o[0]), .clk19_i(clk_ph_o[6*NUM_TLS]), .s_i(dly_s_i),
    .delay_out1_o(delay_out1_o), .delay_out2_o(delay_out2_o)
  );

endmodule
