`timescale 1ps/1ps
// spb_array: the static programming bits (SRAM cells) that configure the
// logic core, organised as ROWS word-line rows of ROW_BITS cells.
//
// Writing: the bit-line chain drives all bit lines of a row at once
// (bl_drive_i = 1); on the rising edge of wr_clk_i every row whose word
// line is high stores bl_i. The word-line chain keeps at most one row open.
// Reading: all cells are read continuously by the logic (mem_o). rd_row_o
// is the OR of the open rows, i.e. the single row selected by the word
// lines, for the read-back chain.
// The cells are modelled as flip-flops with no reset; like SRAM they power
// up with arbitrary contents until programmed.
// Rows written through word and bit lines follow the published memory;
// the write on the chain clock edge and the read path are this design's.
module spb_array #(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned ROW_BITS = 113
) (
  input  logic                          wr_clk_i,
  input  logic [ROWS-1:0]               wl_i,
  input  logic [ROW_BITS-1:0]           bl_i,
  input  logic                          bl_drive_i,
  output logic [ROWS-1:0][ROW_BITS-1:0] mem_o,
  output logic [ROW_BITS-1:0]           rd_row_o
);

  logic [ROWS-1:0][ROW_BITS-1:0] cells;

  always_ff @(posedge wr_clk_i)
    for (int r = 0; r < ROWS; r++)
      if (bl_drive_i && wl_i[r]) cells[r] <= bl_i;

  always_comb begin
    rd_row_o = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl_i[r]) rd_row_o |= cells[r];
  end

  assign mem_o = cells;

endmodule
