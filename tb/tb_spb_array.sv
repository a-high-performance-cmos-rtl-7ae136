`timescale 1ps/1ps
// tb_spb_array: rows are written only when their word line is high and the
// bit lines are driven; other rows keep their contents; the selected row
// is presented to the read-back path.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_spb_array;
  localparam int ROWS = 64, RB = 113;
  logic clk = 0; logic [ROWS-1:0] wl; logic [RB-1:0] bl, rd; logic drive;
  logic [ROWS-1:0][RB-1:0] mem, shadow;
  int checks = 0, failures = 0;

  spb_array #(.ROWS(ROWS), .ROW_BITS(RB)) dut (
    .wr_clk_i(clk), .wl_i(wl), .bl_i(bl), .bl_drive_i(drive), .mem_o(mem), .rd_row_o(rd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drive = 0; wl = '0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wl = 64'd1 << r; bl = {$urandom, $urandom, $urandom, $urandom}; drive = 1;
      shadow[r] = bl;
    end
    @(negedge clk); drive = 0; wl = '0;
    #1; checks++;
    if (mem !== shadow) begin failures++; $display("FAIL write all"); end
    for (int it = 0; it < 200; it++) begin
      int r;
      r = $urandom_range(0, ROWS-1);
      @(negedge clk);
      wl = 64'd1 << r; bl = {$urandom, $urandom, $urandom, $urandom};
      drive = ($urandom_range(0, 1) == 1);
      if (drive) shadow[r] = bl;
      @(posedge clk); #1;
      checks++;
      if (mem !== shadow || rd !== shadow[r]) begin failures++; $display("FAIL row %0d drive=%b", r, drive); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
