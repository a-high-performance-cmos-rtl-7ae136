`timescale 1ps/1ps
// tb_bl_chain: serial loading (S = 0) of a row, then parallel mode
// (S = 1) in which the bit lines are driven and the contents hold.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_bl_chain;
  localparam int BITS = 113;
  logic clk = 0, s, d, drive; logic [BITS-1:0] bl, word;
  int checks = 0, failures = 0;

  bl_chain #(.BITS(BITS)) dut (.clk_i(clk), .s_i(s), .d_i(d), .bl_o(bl), .bl_drive_o(drive));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 5; rep++) begin
      word = {$urandom, $urandom, $urandom, $urandom};
      s = 0;
      for (int b = 0; b < BITS; b++) begin   // bit 0 first
        @(negedge clk); d = word[b];
        @(posedge clk);
      end
      #1;
      checks++;
      if (bl !== word || drive !== 1'b0) begin failures++; $display("FAIL serial bl=%h exp=%h", bl, word); end
      @(negedge clk); s = 1; d = !d;
      repeat (3) @(posedge clk);
      #1;
      checks++;
      if (bl !== word || drive !== 1'b1) begin failures++; $display("FAIL parallel hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
