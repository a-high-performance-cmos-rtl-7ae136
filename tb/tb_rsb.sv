`timescale 1ps/1ps
// tb_rsb: the buffer repeats its input with the rising-edge delay RISE_PS
// and the falling-edge delay FALL_PS (here set apart to tell them apart).
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_rsb;
  localparam int RISE = 75, FALL = 120;
  logic ci = 0, co;
  int checks = 0, failures = 0;
  time t_in, t_out;

  rsb #(.RISE_PS(RISE), .FALL_PS(FALL)) dut (.clk_i(ci), .clk_o(co));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int i = 0; i < 10; i++) begin
      ci = 1; t_in = $time;
      @(posedge co); t_out = $time;
      checks++;
      if (t_out - t_in != RISE) begin failures++; $display("FAIL rise delay %0t", t_out - t_in); end
      #500;
      ci = 0; t_in = $time;
      @(negedge co); t_out = $time;
      checks++;
      if (t_out - t_in != FALL) begin failures++; $display("FAIL fall delay %0t", t_out - t_in); end
      #500;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
