`timescale 1ps/1ps
// tb_clock_chain: with the nominal separations (90, 60, 60, 70, 100,
// 110 ps) the 19 phases of a three-TLS core rise at the expected offsets
// from clock 1, one TLS spans 490 ps and the capture phase comes 1470 ps
// after clock 1. A second chain set to the post-layout nominal
// separations (127, 89, 65, 102, 137, 122 ps, 642 ps per TLS) must place
// its capture phase 1926 ps after clock 1.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_clock_chain;
  localparam int N = 3;
  localparam int SEP [6] = '{90, 60, 60, 70, 100, 110};
  logic clk = 0; logic [6*N:0] ph;
  int checks = 0, failures = 0;
  time rise [6*N+1];

  localparam int SEP_PL [6] = '{127, 89, 65, 102, 137, 122};
  logic [6*N:0] ph_pl;
  time rise_pl [6*N+1];

  clock_chain #(.NUM_TLS(N)) dut (.clk_in_i(clk), .clk_ph_o(ph));
  clock_chain #(.NUM_TLS(N), .SEP1_PS(127), .SEP2_PS(89), .SEP3_PS(65),
                .SEP4_PS(102), .SEP5_PS(137), .SEP6_PS(122))
    dut_pl (.clk_in_i(clk), .clk_ph_o(ph_pl));

  always #2000 clk = ~clk;

  for (genvar i = 0; i <= 6*N; i++) begin : g_mon
    always @(posedge ph[i]) rise[i] = $time;
    always @(posedge ph_pl[i]) rise_pl[i] = $time;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) begin
      int exp;
      @(posedge clk);
      #1950;
      exp = 0;
      for (int i = 1; i <= 6*N; i++) begin
        exp += SEP[(i-1) % 6];
        checks++;
        if (rise[i] - rise[0] != exp) begin
          failures++; $display("FAIL phase %0d at +%0t exp +%0d", i+1, rise[i] - rise[0], exp);
        end
      end
      exp = 0;
      for (int i = 1; i <= 6*N; i++) begin
        exp += SEP_PL[(i-1) % 6];
        checks++;
        if (rise_pl[i] - rise_pl[0] != exp) begin
          failures++; $display("FAIL post-layout phase %0d at +%0t exp +%0d", i+1, rise_pl[i] - rise_pl[0], exp);
        end
      end
      checks++;
      if (rise_pl[6*N] - rise_pl[0] != 1926) begin
        failures++; $display("FAIL post-layout chain delay");
      end
      checks++;
      if (rise[6] - rise[0] != 490 || rise[6*N] - rise[0] != 1470) begin
        failures++; $display("FAIL TLS or chain delay");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
