`timescale 1ps/1ps
// tb_nor4_dist_tracks: checks the long-track wiring rules (one active
// driver pulls exactly four neighbouring tracks; every track has four
// drivers from four different HLRBs) and random wired-NOR values.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_nor4_dist_tracks;
  import opl_pkg::*;
  import opl_tb_pkg::*;
  logic [7:0][7:0] drv; logic [63:0] tr;
  int checks = 0, failures = 0;
  int drivers [64];
  bit seen [64][8];

  nor4_dist_tracks dut (.drv_i(drv), .track_o(tr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (drivers[t]) drivers[t] = 0;
    foreach (seen[t, h]) seen[t][h] = 0;
    drv = '0;
    #1;
    checks++;
    if (tr !== '1) begin failures++; $display("FAIL idle tracks not all 1"); end
    for (int h = 0; h < 8; h++)
      for (int k = 0; k < 8; k++) begin
        int first, n;
        drv = '0; drv[h][k] = 1'b1;
        #1;
        n = 0; first = -1;
        for (int t = 0; t < 64; t++)
          if (!tr[t]) begin
            n++;
            if (first < 0) first = t;
            drivers[t]++;
            if (seen[t][h]) begin failures++; $display("FAIL hlrb %0d twice on track %0d", h, t); end
            seen[t][h] = 1;
          end
        checks++;
        // four tracks, neighbouring modulo 64
        if (n != 4 || !(tr[(8*k+h)%64] == 0 && tr[(8*k+h+3)%64] == 0)) begin
          failures++;
          $display("FAIL h=%0d k=%0d pulls %0d tracks", h, k, n);
        end
      end
    for (int t = 0; t < 64; t++) begin
      checks++;
      if (drivers[t] != 4) begin failures++; $display("FAIL track %0d has %0d drivers", t, drivers[t]); end
    end
    for (int it = 0; it < 300; it++) begin
      for (int h = 0; h < 8; h++) drv[h] = 8'($urandom) & 8'($urandom) & 8'($urandom);
      #1;
      checks++;
      if (tr !== ref_tracks(drv)) begin failures++; $display("FAIL random"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
