`timescale 1ps/1ps
// tb_plc_array: three TLSs in series. Checks the per-track choice between
// the previous TLS's output and a primary input in front of TLS 1 and 2,
// a signal passed through all three TLSs, and random configurations against
// the reference model chained level by level.
// Expected values are worked out in the testbench from the function the
// published design gives, not from the module's code; the stimulus, sizes
// and clock periods are this testbench's own. Ends with a TB_RESULT line
// and has a watchdog.
module tb_plc_array;
  import opl_pkg::*;
  import opl_tb_pkg::*;
  localparam int N = 3;
  logic [N-1:0][63:0] pi; hlrb_row_cfg_t [N-1:0][63:0] cfg; logic [N-1:1][63:0] sel; logic [63:0] po;
  int checks = 0, failures = 0;
  int n_pass = 0, n_prim = 0;

  plc_array #(.NUM_TLS(N)) dut (.pi_i(pi), .cfg_i(cfg), .in_sel_i(sel), .po_o(po));

  function automatic logic [63:0] model();
    logic [63:0] g;
    hlrb_row_cfg_t c [64];
    g = pi[0];
    for (int t = 0; t < N; t++) begin
      if (t > 0) g = (sel[t] & pi[t]) | (~sel[t] & g);
      for (int r = 0; r < 64; r++) c[r] = cfg[t][r];
      g = ref_tls(g, c);
    end
    return g;
  endfunction

  // HLRB 0 of a TLS: output 0 = in[src] copied (MUX then one product term)
  // onto tracks 0..3, with the given polarity.
  task automatic buffer_cfg(int t, int src, bit invert);
    int m;
    m = src % 8;
    cfg[t] = '0;
    cfg[t][m].mux[src/8] = invert ? OPT_TRUE : OPT_COMP;  // local track = in or ~in
    cfg[t][0].ptg[m] = OPT_TRUE;
    cfg[t][0].nor_en = 4'b0001;
    cfg[t][0].inv_en = 1'b1;                              // track 0 = ~term
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // pass a primary input of group 0 through all three TLSs:
    // each TLS inverts once (track = ~term), so three TLSs invert.
    buffer_cfg(0, 5, 0); buffer_cfg(1, 0, 0); buffer_cfg(2, 0, 0);
    sel = '0;
    for (int it = 0; it < 50; it++) begin
      pi = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      checks++; n_pass++;
      if (po[0] !== !pi[0][5]) begin failures++; $display("FAIL pass po0=%b", po[0]); end
    end
    // track 0 in front of TLS 2 takes primary input pi[2][0] instead
    sel[2][0] = 1'b1;
    for (int it = 0; it < 50; it++) begin
      pi = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      checks++; n_prim++;
      if (po[0] !== !pi[2][0]) begin failures++; $display("FAIL prim po0=%b", po[0]); end
    end
    // random everything
    for (int it = 0; it < 200; it++) begin
      for (int t = 0; t < N; t++) for (int r = 0; r < 64; r++) begin
        cfg[t][r] = rand_row_mapped();
        cfg[t][r].inv_en = ($urandom_range(0, 3) == 0);
      end
      sel = {$urandom, $urandom, $urandom, $urandom};
      pi = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (po !== model()) begin failures++; $display("FAIL random po=%h exp=%h", po, model()); end
    end
    if (n_pass == 0 || n_prim == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
