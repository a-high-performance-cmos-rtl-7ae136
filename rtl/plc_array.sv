`timescale 1ps/1ps
// plc_array: the logic array of the OPL programmable logic core, NUM_TLS
// three-level structures (TLS) in series with a unidirectional data flow.
//
// Track group 0 carries primary inputs into TLS 0. Each later group sits
// between two TLSs and, track by track, either passes the previous TLS's
// output or brings in a primary input (in_sel_i[t][k] = 1 selects pi_i[t][k]).
// So the array takes 64 to NUM_TLS*64 inputs; the 64 output tracks of the
// last TLS are the outputs. The per-track select bit is this design's way
// of making that choice programmable.
// Combinational: in silicon each TLS evaluates on its own six clock phases,
// and the outputs are sampled by the capture flip-flops on the phase after.
// Three TLSs in series and the choice per track group follow the published
// core.
module plc_array
  import opl_pkg::*;
#(
  parameter int unsigned NUM_TLS = 3
) (
  input  logic          [NUM_TLS-1:0][TRACKS-1:0] pi_i,
  input  hlrb_row_cfg_t [NUM_TLS-1:0][ROWS-1:0]   cfg_i,
  input  logic          [NUM_TLS-1:1][TRACKS-1:0] in_sel_i,
  output logic          [TRACKS-1:0]              po_o
);

  logic [NUM_TLS-1:0][TRACKS-1:0] grp_in;   // input track group of each TLS
  logic [NUM_TLS-1:0][TRACKS-1:0] grp_out;  // output track group of each TLS

  assign grp_in[0] = pi_i[0];

  for (genvar t = 0; t < NUM_TLS; t++) begin : g_tls
    if (t > 0) begin : g_sel
      assign grp_in[t] = (in_sel_i[t] & pi_i[t]) | (~in_sel_i[t] & grp_out[t-1]);
    end
    tls u_tls (.in_i(grp_in[t]), .cfg_i(cfg_i[t]), .out_o(grp_out[t]));
  end

  assign po_o = grp_out[NUM_TLS-1];

endmodule
