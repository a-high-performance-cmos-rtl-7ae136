`timescale 1ps/1ps
// opl_pkg: sizes and configuration-word types shared by the OPL programmable
// logic core.
//
// The core is a chain of three-level structures (TLS). Each TLS reads one
// group of 64 long input tracks and drives one group of 64 long output
// tracks. It holds eight hybrid logic-routing blocks (HLRB) of eight logic
// rows each, 64 rows in all. Every logic row carries one MUX8/NOR2 input
// selector, one product term (PTG), one first-level NOR4_EN and one INV_EN
// track driver; hlrb_row_cfg_t is the 37-bit configuration of such a row.
// The sizes (64 tracks, 8 HLRBs, 8 rows per HLRB, 8-input OPT_INV gates) are
// those of the published core; the packing of the configuration bits into a
// row word is this design's own.
package opl_pkg;

  localparam int unsigned TRACKS       = 64;  // long tracks per group
  localparam int unsigned HLRBS        = 8;   // HLRBs per TLS
  localparam int unsigned HLRB_ROWS    = 8;   // logic rows per HLRB
  localparam int unsigned FANIN        = 8;   // OPT_INVs per MUX8/NOR2 and per PTG
  localparam int unsigned DIST_COPIES  = 4;   // tracks driven by one HLRB output
  localparam int unsigned ROWS         = HLRBS * HLRB_ROWS;  // 64 logic rows

  // OPT_INV control (Table 4-1): s1 = 0 forces the output low (state 3);
  // with s1 = 1, s0 = 1 passes the input (state 1), s0 = 0 inverts it (state 2).
  typedef struct packed {
    logic s1;
    logic s0;
  } opt_inv_cfg_t;

  localparam opt_inv_cfg_t OPT_OFF  = '{s1: 1'b0, s0: 1'b0};
  localparam opt_inv_cfg_t OPT_TRUE = '{s1: 1'b1, s0: 1'b1};
  localparam opt_inv_cfg_t OPT_COMP = '{s1: 1'b1, s0: 1'b0};

  // Configuration of one logic row of an HLRB (37 bits).
  typedef struct packed {
    logic                          inv_en;  // INV_EN enable of this row's output
    logic         [3:0]            nor_en;  // NOR4_EN enables EN1..EN4
    opt_inv_cfg_t [FANIN-1:0]      ptg;     // product term of this row, per local track
    opt_inv_cfg_t [FANIN-1:0]      mux;     // MUX8/NOR2 of this row, per candidate input
  } hlrb_row_cfg_t;

  localparam int unsigned ROW_CFG_BITS = $bits(hlrb_row_cfg_t);

  // Long track driven by copy c (0..3) of output k of HLRB h. Four
  // neighbouring tracks carry one output; every track collects exactly one
  // driver from each of four different HLRBs.
  function automatic int unsigned dist_track(int unsigned h, int unsigned k, int unsigned c);
    return (HLRB_ROWS * k + h + c) % TRACKS;
  endfunction

  // Input track seen by candidate j of MUX m: MUX m reads tracks m, m+8, ...
  function automatic int unsigned mux_track(int unsigned m, int unsigned j);
    return FANIN * j + m;
  endfunction

endpackage
