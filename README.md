# OPL programmable logic core

This is a programmable logic core for embedding in a system-on-chip. It is
built from product terms rather than look-up tables. It is written for a
very fast dynamic logic family, *output prediction logic* (OPL). In OPL
every gate level gets its own finely spaced clock phase, so one pass through
a deep AND/NOR network takes well under two nanoseconds.

The core is a chain of identical **three-level structures (TLS)**. Each TLS
reads a group of 64 long tracks and drives another group of 64. Inside a
TLS, eight **hybrid logic-routing blocks (HLRB)** turn the inputs into
product terms and sums of products. The output tracks themselves act as a
final wired-NOR gate, so they serve both as logic and as routing.

The RTL models a complete test chip:

- three TLSs in series;
- the SRAM configuration memory, with its word-line, bit-line and
  read-back shift-register chains;
- the clock chain that makes 19 clock phases;
- the capture flip-flops and an output shift chain;
- a pair of multiplexers for measuring the core's delay on the tester.

The dynamic gates are modelled by the logic value they settle to.

## What one TLS computes

Each HLRB has three levels. Each level has eight gates, and each gate has
eight inputs.

1. **Input selectors (MUX8/NOR2).**
   - Selector *m* of every HLRB can reach tracks *m, m+8, …, m+56* of the
     input group.
   - Each candidate passes through an *optional inverter*. An optional
     inverter passes its input, passes its complement, or outputs 0.
   - The eight results meet in a NOR8. With one input enabled the selector
     is an inverting 8:1 multiplexer. With two enabled it is a NOR2 of the
     inputs, or, with both inverters complementing, an AND2 of them.
   - An HLRB therefore takes in up to 16 of the 64 inputs, as 8 local
     tracks.
2. **Product terms (PTG).**
   - Each local track is buffered by an inverter.
   - Each of the eight product terms is an AND of any subset of the eight
     local tracks, in either polarity. Because the selectors can form AND2s,
     this reaches AND16 of the inputs.
3. **First-level NOR4 and track drivers (NOR4_EN, INV_EN).**
   - Logic row *k* of the HLRB has a NOR4 with per-input enables. Rows 0–3
     read product terms 0–3; rows 4–7 read terms 4–7.
   - An enabled inverter follows the NOR4. Its output is the OR of the
     chosen terms, or 0 when disabled.
   - That output drives four long tracks.

Each output track is precharged high. Any of its four drivers pulls it low,
and the four drivers come from four different HLRBs. So one track computes

```
track = NOT( OR of up to 16 product terms )
```

Those terms come from up to four HLRBs, and each term reaches up to 16
inputs. **The outputs of a TLS are always the complement of a sum of
products.** A mapping either uses that inversion (for example, the next
TLS re-inverts through its selector) or chooses product terms of the
complement.

### Long-track wiring

Output *k* of HLRB *h* drives tracks `(8k + h + c) mod 64` for
`c = 0..3` (`opl_pkg::dist_track`). This pattern has three properties:

- every HLRB output reaches four neighbouring tracks;
- every track has exactly four drivers;
- the four drivers of a track come from four different HLRBs, so one HLRB
  never drives a track twice.

Track *t* is driven by HLRB `h = (t − c) mod 8`, through output
`k = ((t − c − h) mod 64) / 8`, for `c = 0..3`. An idle track reads 1.

### Track groups between TLSs

Group 0 feeds TLS 0 from the primary inputs. Groups 1 and 2 sit between
TLSs. Each track in those groups either carries the previous TLS's output
or a primary input, chosen by a configuration bit per track. The core thus
takes 64 to 192 inputs and gives 64 outputs (`plc_array`).

## Configuration

The memory has 64 rows. Row *r* holds logic row *r* of every TLS. Rows
8*h*…8*h*+7 of a TLS belong to HLRB *h*. Within an HLRB, row *k* holds:

| field (`hlrb_row_cfg_t`) | bits | meaning |
|---|---|---|
| `mux[7:0]`  | 16 | optional inverters of selector *k*; entry *j* acts on track 8*j*+*k* |
| `ptg[7:0]`  | 16 | optional inverters of product term *k*; entry *j* acts on local track *j* |
| `nor_en`    | 4  | enables of first-level NOR4 *k*, over the four terms of its group |
| `inv_en`    | 1  | enable of track driver *k* |

Each optional-inverter field is `{s1, s0}`:

- `11` passes the input;
- `10` passes its complement;
- `0x` gives 0, i.e. the input is not used.

The full memory word of a row is 113 bits. Bits `[37t +: 37]` configure
TLS *t*. Bits 111 and 112 select the primary input for track *r* in front
of TLS 1 and TLS 2.

### Polarity in practice

A selector given one input with setting `10` outputs the input itself. A
product-term literal with `11` then uses it in true polarity, and `10` in
complement. A selector with two inputs at `10` outputs their AND. With
`11` on both, it outputs their NOR.

### Programming sequence

All controls are plain ports of `opl_plc_chip`.

1. Pulse `wl_rst_i`. Then clock a single 1 into the word-line chain
   (`wl_d_i`, `wl_clk_i`); row 0 is now open.
2. For each row:
   1. With `bl_s_i = 0`, shift the 113 bits into the bit-line chain. The
      first bit shifted ends up in bit 0.
   2. Give one `bl_clk_i` edge with `bl_s_i = 1`. The chain holds and
      drives the bit lines, and the open row stores them.
   3. Clock the word-line chain once to open the next row.
3. Pulse `wl_rst_i` so that no word line stays open while the logic runs.

**Read-back.** Open a row the same way. Load the read-back chain with
`rb_load_i = 1` and one `rb_clk_i` edge. Then shift it out through `rb_q_o`,
bit 0 first.

## Clocking, capture and delay measurement

Each TLS uses six clock phases. Phase *i*+1 follows phase *i* by a
separation. The nominal separations are 90, 60, 60, 70, 100 and 110 ps,
490 ps per TLS.

- `clock_chain` builds the phases as a cascade of reduced-swing buffers
  (`rsb`) from `clk_in_i`. It has 6·3 + 1 = 19 phases; `clk_ph_o[0]` is
  phase 1.
- The 19th phase clocks the 64 capture flip-flops (`sdff_column`). Results
  are therefore in `po_q_o` 1470 ps after the rising edge of `clk_in_i`.
- `out_chain` loads `po_q_o` (`oc_load_i = 1`, one `oc_clk_i` edge) and
  shifts it out through `oc_q_o`, bit 0 first.
- `delay_mux` puts phase 1 and phase 19 on two pads:
  - with `dly_s_i = 1`, pad 1 carries phase 1 and pad 2 carries phase 19;
  - with `dly_s_i = 0`, they are swapped.

  Averaging the two measurements cancels any skew between the pads.

The separations model a tuned silicon buffer. `rsb` and `clock_chain` are
behavioural models with transport delays and are not synthesizable. The
separations are parameters (`SEP1_PS`…`SEP6_PS`, and `RISE_PS`/`FALL_PS`
per buffer). Everything else is synthesizable RTL. Inside the logic array
the settling is combinational. The phases only set when the result is
captured and when it can be observed on the pads.

## Mapped functions

`tb/tb_workloads.sv` maps by hand the functions used to evaluate the core,
and checks each against its Boolean equation.

| function | resources in this mapping | fits the 3-TLS default |
|---|---|---|
| XOR2 | two AND2 selectors, one product term | yes |
| 16:1 multiplexer | 16 AND5 terms in 4 HLRBs, OR16 on one track | yes (1 TLS) |
| 16-bit address decoder | per output: 2 HLRBs, selectors as NOR2 of literals, NOR4 + wired NOR | yes (1 TLS); 4 outputs simulated |
| 9-bit parity | XOR3 ×3 in TLS *n*, XOR3 of those in TLS *n*+1 | yes (2 TLS) |
| 10-input, 2-output random logic | 9 product terms in 3 HLRBs | yes (1 TLS) |
| 16-bit carry-lookahead adder | published as 3 TLS levels; its low 4 bits mapped here in 2 TLSs (G, P from selectors; carries and half sums; then sums) | by level count; 4-bit slice simulated exhaustively |
| 8×8 pipelined multiplier | published as 9 TLS levels | no (needs `NUM_TLS = 9`) |

`tb/tb_opl_plc_chip.sv` runs the whole chip at its default size:

- it programs all 64 rows through the chains and reads rows back;
- it passes an XOR through all three TLSs;
- it joins a primary input on a shared track and decodes a 16-bit address;
- it checks that results appear only at phase 19 and shifts them out;
- it measures the 1470 ps delay on both pads in both multiplexer settings.

## Departures from the published core, and open points

- **Configuration bits.** The published TLS has 2816 SRAM bits, i.e. 44 per
  logic row. This design needs 37 per row, as listed above. The use of the
  remaining bits is not known, so they are not modelled.
- **Input select bits.** The published chip has 8512 bits in all. Here it is
  64 × 113 = 7232: 3 × 2368 logic bits plus 128 input-select bits.
- **Layout choices of this design.** The selector-to-track pattern, the
  long-track wiring formula and the split of NOR4 rows between the two
  product-term groups all meet the published rules. The exact published
  pattern is not spelled out, so the wiring of the original chip may
  differ, and with it how tightly a given function packs.
- **Capture edge.** The capture flip-flop is modelled on the rising edge of
  phase 19. This is the edge the delay measurement is defined on. The
  published description also mentions latching at a falling edge.
- **Random-logic example.** The product terms come from its truth table.
  The published equations for the same function list different literals.
  The function takes three HLRBs here instead of the published two. Its
  five-term output needs a driver from a second HLRB, because no HLRB
  drives one track twice.
- **Mapped functions not reproduced.** The full 16-bit adder is not mapped
  onto this wiring; only a 4-bit slice of its scheme is. The decoder is shown with four outputs per TLS, not the
  published sixteen, which rely on product terms shared in a way that is
  not described in enough detail to reproduce.
- **Analog parts.** The buffer delay has no voltage-control inputs; the
  delays are parameters. Clock buffer trees, decoupling capacitors, pads and
  the power network have no logic function and are left out.
- **Chain controls.** Each chain has its own control ports. The test chip
  shares a small number of pads, and its pin assignment is not modelled.

## Files

- `rtl/opl_pkg.sv`: sizes, the row configuration type, and the wiring
  functions.
- Gates:
  - `opt_inv`: optional inverter;
  - `mux8_nor2`: input selector;
  - `ptg_array`: eight product terms;
  - `nor4_en`;
  - `inv_en`;
  - `nor4_dist_tracks`: the 64 long tracks.
- Logic: `hlrb` ⊂ `tls` ⊂ `plc_array`.
- Memory and chains:
  - `spb_array`;
  - `static_dff_r` and `static_dff`;
  - `wl_chain`, `bl_chain`, `rb_chain`, `out_chain`;
  - `sdff_column`.
- Timing: `rsb`, `clock_chain` and `delay_mux` (the first two are
  behavioural).
- Top: `opl_plc_chip`.
- `tb/`:
  - one self-checking testbench per module, `tb_<module>.sv`;
  - `tb_workloads.sv`;
  - `opl_tb_pkg.sv`, the shared Boolean reference model used by the logic
    testbenches.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_opl_plc_chip \
    -y rtl -y tb +libext+.sv rtl/opl_pkg.sv tb/opl_tb_pkg.sv \
    tb/tb_opl_plc_chip.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench. `--timing` is
needed for the delay models and the clock-driven testbenches. All files use
`` `timescale 1ps/1ps ``.

The full-chip test runs at the default size (`NUM_TLS = 3`, 64 rows) in
under a second of simulation time. `NUM_TLS` can be raised on
`opl_plc_chip` to model deeper cores. The row word and the clock chain grow
with it.
