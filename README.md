# Hybrid MUX4 / 6-LUT logic blocks for FPGAs

A 6-input LUT is a 64:1 multiplexer over 64 configuration cells. Yet the
widest multiplexer it can implement is a 4:1 mux (four data inputs plus two
selects). Multiplexers are common in real netlists, so much of that LUT area
is wasted on them. This design replaces some of the LUTs in a logic block with
a hardened **MUX4** element. A MUX4 is a 4:1 multiplexer with optional
inversion on each data input. It has the same six input pins as a 6-LUT, but
it costs about a tenth of the LUT's area: 108 against 930 minimum-width
transistors in the transistor-level sizing this architecture is based on.

The RTL models two logic-block (CLB) families built around this idea:

* **Nonfracturable hybrid CLB** (`clb_nf`): 40 inputs and ten single-output,
  6-input basic logic elements (BLEs). By default 3 of them hold a MUX4 and
  7 hold a 6-LUT.
* **Fracturable hybrid CLB** (`clb_frac`): 80 inputs and ten 8-input,
  2-output BLEs. By default 3 of them hold a *Dual MUX4* and 7 hold a
  *fracturable 6-LUT*, which is one 6-input function or two 5-input ones.

Each BLE has a bypassable register. A 50%-depopulated crossbar feeds the BLE
inputs from the CLB inputs and from every BLE output. Everything is programmed
through a serial configuration chain. `hybrid_fpga_top` places one tile of
each family side by side. The two families are alternatives, so they are not
connected to each other.

## Why the mix pays off, and when it does not

A simple tile-area model sets the proportions. Routing is 50% of a tile, the
ten LUTs are 30%, and flip-flops and other logic are 20%. Swapping three of ten
6-LUTs for MUX4s shrinks the logic share to (3 × 0.116 + 7)/10 of its size.
That is 22% of the tile instead of 30%, so the tile is about 92% of a LUT-only
tile. This only pays off if the circuit has enough MUX4-compatible functions
to fill those slots. Otherwise extra CLBs are needed to supply LUTs. A 3:7
block breaks even at about 8% more CLBs than a LUT-only block. The MUX:LUT
ratio is therefore a parameter (`N_MUX4`), so the whole 1:9 … 5:5 range can
be built.

| ratio (MUX:LUT) | 1:9 | 2:8 | 3:7 | 4:6 | 5:5 |
|---|---|---|---|---|---|
| nonfracturable, minimum area vs LUT-only | 97.3% | 94.7% | 92.0% | 89.4% | 86.7% |
| fracturable, minimum area vs LUT-only | 97.8% | 95.6% | 93.5% | 91.3% | 89.1% |

Whether a function fits a MUX4 matters more than anything else in this
design. Any function that fits a MUX4 also fits a 6-LUT. The reverse is not
true.

## The MUX4 element (`mux4_le`)

`out = d[s] ^ inv[s]`. The element has four data pins `d[3:0]` and two
select pins `s[1:0]`. Each data pin has an inversion bit, and the selects
have none. Inverting a select would only permute the data inputs, so it would
add no new functions. In hardware this is four 2:1 muxes for the inversions,
a three-mux 4:1 tree and four configuration cells.

A function fits if there is an ordered pair of its variables, placed on
`s[0]` and `s[1]`, such that each of the four Shannon cofactors is one of:

* 0 or 1: the crossbar supplies constant 0, and the inversion bit turns it
  into 1 where needed;
* a single other variable, or the complement of one.

This covers every 2- and 3-input function. It also covers the inverting 4:1
mux of six inputs, and all 4-, 5- and 6-input functions whose cofactors
decompose this way (different cofactors may use different variables).
`tb_mux4_mapping` checks this in the hardware. It takes a truth table, finds
a mapping, loads it into the CLB and compares all 64 input combinations.
Functions that do not fit (for example XOR6 and AND6) go to a 6-LUT BLE, as
a packer would place them.

## Fracturable elements

**Fracturable 6-LUT (`frac_lut6`)** has eight pins:

| pins | use |
|---|---|
| `in[1:0]` | shared by both halves |
| `in[4:2]` | private to 5-LUT A |
| `in[7:5]` | private to 5-LUT B |

* `split = 1`: `out_a = A[{in[4:2],in[1:0]}]` and `out_b = B[{in[7:5],in[1:0]}]`.
  Two 5-input functions fit if they share two inputs. Two 4-input functions
  with no common input also fit: A ignores `in[1]` and B ignores `in[0]`, so
  eight distinct signals are used.
* `split = 0`: B is addressed by A's five inputs, and `in[5]` picks the
  half. `out_a` is then a 6-input function with truth table `{lut_b, lut_a}`.

**Dual MUX4 (`dual_mux4`)** contains two MUX4s. They share the data pins
`in[3:0]` and have their own selects: `in[5:4]` for A and `in[7:6]` for B.
Each MUX has its own four inversion bits. Because all four data pins are
shared, two unrelated functions fit together only when their data-pin needs
agree. For example, any two 2-input functions fit: all data pins are constant
0 and each MUX's inversion bits hold its own truth table. `tb_frac_mapping`
runs all 256 such pairs. A pair of *genuine* 3-input functions with no common
input does **not** fit. Each needs its third variable on a data pin that the
other MUX also reads. The architecture claims this pairing works. With the
stated wiring (dedicated selects, shared data) it does not, and this RTL
keeps the stated wiring.

## BLEs

`ble_nf` is one LE followed by a D flip-flop and a bypass mux. `ble_frac`
does the same for each of its two outputs. Each register has its own
`reg_en` configuration bit. The registers capture on the rising edge of `clk`
when `ce` is high. `rst_n` clears them to 0 asynchronously. When the register
is bypassed, the output is combinational. When it is used, the output follows
the LE one clock later.

## Intra-CLB crossbar (`xbar_depop`)

Sources are numbered `src = {BLE outputs, CLB inputs}`. For `clb_nf` that is
inputs 0–39 and then BLE b at 40+b. For `clb_frac` it is inputs 0–79 and then
BLE b output o at 80+2b+o. With `DEPOP = 2`, pin p (numbered across all BLEs,
BLE b's pin j is p = b·pins+j) reaches only the sources whose index has the
same parity as p. Select code c picks source `2c + p%2`. The code N_SRC/2
(25 or 50) drives a constant 0, and so does any larger code. A BLE's pins
alternate parity, so every BLE can still reach every source, just not on
every pin. A mapper therefore has to place each signal on a pin of the right
parity. In the testbenches, a signal that must reach pins of both parities is
driven onto one even and one odd CLB input.

BLE outputs feed back into the crossbar. This feedback is forced to 0 while
`cfg_rst_n` is low or `cfg_en` is high. A cleared, random or half-shifted
bitstream therefore cannot form a combinational ring. Lint tools still see
the structural loop through the feedback (Verilator reports `UNOPTFLAT`).
Only a bitstream that deliberately programs a combinational cycle can close
it, as in any FPGA fabric.

## Configuration bitstream

Each CLB has one shift chain (`cfg_chain`). While `cfg_en` is high, every
rising clock edge shifts `cfg_in` into bit 0. Send the word most significant
bit first. Loading takes exactly `CFG_BITS` enabled cycles. `cfg_out` is the
top bit, so chains can be cascaded. `cfg_rst_n` clears the chain. The user
reset `rst_n` does not touch it.

Layout of the configuration word, from the least significant bit up:

| field | `clb_nf` (770 bits) | `clb_frac` (979 bits) |
|---|---|---|
| crossbar codes, pin p at `p*SEL_W` | 60 pins × 5 bits = [299:0] | 80 pins × 6 bits = [479:0] |
| MUX-type BLE b (b < N_MUX4) | `{reg_en, inv[3:0]}` at 300+5b | `{reg_en_b, reg_en_a, inv_b[3:0], inv_a[3:0]}` at 480+10b |
| LUT-type BLE b | `{reg_en, truth[63:0]}` at 300+5·N_MUX4+65(b−N_MUX4) | `{reg_en_b, reg_en_a, split, lut_b[31:0], lut_a[31:0]}` at 480+10·N_MUX4+67(b−N_MUX4) |

The MUX-type BLEs are BLEs 0 … N_MUX4−1. `hyb_pkg` computes the offsets for
other parameter values (`ble_cfg_w`, `ble_cfg_off`, `xbar_sel_w`). In a 6-LUT
table, `in[0]` is the least significant address bit. BLE pin j is LE pin j.
For the MUX4, pins 0–3 are data and pins 4–5 are selects.

## Files

| file | contents |
|---|---|
| `rtl/hyb_pkg.sv` | sizes, LE-kind enum, config structs, layout functions |
| `rtl/lut6.sv`, `rtl/mux4_le.sv` | nonfracturable logic elements |
| `rtl/frac_lut6.sv`, `rtl/dual_mux4.sv` | fracturable logic elements |
| `rtl/ble_nf.sv`, `rtl/ble_frac.sv` | BLEs with optional registers |
| `rtl/xbar_depop.sv` | depopulated crossbar |
| `rtl/cfg_chain.sv` | configuration shift chain |
| `rtl/clb_nf.sv`, `rtl/clb_frac.sv` | the two hybrid CLBs |
| `rtl/hybrid_fpga_top.sv` | both tiles side by side |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fab_pkg.sv` | bitstream builders and reference models for the CLB tests |
| `tb/tb_mux4_mapping.sv`, `tb/tb_frac_mapping.sv` | function-mapping workloads |
| `tb/tb_ratio_sweep.sv` | both CLBs at every ratio from 1:9 to 5:5 |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
including through a watchdog. For example:

```
verilator --binary --timing --assert -Wno-UNOPTFLAT -Irtl -Itb \
    rtl/hyb_pkg.sv tb/tb_fab_pkg.sv tb/tb_hybrid_fpga_top.sv \
    --top-module tb_hybrid_fpga_top -o sim
./obj_dir/sim
```

Replace the testbench name for the others. `-Wno-UNOPTFLAT` accepts the
feedback loop described above. All tests run in seconds at the default
sizes.

What the tests cover:

* **Leaf elements** (`lut6`, `mux4_le`, `frac_lut6`, `dual_mux4`): exhaustive
  or near-exhaustive comparison against independent reference expressions.
* **BLEs**: random inputs, clock enable and configuration. Checked: the
  one-cycle register latency, that the register holds when `ce` is low, and
  reset.
* **Crossbar**: random codes, including the constant and out-of-range codes,
  and reachability of every source from every BLE.
* **Configuration chain**: the load takes exactly N cycles, idle cycles do
  not shift, the word shifts out in order, and reset clears the chain.
* **CLB tests and `tb_hybrid_fpga_top`**: each tile is programmed with a
  small circuit. The circuits are an inverting 4:1 mux, an XOR built from
  constant data, a random 6-LUT, a LUT fed back from two other BLEs,
  registered toggles, a Dual MUX4 with two different outputs, a split
  6-LUT, and an unsplit 6-LUT. Every output is compared with a model on every
  cycle. The top test also counts each mechanism and fails if one never
  happened.
* **`tb_ratio_sweep`**: builds both CLB families at every ratio from 1:9 to
  5:5. Every BLE is programmed, and all outputs are checked against the
  layout rule above.

## Where this RTL goes beyond the architecture description

These points are this design's own choices. The architecture description
does not specify them.

* The serial configuration chain, its bit layout, and the separate
  configuration reset.
* The feedback hold during configuration.
* The register clock enable and asynchronous reset.
* The crossbar's parity pattern, and constants supplied as a crossbar code.
* The pin assignment of the fracturable 6-LUT and its 6-LUT-mode wiring.
* Per-MUX inversion bits in the Dual MUX4.
* Placing the MUX-type BLEs first in the CLB.
* A 3:7 ratio for the fracturable block. The architecture only says the same
  1:9 … 5:5 sweep applies.

Not included:

* The global inter-CLB routing (channels, switch and connection blocks). It
  is a standard island-style fabric, not specified here, so tile I/O is
  brought out as ports.
* Transistor sizing and delays (MUX4 about 248 ps against 398 ps for a 6-LUT,
  in 40 nm terms). These have no RTL meaning.

A whole benchmark circuit (hundreds to tens of thousands of LEs) needs many
tiles plus global routing, so it cannot run on these two tiles. The mapping
testbenches instead exercise the per-function step of that flow: they pick
MUX4 or LUT per function, place the pins and load the bitstream.
