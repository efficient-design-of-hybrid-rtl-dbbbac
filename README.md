# Hybrid LUT / MUX4 FPGA logic blocks

A six-input lookup table (6-LUT) is a 64-to-1 multiplexer over 64
configuration cells. It can implement any six-input function. Yet a plain
4-to-1 multiplexer, which is very common in real logic, uses all six of the
LUT's inputs (four data plus two select) and leaves almost all of its 64 cells
doing nothing useful. This design is a configurable logic block (CLB) that
replaces some of the 6-LUTs with **MUX4** elements. A MUX4 is a hardened 4-to-1
multiplexer with a configurable inverter on each data input. It has the same
six input pins as a LUT, but only four configuration cells and three levels of
2-to-1 multiplexing instead of six. Because the pin count is the same, the
routing inside the block treats both kinds of element alike.

Two block architectures are provided, each in the MUX4:LUT ratio that gave the
best area results for it:

| | nonfracturable CLB (`hybrid_clb`) | fracturable CLB (`hybrid_frac_clb`) |
|---|---|---|
| CLB inputs | 40 | 80 |
| BLEs (basic logic elements) | 10, each 6 inputs / 1 output | 10, each 8 inputs / 2 outputs |
| MUX-type element | MUX4 | Dual MUX4 |
| LUT-type element | 6-LUT | fracturable 6-LUT (one 6-LUT or two 5-LUTs) |
| default MUX4 : LUT | 4 : 6 (`N_MUX4 = 4`) | 2 : 8 (`N_MUX4 = 2`) |
| optional flip-flop | one per BLE | one per BLE output |
| intracluster crossbar | 50 sources → 60 pins, 50 % populated | 100 sources → 80 pins, 50 % populated |
| configuration cells | 710 | 1036 |

The top, `hybrid_fpga_top`, places one block of each kind side by side. Each
block has its own inputs, outputs and configuration chain. The two are
alternative architectures, not parts of one device. Routing between CLBs is
outside this design, so the pins of each block are ports of the top.

## What a MUX4 can implement

`mux4_le` computes `out = d[s] ^ inv[s]`. The data inputs `d0..d3` are
`le_in[3:0]`, the select `s = {s1,s0}` is `le_in[5:4]`, and `inv` is the four
configuration cells. Internally it is seven 2-to-1 multiplexers and four
inverters: four multiplexers choose each data input or its inverse, and three
form the 4-to-1 tree.

All other flexibility comes from how the crossbar connects the pins. This gives
the following functions:

* **Any 2-input function f(a,b).** Route a and b to the selects and tie every
  data pin to logic 0. Inversion cell `{b,a}` then holds f's truth-table entry.
* **Any 3-input function.** Take the Shannon decomposition about two of the
  variables and route those two to the selects. Each of the four cofactors is
  0, 1, c or ¬c. That is a data pin tied to 0 or to c, with or without
  inversion.
* **Some 4-, 5- and 6-input functions.** This works when the cofactors about
  some pair of inputs each depend on at most one remaining input. The 4-to-1
  multiplexer itself, with optional inversion on its data inputs, is the one
  family of 6-input functions that fits.

Choosing which functions of a netlist go to MUX4s is the job of the technology
mapper. This RTL implements only the hardware.

## Fracturable elements

The fracturable BLE has 8 input pins and 2 outputs, in the style of an adaptive
LUT.

* **`frac_lut6`** splits its 64-cell table into two 5-input halves. When the
  mode cell is 0 it is one 6-LUT: both halves read `le_in[4:0]` and `le_in[5]`
  chooses between them. When the mode cell is 1 it is two 5-LUTs:
  * LUT A reads `le_in[4:0]` and uses cells 31:0.
  * LUT B reads `{le_in[7:5], le_in[1:0]}` and uses cells 63:32.

  In this mode the two LUTs share `le_in[1:0]`. `le_out[1]` always shows the
  upper half.
* **`dual_mux4`** is two MUX4s. Eight pins cannot serve two 6-input elements,
  so the two share their selects `le_in[7:6]` and two data pins. MUX A takes
  data from `le_in[3:0]` and MUX B from `le_in[5:2]`. Used alone, MUX A is an
  ordinary MUX4 with six independent inputs.

Which pins are shared is this design's choice, in both elements.

## Crossbar and feedback

Each BLE input pin is a binary-encoded multiplexer over half of the sources.
The sources are the CLB inputs (indices 0 … N_IN-1) followed by the BLE outputs
fed back (N_IN …). Pin `p` can reach sources `p%2, p%2+2, p%2+4, …`. A select
value `k` picks source `2k + p%2`, and a value past the last source picks
source 0. In a nonfracturable BLE, pins 0, 2, 4 see the even sources and
pins 1, 3, 5 the odd ones. Every source can therefore reach three pins of every
BLE.

Because of the feedback, one BLE can drive another inside the block. It also
means a configuration can close a loop that has no flip-flop in it. As in any
FPGA, avoiding that is up to the configuration. Lint tools report the feedback
path as a combinational loop, and it stays because the architecture needs it.
While `cfg_rst_n` is low or `cfg_en` is high, the feedback into the crossbar
is forced to 0. This stops random power-up contents or a half-shifted image
from oscillating. For the same reason a testbench should hold `cfg_rst_n` low
from time zero, before the configuration is cleared.

## Configuration

All configuration cells of a block form one shift register (`config_chain`).
While `cfg_en` is high, each rising clock edge shifts `cfg_in` in at bit 0.
The image is sent **MSB first**, takes exactly `CFG_W` clocks, and the old
image comes out of `cfg_out` at the same time. Layout, from the LSB:

1. The crossbar select fields, `SEL_W` bits per pin. Pin `p` is input `p % PINS`
   of BLE `p / PINS`. `SEL_W` is 5 in the nonfracturable block and 6 in the
   fracturable one.
2. BLE 0 … BLE 9, MUX-type BLEs first. Widths are given by `hybrid_pkg`
   (`ble_cfg_w`, `frac_ble_cfg_w`, `ble_cfg_off`):
   * MUX4 BLE: 4 inversion cells, then the register-use bit (5 bits).
   * 6-LUT BLE: 64 truth-table cells (entry = input value), then the
     register-use bit (65 bits).
   * Dual MUX4 BLE: inversion cells of A [3:0] and of B [7:4], then register
     use for output 0 and output 1 (10 bits).
   * Fracturable-LUT BLE: 64 table cells, the mode cell, then register use for
     output 0 and output 1 (67 bits).

There are two resets. `cfg_rst_n` clears the configuration cells (power-on).
`rst_n` clears only the BLE flip-flops, so user logic can be reset without
reloading. A BLE's flip-flop loads its LE output on every rising edge. The
register-use bit chooses whether the BLE output is that flip-flop or the LE
output directly.

## Timing

The path from CLB inputs to CLB outputs is combinational through the crossbar
and the LEs. Registered BLE outputs change on the rising edge of `clk`. There is
no pipelining or handshake. The element sizes behind the ratios come from
transistor-level estimates for a 22 nm process:

* A delay-matched 6-LUT is about 930 minimum-width transistors (261 ps).
* A MUX4 is about 95 transistors (204 ps).
* A Dual MUX4 is about 249 transistors.

Those figures belong to a full-custom cell and say nothing about what this RTL
synthesizes to.

## Files

| file | contents |
|---|---|
| `rtl/hybrid_pkg.sv` | shared constants and configuration-layout functions |
| `rtl/mux2.sv`, `rtl/mux4_le.sv`, `rtl/lut6.sv` | 2-to-1 MUX cell, MUX4 element, K-input LUT |
| `rtl/dual_mux4.sv`, `rtl/frac_lut6.sv` | fracturable elements |
| `rtl/ble.sv`, `rtl/frac_ble.sv` | BLEs with optional flip-flops |
| `rtl/xbar.sv`, `rtl/config_chain.sv` | crossbar, configuration shift register |
| `rtl/hybrid_clb.sv`, `rtl/hybrid_frac_clb.sv` | the two CLBs |
| `rtl/hybrid_fpga_top.sv` | both CLBs side by side |
| `tb/hybrid_ref_pkg.sv` | reference functions and the `ClbModel` class |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_ratio_sweep.sv`, `tb/clb_ratio_checker.sv` | both CLBs at every ratio from 1:9 to 5:5 |

The parameters worth changing are `N_MUX4`, which sets the MUX4:LUT ratio (the
architectures were studied from 1:9 to 5:5), and `N_IN`, `N_BLE` and `STRIDE`
on the CLBs. `STRIDE = 2` gives 50 % crossbar population, and `STRIDE = 1` a
full crossbar.

## Simulating

Each testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<n>`. For example, this runs the end-to-end test
of the top at default sizes:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/hybrid_pkg.sv tb/hybrid_ref_pkg.sv tb/tb_hybrid_fpga_top.sv \
    --top-module tb_hybrid_fpga_top -o sim
./obj_dir/sim
```

What the testbenches check:

* The element testbenches compare every input pattern with the element's
  definition. `tb_mux4_le` also shows that the MUX4 realizes every 2- and
  3-input function when routed as described above.
* The CLB testbenches and the top testbench work the same way:
  1. `ClbModel` draws random configuration images. Any loop through the
     feedback passes a flip-flop.
  2. Each image is shifted in through the chain. The test checks that the load
     takes `CFG_W` clocks and that the previous image streams out of `cfg_out`.
  3. Every output is compared with the model, cycle by cycle.
  4. The test counts, and requires, each mechanism: crossbar feedback,
     registered and combinational outputs, MUX4 and LUT elements, both modes of
     the fracturable LUT, and a user reset that keeps the configuration.
* `tb_ratio_sweep` runs the same model-based check on both CLB kinds at each
  MUX4:LUT ratio from 1:9 to 5:5.

## Where this departs from, or adds to, the architecture study

* Configuration loading is not specified by the study. The serial chain, its
  bit order, the two resets and the feedback hold during loading are choices
  made here.
* Which half of the sources each crossbar pin sees is a choice made here. So
  is the binary encoding of its selects. The study fixes only 50 %
  depopulation.
* Input sharing in the Dual MUX4 and the fracturable LUT, pin order in the MUX4,
  and the placement of MUX-type BLEs at the low indices are choices made here.
* Not built:
  * The routing between CLBs (channels, switch boxes), which is taken as a
    conventional island-style fabric.
  * The mapping software that decides which functions go into MUX4s.
  * Device-level arrays of CLBs. The benchmark circuits of the study each need
    many CLBs and cannot run on the two blocks here.
