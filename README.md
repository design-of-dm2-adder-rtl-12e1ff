# DM² adder: one-cycle dual-mode addition with dual mode logic gates

Most additions have short carry chains. A *dual-mode adder* uses that fact:
it is built for the carry chain you can expect, not the worst case, and a
small detector flags the few operand pairs that could carry further. In its
original form such an adder spends extra clock cycles on the rare long-carry
additions, so a pipeline has to stall for them. That is awkward in an
in-order pipeline and hard to fit into an out-of-order one.

The DM² ("dual mode squared") adder removes the stall. Its gates are *dual
mode logic* (DML) gates, which can run in one of two modes, switchable every
clock cycle:

| detector says | adder mode | DML gate mode | what it costs |
|---|---|---|---|
| normal (short carries only) | normal | **static**: behaves like static CMOS | low energy, the common case |
| extended (a carry may cross a whole block) | extended | **dynamic**: precharge, then evaluate | more energy, but fast enough for the full ripple |

So every addition finishes in one cycle. The energy cost of the dynamic mode
is paid only for the rare extended-mode operand pairs.

This repository holds a logic-level SystemVerilog model of that adder. The
configuration is 12 bits: three ripple-carry blocks of four bits. It also has
a small pipeline wrapper in which the mode is decided one stage ahead of the
addition.

## Structure

```
dm2_top                 pipeline: decode stage -> register -> ALU stage
├── nrex_detect         decode stage: normal / extended decision (NR/EX)
├── dml_clk_ctrl        ALU stage: static or dynamic DML clock for this cycle
└── dm2_adder           ALU stage: 3 chained blocks
    └── dml_rca  x3     4-bit ripple-carry block, alternating polarity
        └── dml_full_adder x4   Type A / Type B DML full adder
dm2_pkg                 shared types (fa_type_e, dml_mode_e) and default sizes
```

Parameters: `K` (bits per block, default 4) and `NUM_BLOCKS` (default 3). The
operand width is `K*NUM_BLOCKS`.

## The mode decision (`nrex_detect`)

A carry can run past the end of a K-bit block only if every bit of that block
*propagates*, that is, `x[i] ^ y[i] = 1` for all K bits. For each block, an AND
of its K propagate bits raises `blk_prop[j]`. A NOR over the blocks gives
`nr_ex`:

* `nr_ex = 1`: normal mode. No carry chain is longer than one block.
* `nr_ex = 0`: extended mode. At least one block could pass a carry straight
  through.

The decision ignores the carry in. It is conservative: a fully propagating
block with no incoming carry still selects extended mode. With random
operands, a given 4-bit block propagates fully with probability 1/16, so about
18% of random 12-bit additions run in extended mode. Real operand
distributions are usually more skewed towards normal mode.

## Alternating-polarity ripple carry (`dml_rca`, `dml_full_adder`)

Each block is a ripple-carry adder of four full adders. The cells alternate
between two types, and each cell is an *inverting* full adder: it outputs the
complement of the carry and the complement of the sum.

* **Type A** (even bits) takes true `x`, `y` and carry. It outputs carry‑bar
  and sum‑bar.
* **Type B** (odd bits) takes inverted `x` and `y`, and the carry‑bar straight
  from the Type A cell before it. A full adder is self-dual:
  `FA(~a,~b,~c) = ~FA(a,b,c)`. So the inverting Type B cell outputs a **true**
  carry and a **true** sum.

The carry therefore passes from cell to cell with no inverter in its path.
That is why the scheme roughly halves the ripple delay compared with
non-inverting cells. Inverters sit only off the carry path:

* on the operands of the Type B cells;
* on the sums of the Type A cells;
* on the carry out, if K is odd.

All ports of `dml_rca` are true polarity.

## Modelling a DML gate

A DML gate is a static CMOS gate plus one clocked transistor on its output:

* **Type A** has a pMOS to the supply, driven by `clk`.
* **Type B** has an nMOS to ground, driven by `clk_bar`.

In static mode the extra transistor is held off: `clk` stays high and
`clk_bar` stays low. In dynamic mode the clock toggles. In the precharge phase
Type A outputs are pulled to 1 and Type B outputs to 0. In the evaluation
phase the gate computes its function.

`dml_full_adder` models this at logic level, with one clock input
`dml_clk`:

```
dml_clk = 1  (static mode, or evaluation)  ->  outputs = ~carry, ~sum of the inputs
dml_clk = 0  (precharge)                    ->  outputs = 1 (Type A) / 0 (Type B)
```

Type B forms `clk_bar` from `dml_clk` internally. The precharge values fit the
alternating chain: during precharge every true-polarity carry and sum along
the chain reads 0. So a block, and the whole adder, reads `sum = 0`,
`cout = 0` while precharging.

This model does not cover:

* the transistor sizing that makes the dynamic mode faster than the static
  one;
* the charge kept on a dynamic node;
* energy and delay.

Because of this, the model shows the *logic* and the *cycle timing* of the
design, not its speed or power. In this model both modes give the same sum;
they differ only in the precharge half-cycle.

## Cycle timing (`dm2_top`, `dml_clk_ctrl`)

The mode is chosen in the decode stage, one stage before the adder. This
leaves a whole cycle to switch the DML clock.

```
            edge n                      edge n+1
clk      ___/‾‾‾‾‾‾‾‾‾‾‾‾‾‾\______________/‾‾‾‾
id_*     op A (nrex_detect runs here)  | op B
ex_*     ...                 | op A registered with its nr_ex
static:  dml_clk = 1 ─────────────────────────  sum valid all cycle
dynamic: dml_clk = 0 (precharge) | 1 (evaluate) sum valid in the low half
```

* On the rising edge, `dm2_top` registers the operands, the carry in, the
  valid bit and `nr_ex` into the ALU stage.
* `dml_clk_ctrl` computes `dml_clk = nr_ex | ~clk`:
  * in a static cycle it stays 1;
  * in a dynamic cycle it is 0 in the high half of `clk` (precharge) and 1 in
    the low half (evaluation).
* The result of an operation accepted at edge *n* is valid before edge *n+1*,
  in both modes. The latency is one cycle and the adder accepts one operation
  per cycle, with no stall.
* `res_valid = ex_valid & dml_clk` tells when `ex_sum`/`ex_cout` can be read.
  A downstream register clocked at the next rising edge sees the evaluated
  value.
* `ex_mode` (`DML_STATIC`/`DML_DYNAMIC`) reports the mode of the current
  cycle.

`nr_ex` changes only at a rising edge, where `~clk` falls. So `dml_clk` can
only fall at a rising edge and rise at a falling edge. The OR gate needs this
to stay glitch-free in a real netlist. In silicon it would normally be a
latch-based clock gate. The model keeps the plain gate.

Reset is synchronous and active low. It clears the valid bit and puts the
gates into static mode. Idle cycles (`id_valid = 0`) also run in static mode.

## Where this model departs from, or goes beyond, the source design

Taken from the design:

* three ripple-carry blocks of four alternating Type A / Type B DML full
  adders;
* the AND-per-block / NOR mode detector, whose output is named NR/EX;
* the static mode for normal additions and the dynamic mode for extended
  ones;
* a mode decision in the decode stage;
* a single-cycle result in both modes.

Chosen here, where the design gives no detail:

* **Detector inputs**: the per-bit propagate signals `x ^ y`. The AND gates
  are known to be fed from each block's operands, but not through what.
* **Inverter placement**: on Type B operands and Type A sums. Each block of
  the source design has four inverters whose connections are not given.
* **NR/EX polarity**: 1 = normal.
* **Dynamic-mode phasing**: precharge in the high half of `clk`.
* **Pipeline bookkeeping**: the valid flag, `res_valid`, reset and idle
  behaviour.

Not built:

* The plain dual-mode adder with a multi-cycle extended mode. It is the
  baseline this design improves on: in extended mode it takes extra cycles
  and stalls the pipeline, which DM² avoids.
* The footed and headed DML gate variants. These are alternative gate
  topologies that the adder does not use.
* Anything analog: the 180 nm transistor netlists, sizing, and the power,
  delay and energy measurements.
* The surrounding processor.

## Simulating

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. With
Verilator 5:

```sh
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/dm2_pkg.sv rtl/dml_full_adder.sv rtl/dml_rca.sv rtl/nrex_detect.sv \
  rtl/dml_clk_ctrl.sv rtl/dm2_adder.sv rtl/dm2_top.sv tb/dm2_top_tb.sv \
  --top-module dm2_top_tb -o sim
./obj_dir/sim
```

For the other modules, replace the testbench file and the top module.

| testbench | what it checks |
|---|---|
| `dml_full_adder_tb` | both cell types, all 16 input/clock combinations, precharge values |
| `dml_rca_tb` | all 512 input combinations of a 4-bit and a 3-bit block, evaluating and precharging |
| `nrex_detect_tb` | block flags and NR/EX against a bit-by-bit reference; directed "one bit short" cases |
| `dml_clk_ctrl_tb` | DML clock in both halves of static and dynamic cycles, random mode switches |
| `dm2_adder_tb` | 12-bit sums against integer addition, full-length carry, precharge |
| `dm2_top_tb` | 200,000 cycles at the default size (see below) |

`dm2_top_tb` runs at the default 12-bit size. It checks the following every
cycle:

* mode, valid, precharge behaviour, and the sum in each half-cycle;
* the one-cycle latency;
* the decode-stage block flags.

It also counts these events and fails if any of them never happens:

* normal and extended operations;
* precharges;
* static→dynamic and dynamic→static switches;
* carry outs;
* 12-bit full ripples;
* idle cycles;
* a reset.

It finishes in well under a second.
