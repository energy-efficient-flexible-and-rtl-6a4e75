# CARLA: a reconfigurable convolution accelerator

CARLA computes the convolutional layers of deep CNNs such as ResNet-50 and
VGG-16 with 16-bit fixed-point data. The design rests on two ideas:

* **Serial accumulation for 3x3 filters.** The three PEs of a convolution unit
  (CU) hold the three weights of one filter row and are chained through
  accumulator registers. A partial sum enters at PE #0, gains one product in
  each PE, and leaves PE #2 one cycle later as a finished filter-row result.
  Every PE does useful work in every cycle, and the zero padding at the left
  and right borders costs no cycles.
* **One shared input pipeline with feedback.** All CUs get the same operand
  stream, one cycle apart, through a chain of pipeline registers. Behind the
  last CU the chain continues through a delay line with taps. Input rows that
  the next filter-row step needs again are fed back from a tap, so they are
  not fetched from DRAM a second time.

In 1x1 mode the same hardware swaps roles. The CU registers hold input
features, the pipeline carries filter weights, and every PE works on its own
output pixel.

This repository holds synthesizable SystemVerilog for the accelerator, with
self-checking testbenches for each block and for the whole design.

## Block diagram

```
             Input#0 ──► [mux]──►PR0──►PR1──► ... ──►PR64──►[19]──►[84]──►[14]──►[16]──►[26]
                           ▲       │      │             │  │       │      │      │      │
                           └───────┼──────┼─────────────┼──┴───────┴──────┴──────┴──────┘ taps
Input#1..#3 (broadcast) ───────────┼──────┼─────────────┤      (delays 65 84 168 182 198 224)
                                   ▼      ▼             ▼
                                 CU#0   CU#1   ...    CU#64 (4 PEs)       controller ─ uop ─► ctrl chain
                                 3 PEs  3 PEs         │                   LFSR pruner
                                 S/P banks per PE     ▼                   drain ──► 4 x 16-bit DRAM writes
```

| Module | Role |
|---|---|
| `carla_pkg` | widths, the micro-operation word `uop_t`, the layer configuration `cfg_t`, the output rounding |
| `carla_top` | the array: controller, pruner, input pipeline, control chain, 65 CUs, drain; beside it, unconnected, one heterogeneous SRAM pair |
| `carla_cu` | one CU: operand registers, multipliers, ACC0/ACC1, muxes M0/M2/A/B, S and P banks |
| `carla_sram` | one dual-port bank (one write and one synchronous read per cycle) |
| `carla_input_pipeline` | PR0..PR64 plus the feedback delay line and the input multiplexer |
| `carla_controller` | the sequencer: DRAM addresses, loads, micro-operations, feedback selection, passes |
| `carla_lfsr_pruner` | pseudo-random keep/prune decision per filter row |
| `carla_drain` | moves finished outputs from the P banks to DRAM over a 64-bit bus |
| `hetero_sram_pair` | the shared-output-SRAM arrangement for two CUs of the earlier baseline accelerator (see below) |

Default size: 65 CUs (64 with three PEs, one with four, 196 PEs in all).
Each PE has an S bank of 75 x 32 bits for partial sums and a P bank of
75 x 16 bits for finished outputs. A CU therefore holds 225 outputs. On-chip
storage is 65 x 225 x 6 bytes, about 86 KB.

## The 3x3 dataflow

A layer is computed in **passes**. A pass is one group of 65 filters (one per
CU) applied to one **partition** of `part_rows` output rows. Inside a pass
the controller walks through `3 x IC` **steps**, one per filter row `f` of
each input channel `c`:

1. The three weights `w[k][c][f][0..2]` of filter `k` are loaded into CU
   #k's registers. They arrive on Input #1..#3, one CU per cycle, so each CU
   loads exactly when the step reaches it.
2. Input rows `o_lo+f-1 .. o_hi+f-1` stream through the pipeline, one
   feature per cycle, row after row without gaps. Rows that fall into the
   zero padding (above the image or below it) are skipped, not streamed as
   zeros.
3. For feature `x[j]` of a row, in one cycle:
   * PE #0 starts output column `j+1`: `ACC0 <= A0 + x[j]*w0`. Here A0 is the
     stored partial sum of that column, or 0 in the first step that touches
     the row.
   * PE #1 continues column `j`: `ACC1 <= ACC0 + x[j]*w1`.
   * PE #2 finishes column `j-1`: `ACC1 + x[j]*w2` is written back to the S
     bank.
4. At the last feature of a row, mux M0 zeroes product 0, which would
   belong to a column outside the image. PE #0 instead starts column 0 of
   the next row. At the first feature of a row, mux M2 zeroes product 2.
   That cycle writes the last column of the previous row, whose right
   neighbour is padding.

The number of compute cycles is therefore `(3*OL^2 - 2*OL) * IC` per filter
group, with no cycles spent on padding. The testbenches check this count
exactly.

**Step changes.** When a step follows the previous one directly, the new
weights load in the last cycle of the old step and no cycle is lost. A step
that cannot follow directly costs one bubble per skipped step plus one
preload cycle. The preload cycle loads the weights, starts column 0 and
completes the pending column. Causes:

* the step was pruned, or is empty because all of its rows are padding;
* the loader is still busy;
* the P banks are still draining.

**Output placement.** Output `o` of a partition (row-major within the
partition) goes to bank `o / 75` of its CU, at address `o mod 75`. Only PE
#2 writes in this mode, through mux B. The partial sums therefore need
`part_rows * W <= 225` words.

## The feedback delay line

Step `f+1` streams all rows of step `f` but the first, plus one new row.
The shared rows return through the feedback chain. Their distance is
`(rows - 1) * W` cycles, where `rows` is the number of rows step `f` streamed.
The chain has taps at PR64 and at the end of each of its five segments
(19, 84, 14, 16 and 26 registers). That gives delays of 65, 84, 168, 182,
198 and 224 cycles.

The controller picks the tap whose delay equals the distance and fetches
only the new row from DRAM. The tap for 56-wide rows with 4-row partitions
is 168. For 28-wide rows with 7-row partitions it is also 168. For 14-wide
rows with 14 rows it is 182.

When no tap matches, the shared rows are fetched again from DRAM. The result
is still correct; only DRAM traffic grows. This fallback is this
implementation's choice.

## The 1x1 dataflow

For 1x1 layers each PE owns one output pixel: 196 pixels per partition, and
a group of 64 filters per pass. For each input channel:

* **One load cycle.** Every CU loads the features of its pixels from Input
  #1..#3, CU #k in cycle k. CU #64 has four PEs and also uses Input #0. In
  that cycle no weight can enter the pipeline: the one stall per 65 cycles.
  The processor utilisation is therefore 64/65 = 98.5 %.
* **64 weight cycles.** Weight `w[m][c]` enters the pipeline. Each PE adds
  `feature * w` to its partial sum for filter `m`, which lives at address `m`
  of its own S bank.

The cycle count is `(U+1) * IC * P * ceil(K/U)`, where `P` is the number of
partitions. Stride 2 is supported: the loader picks every second pixel.

## The 1x1 dataflow for small feature maps

With a 7x7 feature map only 49 pixels exist, so the ordinary 1x1 mode
would keep 49 of the 196 PEs busy. For such layers (`MODE_1X1S`) the roles
swap back to those of the 3x3 mode:

* every PE holds one weight of its own filter, so one pass serves 196
  filters;
* the features of the channel stream through the pipeline;
* PE i of CU #k accumulates pixel `p` of its filter at address `p`.

The CU datapath is the same as in 1x1 mode. Only what is loaded and what is
streamed changes.

A channel takes 65 cycles, set by the loader filling one CU per cycle. Each
weight is read from DRAM exactly once per layer. The feature map is read
once per group of 196 filters. The mode needs `OL^2 <= 64` (and `<= 75`,
the bank depth) and stride 1.

## Passes, the drain and timing overlap

The last channel of a pass also writes the rounded result into the P bank.
Rounding is an arithmetic shift right by `FRAC` (default 8), then saturation
to 16 bits; no activation function is applied.

Once the last write has reached CU #64, the drain copies the P banks to
DRAM while the next pass runs:

* Each cycle it reads four banks at one address, which fills a 64-bit bus.
* Each 16-bit lane carries its own DRAM address.

Only the last channel of a pass writes P, so only that channel has to wait
if the drain is still running. A full drain takes `ceil(196/4) * 75 = 3675`
cycles. Layers with enough channels per pass hide it completely. Layers with
very few channels become drain-bound.

Passes run filter group by filter group, with partitions inside each group.

## Pruning

With semi-structured row-wise pruning, the same filter row (channel `c`, row
`f`) is removed from every filter. A removed row saves the whole step:

* no weights are fetched;
* no features are fetched;
* no cycles are spent.

No index list is stored. A 16-bit LFSR (polynomial
x^16 + x^14 + x^13 + x^11 + 1) is restarted from the seed at the start of
every pass and produces one number per filter row, in channel-major order.
The row is kept when the number is above the threshold. In 1x1 mode there
is one decision per channel.

Training must use the same generator with the same seed to prune the same
rows. The testbenches contain an independent model of the generator.

Rows of the **last** channel are never skipped. If pruned, they run with
zero weights, which are not fetched. This keeps the P write path simple and
costs at most one channel's time per pass.

## Control: micro-operations travelling with the data

The controller issues one micro-operation (`uop_t`) per cycle for CU #0. A
register chain beside the data pipeline gives the same micro-operation to
CU #k `k` cycles later, in the cycle when PR<k> holds the matching feature
or weight. `uop_nxt` (the next micro-operation) addresses the synchronous S
read one cycle early, so the stored partial sum arrives when it is needed.

Register loads follow a similar scheme. A micro-operation with `load` set,
issued at cycle `t`, makes the controller's loader drive CU #k's operands on
the broadcast buses at cycle `t+1+k`.

## Configuration and memory interface

Set `cfg` (a `cfg_t`) and pulse `start`; `done` pulses when the last output
is in DRAM.

| Field | Meaning |
|---|---|
| `mode` | `MODE_3X3`, `MODE_1X1` or `MODE_1X1S` (1x1 for small feature maps) |
| `il`, `ol` | input and output width (= height) |
| `stride` | 1 (3x3), 1 or 2 (1x1) |
| `ic`, `k` | input channels, filters |
| `part_rows` | 3x3: output rows per partition, `part_rows * ol <= 225` |
| `in_base`, `w_base`, `out_base` | DRAM word addresses of the three arrays |
| `prune_en`, `prune_seed`, `prune_thresh` | pruning |

DRAM layouts, one 16-bit word per address:

* Inputs: `in[c][row][col]`.
* 3x3 weights: `w[k][c][fr][fc]`.
* 1x1 weights: `w[k][c]`.
* Outputs: `out[k][row][col]`.

The four read buses expect their data in the same cycle as the address. A
real DRAM would need a prefetch buffer in front of this interface.

`ev` pulses one bit per cycle for each dataflow mechanism that acted:

* 1x1 load stall;
* feedback reuse;
* skipped step;
* border zeroing;
* drain wait;
* preload;
* zero-weight row.

## The heterogeneous SRAM pair (earlier baseline accelerator)

The description also proposes a memory arrangement for its earlier row-wise
accelerator, which is a separate design. It replaces each CU's ping-pong
pair of 448x32 SRAMs as follows:

* Each CU keeps one private 448x32 SRAM, M, for its partial sums.
* Two neighbouring CUs share one 896x16 SRAM, P, for finished outputs.

A deeper, narrower macro is cheaper in area and power than two shallow,
wide ones. 16 bits suffice because only final outputs are stored in P.

`hetero_sram_pair` models one such pair of CUs. P is dual-ported, and each
port belongs to one CU:

* While a pass is computed (`xfer` = 0), both ports write. CU #0 writes the
  lower half of P and CU #1 the upper half.
* During the transfer to DRAM (`xfer` = 1), both ports read at any address,
  so two words leave per cycle. CU writes are ignored. Meanwhile the CUs
  accumulate the next pass in M.

The rest of the baseline accelerator is not built. The pair sits in
`carla_top` beside CARLA, unconnected to it, with its own `hs_` ports.

## Where this design follows the description and where it is its own

Taken from the description:

* the serial three-PE CU and its muxes (M0/M2 for borders, A0..A2, B);
* the S/P bank pair per PE, with PE #2 able to write all banks in 3x3 mode;
* 65 CUs with a four-PE last CU and four DRAM read buses;
* the shared pipeline with the feedback segment lengths 19/84/14/16/26;
* the 1x1 role swap with one stall per 65 cycles;
* the small-feature-map 1x1 dataflow with weights of several filters per CU;
* the 64-bit output bus;
* 16-bit data and 32-bit accumulators;
* the LFSR row pruning rule (keep when above the threshold);
* the cycle and access equations that the testbenches check.

This implementation's own choices:

* **Memory sizes.** The 224 words per CU are split into three banks of 75
  words. Partial-sum words are 32 bits; one summary sentence of the
  description says 24, but the accumulator width and the total on-chip
  memory support 32.
* **The taps.** Where exactly each feedback tap leaves the chain. The DRAM
  fallback when no tap fits.
* **Control.** The micro-operation encoding and the control register chain.
  The state machine and the loader.
* **Memory map and output.** The DRAM layouts. Rounding and saturation of
  the outputs.
* **Pruning details.** The LFSR polynomial and seed handling. The rule for
  pruned rows in the last channel.
* **The drain.** Its transfer order and per-lane addresses.
* **The heterogeneous SRAM pair.** The split of P into one half per CU.
* **Small-feature-map 1x1 mode.** All 196 PEs take a filter, where the
  description's cycle formula counts 192. A channel takes U+1 cycles, where
  that formula counts U.

## Not built

* **7x7 filters** (the first ResNet-50 layer). The description splits each
  7x7 plane into 21 three-wide and one-wide pieces and runs them in 3x3
  mode. The controller does not sequence this, so whole ResNet-50 does not
  run.
* **Strided 3x3 layers.** 3x3 mode supports stride 1 and zero padding 1
  only, with W >= 4.
* **The rest of the earlier baseline accelerator** around the
  heterogeneous SRAM pair.

## What fits

* All 3x3 layers of ResNet-50 (56/28/14/7 wide, partitions of 4/7/14/7
  rows) and of VGG-16 (224 down to 14 wide, partitions of 1/2/4/7/14 rows)
  fit the banks and counters.
* All 1x1 layers of ResNet-50, including the stride-2 projections, fit.
  The 7x7 ones use the small-feature-map mode.
* Channel and filter counts up to 4095 are supported.
* For example, a 56x56 layer with 64 channels and 64 filters takes
  594,944 compute cycles, about 3.0 ms at 200 MHz.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it checks |
|---|---|
| `tb_carla_sram` | random read/write against a model; read latency; read-during-write returns the old word |
| `tb_carla_lfsr_pruner` | the sequence against a model; period 65535; keep fraction; zero seed |
| `tb_carla_input_pipeline` | every PR<k> and all six tap delays against a history of the input |
| `tb_carla_drain` | full and partial passes in all three modes; each output written once to the right address; transfer time 49 cycles per address |
| `tb_carla_cu` | 3x3 rows across bank boundaries and 1x1 filters, for the 3-PE and 4-PE CU, against a direct computation |
| `tb_carla_controller` | full size, all three modes; compute cycles, weight and feature reads against the equations; feedback use, drains, pruner steps, pruning savings |
| `tb_carla_top` | 5-CU array, 8-word banks, short feedback chain; eight layers in all three modes (partial groups, uneven partitions, saturation, stride 2, pruning) compared word by word with a reference convolution; every dataflow event must occur; a write/read pass through the heterogeneous SRAM pair |
| `tb_carla_top_full` | the same checks with the array at its default size (65 CUs, 196 PEs); 56x56 and 28x28 layers, 7x7 layers with 400 filters |
| `tb_hetero_sram_pair` | private SRAMs under read-modify-write; each CU's outputs land in its half of P; two-port readout in 448 cycles; writes and reads ignored in the wrong mode |

Example with plain verilator:

```
verilator --binary --timing -Wno-fatal rtl/carla_pkg.sv rtl/carla_sram.sv rtl/hetero_sram_pair.sv rtl/carla_cu.sv \
  rtl/carla_input_pipeline.sv rtl/carla_lfsr_pruner.sv rtl/carla_drain.sv \
  rtl/carla_controller.sv rtl/carla_top.sv tb/tb_carla_top_full.sv --top-module tb_carla_top_full
./obj_dir/Vtb_carla_top_full
```

The full-size run takes a few seconds. Whole-network runs were not
simulated; their timing follows from the checked cycle equations.

Lint notes:

* Verilator reports some unused bits of the shared structures.
* It also flags `rst_n` as used both asynchronously and in the assertion's
  `disable iff`. This is intended.
