# Run-time configurable CFAR processor built on FIFO insertion sorters

A CFAR (constant false alarm rate) detector decides, sample by sample, whether
a radar return holds a target. It does not use a fixed threshold. It estimates
the local noise level Z from the reference cells on both sides of the cell
under test (CUT), scales Z by a factor α, and declares a target when
`CUT >= α·Z`. Guard cells next to the CUT are left out of the estimate, so a
target does not raise its own threshold.

Detectors differ in how they form Z from the two halves of the window:

| detector | statistic per half                | Z                        |
|----------|-----------------------------------|--------------------------|
| CA       | mean Y1, Y2                       | (Y1 + Y2) / 2            |
| GO       | mean Y1, Y2                       | max(Y1, Y2)              |
| SO       | mean Y1, Y2                       | min(Y1, Y2)              |
| GOSCA    | k-th / i-th ranked sample Y(1), Y(2) | (Y(1) + Y(2)) / 2     |
| GOSGO    | k-th / i-th ranked sample         | max(Y(1), Y(2))          |
| GOSSO    | k-th / i-th ranked sample         | min(Y(1), Y(2))          |

With k = i, the last three become OSCA, OSGO and OSSO.

Each detector works best in a different environment: homogeneous noise,
clutter edges, or several targets close together. This design computes the
inputs of all six detectors in every clock cycle. Choosing a detector is then
only a choice of multiplexer settings, which can change from one sample to the
next with no transition phase. The rank-based detectors need sorted windows.
This design does not sort the windows on each step. Each half of the window is
kept sorted at all times by a **FIFO linear insertion sorter**. Every sample is
inserted at its sorted place, and the oldest sample is dropped, in the same
clock cycle. Sorted order does not change the window sum, so the means come
from the same structure.

## Data path

```
 x_in ──► lagging window ──oldest──► m guard ─► CUT ─► m guard ──► leading window ──oldest──► (dropped)
          (sorter, n cells)                     │                   (sorter, n cells)
            │ mean Y1   │ rank k Y(1)           │                     │ mean Y2   │ rank i Y(2)
            └──► SelOp mux ◄──┘                 │                     └──► SelOp mux ◄──┘
                     │  A                       │                              │ B
                     └───────────────► ALU (SelDet: avg / max / min) ◄─────────┘
                                          │ Z
                                   α ──► (×) ──► α·Z ──► compare: CUT >= α·Z ──► detect
```

The lagging window takes the input samples directly. The guard-cell shift
register takes the sample that the lagging sorter drops, which is the sample
written n steps earlier. So the sorter is also the delay line of its window,
and no separate FIFO is needed. After the CUT and the second set of guard
cells, samples go into the leading window. The leading sorter drops its own
oldest sample after the accumulator has subtracted it.

Each window (`reference_window`) contains five parts:

* `sorting_array`: n Sorting Basic Cells (`sbc`). The cells are sorted largest
  first, so `x[0]` is the largest sample.
* `priority_decoder`: turns the one-hot `expired` bus into SelOldest, the index
  of the cell that holds the oldest sample.
* two `cell_mux` instances. One reads the oldest sample through SelOldest. The
  other reads the sample at the requested rank.
* `pe_accumulator`: a running sum, `acc += newest − oldest`, shifted right by
  log2(n) to give the mean. For this reason n must be a power of two.

The whole processor holds 4n + 2m + 3 registers:

* 2n sample registers
* 2n life counters
* 2m + 1 guard and CUT stages
* 2 accumulators

## How the insertion sorter works

This is the least obvious part of the design.

Every cell i holds a sample `X_i` and a life counter `CNT_i`. The counter is
the number of samples written after `X_i`. Every cell compares its sample with
the incoming sample D: `p_i = X_i > D`. The array is sorted in non-increasing
order, so the p values along the array always read `1 1 … 1 0 0 … 0`. D belongs
at the 1→0 edge. The cell with `CNT = n−1` holds the oldest sample and raises
`expired`. That cell is vacated. The cells between the hole and the insertion
point move one place towards the hole, and D fills the last cell on the
insertion side.

Each cell finds out its own action from its neighbours alone:

```
cnt_flag_i = cnt_flag_{i+1} | expired_i              "an expired cell is at or right of me"
load       = (p_i ^ cnt_flag_{i+1}) | expired_i      "I am between the hole and the edge"
LR         = p_i & load                              1: take from the right, 0: from the left
reset      = load & ((p_{i-1} & ~p_i) | (p_i & ~p_{i+1}))   "I am at the edge: take D"
```

Each cell offers a value to both neighbours. To its left it offers `p ? X : D`
and to its right it offers `p ? D : X`. A cell that loads therefore gets either
its neighbour's sample (a shift) or D (an insertion), with no global control.
Both ends of the array act as fixed neighbours. The left end has p = 1, like an
infinitely large value. The right end has p = 0. Both ends offer D.

There are two cases:

* **Dropped sample left of the edge** (the oldest sample is larger than D): the
  cells with p = 1 to the right of the hole shift one place left. The last
  cell with p = 1 takes D.
* **Dropped sample right of the edge**: the cells with p = 0 up to the hole
  shift one place right. The first cell with p = 0 takes D.

Life counters move with their samples. A cell that loads takes its neighbour's
count plus one. A cell that keeps its sample counts up by one. The cell that
takes D restarts at 0. After reset all samples are 0 and cell i has count i.
The counts are therefore always a permutation of 0…n−1, and exactly one cell is
expired in each cycle. An assertion in `sorting_array` checks this. A new
sample that equals stored samples is placed to their right, because the
comparison is strict.

Ranks count from the smallest sample. Rank 1 is the smallest, rank n the
largest, and rank k is read from cell n−k. The default rank is 12 of 16
(0.75·n), a common choice for order-statistic CFAR.

## Detector selection, scaling and decision

`mode` is a packed struct `cfar_mode_t` = `{sel_op, sel_det}`, defined in
`cfar_pkg`. The package also defines a constant for each detector:
`MODE_CA`, `MODE_GO`, `MODE_SO`, `MODE_GOSCA`, `MODE_GOSGO` and `MODE_GOSSO`.

* `sel_op = 1` selects the window means. `sel_op = 0` selects the ranked samples.
* `sel_det` selects the operation: `DET_AVG` = 0, `DET_MAX` = 1, `DET_MIN` = 2.
  Code 3 gives the average. The average is truncated.

α is unsigned fixed point with `ALPHA_FRAC` = 10 fraction bits in `ALPHA_W` = 16
bits, which covers the range 0 to 64. The default value is 973, which is
α = 0.9501953125. This is the closest value to 0.95 on a grid of 2⁻¹⁰. The
decision compares `CUT·2¹⁰` with the full product `Z·α`, so no bits are lost.
The `threshold` output is the integer part of α·Z, for observation.

## Timing

* Without stalls, the processor takes one sample per clock. `en = 0` holds all
  state.
* After `rst`, `out_valid` rises once 2n + 2m + 1 samples have been written. At
  that point the CUT and both windows hold real samples. With the defaults this
  is 41 samples.
* From then on, every written sample produces a decision. `detect`,
  `threshold`, `z` and `cut` are combinational from the registers, and they
  refer to the CUT held in the current cycle.
* `mode`, `sel_k`, `sel_i` and `alpha` act on the current output directly. A
  switch between detectors therefore takes effect at once. From the switch
  onwards, the output is identical to a run that used the new detector all
  along. `tb_cfar_processor` checks this.
* No pipeline register follows the decision logic. The critical path runs from
  the sorter registers through the rank mux, the ALU, the multiplier and the
  comparator. For a high clock rate, register `detect` and `threshold` (one
  more cycle of latency), or register the ALU output.

## Parameters (`cfar_processor`)

| parameter    | default | meaning |
|--------------|---------|---------|
| `DATA_W`     | 12      | sample width (unsigned amplitude) |
| `N_REF`      | 16      | reference cells per side (n); a power of two; 2n = 32 in total |
| `M_GUARD`    | 4       | guard cells per side (m) |
| `ALPHA_W`    | 16      | width of α |
| `ALPHA_FRAC` | 10      | fraction bits of α |

Tested window sizes are n = 4, 8, 16 and 32 with m = 4, which is 8 to 64
reference cells in total.

## Ports (`cfar_processor`)

| port        | dir | width            | meaning |
|-------------|-----|------------------|---------|
| `clk`       | in  | 1                | clock, rising edge |
| `rst`       | in  | 1                | synchronous reset: samples 0, counters by position, sums 0 |
| `en`        | in  | 1                | write `x_in` this cycle |
| `x_in`      | in  | DATA_W           | input sample |
| `mode`      | in  | `cfar_mode_t`    | detector selection `{sel_op, sel_det}` |
| `sel_k`     | in  | clog2(n+1)       | rank in the lagging window, 1..n |
| `sel_i`     | in  | clog2(n+1)       | rank in the leading window, 1..n |
| `alpha`     | in  | ALPHA_W          | scaling factor |
| `out_valid` | out | 1                | windows and CUT are full |
| `cut`       | out | DATA_W           | cell under test |
| `z`         | out | DATA_W           | noise statistic Z |
| `threshold` | out | DATA_W+ALPHA_W−ALPHA_FRAC | integer part of α·Z |
| `detect`    | out | 1                | target declared: CUT >= α·Z |

## What follows the reference architecture and what is this design's own

The following come from the reference architecture:

* the window chain of two sorters, guard cells and CUT
* the SBC structure and its four control equations
* the life counters initialised to the cell position
* the priority decoder and the multiplexers
* the add/subtract accumulator with a shift
* the SelOp multiplexers (1 = means)
* the ALU with average, maximum and minimum
* the multiplier and the `>=` comparator
* the fill latency of 2n + 2m + 1
* the default sizes and α = 973/1024

This design makes its own choices in these places:

* **Enable and reset.** The `en` input, the synchronous active-high reset and
  `out_valid` are additions.
* **Counter ageing.** A moved sample's count becomes the neighbour's count plus
  one, and `expired` is `CNT = n−1`.
* **Rank convention.** Ranks count from the smallest sample, starting at 1.
* **Which rank goes where.** `sel_k` acts on the lagging window, which takes
  the input samples first. `sel_i` acts on the leading window. Descriptions of
  the generalized detectors differ on which half gets which rank. This design
  follows the block diagram of the architecture.
* **Mean division.** The mean is the sum shifted right, with truncation. The
  accumulator is DATA_W + log2(n) bits wide, which holds any sum exactly.
* **α format.** α is unsigned Q6.10, and the comparison uses the exact product.
* **No output register.** See Timing.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=F`.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_sbc`                | one cell, with scripted neighbours: keep, shift left/right, take D from either side, expire, hold |
| `tb_sorting_array`      | random stream with many ties and random stalls; after every clock: sorted content equals the last n samples, one-hot `expired` on the oldest sample |
| `tb_priority_decoder`   | every one-hot input, zero input, multi-hot inputs |
| `tb_cell_mux`           | every select value |
| `tb_pe_accumulator`     | sum and mean against a recomputed window sum |
| `tb_reference_window`   | oldest sample, sum, mean, random ranks, sorted cells |
| `tb_guard_cut_shift`    | CUT and output delays |
| `tb_cfar_alu`           | all six detectors |
| `tb_threshold_detector` | product, integer threshold, decision at, just below and just above the threshold |
| `tb_cfar_processor`     | whole processor at default parameters: a generated 500-sample range profile; all six detectors; stalls; rank and α changes; fill latency; the GOSGO→GO switch at sample 250 compared with a GO-only run |
| `tb_cfar_sizes`         | processors with 8, 16, 32 and 64 reference cells side by side, against the same model |

The end-to-end tests compare every output with a model that recomputes both
windows from the stored input samples. The model sorts to find the ranks and
sums to find the means. It shares no code with the design.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cfar_pkg.sv tb/tb_cfar_processor.sv \
          --top-module tb_cfar_processor -Mdir obj_tb -o sim
./obj_tb/sim
```

To lint the RTL: `verilator --lint-only -Wall -Irtl rtl/cfar_pkg.sv rtl/cfar_processor.sv`.
Verilator reports some unused-signal warnings in `cfar_processor`. These come
from window outputs that only the testbenches use, such as the sorted cells,
the sums and the leading window's oldest sample.

## Limits

* Samples are unsigned amplitudes. The design has no notion of signed or
  log-domain data.
* `N_REF` must be a power of two, because the mean uses a shift. Elaboration
  reports an error otherwise.
* Ranks outside 1..n are not clamped. An assertion reports them in simulation.
* The clock rate of this RTL has not been measured. Throughput is one sample
  per clock. One 4096 × 4096-sample radar scan in 2.5 s needs about
  6.7 Msample/s.
* The radar chain around the detector is not part of this RTL: filtering, pulse
  integration, tracking, and any automatic controller that picks the detector.
  Such a controller drives the `mode`, `sel_k`, `sel_i` and `alpha` ports.

## Files

`rtl/`: `cfar_pkg.sv` (types and defaults), `sbc.sv`, `sorting_array.sv`,
`priority_decoder.sv`, `cell_mux.sv`, `pe_accumulator.sv`,
`reference_window.sv`, `guard_cut_shift.sv`, `cfar_alu.sv`,
`threshold_detector.sv`, `cfar_processor.sv` (top).
`tb/`: one `tb_<module>.sv` per module, plus `tb_cfar_sizes.sv` and its helper
`cfar_size_check.sv`.
