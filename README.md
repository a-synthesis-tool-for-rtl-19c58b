# Multiplierless folded filter banks for a four-band block transform

A four-band block transform splits a signal into four sub-bands with four 8-tap
FIR filters G0..G3 and decimation by 4 (analysis), and rebuilds it with
upsampling by 4, the same four filters and a delay-and-add chain (synthesis).
Built literally, each half needs four filters running at a quarter of the input
rate, 32 multipliers and a clock per rate.

This RTL builds each half as a single *fold*: the four filters share one
datapath that runs at the sample rate, on one clock, and produces one output
every clock. Two properties make that cheap:

* **Folding the filters, not the operators.** Every filter is treated as one
  node. The four filters of a half take turns on the same taps, and a constant
  schedule with a period of four clocks (the *fold period*) says which filter a
  tap serves in which clock.
* **No multipliers.** All 32 coefficients of a bank are ±1 times one of four
  *seed* coefficients c0..c3 (the shared coefficient set of linear-phase M-band
  transforms). The four seed products c_j·x are formed once per input sample by
  four shift-and-add adders. Every tap then only has to *pick* a stored seed
  product and possibly negate or shift it.

The design follows the architecture of the paper *A Synthesis Tool for the
Multiplierless Realization of FIR-Based Multirate DSP Systems*, which generates
such folds automatically. This RTL is a hand-written instance of that
architecture for the four-band example; see "Where this RTL departs from the
published design" before relying on it.

## The fold datapath

Every fold (`mr_fir_fold`) is four stages in a row, plus a counter:

```
 x ──► scaling_adders ──► product_registers ──► inv_shift ──► combination_adders ──► y
       c_j·x, 4 adders    chain of the           per term:       balanced adder trees
                          products still         mux by phase,   (3 levels for 8 terms,
                          needed                 ±, << shift      1 level for 4 × 2)
                 fold_sequencer: phase = a mod 4, output valid, output phase
```

* **Scaling adders.** Seed j is one adder:
  `seed_j = ±(src_a << sh_a) ± (src_b << sh_b)`, where a source is the input or
  an earlier seed. Each adder is one clock. Adders are placed as early as their
  operands allow; an operand that is ready too early comes from a small
  alignment delay, and every seed is delayed to the depth of the deepest one
  (3 clocks by default). All four products of a sample then leave together.
* **Product registers.** A chain that holds only the seed products some tap
  will still read, as described in the next section.
* **Inverting/noninverting and shifting.** For each term t there is one
  multiplexer with one input per phase (a 4-to-1 multiplexer here). In phase
  p it reads the product of seed `SEL[t][p].seed` that is `SEL[t][p].delay`
  clocks old. It shifts it left by
  `SEL[t][p].shift` and negates it if `SEL[t][p].neg`. One register follows.
* **Combination adders.** A balanced tree of two-input adders, one clock per
  level. With `NOUT` > 1 the terms are split into `NOUT` groups of consecutive
  terms, each with its own tree and output. These parallel outputs serve folds
  of interpolating filters, where several outputs are due in the same clock.
  The analysis bank uses `NOUT` = 1 and the synthesis bank `NOUT` = 4.
* **Fold sequencer.** Counts the phase modulo the fold period. It also counts
  the pipeline fill, so that `valid` rises with output sample 0.

The table `SEL[term][phase]` is the whole schedule. It encodes the filters
and also the decimators, upsamplers and commutators around them. `mrf_pkg`
computes it at elaboration time from one coefficient table.

## Keeping only the products that are still needed

A product c_j·x[i] is not read at every age. Tap m reads seed j at age m only
in the phases whose filter has a ±c_j at tap m. So each product has a
*lifetime*: the largest age at which any tap reads it. Products are grouped
into *classes* by (birth phase, seed). All products of a class have the same
lifetime, because the schedule repeats every four clocks.

The registers form one chain, and every clock each register takes the value
of the register before it. A product enters the chain at its class's entry
register one clock after it is born. It then moves one register per clock, so
at age d it sits in register `ENTRY[c] + d − 1`. It is overwritten after its
last use. Because every class always enters at the same register, each read
address depends only on the term and the phase, and the tap multiplexers stay
4-to-1. A register loads a new product only in the phases where a class enters
it. In every other phase it takes the previous register's value, so each
register input is a small multiplexer.

Two classes may not occupy the same register in the same phase. Register r
holds class c only in phase (i + 1 + r − ENTRY[c]) mod 4, where i is the
class's birth phase. So classes with the same *diagonal* (i + 1 − ENTRY[c])
mod 4 need disjoint register ranges, and classes on different diagonals never
meet. `alloc_entries` in `mrf_pkg` packs the classes at elaboration time,
longest lifetime first. Each class gets the diagonal and entry register that
end lowest. Any fold gets its allocation from its own tap table.

| fold | plain delay lines | this chain | products alive at once |
|---|---|---|---|
| analysis | 4 × 7 = 28 | 17 | 17 |
| synthesis | 4 × 10 = 40 | 33 | 28 |

The analysis chain is as short as possible. The synthesis packing is a
heuristic and leaves five registers more than the bound.

## Why one time-varying filter is the whole analysis bank

In the analysis structure, G_k sees the input delayed by k samples. Its output
is decimated by 4, and a commutator writes band k to output index 4l+3−k:

```
y[4l+3−k] = Σ_{m=0..7} G_k[m] · x[4l−k−m]
```

Put a = 4l−k. This becomes `y[a+3] = Σ_m G_k[m]·x[a−m]` with k = (−a) mod 4.
That is a single 8-tap filter over the most recent input, whose coefficient set
changes every clock and repeats every 4 clocks. So tap m always reads delay m.
Only the seed and the sign change with the phase (`ana_table`). Two output
registers follow the tree, as in the published analysis circuit.

## The synthesis bank: four band filters in parallel, then a chain

The synthesis structure sends y[4l+3−k] to band k, upsamples every band by 4,
filters band k with G_k and sums the four results through a delay chain:
`x̂[n] = w0[n] + w1[n−1] + w2[n−2] + w3[n−3]`. After upsampling, only taps
m ≡ n (mod 4) of G_k meet a nonzero sample, which is two taps per band:

```
w_k[n] = Σ_{r=0,1} G_k[m] · y[n+3−m−k],   m = (n mod 4) + 4r
```

So the four band outputs of one index n are eight terms in all, taken from a
window of 11 band samples. The synthesis fold has eight terms, each a 4-to-1
multiplexer over (seed, age, sign) (`syn_table`). Terms 2k and 2k+1 are the two
taps of band k, and the fold's adders are split into four parallel outputs
(`NOUT` = 4): four adders give w_0[n] .. w_3[n] in the same clock. This is the
kind of parallel output an interpolating fold needs, since an upsampled band
produces a sample at every index.

`recombination_chain` then adds the four outputs through the delay chain in
transposed form:

```
acc3 <= w3;   acc2 <= w2 + acc3;   acc1 <= w1 + acc2;   x̂ = acc0 <= w0 + acc1
```

Three adders, one clock each; their output registers are the chain's delays.
This is the published two-stage shape: four adders after the multiplexers,
then three adders of recombination.

The newest stored sample must be y[n+3]. That is why the synthesis output
trails its input by more clocks than the analysis output does.

## Interfaces and timing

All blocks share one clock and a synchronous, active-high reset that clears
every register, so samples before the first one after reset count as zero.
Each bank has a valid input that acts as a clock enable for the whole fold:
while it is low, nothing moves. The valid output is high for exactly one clock
per new output sample, so it can drive the next bank's valid input directly.
Assertions in `fold_sequencer` check both rules in simulation (run Verilator
with `--assert`).

| block | input | output | latency (enabled clocks) |
|---|---|---|---|
| `analysis_bank` | `x` (12 b), `x_valid` | `y` (22 b), `y_valid`, `y_band` | y[i] ready after x[i+6] is taken |
| `synthesis_bank` | `y` (22 b), `y_valid` | `x_hat` (32 b), `x_valid` | x̂[n] ready after y[n+9] is taken |
| `block_transform_top` | `x`, `x_valid` | `y`, `y_valid`, `y_band`, `x_hat`, `x_hat_valid` | both of the above |

Analysis latency: 3 scaling-adder stages, 1 negator stage, 3 tree levels and
2 output registers, minus the 3-sample lead of the commutator.
Synthesis latency: 3 scaling-adder stages, 1 negator stage, 1 adder level and
1 chain stage, plus the 3 samples of look-ahead the upsampling needs.

`y_band` names the filter that produced the current `y`. Output index 4l+3−k
carries band k, so the bands arrive in the order G3, G2, G1, G0 within each
group of four. The synthesis bank takes the first valid `y` after reset as
index 0, and the four-clock schedule counts from there.

Every word is full precision. The input is 12 bits, y is 12 + 7 + 3 = 22 bits,
and x̂ is 22 + 7 + 3 = 32 bits. Nothing is rounded or truncated. Put a
quantizer between the banks if the application needs one.

## Changing the coefficients

The coefficient values of the published example come from an outside
reference. They are **not** in this RTL. `mrf_pkg` holds placeholders with the
right structure:

* seeds c0..c3 = 9, 25, 49, 61, in units of 2⁻⁷ (8-bit quantized coefficients).
  They are formed by `SEED_RECIPE`: 9 = 8x+x, 25 = 16x+c0, 49 = 2·c1−x,
  61 = c1+4·c0. Seeds c0, c1 and c2/c3 are ready after 1, 2 and 3 adder stages.
* `bank_coefs()`: G0..G3 as (seed, sign, shift), linear phase (G0 and G2
  symmetric, G1 and G3 antisymmetric). Each filter uses every seed twice.

With these placeholders, x̂ is **not** a delayed copy of x. Perfect
reconstruction needs the real coefficient set.

To use another set, edit `SEED_RECIPE` and `bank_coefs()`. Each seed must be
one two-term adder over the input and earlier seeds. Each coefficient must be
±2^s·c_j with a magnitude below 2⁷. The schedule tables, the alignment delays,
the register allocation, the latencies and the valid timing all follow from
these at elaboration.
`mr_fir_fold` also takes any other `SEL`/`RECIPE` pair, with a fold period of
up to 8 clocks, up to 16 terms, any output count that divides the term count,
and a register chain of up to 64 (the package's `MAXP`, `MAXT` and `MAXR`;
an elaboration error reports a fold that exceeds them). Its testbench runs two period-2 folds.

## Where this RTL departs from the published design

* **Coefficients.** Placeholder values, as described above.
* **Register count.** The published design reports 2+16+2 delay elements for
  analysis and 2+20 for synthesis, 42 in total. This RTL uses 5 alignment
  + 17 chain + 2 output registers for analysis and 5 + 33 chain + 4
  recombination registers for synthesis, 66 in total. The differences come
  from the placeholder coefficient pattern, from the common-depth seed
  alignment and from the synthesis recombination (below). The allocation
  heuristic is this design's own. The published
  design cites lifetime-based register allocation without printing its
  algorithm.
* **Seed alignment.** The published design picks up each seed at its own
  depth. Here all seeds are delayed to a common depth first.
* **Synthesis recombination.** The published synthesis circuit also adds the
  terms in pairs and then recombines the pair sums with three adders. It keeps
  the pair sums in registers that load in chosen phases and selects them
  through a second row of six multiplexers. Here the four band outputs of one
  index are formed in the same clock, so the recombination is a plain
  transposed chain with no multiplexers. The adder count (4 + 3), the result
  and the one-sample-per-clock rate are the same.
* **Negation in the scaling adders.** The published circuits use separate
  negators and no subtractors. Here an operand's sign is applied inside the
  seed adder's clock stage. The tap negators are a separate stage, as
  published.
* **Valid/stall input.** This is an addition. With valid held high, the design
  behaves as the free-running single-clock original.

The four scaling adders per bank (eight in all) match the published count.
So does the principle of one output per clock from a single clock.

## Files

| file | contents |
|---|---|
| `rtl/mrf_pkg.sv` | sizes, seed recipe, filter table, schedule and register-allocation functions |
| `rtl/scaling_adders.sv` | seed products, ASAP adders with alignment |
| `rtl/product_registers.sv` | lifetime-allocated product register chain |
| `rtl/inv_shift.sv` | per-term phase multiplexer, negate, shift |
| `rtl/combination_adders.sv` | pipelined adder trees, one or more outputs |
| `rtl/fold_sequencer.sv` | fold-period counter, fill and valid |
| `rtl/mr_fir_fold.sv` | one fold: the four stages and the sequencer |
| `rtl/recombination_chain.sv` | delay-and-add chain after the synthesis band filters |
| `rtl/analysis_bank.sv`, `rtl/synthesis_bank.sv` | the two halves of the transform |
| `rtl/block_transform_top.sv` | analysis feeding synthesis |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
It also has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal rtl/mrf_pkg.sv rtl/*.sv \
    tb/tb_block_transform_top.sv --top-module tb_block_transform_top -Mdir obj_top
obj_top/Vtb_block_transform_top
```

Lint one module with
`verilator --lint-only -Wall rtl/mrf_pkg.sv rtl/*.sv --top-module analysis_bank`.

What the testbenches establish:

* `tb_block_transform_top` runs the top at its default sizes. It streams 400
  random and full-scale samples with random stalls. Every y and every x̂ is
  compared with an unfolded model of the two filter banks: delays, filters,
  decimators, upsamplers, commutators and the delay-and-add chain. The model
  has its own integer copy of the coefficients. The test also checks `y_band`
  and both latencies, and requires stalls, all four bands and fold-period
  wraps to occur.
* `tb_analysis_bank` and `tb_synthesis_bank` run the same comparison for one
  bank each.
* `tb_mr_fir_fold` checks two other folds with period 2 and other seeds and
  shifts. One holds two decimating 4-tap filters that take turns on all taps.
  The other holds two interpolate-by-2 filters with parallel outputs
  (`NOUT` = 2). Their inputs arrive in alternate clocks, and in every clock the
  even taps serve one filter and the odd taps the other.
* `tb_synthesis_bank` also checks that the synthesis chain has between 28
  and 40 registers.
* The remaining testbenches check one stage each against direct arithmetic:
  seed values and depth; that every product a tap reads sits at its allocated
  register, and that the analysis chain has 17 registers; the
  multiplexer/negate/shift selection; tree sums, including a non-power-of-two
  tree and a split into two parallel outputs; the delay-and-add chain with its
  valid timing under stalls; and phase, fill and valid timing.

All of these check the folded hardware against the unfolded filter bank for
the coefficient table in `mrf_pkg`. They say nothing about the quality of the
transform itself.
