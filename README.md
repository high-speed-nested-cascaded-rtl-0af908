# Nested cascaded MASH 1-1-1 divider controller

A fractional-N PLL divides its oscillator by an integer that changes every
reference cycle so that the average ratio is fractional. The sequence of
ratio offsets usually comes from a MASH 1-1-1 digital delta-sigma modulator:
three cascaded first-order modulators whose output is a small integer
(-3..+4) with mean `x / 2**m` and quantization noise pushed to high
frequencies by `(1 - z^-1)^3`. Each first-order modulator is an `m`-bit
accumulator, and the carry through that accumulator (16 bits here) limits
how fast the modulator can be clocked, and so how high the PLL reference
frequency can be.

This design removes that limit without changing the output. Each 16-bit
accumulator is cut into `N` narrow accumulators ("levels"), and the carry
out of one level goes, through a flip-flop, into the carry-in of the level
above. The longest carry chain is then `ceil(16/N)` bits: 4 bits for the
default of four levels. The cost is a few flip-flops: the level-to-level
carry registers, and a short delay line on each input slice. The output
sequence is bit-for-bit that of the conventional 16-bit MASH 1-1-1, with the
same dither, delayed by `N-1` clocks.

## How the cascade works

### One level: a first-order modulator as an adder

A first-order delta-sigma modulator with a one-bit quantizer is just an
accumulator (`ddsm_acc`). Each clock it computes `x + e + cin`. The carry
out becomes the output `y` and the sum becomes the new state `e`, both
registered. Over `2**W` clocks the output is 1 exactly `x + cin` times on
average. The state `e` is also the quantization error, which the next MASH
stage requantizes.

### The grid

`nc_mash_core` is a grid of `ddsm_acc` instances: `N` levels by 3 stages.
Level 1 holds the most significant bits of every accumulator and level `N`
the least significant bits. DDSM `(k, j)`, at level `k` and stage `j`, adds:

* its data input: the input slice `x_k` for stage 1, or the error
  `e(k, j-1)` of the previous stage of its own level;
* its own registered error `e(k, j)`;
* as carry in, the registered output `y(k+1, j)` of the same stage one
  level down.

The last level has nothing below it. Its stage-2 carry in takes the dither
bit, and its stage-1 and stage-3 carry ins are zero. The three outputs of
level 1, `y(1,1..3)`, are the three MASH stage outputs.

```
          stage 1            stage 2            stage 3
level 1   [x1 + e + c] --e--> [e + e + c] --e--> [e + e + c] --> y1, y2, y3
              ^ carry             ^ carry            ^ carry
level 2   [x2 + e + c] --e--> [e + e + c] --e--> [e + e + c]
              ^                   ^                  ^
level 3   [x3 + e + c] --e--> [e + e + c] --e--> [e + e + c]
              ^                   ^                  ^
level 4   [x4 + e + 0] --e--> [e + e + d] --e--> [e + e + 0]      d = dither
```

### Why the output is unchanged: the staircase

A carry takes one clock to climb a level. So level `k` works on the same
accumulation step as the last level did `N-k` clocks earlier. The whole grid
is a pipelined ripple adder whose slices work in a staircase. Level `N`
handles step `t` at clock `t`, level `N-1` finishes that step at clock
`t+1`, and level 1 finishes it at clock `t+N-1`.

Two things keep this exact:

* **Input alignment** (`input_align`). The input word is split into slices
  `x = x_1 * 2**(w2+w3+w4) + x_2 * 2**(w3+w4) + x_3 * 2**w4 + x_4`. Slice
  `k` is then delayed by `N-k` clocks, which is the total latency of the
  levels below it (3, 2, 1 and 0 flip-flops for the four levels). Without
  this, a changing input word would reach the levels at different
  accumulation steps, and the result would be wrong whenever `x` is not
  constant.
* **Stage-to-stage errors stay on the same staircase.** Stage 2 of level `k`
  reads the error of stage 1 of level `k` from the previous clock. That
  error belongs to the step that level `k` has just finished, which is
  exactly the step that stage 2 of level `k` needs. The dither enters at the
  least significant level, which is not skewed, so dither bit `t` lands on
  accumulation step `t` as it would in a conventional MASH.

Because of this, `y(1, j)` equals the carry out of stage `j` of a single
16-bit MASH 1-1-1, delayed by `N-1` clocks. This holds from reset on, since
all registers, the input delay lines included, reset to zero. The noise
shaping, the mean and the dither behaviour are therefore those of the
conventional modulator. In the per-level view, the first- and
second-stage errors of every level cancel. The third-stage error of each
level `k` reaches the output shaped by `(1 - z^-1)^3`, scaled down by the
moduli of the levels above it. Summed over the levels, these terms are
exactly the third-stage error of the whole-word modulator.

When `N` does not divide the word width, slice widths differ by at most one
bit, and the wider slices go to the upper levels (16 bits in 3 levels is
6 + 5 + 5). The critical path is then `ceil(16/N)` bits, so a depth that
divides the word gives the best speed for its area.

### Error cancellation (`mash_combiner`)

The three stage outputs are combined as

```
Y = z^-2 Y1 + z^-1 (1 - z^-1) Y2 + (1 - z^-1)^2 Y3
```

in a nested form with an inner and an outer node:

```
c = y2(n-1) + y3(n) - y3(n-1)
y = y1(n-2) + c(n)  - c(n-1)
```

This takes two flip-flops on `y1`, one on `y2`, one on `y3` and one on `c`.
The output is taken from the last adder with no register after it. It spans
-3..+4 and is given as a 4-bit two's complement number.

### Dither (`dither_lfsr`)

A MASH with a constant input is a finite state machine and can produce
periodic patterns that show up as spurs. A one-bit pseudo-random dither
breaks them up. It is added at the carry in of stage 2 of the last level,
the least significant bit of the second stage. That dither is shaped to
first order and has zero mean at the output. The source is a 23-bit
maximal-length Fibonacci LFSR (`x^23 + x^18 + 1`, period `2**23 - 1`), whose
long period keeps its own repetition from becoming a spur. `dither_en` gates
the bit, and the register keeps shifting while dither is off.

## Interface and timing

`nc_mash_top` ports:

| port        | dir | width       | meaning |
|-------------|-----|-------------|---------|
| `clk`       | in  | 1           | reference clock; everything is rising-edge |
| `rst_n`     | in  | 1           | asynchronous, active-low; clears all state, loads the LFSR seed |
| `x`         | in  | `M_BITS`    | fractional word, unsigned; output mean is `x / 2**M_BITS` |
| `dither_en` | in  | 1           | enables the dither bit |
| `y`         | out | `ORDER+1`   | ratio offset, two's complement (-3..+4 for the default) |

* `x` is sampled on every rising edge. It may change every clock; the
  input alignment keeps the result exact.
* Latency from `x` to `y` is `N_LEVELS + 2` clocks: `N_LEVELS - 1` of
  staircase, one for the first-stage register and two in the combiner.
  Compared with a conventional MASH 1-1-1 this is `N_LEVELS - 1` extra
  clocks, and throughput is one output per clock.
* The caller adds `y` to the integer part of the divide ratio; that adder
  and the divider itself are outside this design.

### Parameters

| parameter  | default | module(s) | meaning |
|------------|---------|-----------|---------|
| `M_BITS`   | 16 | top, core, `input_align` | total accumulator width; resolution `2**-M_BITS` |
| `N_LEVELS` | 4  | top, core, `input_align` | levels of cascading; 1 gives the conventional MASH 1-1-1 |
| `ORDER`    | 3  | top, core, `mash_combiner` | number of first-order stages (at least 2) |
| `LFSR_W`   | 23 | top, `dither_lfsr` | dither register length (`TAPS` and `SEED` must match it) |
| `W`        | 4  | `ddsm_acc` | width of one narrow accumulator (set by the core) |

`ORDER` other than 3 builds a MASH 1-1 or 1-1-1-1 and so on in the same
pattern. The combiner then uses the nesting
`c_L = y_L`, `c_j = z^-(L-j) y_j + (1 - z^-1) c_{j+1}`, `y = c_1`, and the
output is `ORDER + 1` bits wide.

At the defaults the design holds 114 flip-flops:

* 60 in the twelve 4-bit DDSMs (4 state bits and 1 carry each);
* 24 in the input delay lines;
* 23 in the LFSR;
* 7 in the combiner.

## Files

All modules use the package `rtl/nc_mash_pkg.sv`, which holds the slice-width
arithmetic and the default order.

| file | contents |
|------|----------|
| `rtl/nc_mash_top.sv`   | top: `input_align` -> `nc_mash_core` -> `mash_combiner`, plus `dither_lfsr` |
| `rtl/nc_mash_core.sv`  | the `N_LEVELS x ORDER` grid of narrow DDSMs |
| `rtl/ddsm_acc.sv`      | one first-order DDSM: a registered adder with carry in and carry out |
| `rtl/input_align.sv`   | per-slice input delay lines |
| `rtl/mash_combiner.sv` | error-cancellation network |
| `rtl/dither_lfsr.sv`   | dither source |
| `tb/mash_ref_pkg.sv`   | whole-word MASH model of any order, and a bit-stream model of the LFSR |
| `tb/*_tb.sv`           | self-checking testbenches, one per module, plus `nc_mash_levels_tb` |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if it hangs. The reference model in `tb/mash_ref_pkg.sv`
works on whole words with no slicing, and forms the output from the
expanded binomial form of the cancellation equation, not the nested form
the RTL uses.

* `nc_mash_top_tb` runs the default build (16 bits, 4 levels) end to end,
  about 450 000 clocks, well under a second. Each clock, the output must
  equal the whole-word model's output delayed by exactly three clocks. The
  run covers:
  * a step test of the input-to-output latency;
  * the output mean over `2**17` clocks, with and without dither, which must
    match `x / 2**16` to within a few counts;
  * random input changes;
  * dither switched on and off;
  * a reset in mid-run.

  It also counts each mechanism and fails if one never happened:
  * dither bits injected;
  * input word changes;
  * carries across each slice boundary;
  * outputs at -3 and +4;
  * the mid-run reset.
* `nc_mash_levels_tb` builds 16-bit modulators with 1, 2, 3, 4 and 8 levels
  and checks that every one equals the single-level (conventional) one
  delayed by `N-1` clocks. It also checks order-2 and order-4 versions
  against whole-word models of their own order.
* `nc_mash_core_tb`, `ddsm_acc_tb`, `input_align_tb`, `mash_combiner_tb` and
  `dither_lfsr_tb` check each module alone. The LFSR test checks the bit
  stream against the shift-register recurrence, and the full period
  (127 clocks) of a 7-bit version.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/nc_mash_pkg.sv tb/mash_ref_pkg.sv \
    tb/nc_mash_top_tb.sv --top-module nc_mash_top_tb -Mdir obj -o sim
./obj/sim
```

Replace the testbench name for the others. The testbenches use classes and
queues, so they are for simulation only. The RTL is plain synthesizable
SystemVerilog.

## What is taken from the published design and what is not

Taken from the published NC-MASH 1-1-1:

* the split of every MASH stage into levels chained through carry ins;
* the registered-adder form of each modulator;
* the per-slice input delays of `N-k` clocks;
* the error-cancellation equation and its register placement;
* one-bit dither on stage 2 of the last level;
* the default size of 16 bits in four levels.

Choices made here:

* Reset: asynchronous, active-low, clearing everything to zero.
* Output format: 4-bit two's complement rather than a 3-bit code.
* Uneven slices: how the slice widths are split when `N` does not divide
  the word.
* Dither source: the LFSR polynomial, its seed, and the enable that gates
  the bit while the register keeps running.
* Other orders: the `ORDER` generalisation and its combiner nesting.

Speed and area are not shown by simulation. The published synthesis
results give, for four levels, about a threefold higher maximum clock rate
for about 9% more area than the conventional 16-bit MASH 1-1-1. In this RTL
the expected effect is the shorter carry chain: 4 bits instead of 16 at the
defaults. To confirm the clock rate, run it through a timing-driven
synthesis flow.
