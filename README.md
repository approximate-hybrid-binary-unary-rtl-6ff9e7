# Approximate hybrid binary-unary function units, with BERT and edge-detection datapaths

Non-linear functions such as exp, GELU, tanh or x^0.45 are expensive in
ordinary binary hardware (CORDIC, polynomial evaluation, dividers). This
design computes them with *approximate hybrid binary-unary* (HBU) units: a
W-bit function is cut into input regions in each of which the upper K output
bits are constant, so only the small remaining (W-K)-bit part has to be
computed, and that part is done in the unary domain with a network of wires
and a few XOR gates. The fixed upper bits are simply concatenated to the
result. There is no adder, no multiplier and no table of 2^W words; a unit
is a handful of comparators, XORs and a ones counter, and it produces one
result per clock cycle.

The RTL contains the generic unit and three uses of it, following the
FPGA '23 paper "Approximate Hybrid Binary-Unary Computing with Applications
in BERT Language Model and Image Processing":

* a bank of five 16-bit benchmark functions (GELU, gamma, tanh, cosh, exp);
* the non-linear layers of a BERT encoder accelerator (Softmax over 80
  elements, Trimmed GELU over 128 elements) next to a matrix-multiply layer;
* an 8-bit Roberts Cross edge-magnitude kernel built from HBU square and
  square-root units.

## How an approximate HBU unit works

### Function division

Treat the function as a table of integer codes f(x), x in [0, 2^W). The
division step (done once, offline) produces a list of regions:

1. Start with aligned regions of 2^IL inputs.
2. For a region, look at the upper K bits of f over it. If they are all the
   same, the region is finished.
3. Otherwise try each candidate value `ub` for the upper bits: clip f into
   `[ub*2^(W-K), (ub+1)*2^(W-K) - 1]` and measure the rounding error
   `mean|f_clipped - f| / 2^W`. Keep the best `ub` if its error is below the
   target TRE, or if the region has shrunk to 2^Lmin inputs; otherwise split
   the region in two and treat both halves the same way.

Each finished region i is now `{UB_i, g_i(x)}`: constant upper bits and a
truncated sub-function g_i of only W-K bits over 2^L_i inputs.

A second step shares hardware: a region reuses the core of an earlier
region of the same length when their truncated sub-functions differ by at
most TSE (`mean|g_i - g_j| / 2^W`). Many regions of smooth functions have
nearly identical lower-bit shapes, so a 16-bit function often needs only one
to five cores.

The outcome of both steps is a *plan* (`hbu_pkg::hbu_plan_t`): for each
region its start, log2 length, upper bits and core; for each core the region
that defines it. All plans used here are in `rtl/hbu_plans_pkg.sv`, each
with the parameters that produced it and its resulting error.

### The hardware of a unit (`hbu_unit`)

For every core:

* `therm_encoder` turns the low L input bits (the offset inside any region
  of length 2^L, since regions are aligned) into 2^L-1 thermometer wires:
  wire t-1 is high when the offset is at least t.
* `unary_core` is the scaling network. Output wire j must be high when
  g(offset) >= j. It changes state exactly at the offsets t where
  `[g(t) >= j]` differs from `[g(t-1) >= j]` (its triggering points). With one
  triggering point the output is a wire to input wire t; with several, the
  input wires are XORed (the output rises, then falls again where g
  decreases); if g(0) >= j it starts from constant 1. Monotonic pieces need
  only wires.
* `therm_decoder` counts the high output wires, giving the W-K bit result.

Finally the input bits above the shortest region length index a constant
table of `{UB, core}`; the output is `{UB, decoded output of that core}`.

The cores' contents are never stored in the source. While elaborating,
`unary_core` evaluates the function itself (`hbu_pkg::f_eval`) over its
representative region, clips it to that region's upper bits and derives
the triggering points. The source therefore holds only the short plans, and
a plan plus the function definition fully determines the netlist.

### Functions and number formats

All units work on unsigned W-bit codes (`hbu_pkg::f_eval`), rounded to
nearest and clipped to [0, 2^W-1]:

| function | input | output |
|---|---|---|
| gamma x^0.45, tanh' = (1+tanh(4(2x-1)))/2, cosh' = cosh(x)-1, exp' = e^(x-1), x^2, sqrt(x) | x = code/2^W in [0,1) | value*2^W |
| GELU | Fixed<1,W,W-4> on [-8,8), offset binary (two's complement with MSB inverted) | same format |
| Softmax exp | Fixed<1,W,W-4> on [-8,8), offset binary | e^x with W-1 fraction bits (Fixed<0,16,15> at 16 bits) |

erf in GELU uses the Abramowitz-Stegun 7.1.26 formula (error < 1.5e-7).

### Plans provided

"Config. 1" plans meet a mean absolute error below 0.01 of full scale,
"Config. 2" below 0.001, as in the paper's two configurations. The paper
does not publish its IL/Lmin/K/TRE/TSE choices; these were found by a search
for the smallest cores meeting each bound.

| plan | regions | cores | K | mean abs. error |
|---|---|---|---|---|
| GELU16_C1, EXP16_C1, COSH16_C1 | 64 | 1 | 13 | 0.0020-0.0024 |
| GAMMA16_C1, TANH16_C1, SEXP16_C1 | 64 | 1 | 13 | 0.0037-0.0040 |
| GELU16_C2, TANH16_C2 | 256 | 5 | 10 | 0.00039, 0.00091 |
| COSH16_C2, SEXP16_C2 | 256 | 4 | 10 | 0.00039, 0.00099 |
| GAMMA16_C2 | 256 | 1 | 10 | 0.00070 |
| EXP16_C2 | 128 | 1 | 10 | 0.00092 |
| SQ8_C1 / SQ8_C2 | 13 / 15 | 5 / 15 | 5 / 3 | 0.0097 / 0.00046 |
| SQRT8_C1 / SQRT8_C2 | 21 / 12 | 2 / 12 | 6 / 3 | 0.0083 / 0.00078 |

To add a function: add it to `func_e` and `f_eval`, run the division and
sharing steps described above (and in the header of `hbu_plans_pkg.sv`) on
its codes, and add the resulting plan. Limits: W <= 16, at most 256 regions
and 16 cores.

## BERT encoder accelerator (`bert_accel`)

One pass takes an int8 vector of 128 through `mma_layer`
(y = Wx + b, int8 weights, 32-bit bias and accumulation, reuse factor 64:
two input elements per cycle against all 128 columns, 256 multipliers) and
then through one post-operation chosen per pass (`bert_pkg::post_op_e`):

* **none**: raw 32-bit results;
* **Trimmed GELU** (`tgelu_layer`, 128 lanes): results read as Fixed<1,32,8>;
  x < -8 gives 0, x >= 8 gives x, otherwise x is re-scaled to
  Fixed<1,16,12>, evaluated by the 16-bit HBU GELU unit and rounded back;
* **Softmax** (`softmax_layer`, first 80 lanes): results read as
  Fixed<1,32,12>; the maximum is subtracted, lanes more than 8 below it
  become 0, the rest go through the 16-bit HBU exp unit (Fixed<1,16,12> in,
  Fixed<0,16,15> out), are summed in 32 bits and divided by the sum.
  Output probabilities are Fixed<0,16,15> in lanes 0..79.

Larger operations (for instance a product of length 3072) are sequences of
passes with different weights; the sequencing, LayerNorm and the attention
data movement are outside this design.

Latencies, counting the clock edge that accepts the input as the first:

| block | cycles | throughput |
|---|---|---|
| `hbu_unit` (OUT_REG=1) | 1 | 1 per cycle |
| `softmax_layer` | 3 (max; subtract + exp; sum + divide) | 1 vector per cycle |
| `tgelu_layer` | 4 (register; classify + rescale; GELU unit; select) | 1 vector per cycle |
| `mma_layer` | 65 (load + 64 accumulate steps) | 1 vector per 65 cycles |
| `bert_accel` | 66 / 70 / 69 for none / GELU / Softmax | one pass in flight |
| `roberts_cross` | 1 | 1 window per cycle |

The MMA layer is the bottleneck; the non-linear layers add 3 or 4 cycles.

## Roberts Cross (`roberts_cross`)

For the window `p00 p01 / p10 p11`: |Gx| = |p00 - p11|, |Gy| = |p01 - p10|,
each squared by an 8-bit HBU unit (a^2/256), summed with saturation at 255,
and square-rooted by an 8-bit HBU unit (sqrt(256 s)), so
G = min(255, sqrt(Gx^2 + Gy^2)) approximately. The units are combinational
and the result is registered. Forming windows from an image is left to the
surrounding system.

## Top level

`hbu_func_bank` holds the five benchmark units; its parameter CFG picks the
Config. 1 (default) or Config. 2 plans.

`hbu_system_top` places `bert_accel` (ports `bert_*`), `roberts_cross`
(`rc_*`) and `hbu_func_bank` (`fb_*`, Config. 1) side by
side with a common clock and active-low asynchronous reset. Only control
state (valid bits, MMA counter) is reset; datapath registers are not.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_hbu_unit`: every input code of three units (exp 16-bit C1, sqrt 8-bit
  C2, sq 8-bit C1) against a behavioural region/core reference, one-cycle
  latency, and the mean absolute error bound; measured errors equal those in
  the plan table.
* `tb_unary_core`: a falling-then-rising GELU piece, so XOR gates are used.
* `tb_therm_encoder`, `tb_therm_decoder`: exhaustive / random codes.
* `tb_hbu_func_bank`: both configurations of the bank, every fifth code;
  each function below 0.01 (Config. 1) and 0.001 (Config. 2).
* `tb_softmax_layer`, `tb_tgelu_layer`, `tb_mma_layer`, `tb_bert_accel`:
  full-size vectors against floating-point or integer references, with exact
  latency checks; Softmax within 0.01 per probability, GELU within 0.06 per
  element (mean 0.0066).
* `tb_roberts_cross`: random and extreme windows, within 16 codes of the
  floating-point magnitude, mean error about 3 codes.
* `tb_hbu_system_top`: the whole design at its default size: BERT passes of
  all three kinds, a 32x32 synthetic image through the edge kernel
  (PSNR about 34.5 dB against floating point) and the function bank; it also
  checks that every mechanism (each post-operation, the three GELU ranges,
  Softmax lanes dropped to zero, back-pressure from the busy MMA layer,
  saturated edges) occurred.

Run one with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hbu_system_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/hbu_pkg.sv rtl/bert_pkg.sv rtl/hbu_plans_pkg.sv tb/tb_hbu_system_top.sv
obj_dir/Vtb_hbu_system_top
```

The largest testbenches elaborate 200+ HBU units and take about half a
minute to build; simulation takes seconds.

## Where this design departs from, or fills in, the paper

* Plans (region lists) are computed offline and stored; the unary wiring is
  derived from them at elaboration. The paper's own flow generated Verilog
  from a program.
* The paper's per-function parameters are unknown, so area will not match
  its LUT counts exactly; the plans meet its error bounds.
* The benchmark bank has 16-bit plans for both configurations, and x^2 and
  sqrt have 8-bit plans. 8- and 12-bit versions of the benchmark functions
  need new plans.
* The Softmax sum is an adder tree and each lane has its own divider, to meet
  three cycles per vector; the paper names a 32-bit accumulator and a divider.
* The internal organisation of the matrix-multiply layer, the weight-loading
  ports, the post-operation select and the fixed-point reading of the MMA
  results by the GELU and Softmax layers are this design's choices.
* Roberts Cross saturates the sum of squares at 255.
* LayerNorm is not implemented (the paper does not implement it either).
