# Two-stage multipliers built from input-shuffled 6-3 counters

A parallel multiplier spends most of its area and energy adding up the
partial-product array. This design reduces that array with *counter based
compressors* (CBCs). A CBC counts the ones in a column and writes the count
as a binary number: an N-input counter makes one bit for the column itself
and carry bits for columns +1, +2 and +3. Wide counters (up to 15-4) reduce
even the 16-bit middle column of a 16x16 multiplier in one step. So two
reduction stages and one final adder are enough.

Every counter is built around one cell: a 6-3 counter whose inputs are
*shuffled* first. Each input pair is replaced by its AND and its OR. That
turns the pair into a two-bit thermometer code and leaves only 27 of the 64
input codes possible. For image work the 6-3 counter also comes in two
approximate variants. They replace one or two of its output functions with
cheaper logic that is sometimes wrong. A multiplier then uses the
approximate counter only in a chosen range of product columns.

The RTL is plain synthesizable SystemVerilog with no clock: every module is
combinational.

## The 6-3 counter (`cbc_6_3`, `cbc_input_shuffle`)

Inputs `x[5:0]` form three pairs. `cbc_input_shuffle` computes

    A = x1 & x0   B = x1 | x0
    C = x3 & x2   D = x3 | x2
    E = x5 & x4   F = x5 | x4

In each pair the code {AND, OR} is 00, 01 or 11 for zero, one or two ones.
So A+B+C+D+E+F is still the number of ones in `x`. Only 3^3 = 27 codes can
occur, and logic after the shuffle may treat the other 37 as don't-cares.
The output is packed `{A,B,C,D,E,F}`, so read as a number it is the minterm
index of the counter's truth table.

`cbc_6_3` returns `{cout2, cout1, sum}`, the count with weights 4, 2, 1.
The parameter `MODE` (type `cbc_pkg::cbc_mode_e`) selects one of three
variants:

| MODE          | sum                  | cout1                | cout2 | exact on |
|---------------|----------------------|----------------------|-------|----------|
| `CBC_EXACT`   | exact                | exact                | exact | 64 / 64  |
| `CBC_DESIGN1` | SUM' (below)         | exact                | exact | 46 / 64  |
| `CBC_DESIGN2` | SUM'                 | COUT1' (below)       | exact | 34 / 64  |

    SUM'   = B'D' + B'F' + B'E + B'C + D'F' + D'E + A'BC'DE'
             + CF' + CE + AD' + AF + AE + AC
    COUT1' = CE + A'E + A'C + BC'F' + BD'E' + A'DF

The exact variant is written as the sum of the six shuffled bits, which is
exactly its 27-row truth table. The synthesis tool minimises it.

Know these properties of the approximate equations before you use them:

* SUM' is 1 when all six inputs are 0. An approximate counter that sees an
  all-zero group therefore adds a spurious one at its column.
* The errors are not symmetric. Most wrong counts are too high, so
  approximate products tend to be too large.

## Wide counters (`cbc_counter`)

`cbc_counter #(N, MODE)` counts N inputs, for N from 2 to 15. It has
`clog2(N+1)` outputs, so it is an N-3 counter up to N = 7 and an N-4
counter from 8 to 15. The inputs are grouped from the LSB up:

* each full group of six goes to a `cbc_6_3`;
* a leftover of four or five inputs goes to one more `cbc_6_3`, with its
  top inputs tied to 0 (this is how the 4-3 and 5-3 counters are made);
* a leftover of three goes to a full adder, and a leftover of two to a half
  adder;
* a single leftover bit is used as it is.

An exact adder then sums the group counts. For example, a 15-4 counter is
two 6-3 counters and a full adder. A 9-4 counter is one 6-3 counter and a
full adder.

With an approximate `MODE`, only the 6-3 cells are approximate. The full
adder, the half adder and the merge adder stay exact. If an approximate
count does not fit in the output width, it wraps.

Over all 32768 inputs, the approximate 15-4 counter is exact on 53.2% of
inputs with Design-1 and on 29.7% with Design-2. Published figures for a
15-4 counter built on the same approximate 6-3 cell are higher: 64.7% and
59.8%. The wide-counter structure here is this design's own (see below),
and it reproduces neither figure.

## The multiplier (`cbc_multiplier`)

`cbc_multiplier #(W, MODE, APX_LO, APX_HI)` computes the unsigned product
`p = a * b` (2W bits). It works in four steps:

1. **Partial products.** `a[j] & b[i]` goes to column `i+j`. So column `c`
   holds `min(c+1, 2W-1-c)` bits.
2. **Stage 1.** Every column of three or more bits gets one counter sized
   to that column: 3-2 (a full adder), 4-3, 5-3, 6-3, 7-3, 8-4 and so on up
   to 15-4. A column taller than 15 bits (only the middle column of a 16x16
   array) uses a 15-4 counter and passes its 16th bit through unchanged.
   Output bit k of the counter in column c lands in column c+k.
3. **Stage 2.** The same rule applies again. After stage 1 no column is
   taller than 5 bits, so stage 2 uses only 3-2, 4-3 and 5-3 counters.
4. **Final addition.** After stage 2 no column holds more than three bits.
   A carry-propagate adder sums these three rows.

Column heights for 16x16, from column 0 to column 31:

    partial products: 1 2 3 ... 15 16 15 ... 3 2 1 0
    after stage 1   : 1 2 1 2 2 3 3 3 3 3 4 4 4 4 4 5 4 4 4 4 4 4 4 4 4 4 4 3 3 4 1 0
    after stage 2   : 1 2 1 2 2 1 2 2 2 2 2 2 3 3 3 ... 3 3 2 2 1

Inside a column, the bits are stored in a fixed order. Bits that bypass the
counter come first. Then come the outputs of the counters in columns c,
c-1, c-2 and c-3. This order does not change an exact product. It does
decide which bits share a 6-3 cell in stage 2, and so it sets the exact
error pattern of an approximate multiplier.

The functions in `cbc_pkg` compute the whole plan at elaboration time:
`stage_height`, `stage_slot` and `stage_max_height`. Each reduction stage
is one `cbc_reduce_stage` instance. To change the plan, for example the
largest counter (`CBC_MAX_IN`) or the bit order inside a column, edit those
functions. The RTL follows them.

### Approximation models

The counters whose column lies in `APX_LO..APX_HI` are built with `MODE`,
in both stages. All other counters are exact.

| model       | W  | columns | meaning                               |
|-------------|----|---------|---------------------------------------|
| true        | any| none    | `MODE = CBC_EXACT` (the default)      |
| model-1     | 8  | 5..9    | the middle five of the 15 columns     |
| model-2     | 16 | 0..31   | every counter                         |
| model-3     | 16 | 0..15   | from the middle to the LSB side       |

## The top (`image_multiplier_top`)

The top holds pixel multipliers for two image formats, side by side. They
share nothing.

* **8-bit pixels.** `a8 * b8` gives `p8_true` (exact) and `p8_apx`
  (model-1, variant `MODE8`, default Design-1).
* **16-bit pixels.** `a16 * b16` gives `p16_true` and `p16_apx`. The
  approximate columns are `APX16_LO..APX16_HI`, default 0..15 (model-3). Set
  `APX16_HI = 31` for model-2. `MODE16` selects the variant, default
  Design-1.

Each output is the full double-width product of one pixel pair. Squaring an
image (contrast scaling) means `a = b`. Scaling the product back to pixel
range, for example by keeping its upper half, is left to the user.

## How far it can be trusted

Every testbench below compares the RTL with values computed independently.
Plain arithmetic checks the exact paths. For the approximate paths, a
bit-level reference model in `tb/cbc_ref_pkg.sv` rebuilds the same column
plan from queues of bits and the counter equations.

| testbench                  | what it checks |
|----------------------------|----------------|
| `tb_cbc_input_shuffle`     | all 64 inputs; each AND/OR pair; that the count is kept; exactly 27 distinct codes |
| `tb_cbc_6_3`               | all 64 inputs in all three modes; pass rates 46/64 and 34/64 |
| `tb_cbc_counter`           | exact counters for N = 3..15; 15-, 10- and 5-input approximate counters against the reference; exhaustive 15-4 pass rates |
| `tb_cbc_multiplier`        | all 65536 8x8 exact products; 16x16 exact products on random and corner operands; 8x8 model-1, 16x16 model-2 and model-3 against the reference |
| `tb_image_multiplier_top`  | the top at its default parameters, end to end; counts approximate products below, equal to and above exact |
| `tb_image_workloads`       | image products and image squares at 8 and 16 bits; reports PSNR and NED for every model |

The workload testbench uses 64x64 synthetic images (smooth shading plus
texture). It scores the output pixels (the upper half of each product) and
gets these results:

| configuration            | PSNR, A x B | PSNR, A^2 | NED, A x B |
|--------------------------|-------------|-----------|------------|
| 8x8 model-1 Design-1     | 44.4 dB     | 42.2 dB   | 4.4e-3     |
| 8x8 model-1 Design-2     | 38.7 dB     | 38.2 dB   | 9.0e-3     |
| 16x16 model-3 Design-1   | 94.4 dB     | 93.9 dB   | 1.6e-5     |
| 16x16 model-3 Design-2   | 90.6 dB     | 90.4 dB   | 2.8e-5     |
| 16x16 model-2 Design-1   | 17.9 dB     | 15.1 dB   | 1.1e-1     |
| 16x16 model-2 Design-2   | 11.4 dB     | 14.0 dB   | 2.6e-1     |

The orderings match the published ones:

* model-3 is far better than model-2;
* Design-1 is better than Design-2.

The testbench checks both orderings. The model-3 NED has the same order of
magnitude as the published figure (about 3e-5). Model-2 is much worse than
the published figure (about 4e-5, PSNR 25–28 dB). The reason: with the
approximate equations above, every all-zero group in a high column adds a
large error. So use model-2 with care. Model-3 and model-1 are the useful
configurations.

## Where this implementation makes its own choices

These points are not fixed by the method. Each was settled here in the
simplest way that works:

* The internals of the 7-3 to 15-4 counters: the grouping and the exact
  merge adder.
* How the 4-3 and 5-3 counters are made: a 6-3 counter with inputs tied to
  0.
* The column plan: one counter per column and stage, up to 15-4, and the
  order of bits inside a column.
* The three-row final adder.
* The exact column ranges of model-1 and model-3.
* Unsigned operands, and no pipeline registers.
* The default variants in the top (Design-1 for both widths).
* The exact 6-3 logic is the truth table written as an addition, not a
  hand-minimised sum of products.
* When Design-2 is selected, the wide counters use it in every 6-3 cell.

Gate-level results (area, power and delay in a 90 nm library) are outside
the scope of RTL. Nothing here reproduces them.

## Simulating

All files are in `rtl/` (design) and `tb/` (testbenches and reference
model). One module, package or interface per file. With Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/cbc_pkg.sv tb/cbc_ref_pkg.sv tb/tb_image_multiplier_top.sv \
        --top-module tb_image_multiplier_top
    ./obj_dir/Vtb_image_multiplier_top

Replace the testbench name to run another one. Every testbench ends with a
line `TB_RESULT checks=<n> failures=<m>`, and each one runs in seconds. To
lint the design alone:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/cbc_pkg.sv \
        rtl/image_multiplier_top.sv --top-module image_multiplier_top

The module parameters have these defaults:

* `cbc_multiplier`: W = 16, exact.
* `cbc_counter`: N = 15, exact.
* `image_multiplier_top`: 8-bit model-1 and 16-bit model-3, both
  Design-1.

Synthesized with a generic flow, the whole top (four multipliers) comes to
about 1.9k word-level cells, with no flip-flops.
