# Fixed-point power functions for FPGAs: x^-1, x^-1/2 and x^1/2

This RTL evaluates three functions in fixed point: the reciprocal 1/x, the reciprocal square
root 1/sqrt(x) and the square root sqrt(x). Every result is *faithfully rounded*: it is one of
the two representable numbers around the exact value, so the error is below one unit in the
last place (ulp). No floating-point hardware is used. Each operator is sized around the memory
blocks and multipliers of an FPGA. The cost model counts 10 Kbit block RAMs that can be used as
2048x5, 1024x10, 512x20 or 256x40, with one 18x18 multiplier per half DSP block.

There are three families of operators. Which one fits depends on the output precision:

| Precision | Family | Module |
|---|---|---|
| Short formats (16 bits here), any position of the binary point | **Holistic full-range evaluation**: a per-format choice among underflow tables, a piecewise-linear polynomial and patch tables, with no range reduction | `holistic_fn` |
| About 20–24 bits on [1,2) | **Tabulate-and-multiply**: one table read and one or two multiplications, where a two-term expansion has been factored into a product | `tabmult1`, `tabmult2` |
| 32 bits on [1,2) | **Bipartite seed + one iteration**: a Newton step (quadratic) or a Halley-type step (cubic) | `newton_recip`, `halley_recip`, `halley_rsqrt` |

All tables are computed at elaboration from closed-form expressions in SystemVerilog, using
`real` constant functions. No data files are read. Every operator is fully pipelined: it takes
one input per cycle and has a fixed latency.

## Number formats

A format (w, f) is an unsigned w-bit word with f fraction bits. Its value is `X / 2^f`, and its
ulp is `2^-f`.

- **Holistic operators** take (W, F) for input and output alike. The input covers all of
  `[0, 2^(W-F))`. It is not restricted to a binade.
- **[1,2) operators** use (W, W-1). The integer bit of the input must be 1. The result of 1/x
  or 1/sqrt(x) lies in (1/2, 1]; sqrt(x) lies in [1, sqrt 2). Both are returned in the same
  (W, W-1) format.

## Holistic full-range evaluation (`holistic_fn`)

This is the part of the design that takes the most explaining.

### Why not reduce the range

The textbook way to compute 1/x on a fixed-point input has three steps:
1. Count leading zeros.
2. Shift x into [1,2) and evaluate there.
3. Shift the result back.

For a 16-bit word, the normaliser and the reconstruction cost more logic and latency than the
function kernel. `holistic_fn` works on the raw input word instead. The generator examines the
function on the exact format, and the RTL keeps only the hardware that the format needs.

What decides that hardware is how 1/x (or 1/sqrt x) behaves across the input range:

- **Small x.** The true result exceeds the largest code `2^W-1`, so the output *saturates*.
- **Just above that.** The function is steep. A low-degree polynomial over a wide segment is not
  accurate enough, so these values are *tabulated*.
- **The middle and upper range.** The function is smooth. A *first-degree polynomial per
  segment* is faithful there.
- **Large x, when F is small.** The result is below half an ulp, so 0 is a faithful answer: the
  output *underflows*. With 1/x on (16,4), for example, almost every input underflows.

### Elaboration-time analysis

Everything below is computed by constant functions at elaboration. Nothing is done at run time.

**Saturation and underflow points.** Because the function falls monotonically, binary searches
over the input codes find three points:

| Point | Definition |
|---|---|
| `ISAT` | First input whose correctly rounded result fits in W bits. Inputs below it saturate to `2^W-1`; x = 0 saturates too. |
| `IDX1` | First input from which the constant 1 ulp is faithful. |
| `IDX0` | First input from which the constant 0 is faithful. |

**Polynomial segments.** The input word is cut into `2^K` equal segments by its top K bits. In
each segment the generator fits `y = c0 - c1*t`, where t is the offset inside the segment. The
fit is the minimax line for a convex function (Chebyshev equioscillation: the chord slope, with
c0 centred between the chord error and the tangent error). It then checks whether the method
error plus the coefficient and product rounding stays within one ulp. `c1` is stored as a
magnitude because the slope is always negative. Since accuracy improves monotonically with x,
a binary search finds `STAB`, the first segment that is accurate. Inputs below it go to the
patch table.

**Patch table.** The table covers the inputs from `TB` to the start of segment `STAB`. Two
choices are costed independently:

- **Where the table starts.** One option puts the saturated inputs in the table (`TB = 0`, so
  the table is indexed directly by x). The other leaves them to a comparator (`TB = ISAT`, so
  the table is indexed by `x - ISAT`).
- **How the table is stored.** Either *plain*, one full-width word per input, or *base +
  offset*: a base table sampled every `2^SB` inputs, plus a narrow table of differences from
  that base. The offset width comes from the largest difference in any sample group.
  Monotonicity makes this an O(1) computation, the difference between the first and last
  entries of the first group.

**Cost and choice.** Each candidate is priced in memory blocks by `fxp_pkg::m10k_blocks`. The
price is the cheapest of the four block shapes, counting cascaded blocks in depth and width.
The candidates are:

| Architecture | What it contains | Cost |
|---|---|---|
| `ARCH_UF_A` | Table for every input below `IDX0`; constant 0 above | That one table |
| `ARCH_UF_B` | Table below `IDX1`; constant 1 ulp in `[IDX1, IDX0)`; 0 above | A smaller table, plus one more comparator |
| `ARCH_POLY` | For each K from 3 to W-3: the `c0`/`c1` tables, plus the cheapest patch-table variant | The K with the lowest total |

The cheapest architecture wins. Ties go to UF_A, then UF_B, then POLY. The module exposes its
decisions as localparams, which the testbenches read hierarchically: `ARCH`, `K`, `STAB`, `TB`,
`SB`, `OW`, the block costs `COST_*`, and `LATENCY`.

### Datapath

**Underflow architectures.** There is one table read and one or two comparators (x below
`IDX1`, x below `IDX0`). The output is registered. Latency is 2.

**Polynomial architecture.** There are four register stages:
1. Read `c0`, `c1` and the patch table (both halves when it is base + offset); decode the
   saturate and in-table flags.
2. Multiply `c1 * t`. This is the only multiplier.
3. Compute `c0 - c1*t` with GB = 6 guard bits; add base and offset.
4. Round to nearest. Select the saturation value, the table value or the polynomial.

A `pipe_delay` then pads the latency to 6 with a plain table and 7 with base + offset. Those are
the latencies reported for the smaller formats.

### What the choice gives for 16-bit formats

`tb_holistic_table1` builds all 24 formats. For 1/x:

| f | 15 | 14 | 13 | 12 | 11 | 10 | 9 | 8 | 7 | 6 | 5 | 4 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| architecture | poly | poly, b+o, x−ISAT | poly, b+o, x−ISAT | poly, b+o, x−ISAT | poly | poly | poly | poly | poly | poly | UF_B | UF_A |
| blocks (this cost model) | 3 | 8 | 9 | 8 | 7 | 6 | 4 | 3 | 3 | 2 | 2 | 1 |
| blocks (published, after synthesis) | 3 | 8 | 10 | 11 | 8 | 8 | 6 | 5 | 5 | 4 | 2 | 1 |
| latency | 6 | 7 | 7 | 7 | 6 | 6 | 6 | 6 | 6 | 6 | 2 | 2 |

For 1/sqrt(x), every format uses the polynomial, at 2–8 blocks. Formats f = 13, 14 and 15 use a
base + offset patch table.

The block counts here are the generator's own estimate. The published counts come from
synthesis. They are higher where the tool packed tables less tightly, or where the segment
tables are stored wider than the minimum used here.

## Tabulate-and-multiply on [1,2) (`tabmult1`, `tabmult2`)

Both operators split `x = x1 + x2`:
- x1 is the top M fraction bits and indexes the tables;
- x2 is the remaining L = W-1-M bits;
- c = x1 + 2^-(M+1) is the centre of the segment.

A Taylor expansion around c is rearranged so that the part that depends on x2 is a **product**
of two simple terms, not a sum of tabulated terms. The trick throughout is that
`F = x2 - 2^-(M+1)` costs nothing: it is x2 with its MSB inverted, read as a signed number.

**First order** (`tabmult1`): `x^P ≈ C'·x'`.
- `x' = c + P·F` is a bit pattern of x1, plus F or a shifted F.
- `C' = c^(P-1)` plus a small term that centres the method error.
- Cost: one table of 2^M entries and one multiplier.
- The default is 1/x on (21,20) with M = 10: a 1024 x 23 table, latency 4.

**Second order** (`tabmult2`): `x^P ≈ D·(G + P·F·x')`.
- `D = c^(P-2)` and `G = c^2` are read from one table.
- `x' = c + (P-1)/2·F`. The factor (P-1)/2 is -1, -3/4 or -1/4, so x' is a shift-and-add.
- Multiplying by P is a negation and/or a one-bit shift.
- Cost: two multipliers and a 2^M-entry table.
- The default is 24 bits with M = 8: 256 entries of D and G.
- Latencies are 5 / 9 / 8 for 1/x, 1/sqrt(x) and sqrt(x). These match the reported figures; the
  datapath itself has 5 stages, and the rest is output delay.

Both products are truncated G guard bits below the output LSB. The final addition rounds to
nearest. The error budget keeps the total below 1 ulp:
- method error around 2^-(3M) for the second order;
- the truncation errors;
- the final rounding, at most ½ ulp.

The guard-bit count follows the bound g > 2 + log2(2 - P), which gives G = 4.

## 32-bit operators: bipartite seed plus one iteration

**Bipartite seed** (`bipartite`). The fraction bits under the leading one are split into fields
A, B and C. Two tables are read in parallel, and y0 = TIV + TO:

| Table | Indexed by | Holds |
|---|---|---|
| TIV | (A, B) | The function at the centre of the sub-interval |
| TO | (A, C) | A signed slope correction |

**Iterations.** The seed x0 feeds one step written in correction form, `x1 = x0 + x0·(...)`:

| Module | Function | Step | Seed error | Tables (A,B,C; fraction bits) |
|---|---|---|---|---|
| `newton_recip` | 1/x | `h = 1 - a·x0`, `x1 = x0 + x0·h` | 2^-15.75 | 2048 x 18 + 1024 x 6 (5,6,5; 17) |
| `halley_recip` | 1/x | `x1 = x0 + x0·(h + h²)` | 2^-10.81 | 256 x 13 + 64 x 4 (3,5,3; 12) |
| `halley_rsqrt` | 1/sqrt(x) | `h = 1 - a·x0²`, `x1 = x0 + x0·(4h + 3h²)/8` | 2^-11.47 | 256 x 13 + 64 x 3 (3,5,3; 12) |

The TO width is not fixed by a formula on the split. It is the smallest signed width that holds
the largest entry. Because |f'| falls with x, that entry is at x0 = 0, so the width costs O(1) to
find.

Because `|h| < 2^-H_MSB` is known from the seed error, h is kept only on the bits below that
weight. So is its square. An assertion checks that h fits. The correction is truncated G = 6 bits
below the output LSB and added with rounding to nearest.

**Error budget.** This is where the three operators differ. One ulp is 2^-31. The iteration
errors below were found by evaluating the step over every seed interval.

- **Cubic steps.** The iteration leaves at most 2^-32.4 (0.38 ulp) for 1/x and 2^-33.0
  (0.24 ulp) for 1/sqrt(x). The truncations add about 0.05 ulp and the rounding 0.5 ulp, which
  stays below 1 ulp.
- **Newton step.** The 16-bit seed leaves 2^-31.41, which is 0.75 ulp: too much to round
  directly. But this error is one-sided, since `x0·(1+h) = (1-h²)/a` never exceeds 1/a, and the
  truncations only lower the sum further. A constant `BIAS` (25 units of 2^-37, half the worst
  shortfall) is therefore added before rounding. That centres the error at ±0.39 ulp. Without
  the bias, the testbench finds inputs that are not faithful. A different seed split needs the
  bias recomputed.

Latencies are 9 (Newton 1/x), 11 (Halley 1/x) and 19 (1/sqrt x). They match the reported values
by padding the output. The datapaths themselves have 7, 9 and 10 stages.

## Top level (`fxp_funcgen_top`)

The top places one instance of each operator side by side, at default parameters:
- holistic 1/x and 1/sqrt(x) on (16,8);
- first-order 1/x on (21,20);
- second-order 1/x, 1/sqrt(x) and sqrt(x) on (24,23);
- Newton and Halley 1/x on (32,31);
- Halley 1/sqrt(x) on (32,31).

Each operator `<op>` has ports `<op>_in_valid`, `<op>_x`, `<op>_out_valid` and `<op>_y`. They
share `clk` and a synchronous, active-high `rst`. The reset only clears the valid pipeline, and
data registers are free-running. `pipe_delay` is a small helper that delays data and valid by a
fixed number of cycles.

## Verification

`tb/fxp_check_pkg.sv` decides faithfulness exactly, in wide integer arithmetic: y is faithful
for 1/x if `(y-1)·x < 2^(2f) < (y+1)·x`, and similarly with squares for the root functions. No
floating-point reference is involved.

| Testbench | Covers |
|---|---|
| `tb_holistic_fn` | Exhaustive over all 2^16 inputs, for 7 formats that exercise every architecture. Also checks the chosen architecture. |
| `tb_holistic_table1` | Exhaustive over all 24 formats: 1/x and 1/sqrt(x), f = 4..15. Prints the choice per format. |
| `tb_tabmult1`, `tb_tabmult2` | Exhaustive or dense sweeps at default size, with latency checked. |
| `tb_tabmult_table2` | The other evaluated sizes: first order at 19, 21, 23 and 24 bits; second order at 21, 23 and 24 bits. |
| `tb_bipartite` | Seed error bound. |
| `tb_newton_recip`, `tb_halley_recip`, `tb_halley_rsqrt` | 200 000 random and boundary inputs each, with latency checked. |
| `tb_fxp_funcgen_top` | The whole top at default parameters. It also counts that saturation, patch-table, polynomial, h < 0 and h ≥ 0 cases all occurred. |

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fxp_pkg.sv tb/fxp_check_pkg.sv tb/tb_holistic_fn.sv --top tb_holistic_fn
./obj_dir/Vtb_holistic_fn
```

## Departures from the published design, and limits

- **Holistic block counts.** The architecture choice uses a block-count model, not a synthesis
  run. For 1/x the variants fall where the published results put them:
  - (16,4) uses UF_A;
  - (16,5) uses UF_B;
  - (16,15) uses a polynomial with no extra table;
  - (16,14) uses base + offset indexed by x − ISAT.

  For (16,12), this model prefers base + offset indexed by x − ISAT, where x-indexing was
  reported. 1/sqrt(x) at f = 4..6 is reported with 2 blocks, and this model also finds
  2 blocks.
- **Holistic latencies.** Latency here is fixed per architecture: 2 for underflow, 6 for a
  polynomial with a plain table, 7 with base + offset. The reported latencies run from 6 to 9
  and are not all matched. For 1/x they are 7 at f = 9..11 and 15, and 9 at f = 12..14. (16,5)
  is reported with latency 6 and one multiplier, where UF_B here needs neither.
- **32-bit seeds.** The published table sizes are reproduced. The individual fields A, B and C
  are not given and were chosen here. The 1/sqrt(x) seed keeps its two tables separate instead
  of packing them into one dual-port memory. The Newton bias is this design's addition; it is
  what makes the published seed size faithful with a plain rounding step.
- **Alternative seed.** The variant that seeds the cubic iteration from a plain table rather
  than a bipartite one is not included.
- **Table size limit.** Tables are built by generate loops. Verilator unrolls at most 16384
  iterations per loop, which covers every 16-bit format here; the largest table is 5568 entries
  at (16,14).
- **Not included.** The software front end of a function generator (format parsing, choosing
  among operator families) is not RTL and is not included. Neither are the comparison
  baselines: a range-reducing 16-bit operator, and library polynomial cores.
