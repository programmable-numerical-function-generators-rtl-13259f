# Quadratic numerical function generator with LUT-cascade segment lookup

This is synthesizable SystemVerilog for a pipelined unit that computes an
elementary function, such as 1/x, sqrt(x), log2(x), sin(pi x) or a sigmoid, to
a fixed-point accuracy of 2^-m. It produces one result per clock cycle.

The idea is piecewise quadratic approximation on **non-uniform** segments.
Functions such as sqrt(-ln x), or sqrt(x) near 0, change curvature sharply in
one part of the domain and gently elsewhere. Equal-width segments then waste
table space on the gentle part. Segments of varying width need far fewer
table entries, but finding which segment an input falls in is then no longer
a matter of taking its top bits. Here that lookup is done by an **LUT
cascade**: a chain of small memories, each of which reads a few input bits
plus a short code from its predecessor. Any segmentation can be realised this
way by changing only memory contents.

The architecture follows Nagayama, Sasao and Butler, *Programmable Numerical
Function Generators Based on Quadratic Approximation: Architecture and
Synthesis Method*. All bit widths, the table-loading port and the encodings
described below are this implementation's own choices. The original leaves
them to a per-function error analysis that it does not publish.

## What is computed

The domain [a, b] is cut into segments [s_i, e_i]. On segment i the function
is replaced by a quadratic written about the segment midpoint
q_i = (s_i + e_i)/2:

    y = c2_i * (x - q_i)^2 + c1_i * (x - q_i) + c0_i

Centring on q_i keeps |x - q_i| at or below half the segment width. That
makes the square and the products small. The three coefficients come from a
2nd-order Chebyshev interpolant of f on the segment.

## Pipeline

```
 x ──┬─► segment index encoder ──i──► coefficients table ──┬─ -q ─┐
     │   (LUT cascade, N_CAS stages)    (1 stage)          ├─ c2, l2, c1, l1, c0
     └──────────── x delayed ───────────────────────────►  (+) x + (-q) = d   (1)
                                                            │
                              d ─► square (1) ─► c2·d²  ┐    │
                              d ─(delay)──────► c1·d   ┘ multipliers (1)
                                          × 2^l2, × 2^l1   shifters (1, optional)
                                 c2·d² + c1·d + c0 ─► round ─► y   final adder (1)
```

| unit                    | module                  | stages |
|-------------------------|-------------------------|--------|
| segment index encoder   | `seg_index_encoder`     | N_CAS  |
| coefficients table      | `coef_table`            | 1      |
| x + (-q) adder          | `offset_adder`          | 1      |
| squaring unit           | `squaring_unit`         | 1      |
| two multipliers         | `pipelined_multiplier`  | 1      |
| scaling shifters        | `scaling_shifter`       | 1 (HAS_SHIFTER=1) or 0 |
| final adder             | `final_adder`           | 1      |

The latency from `x` to `y` is **N_CAS + 6** cycles, or N_CAS + 5 without the
shifter stage. With the defaults that is 12 cycles. There is no stall and no
back-pressure: `in_valid` travels down a reset-cleared shift register, and it
comes out as `out_valid` alongside `y`. Only that valid chain is reset.
Datapath registers are not reset.

## The segment index encoder (the part to understand)

The encoder computes the segment index function: index 0 for s_0 ≤ x ≤ e_0,
and index i for s_i < x ≤ e_i. With defaults the 24 input bits are cut into
six groups of four, most significant first:

- LUT 0 is addressed by bits 23..20 and outputs R rails.
- LUT j (1 ≤ j ≤ 4) is addressed by {rails from LUT j-1, the next 4 bits} and
  outputs R rails.
- LUT 5 is addressed by {rails, bits 3..0} and outputs the K-bit index.

Every LUT is a synchronous memory, so the cascade forms an N_CAS-stage
pipeline. The encoder delays x alongside it, so that each LUT sees the bits
of the same sample.

**What the rails carry.** Once the top bits of x have been read, the index
is a function of the remaining bits only (a "sub-function"). The rails must
identify which sub-function applies. The index function is monotone in x,
so for the prefix read so far, the remaining part of the domain either:

- lies entirely inside one segment k (sub-function "constant k"), or
- contains a segment boundary. That sub-function cannot occur for any other
  prefix, because every other prefix lies wholly before or after it.

So at every cut there are at most t constant classes plus t-1 boundary
classes, 2t-1 in all, with t the number of segments. This design uses
**R = K + 1 rails**, with 2^K ≥ t. The generated tables do use nearly all of
them: 8 segments of 2^x need 15 classes, and 512 segments of sqrt(-ln x) need
984. The original paper states a bound of ⌈log2 t⌉ rails. This design does
not rely on that bound.

**Filling the LUTs.** For each cut, enumerate the classes by walking forward
from the previous cut's classes:

1. For LUT 0, take each 4-bit value g. The prefix g defines an input interval
   [lo, hi].
2. If seg(lo) = seg(hi), the class is "constant seg(lo)". Otherwise the
   interval has a class of its own.
3. Give each new class the next free rail code, and write it to LUT 0 at
   address g.
4. For LUT j, take each class c of cut j-1 (any one prefix p that produced
   it) and each g. The new prefix is p·g; classify it in the same way, and
   write its code at address {c, g}.
5. The last LUT writes seg(p·g) itself.

Inputs outside the domain can go to either end segment. The generator clamps
negative x to the last segment, which keeps the function monotone over raw
codes.

## Coefficients and the scaling shifter

A coefficient can be large, as c2 of sqrt(-ln x) is near x = 1 (about -4·10^9
at 24 bits), or small. Each of c2 and c1 is therefore stored as a signed
mantissa m and a signed exponent l, with c = m · 2^(l - (W-2)) for a W-bit
mantissa. The multiplier works on the narrow mantissa. The shifter then
applies 2^l, together with a constant that converts the product's binary
point to the final adder's:

- c2 term: the product has (C2W-2) + SQF fractional bits, and the shift is
  l2 + AF - (C2W-2) - SQF.
- c1 term: the product has (C1W-2) + DF fractional bits, and the shift is
  l1 + AF - (C1W-2) - DF.

A positive shift moves left. A negative one moves right with sign
extension, which truncates toward minus infinity.

A generator built with `HAS_SHIFTER = 0` drops the stage and ignores the
exponents. It suits only functions whose coefficients are all below 2 in
magnitude; `tb_nfg_noshift` runs seven such functions.

### Coefficient word

Word i of the coefficients table is, MSB first:

| field  | bits (default) | format |
|--------|----------------|--------|
| neg_q  | N+2 = 26       | -q_i, signed, XF+1 = 23 fractional bits; equals -(s_code + e_code) |
| m2     | C2W = 20       | signed mantissa of c2, 18 fractional bits |
| l2     | LW = 7         | signed exponent of c2 |
| m1     | C1W = 26       | signed mantissa of c1, 24 fractional bits |
| l1     | LW = 7         | signed exponent of c1 |
| c0     | YI+XF+GUARD = 29 | signed, XF+GUARD = 26 fractional bits |

## Number formats

| signal | width (default) | fractional bits |
|--------|-----------------|-----------------|
| x      | N = 24, two's complement | XF = 22 (so x ∈ [-2, 2)) |
| d = x - q | N+2 = 26     | XF+1 = 23 |
| d²     | 51, unsigned, exact | 2·(XF+1) = 46 (`SQ_TRUNC` drops low bits) |
| internal sum | ACCW = 40 | AF = XF + GUARD = 26 |
| y      | YI + XF = 25    | XF = 22, rounded to nearest (half up) |

The input and the output have the same number of fractional bits. The target
error is one output LSB, 2^-XF. The result is not saturated: the tables must
describe a function whose values fit the YI = 3 integer bits, i.e. [-4, 4).

## Loading a function

Nothing in the RTL is specific to one function. The tables are written
through one port:

- `wr_sel` 0..N_CAS-1 selects a cascade LUT, and `wr_sel = N_CAS` selects the
  coefficients table.
- `wr_addr` and `wr_data` are used from their low end. Each memory takes as
  many bits as it has.
- A write takes effect at the clock edge. Loading may overlap evaluation, but
  results that depend on half-written tables are meaningless.

The tables for a function are produced in four steps. The testbench package
`tb/nfg_tb_pkg.sv` implements all of them in SystemVerilog.

1. **Segmentation.** Start at s = a. Make each segment as wide as possible
   such that (e - s)^3 / 192 · max|f'''| over [s, e] stays within the target
   approximation error, which is the Chebyshev error bound for degree 2. The
   end e is found bit by bit from the MSB of the offset e - s, so each
   segment takes n trials. Then start the next segment at e.
2. **Halving.** The table has 2^k words anyway, with k = ⌈log2 t⌉. Split the
   widest segment in two until t = 2^k. This narrows |x - q| and lowers the
   error at no memory cost.
3. **Coefficients.** On [s, e] with h = (e - s)/2 and u = h·√3/2, take
   c0 = f(q), c1 = (f(q+u) - f(q-u)) / (2u), and
   c2 = (f(q+u) + f(q-u) - 2f(q)) / (2u²). This is the quadratic through the
   three Chebyshev nodes. Then round to the mantissa/exponent form above.
4. **Cascade contents**, as described in the encoder section.

The testbench estimates f''' from third differences with a step between
2^-14 and 2^-10. With that estimate, the segment counts before halving equal
the published ones for every function and both errors in the evaluation
set, except sqrt(-ln x): 313 instead of 331 at 2^-25, and 54 instead of 52
at 2^-17.

## Parameters (`nfg_top`)

| parameter   | default | meaning |
|-------------|---------|---------|
| N           | 24  | input bits (precision) |
| XF          | 22  | fractional bits of x and y |
| K           | 9   | index bits; coefficients table of 2^K words |
| N_CAS       | 6   | LUTs in the cascade; must divide N |
| R           | 10  | rails between LUTs (K+1) |
| C2W, C1W    | 20, 26 | mantissa widths of c2, c1 |
| LW          | 7   | exponent width |
| YI          | 3   | integer bits of y, sign included |
| GUARD       | 4   | extra fractional bits before the final rounding |
| ACCW        | 40  | internal sum width |
| HAS_SHIFTER | 1   | include the scaling-shifter stage |
| SQ_TRUNC    | 0   | low bits dropped from the square |
| D_DROP      | 0   | high bits dropped from x - q before the square and the c1 multiplier |

Only N = 24 (and 16 for the second configuration) comes from the published
evaluation. Everything else was chosen here. The widths are generous rather
than minimal, and the memories are sized so that one build holds any of the
evaluated functions. The default build therefore holds about 862 kbit: the
cascade has 803 kbit (LUTs 1 to 5 have 2^14 words each), and the coefficients
table 59 kbit. A build tailored to one function needs far less, since its
cascade can use fewer rails and LUT sizes fitted to it. The testbenches
print that tailored figure for each function: ⌈log2 classes⌉ rails at each
cut, with the same word formats and grouping. At 24 bits it ranges from
24.5 kbit (Gaussian) to 545 kbit (sqrt(-ln x)), with 2^x at 63,600 bits
against 19,072 published. At 16 bits, 2^x needs 3,144 against 1,112. This
encoding, with its uniform groups and wide words, therefore needs roughly
2.5 to 3.5 times the published memory sizes.

## Departures and limits

- **Bit widths are not minimised per function.** By default `x - q` keeps
  all N+2 bits, and the square is exact. Because q is the segment midpoint,
  |x - q| is at most half the widest segment. `D_DROP` removes high bits
  that are then only sign copies, which shrinks the squaring unit and the c1
  multiplier. The loaded tables must keep every segment narrower than
  2^(N+1-D_DROP-XF). The 16-bit test runs with `D_DROP = 4`: x - q has 14
  bits instead of 18. Truncating the square to the adder's fraction
  costs up to 2^-18.7 on the entropy function, whose c2 is large. That fails
  2^-22 accuracy, so the default keeps the square exact.
- **Rails:** K+1 rather than ⌈log2 t⌉, for the reason given above.
- **LUT input grouping** is uniform, N/N_CAS bits per LUT. A cascade
  synthesised for one function could use unequal groups.
- **Programmability** comes from a write port, so one netlist serves every
  function. This is an addition: the published flow regenerates the HDL for
  each function.
- **sqrt(-ln x) near x = 1:** its derivatives are unbounded there. On a
  24-bit input grid no quadratic meets 2^-22 within about 2^-12 of x = 1.
  The hardware reproduces its quadratics exactly there too, but the error
  against f reaches 2^-12.8 (24-bit build) and 2^-9.5 (16-bit build).
- **Default accuracy is 2^-22.** Two's complement x with two integer bits
  leaves 22 fractional bits in 24. Comparisons that need 2^-23 or 2^-24 use a
  26-bit build (`tb_nfg_table4`).
- No saturation of y, and no reset of datapath registers.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. The end-to-end benches compare against real-number evaluation, not
against a model of the RTL:

| testbench | configuration | what it shows |
|-----------|---------------|---------------|
| `tb_nfg_top` | defaults (24-bit) | all 14 functions of the evaluation set at approximation error 2^-25, each loaded in turn; every segment end, its neighbour and 400 random inputs; y within 2^-22 of the segment's quadratic and of f(x); latency 12; back-to-back issue, idle gaps, scaled coefficients, negative x - q and segment halving all occur |
| `tb_nfg_16bit` | N=16, XF=14, K=6, 4 LUTs, D_DROP=4 | the same 14 functions at 2^-17, to 2^-14, with x - q narrowed to 14 bits |
| `tb_nfg_noshift` | 16-bit, no shifter | latency N_CAS+5; seven functions with unscaled coefficients |
| `tb_nfg_table4` | N=26, XF=24, 13 LUTs | sin(pi x) on [0,1/4], exp(x), 2^x-1, sin(pi x/4), all to 2^-24 |
| `tb_seg_index_encoder` | 12-bit, 3 LUTs | random segmentations; all 4096 inputs streamed; index, latency and delayed x |
| unit benches | — | `cascade_lut`, `coef_table`, `offset_adder`, `squaring_unit`, `pipelined_multiplier`, `scaling_shifter`, `final_adder` against real-number results |

In the end-to-end benches, every output lies within 2^-22.8 (24-bit) or
2^-14.8 (16-bit) of its segment's real-valued quadratic. It lies within
2^-22.5 or 2^-14.6 of f, except at the singular end of sqrt(-ln x) noted
above.

`tb/nfg_bench.sv` is the parameterised bench behind the 16-bit, no-shifter
and 26-bit runs. `tb/nfg_tb_pkg.sv` holds the table generator.

### Running with Verilator

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/nfg_pkg.sv tb/nfg_tb_pkg.sv tb/tb_nfg_top.sv --top-module tb_nfg_top
./obj_dir/Vtb_nfg_top
```

Replace `tb_nfg_top` with any other testbench name. The unit benches do not
need `tb/nfg_tb_pkg.sv`. The full-size run takes well under a second.

## Files

- `rtl/nfg_pkg.sv`: default sizes shared by all modules.
- `rtl/nfg_top.sv`: the generator: units, inter-stage registers and loading
  decode.
- `rtl/seg_index_encoder.sv`, `rtl/cascade_lut.sv`: the LUT cascade.
- `rtl/coef_table.sv`: the coefficients memory and its word layout.
- `rtl/offset_adder.sv`, `rtl/squaring_unit.sv`,
  `rtl/pipelined_multiplier.sv`, `rtl/scaling_shifter.sv`,
  `rtl/final_adder.sv`: the arithmetic units.
- `tb/`: the testbenches, the parameterised bench and the table generator.
