# Pipelined single-precision elementary function library

This is a library of fully pipelined IEEE-754 binary32 cores for the C math
functions an FPGA compiler most often needs: `expf`, `logf`, `sinf`, `cosf`,
`tanf`, `powf`, `sqrtf`, `fabsf`, `frexpf`, `ldexpf`, `modff` and `rand`. It also
includes the floating-point add, multiply and divide units they rely on, and a
normal-density pipeline built from the cores. Every core takes a new operand set
on every clock and returns its result a fixed number of clocks later. A C-level
call therefore costs one clock of throughput however deep the core is.

The transcendental cores share one idea. Floating-point values exist only at the
edges. Inside a core the argument is turned into a wide fixed-point number and
split into a coarse part and a fine part. The coarse part addresses a table. The
fine part is small enough for a polynomial of degree 2 to 4 to reach binary32
accuracy. Table and polynomial are then combined with a few wide integer
multiplies, and one normalise-and-round step produces the binary32 result. No
floating-point adder or multiplier is needed inside `expf`, `logf`, `sinf`,
`cosf` or `powf`.

The design follows the architecture of *An Elementary Transcendental Function
Core Library for Reconfigurable Computing*, which describes this library for an
FPGA C compiler. The section "Where this design departs or decides on its own"
lists what was taken from that description and what had to be chosen here.

## Conventions shared by all cores

* **Format.** Operands and results are 32-bit IEEE binary32 words on plain
  `logic [31:0]` ports. Subnormal inputs are read as zero. Results smaller than
  2^-126 are flushed to zero. NaN results are the quiet NaN `0x7fc00000`.
* **Handshake.** Every core has the ports `clk`, `rst_n`, `in_valid` and
  `out_valid`. Operands are sampled on each rising edge. `out_valid` rises exactly
  `LAT` clocks after the `in_valid` that carried the operands. There is no stall
  and no back-pressure. Only the valid chain is reset (synchronously, active low);
  the data registers are not reset.
* **Latencies** are constants in `rtl/fp32_pkg.sv`, so that a parent can line
  up parallel paths (see `pdf`):

| core | latency (clocks) | result |
|---|---|---|
| `fabsf` | 1 | exact |
| `frexpf` | 1 | exact |
| `ldexpf` | 2 | exact, saturating |
| `modff` | 2 | exact |
| `fp_mul` | 3 | correctly rounded (nearest even) |
| `fp_add` | 4 | correctly rounded |
| `expf` | 6 | faithful (< 1 ulp, tested) |
| `sinf`, `cosf` | 8 | < 1 ulp, or 2e-11 absolute near zeros |
| `sqrtf` | 27 | correctly rounded |
| `fp_div` | 28 | correctly rounded |
| `tanf` | 36 | ≤ 2 ulp away from the poles |
| `logf` | 52 | faithful (< 1 ulp, tested) |
| `powf` | 58 | ≤ 1 + \|y ln x\|/64 ulp |
| `pdf` | 69 | see below |

`fp32_pkg::fix_to_f32` is the single normalise-and-round function used by almost
every core. Its input is a sign and a 64-bit magnitude, together with the binary
weight of the magnitude's top bit. It finds the leading one, rounds to nearest
even using a guard bit and the OR of everything below, and saturates to infinity
or flushes to zero.

## expf: two tables and a parabola

`expf` uses the identity exp(x) = exp(i) · exp(f), where x = i + f with i an integer
and 0 ≤ f < 1.

1. **To fixed point** (`expf`, one clock). x = M · 2^(e−23) becomes a 39-bit
   two's-complement number z with 30 fraction bits, by shifting M by e+7.
   Because the number is two's complement, its top 9 bits are ⌊x⌋ and the rest
   is f ≥ 0, for negative x as well. For |x| ≥ 128 the result is certain to
   overflow or underflow, so those arguments become flags instead.
2. **Split** (`exp_core`). The top 9 bits of f (`f_hi`) address table `EF`, with
   512 entries of exp(f_hi) in 2.30 format. The remaining 21 bits (`f_lo` <
   2^-9) go to 1 + f_lo + f_lo²/2. The dropped cubic term is below 2^-29.6.
   Table `EI` holds exp(i) for i in [−128, 127] as a binary exponent and a 1.31
   mantissa.
3. **Products.** mantissa(exp i) × exp(f_hi) is formed in one clock and the
   polynomial is applied in the next. The binary exponent from `EI` passes
   through unchanged to `fix_to_f32`.

Arguments with i > 88 give +inf. Arguments with i < −104, or results below 2^-126,
give +0.

Both tables are computed at elaboration time by constant functions using `$exp`
(EI[i] = exp(i) split into 2^e · m, EF[k] = exp(k/512)). No data files are read.
`exp_core` takes the fixed-point argument directly, so `powf` reuses it.

## logf: breakpoints and a division

With x = frac · 2^ept:

    ln x = ept·ln2 + ln c_k + p(r),   c_k = 1 + k/64,   r = 2(frac − c_k)/(frac + c_k)
    p(r) = ln((1 + r/2)/(1 − r/2)) ≈ r + r³/12

* frac is first moved into [0.75, 1.5). When frac ≥ 1.5 it is halved and ept is
  incremented. Without this, inputs just below 1.0 would subtract two nearly
  equal numbers (−ln2 + ln(≈2)) and lose their relative accuracy.
* k = round((frac − 1)·64) ranges over [−16, 32], so |frac − c_k| ≤ 1/128 and
  |r| < 2^-6.5. The dropped r⁵/80 term is then below 2^-39.
* `ROM1(ept)` = ept·ln2 has 256 entries. `ROM2(k)` = ln c_k has 128 entries.
  Both store signed fixed point with 50 fraction bits and are computed at
  elaboration time.
* The division is a 45-stage pipelined restoring divider (`fix_div_pipe`). The
  numerator is scaled by 64 first, so the quotient's first bit already weighs
  2^-6 and every stage yields a useful bit of |r|, down to 2^-50. This divider is
  what makes `logf` the deepest core.
* r², r³, r³/12 (a constant multiply) and the final three-term sum take one
  clock each. `log_core` outputs the sum as a 60-bit fixed-point value, and
  `logf` rounds it. Near x = 1 the result is essentially r itself, which the
  divider delivers with at least 26 significant bits.

Special values: a negative x or NaN gives NaN, 0 gives −inf and +inf gives +inf.

## sinf, cosf, tanf: quarter turns, a table and the addition theorem

`trig_core` computes both sin x and cos x, and the three cores are thin wrappers
around it.

1. |x| is multiplied by 2/π. The constant is the first 72 bits of the binary
   expansion of 2/π (`72'hA2F9836E4E441529FC`); a real-valued constant would
   hold only 53 of them. The product, taken modulo 4, gives the quadrant (2 bits)
   and the angle within the quadrant as a 44-bit fraction of a quarter turn.
2. That fraction is split as a + b. The top 8 bits (a) address two 256-entry
   tables of sin(a·π/2) and cos(a·π/2). The low 36 bits (b) are converted back
   to radians, β = b·π/2 < 2^-7.3, and fed to sin β ≈ β − β³/6 and
   cos β ≈ 1 − β²/2 + β⁴/24.
3. The addition formulas sin(a+b) = sin a cos b + cos a sin b and
   cos(a+b) = cos a cos b − sin a sin b give the values in the first quadrant.
   The quadrant then swaps and negates them, and the sign of x is applied to the
   sine.

All intermediate values carry 44 fraction bits. Arguments with |x| < 2^-12
bypass the pipeline: the result is sin x = x and cos x = 1, with an error below
half an ulp. Arguments with |x| ≥ 2^24, ±inf and NaN give NaN. The absolute error is
about 2^-40. Results far from zero are therefore within one ulp. Next to a zero
of sin or cos, which happens at large arguments, the relative error grows, and
the testbench bounds it at 2e-11 absolute.

`tanf` feeds the core's sine and cosine into `fp_div`.

## powf: log and exp without leaving fixed point

x^y = exp(y · ln x). `log_core` provides ln x with 50 fraction bits. This value
is multiplied exactly by the 24-bit significand of y, then shifted by y's
exponent into the 30-fraction-bit argument format of `exp_core`. Magnitudes of
128 or more saturate to the overflow or underflow flag. Passing through binary32
between the two steps would cost about |y ln x|·2^-24 of relative accuracy. This
route costs only about |y ln x|·2^-30, i.e. 1 + |y ln x|/64 ulp. The special cases
(y = 0, x = 0, infinities, NaN, negative x) are decided in the same clock and
listed in the header of `rtl/powf.sv`.

## rand: six generators in one ring

`rand_ms_i` reproduces the C runtime `rand()` of mingw32 exactly:
state ← state·214013 + 2531011 (mod 2^32), and the result is bits 30..16 of the
state. After the default seed 1 it yields 41, 18467, 6334, …. Its whole 32-bit
multiply-add sits in one clock cycle, because the next state depends on the
current one.

`rand6` breaks that loop by interleaving six independent generators (threads).
The six registers of a ring each hold one thread. Stages 0–3 each add one byte
of the state times 214013, stage 4 adds 2531011, and stage 5 is the output
register, which feeds stage 0 again. Each thread therefore has six clocks for
one update, while the ring as a whole produces one number per clock. Thread t is
seeded with `seed + t`. A load writes every stage with its thread's partial sums
already formed, so numbers leave at once in the thread order 5, 4, 3, 2, 1, 0,
5, …. The `thread` output names the source of each number. Each thread's
sequence is exactly `rand()` after `srand(seed + t)`. The merged stream is not
`rand()`'s sequence.

## pdf: a pipeline of library cores

`pdf` computes the normal density f(x; μ, σ) = exp(−(x−μ)²/(2σ²)) / (σ√(2π)) at
one result per clock. The main chain is

    x − μ (fp_add) → d² (fp_mul) → d²/(2σ²) (fp_div) → expf(−q) → ÷ σ√(2π) (fp_div)

Two further `fp_mul` form σ² and 2σ², and a third forms σ√(2π). `pipe_delay`
lines hold each of these until the main chain needs it; their depths are worked
out from the latency constants. The rounding error of q is magnified by q in the
exponential, so the testbench accepts 4 + 8q ulp.

## Top level

`mathlib_top` places every core side by side, each with its own name-prefixed
ports (`expf_x`, `expf_y`, `expf_in_valid`, …, `rand6_thread`). All cores can
therefore work on the same clock: every function can run for each input, one set
of inputs per clock. The top has no parameters.

## Verification

Each core has a self-checking testbench `tb/tb_<core>.sv`. It sends corner cases
and thousands of random operands, with random gaps between them. Every result is
compared with a reference built from the simulator's real-number functions
(`$exp`, `$ln`, `$sin`, `$pow`, …). `tb/tb_fp_pkg.sv` converts between bit
patterns and reals using integer field arithmetic, independently of the design,
and measures errors in ulps. The testbenches also check that each result arrives
exactly after the core's latency. The checks are:

* The exactly rounded units are compared bit for bit: `fp_add`, `fp_mul`,
  `fp_div`, `sqrtf`, `ldexpf`, `modff` and `frexpf`.
* `expf` and `logf` must be faithful, meaning an error below 1 ulp. They are
  tested over their whole argument range and next to 1.0.
* `tb_mathlib_top` drives all cores at once for 6000 clocks. It counts each
  mechanism of the design: overflow and underflow, the log argument halving, all
  four trig quadrants, the trig bypass and out-of-range path, division by zero,
  adder cancellation, odd exponents in `sqrtf`, saturation in `powf`, every
  `rand6` thread and seed loads. It fails if any of them never occurred.
* `tb_table4_workload` gives 2^10 operand sets to every core on consecutive
  clocks. It checks that each core delivers its last result after exactly
  1023 + latency clocks. At 100 MHz this is 0.0100–0.0107 µs per result,
  including the pipeline fill.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Mdir obj \
      rtl/fp32_pkg.sv tb/tb_fp_pkg.sv rtl/*.sv tb/tb_expf.sv --top-module tb_expf
    ./obj/Vtb_expf

Every testbench ends by printing `TB_RESULT checks=N failures=M`. `rtl/fp32_pkg.sv`
appears twice on that command line only so that the package is read first;
Verilator accepts this. All tables are computed at elaboration time, so nothing
beyond the `.sv` files is needed.

## Where this design departs or decides on its own

Taken from the source description:

* the list of functions;
* the fully pipelined one-result-per-clock style;
* exp as a table for the integer part times a polynomial for the fraction;
* log as ept·ln2 from a table, plus ln c_k from a second table, plus an
  odd-polynomial p(r) with r = 2(frac−c_k)/(frac+c_k) of degree 3;
* sine and cosine by the addition theorem, with one table for the coarse part
  and polynomials for the fine part;
* the mingw32-exact iterative `rand` and the six-thread pipelined `rand`;
* the normal-density function as one pipeline;
* faithful rounding as the accuracy goal.

Decided here, because the description does not say:

* **Interfaces**: the valid-only handshake, the latencies, and the flush of
  subnormals.
* **Table sizes**: 512 entries for exp's fraction table (the description says
  tables rarely exceed 512–1024 entries), 64 log breakpoints, 256-entry trig
  tables.
* **exp polynomial**: the extra split of exp(f) into exp(f_hi)·p(f_lo).
* **The single-precision log**: the source explains its log algorithm in
  detail only for double precision, and says that the single-precision core is
  similar but simpler. The core here applies the same algorithm at single
  precision, with N = 64 breakpoints. The source's storage formula allows
  ⌊n/2⌋+1 words per breakpoint in ROM2. Here ROM2 holds only ln c_k, because
  the coefficients of p(r) are the same for every breakpoint.
* **Log argument range**: the [0.75, 1.5) centring, and r taken as signed. The
  source gives r ∈ [0, 1/N), which cannot hold for the nearest breakpoint.
* **Trig range reduction**: multiplication by 2/π with quadrant symmetry, the
  2^24 argument limit and the small-argument bypass. The source splits x
  directly into a + b and says nothing about range reduction.
* **tanf and powf**: their algorithms. The source names them and gives their
  resources only. tan is sin/cos, and pow is the fixed-point exp(y ln x). Negative
  bases give NaN even for integer y.
* **sqrtf and the add, multiply and divide units**: their algorithms, which are
  standard digit-recurrence and align-add-round datapaths.
* **`rand6`**: the seeding of its threads (seed + t) and its output order.
* **A second `rand` variant** (`rand_ms`) appears in the source only as a line in
  a resource table, with no description of how it differs. It is not built.
* **FPGA mapping**: the source reports results on a Virtex-4 (slices, DSP48s,
  block RAMs, 90–190 MHz). This RTL is generic and instantiates no device
  primitives. Tables are constant arrays that a synthesiser may map to ROM, and
  the wide fixed-point multiplies are plain `*` operators.
* **No double precision**: the double-precision logarithm appears in the source
  only as a resource estimate for comparison and is not part of this library.

## Changing the design

* `exp_core #(FHI_BITS)`, `log_core #(N)` and `trig_core #(A_BITS)` set the
  table sizes. Smaller tables need higher-degree polynomials to keep the
  accuracy, and the polynomials are written for the defaults, so re-run the
  testbenches after any change.
* Any change to the number of pipeline stages of a core must be matched in its
  `LAT_*` constant in `fp32_pkg`. Those constants drive the valid chains, the
  alignment inside `pdf` and `powf`, and the latency checks of the testbenches.
* `rand6` is laid out for exactly six stages, and an elaboration-time assertion
  guards its `THREADS` parameter.
