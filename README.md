# Pipelined single-precision exp(x): integer table × hyperbolic CORDIC

This core computes `exp(x)` for an IEEE 754 single-precision `x`. It splits
the argument into an integer part and a fraction, `x = i + f`, with
`i = floor(x)` and `0 <= f < 1`. Then it uses

    exp(x) = exp(i) * exp(f)

`exp(i)` can take only 256 values, because `i` is an 8-bit signed integer,
so it comes from a table of precomputed floats. `exp(f)` lies in `[1, e)`.
A hyperbolic CORDIC computes it in fixed point, using only adds, shifts and
a small table of constants. The two branches run side by side. A single
floating-point multiplication joins them at the end.

The core is fully pipelined. It accepts one argument every clock cycle, and
each result leaves 37 cycles later at the default of 32 CORDIC iterations.
Nothing in it stalls.

## Data flow

```
             +------------------+   i (8-bit signed)   +---------------+  exp(i)  +------------+
 x (float) ->| exp_bits_extract |--------------------->| exp_int_table |--------->| delay_line |--+
             |  float -> 8.24,  |                      | 256 x float   |          | ITER+1 regs|  |   +--------+
             |  split i / f     |   f (2.30 unsigned)  +---------------+          +------------+  +-->| fp_mul |--> y = exp(x)
             |                  |--------------------->| cordic_exp    |--------->| fix2float  |----->|        |
             +------------------+                      | ITER stages   |  2.30    | 2.30->float|      +--------+
                                                       +---------------+          +------------+
```

| stage | module | cycles |
|---|---|---|
| split `x` into `i` and `f` | `exp_bits_extract` | 1 |
| `exp(f)` by CORDIC, plus the `x + y` output register | `cordic_exp` | ITER + 1 |
| cast `exp(f)` to float | `fix2float` | 1 |
| `exp(i) * exp(f)` | `fp_mul` | 2 |
| **total** (`exp_pkg::core_latency(ITER)`) | `exp_core` | **ITER + 5 = 37** |

The table read takes one cycle and runs in parallel with the first CORDIC
stage. A `delay_line` of ITER + 1 registers then holds `exp(i)` until the
cast `exp(f)` is ready. Each argument carries its own valid bit
(`in_valid` → `out_valid`), and results leave in the order the arguments
came in. `exp_core` contains an assertion that checks `out_valid` follows
`in_valid` by exactly the latency.

## Number formats

* **Argument split (8.24).** The float is converted to a 32-bit two's
  complement fixed-point word with 8 integer and 24 fraction bits. The top
  byte is `i = floor(x)`, also for negative `x`. The low 24 bits are `f`.
  For example, `x = -0.25` gives `i = -1` and `f = 0.75`. This keeps `f` in
  `[0, 1)`, inside the CORDIC's convergence range. Fraction bits of `x`
  finer than 2^-24 are truncated. The magnitude is truncated before the
  sign is applied.
* **CORDIC words (2.30).** `f` is widened to 32 bits with 2 integer and 30
  fraction bits: `{2'b00, f, 6'b0}`. The CORDIC registers x, y and z are
  signed 2.30. The result `exp(f)` can exceed 2, so it is read as
  *unsigned* 2.30, which covers `[0, 4)`.
* **Floats.** `exp_pkg::float_t` is a packed struct `{sign, exp[7:0], man[22:0]}`.

## The hyperbolic CORDIC (`cordic_exp`)

This is the part that needs the most explanation. Rotation-mode hyperbolic
CORDIC starts from `(x, y, z) = (1/K, 0, f)`. In each iteration `k` it turns
the vector `(x, y)` by a hyperbolic angle `±atanh(2^-s)`, chosen to drive
`z` towards 0. Here `s = s(k)` is the shift of that iteration:

    d = (z < 0) ? -1 : +1
    x' = x + d * (y >>> s)
    y' = y + d * (x >>> s)
    z' = z - d * atanh(2^-s)

Each step multiplies the vector by `[[1, d·2^-s], [d·2^-s, 1]]`. This is the
hyperbolic rotation `[[cosh θ, sinh θ], [sinh θ, cosh θ]]` scaled by
`sqrt(1 - 2^-2s)`. After all steps, `z ≈ 0` and the total angle is `f`. The
product of the scale factors is the gain `K ≈ 0.82816`. Starting with
`x = 1/K` cancels it, so the final values are

    x = cosh(f),  y = sinh(f),  exp(f) = x + y.

Design points:

* **Shift schedule.** `s(k) = 1, 2, 3, 4, 4, 5, …, 13, 13, 14, …, 30`. A
  hyperbolic CORDIC does not converge with each shift used once: shifts 4,
  13, 40, … must be repeated. Shifts 1 to 30 with 4 and 13 repeated give
  exactly 32 iterations. Shift 30 is the last one that can change a 2.30
  word. This is why `ITER` defaults to 32 and `ITER_MAX` is 32. With these
  repeats the CORDIC converges for `|f|` up to about 1.118, which covers
  `[0, 1)`.
* **Constant tables.** `exp_pkg::HTAB[k] = round(atanh(2^-s(k)) · 2^30)`.
  `exp_pkg::CORDIC_X0 = round(2^30 / K) = 0x4D47A1C8`, where
  `K = ∏ sqrt(1 - 2^-2s(k))` is taken over the 32 iterations. `K` depends
  on the iteration count. With a smaller `ITER`, x0 is slightly off. Any
  `ITER` from 1 to 32 elaborates, but only 32 is accurate to single
  precision.
* **Unrolling.** Each iteration is one pipeline stage (a `g_iter[k]`
  generate block holding `x_r`, `y_r`, `z_r` and `v_r`). The shift and the
  arctanh value of each stage are elaboration-time constants, so each shift
  is plain wiring.
* **Accuracy.** The arithmetic shifts truncate. Over 20,000 random fractions
  the error stayed below 24 units of 2^-30 (about 2.2·10^-8), roughly a
  fifth of a single-precision ulp at 1.0. The testbench allows 2^-25.

## The integer-part table (`exp_int_table`)

The table has 256 entries of 32 bits. It is addressed by `i` in two's
complement: addresses 0..127 hold `i = 0..127`, addresses 128..255 hold
`i = -128..-1`. Entry `i` is `exp(i)` rounded to the nearest float, ties to
even. The package function `exp_int_entry` computes the entries at
elaboration from `$exp`, so the memory needs no data file. The table holds:

* `+inf` for `i >= 89`;
* subnormal floats for `-103 <= i <= -88`;
* `+0` for `i <= -104`.

The read is registered, so the table maps onto one block RAM (8 kbit).

## Cast and multiply

* `fix2float` normalises the 2.30 word with a leading-zero count. It rounds
  to nearest, ties to even. Bit 31 of the word has weight 2, so after `n`
  leading zeros the biased exponent is `128 - n`.
* `fp_mul` is a general single-precision multiplier in two stages:
  * **Stage 1.** Unpack the operands. Normalise subnormal significands. Form
    the 24×24-bit product. Add the exponents.
  * **Stage 2.** Normalise the product. Round to nearest even. Handle
    overflow and the special values.

  Normalising subnormal inputs lets the table's subnormal `exp(i)` entries
  give correct normal results: for example, `x = -87.2` uses `exp(-88)`,
  which is subnormal. Results below 2^-126 are **flushed to zero**, so the
  core never outputs a subnormal.

## Special values and range

| argument | result |
|---|---|
| NaN | quiet NaN `0x7FC00000` (the table value is replaced by NaN) |
| `x >= 88.7228…` (incl. `x >= 128`, `+inf`) | `+inf` |
| `x < about -87.3365` (incl. `x <= -128`, `-inf`) | `+0` (true result is subnormal or smaller) |
| `|x| < 2^-24`, subnormal `x` | exactly `1.0` |

Arguments with `|x| >= 128` saturate to `i = 127` (table `+inf`) or to
`i = -128, f = 0` (table `+0`).

## Accuracy

Over 40,000 random arguments across the whole range, each normal result was
within 2.4 ulp of the true `exp(x)`. The end-to-end testbench allows 3 ulp.
The errors come from these sources:

* the 2^-24 truncation of `x`, which matters only for `|x| < 1`, where the
  float has finer bits;
* the rounding of the table entry;
* the CORDIC error;
* the cast;
* the final rounding.

The results are not correctly rounded, and the core does not claim to be.

## Where this design departs from its source

The structure follows a published design of an exp(x) core: the integer and
fraction split with an 8-bit integer part, the table of `exp(i)`, a 2.30
hyperbolic CORDIC with an arctanh table, the cast of its result to float,
and one float multiplication. The following points are this design's own:

* **Signs of the y update.** The source prints the y update as
  `y' = y - d·x·2^-i`, which, together with its x update, describes a
  circular rotation. Its rotation matrix is hyperbolic, and it describes
  the result as a difference of cosh and sinh. This core uses the
  hyperbolic signs throughout, so `y = +sinh(f)` and `exp(f) = x + y`.
* **Latency and throughput.** The source was built with a C-like
  high-level synthesis language. It reports 110 cycles of latency at
  50 MHz on a Virtex-4 LX200. This RTL is unrolled instead: 37 cycles, one
  result per cycle. Its clock rate has not been measured.
* **Choices the source leaves open.** These were made here:
  * the shift schedule with repeated shifts (the source names a per-iteration
    table without giving it);
  * the 1/K start value;
  * the saturation of `|x| >= 128`;
  * the special-value handling;
  * the rounding modes;
  * the flush of subnormal results;
  * the register placement;
  * the valid-only handshake with a synchronous reset of the valid bits
    (data registers are not reset).
* **Not included:**
  * The host platform of the original work: host system, interconnect
    ASIC, QDR SRAM banks, FPGA loader. The core's plain streaming ports
    are where such logic would attach.
  * The double-precision variant the source estimates for comparison (62
    iterations, double multiply).

## Files

| file | contents |
|---|---|
| `rtl/exp_pkg.sv` | `float_t`, CORDIC shift schedule, arctanh table, 1/K, latencies, `exp_int_entry`, `lzc32` |
| `rtl/exp_core.sv` | top level (parameter `ITER`, default 32) |
| `rtl/exp_bits_extract.sv` | float → `i`, `f` |
| `rtl/exp_int_table.sv` | `exp(i)` table |
| `rtl/cordic_exp.sv` | pipelined hyperbolic CORDIC, `exp(f)` in 2.30 |
| `rtl/fix2float.sv` | 2.30 → float |
| `rtl/fp_mul.sv` | float multiplier |
| `rtl/delay_line.sv` | register chain aligning the two branches |
| `tb/tb_fp_pkg.sv` | testbench helpers: float → real by arithmetic, ulp distance |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Top-level ports of `exp_core`: `clk`, `rst` (synchronous, active high),
`in_valid`, `x` (`float_t`), `out_valid`, `y` (`float_t`).

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Run
from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -y rtl -y tb \
    rtl/exp_pkg.sv tb/tb_fp_pkg.sv tb/tb_exp_core.sv --top-module tb_exp_core
./obj_dir/Vtb_exp_core
```

Replace `tb_exp_core` with `tb_cordic_exp`, `tb_fp_mul`, `tb_fix2float`,
`tb_exp_int_table` or `tb_exp_bits_extract` to test one module.

The testbenches compare each result with a reference computed in real
arithmetic (`$exp`, exact products), not with a copy of the logic.

* **`tb_exp_core`.** Runs the core at its default parameters. It checks the
  37-cycle latency, the ordering and the one-per-cycle throughput. It
  counts and requires each of these cases:
  * positive and negative arguments;
  * overflow to inf;
  * flush to zero;
  * `|x| >= 128` saturation;
  * infinite and NaN arguments;
  * subnormal table entries;
  * arguments below 2^-24;
  * back-to-back and idle cycles.
* **The unit testbenches.** These check correct rounding, tie-breaking and
  special cases exhaustively or over 20,000–30,000 random inputs.

## Changing the design

* `ITER` (on `exp_core` or `cordic_exp`) sets the number of CORDIC stages
  and the latency (ITER + 5). Above 32 it would need a wider word, more
  repeated shifts (the next is 40), and longer `HTAB` and `CORDIC_X0`
  constants. If `ITER` is reduced, recompute `CORDIC_X0` for the shorter
  product.
* To change the word format, change `FIX_W`, `HTAB` and `CORDIC_X0`
  together. `HTAB` and `CORDIC_X0` follow the formulas above.
* To move pipeline registers, update the `LAT_*` constants in `exp_pkg`.
  The alignment delay in `exp_core` is computed from them.
