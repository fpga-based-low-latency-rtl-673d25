# Low-latency floating-point square root by hyperbolic CORDIC

This unit takes the square root of an IEEE-754 single-precision number. It uses
only integer adders and shifters and one constant multiplication. It has no
divider, no variable multiplier and no rounding step. The float is handled as a
32-bit integer:

* The exponent field is split off and halved.
* The mantissa goes through 13 hyperbolic CORDIC micro-rotations.
* One multiplication by a constant removes the CORDIC gain.
* The fraction and the new exponent are ORed back together.

The result arrives `LATENCY` clock cycles after the operand, 2 by default, and
the unit accepts a new operand every cycle. Every normal operand gives a result
whose relative error lies in [-1.70019560e-7, +1.00532414e-7]. That is about
one unit in the last place.

## The idea in one page

A normal float is `x = M * 2^e` with `M` in [1, 2). Then:

* if `e` is even: `sqrt(x) = sqrt(M) * 2^(e/2)`
* if `e` is odd: `sqrt(x) = sqrt(2M) * 2^((e-1)/2)`

So only the square root of a number `m` in [1, 4) has to be computed
(`m = M` or `m = 2M`), and that root lies in [1, 2). That is exactly the
range of a float mantissa, so the root's fraction bits go straight into the
result and no normalisation shift is needed.

Hyperbolic CORDIC in vectoring mode rotates a vector `(x, y)` so that `y`
goes to zero, keeping `x^2 - y^2` invariant up to a known gain. Each step is:

    if y >= 0:  x' = x - (y >> j),  y' = y - (x >> j)
    else:       x' = x + (y >> j),  y' = y + (x >> j)

It starts from `x0 = m + 1` and `y0 = m - 1`, so `x0^2 - y0^2 = 4m`. The rotations
therefore leave `x = K * 2 * sqrt(m)`. Here `K` is the product of
`sqrt(1 - 2^-2j)` over the shifts used. Classical CORDIC square roots start
from `m ± 0.25`, which converges only for `m` up to about 2.3. With `±1` the
start values cover the whole [1, 4) range that the exponent trick produces.

## Bit-level datapath

In the listings below, `>>` on a signed value is an arithmetic shift.

### Operand split (`sqrt_cordic_init`)

Three fields are masked out of the operand bits `i`:

| name   | mask         | content                                   |
|--------|--------------|-------------------------------------------|
| `i_exp`| `0x7f800000` | biased exponent `E`                       |
| `i_m`  | `0x00ffffff` | 23 fraction bits, plus the exponent LSB as bit 23 |
| `i_m0` | `0x007fffff` | 23 fraction bits                          |

Bit 23 of `i_m` is the exponent LSB. When it is set, `E` is odd, so the
unbiased exponent `E - 127` is even and `m = M`. When it is clear, `m = 2M`.
The fixed-point scale is `1.0 = 2^23` (`0x800000`). The start values are:

| range           | `i1` (x0)                          | `i2` (y0)                         |
|-----------------|------------------------------------|-----------------------------------|
| `m = M`, [1,2)  | `(i_m + 0x800000) << 3` = M + 1    | `i_m0 << 3` = M - 1               |
| `m = 2M`, [2,4) | `((i_m << 1) + 0x1800000) << 3` = 2M + 1 | `((i_m << 1) + 0x800000) << 3` = 2M - 1 |

In the first row `i_m` already contains the implicit leading one, because
bit 23 is set. The final `<< 3` adds three guard bits (parameter `GUARD`).
Inside the rotator, 1.0 is therefore `2^26`. The largest value, 2m + 1 < 5,
stays below `2^29`, so 32-bit signed arithmetic never overflows.

### Rotations (`cordic_hyp_step`, `cordic_hyp_rotator`)

The schedule is the classical hyperbolic one, ending at shift 12. Shift 4 is
executed twice, because hyperbolic CORDIC converges only if certain iterations
repeat (4, 13, 40, ...). The shifts are:

    rotation k : 0 1 2 3 4 5 6 7 8 9 10 11 12
    shift j    : 1 2 3 4 4 5 6 7 8 9 10 11 12

The first rotation always subtracts, because `y0 = m - 1` is never negative. All
later rotations choose their direction from the sign of `i2`.

Twelve distinct shifts are enough for a 24-bit mantissa. Only `x` is used,
and `x^2 - y^2` stays fixed, so the `y` left after the last rotation enters
`x` only quadratically. A residue of about `2^-12 * x` gives a relative
error near `2^-25`. The guard bits absorb the truncation of the shifts.

### Gain removal (`sqrt_scale`)

For this schedule `K = 0.8281593753...`. After the rotations,
`i1 = 2K*sqrt(m) * 2^26`. One signed multiplication by
`SCALE_C = round(4/K * 2^23) = 40516878`, followed by `>> 23`, gives
`8*sqrt(m) * 2^26 = sqrt(m) * 2^29`. Then:

    frac = (i1' >> 6) - 0x800000

This leaves the 23 fraction bits of `sqrt(m)`. The 6 is `GUARD + 3`. The result
is truncated, not rounded. On an FPGA the 32 × 27-bit constant product fits two
to four DSP multipliers.

### Exponent and packing (`sqrt_pack`)

The result exponent is `floor((E - 127) / 2) + 127 = floor((E + 127) / 2)`. It
is computed in place on the exponent field:

    y = (((i_exp + 0x3f800000) >> 1) & 0x7f800000) | frac

The mask drops the bit that the halving shifts down out of the exponent LSB.
Because the root always lies in [1, 2), `frac` always fits in bits 22:0. The
exhaustive sweep described below confirms this.

## Operands outside the normal range

Only normal, non-negative operands are meaningful. None of the following is
special-cased; each gives what the integer datapath gives:

| operand                      | result                         |
|------------------------------|--------------------------------|
| `+0.0`                       | `0x1fb504f3` ≈ 7.6664670e-20 (not 0) |
| largest subnormal `0x007fffff` (1.1754942e-38) | ≈ 1.0842021e-19   |
| largest normal `0x7f7fffff`  | ≈ 1.8446743e+19                |
| `+inf`                       | exactly 2^64 ≈ 1.8446744e+19    |
| negative operand             | sign bit ignored: returns `sqrt(|x|)` |
| NaN (e.g. `0x7fc00000`)      | a finite number (≈ 2.26e+19)    |

A subnormal `0.f * 2^-126` is read as if it had the implicit leading one,
that is as `1.f * 2^-127`. Zero is read the same way, as `2^-127`. If
IEEE behaviour is needed for these cases, add a bypass around the unit. Such a
bypass is not part of this RTL.

## Accuracy

The result depends only on the 23 fraction bits and on the parity of the
exponent. A sweep over all 2 × 2^23 such patterns therefore covers every
normal operand. `tb_sqrt_cordic_fp_sweep` runs that sweep through the RTL in
about 8 seconds. The extremes of the relative error `y / sqrt(x) - 1` are:

* minimum -1.7001955976e-7, at mantissa 0x031ebe with an odd exponent (e.g. x = 1.0243...)
* maximum +1.0053241417e-7, at mantissa 0x4b1682 with an odd exponent (e.g. x = 1.5866...)

No rounding is done. Results are therefore not always correctly rounded,
but they are never off by more than about one unit in the last place.

## Pipelining and interface (`sqrt_cordic_fp`)

| port        | dir | width | meaning                                         |
|-------------|-----|-------|-------------------------------------------------|
| `clk`       | in  | 1     | clock                                           |
| `rst_n`     | in  | 1     | synchronous, active-low; clears the valid bits only |
| `in_valid`  | in  | 1     | `in_x` carries an operand this cycle            |
| `in_x`      | in  | 32    | float32 operand                                 |
| `out_valid` | out | 1     | `out_y` carries a result                        |
| `out_y`     | out | 32    | float32 square root                             |

An operand presented with `in_valid` at clock edge *n* appears on
`out_y` with `out_valid` just after edge *n + LATENCY*. One operand can be
accepted every cycle. There is no back-pressure and no stall: results come out
in order, whether you read them or not. The datapath registers are not reset.

`LATENCY` registers are used:

* one at the output, after the multiplier and packer;
* `LATENCY - 1` spread over the 13 rotations, cutting the rotations into
  segments of nearly equal length.

For example, `LATENCY = 2` puts a register after the 7th of the 13 rotations. The allowed
range is 1 to 13.

The default of 2 is the latency the algorithm reaches at 100 MHz on the
fastest devices. Larger values match the slower families, at the same clock:

| LATENCY | device family at 100 MHz                         |
|---------|--------------------------------------------------|
| 2       | Kintex UltraScale+, Virtex UltraScale+, Versal   |
| 3       | Zynq UltraScale+                                 |
| 4       | Kintex UltraScale                                |
| 5       | Kintex-7, Virtex-7                               |
| 7       | Artix-7, Zynq-7000                               |
| 8       | Spartan-7                                        |

The register placement is a balanced guess, not a timing-driven one. The last
segment holds the 32-bit constant multiplier and is the longest. On a slow
device you may want to move a register next to it.

## Parameters

| parameter  | default    | notes |
|------------|------------|-------|
| `LATENCY`  | 2          | 1..13, see above |
| `GUARD`    | 3          | guard bits of the rotator; at most 5 for 32-bit arithmetic; the final shift follows it |
| `LAST_J`   | 12         | last shift of the schedule |
| `REPEAT_J` | 4          | shift that is executed twice |
| `SCALE_C`  | 40516878   | `round(4/K * 2^23)` for the schedule in use |

`SCALE_C` is not derived from the schedule automatically. If you change
`LAST_J` or `REPEAT_J`, recompute `K = prod sqrt(1 - 2^-2j)` over the new
shifts, and pass the new constant. `tb_sqrt_scale` shows the formula.

## Files

RTL (`rtl/`), one unit per file:

* `sqrt_cordic_pkg.sv`: field masks, constants, the word type, and the
  schedule and register-placement functions.
* `sqrt_cordic_init.sv`: operand split, range selection and start values.
* `cordic_hyp_step.sv`: one micro-rotation.
* `cordic_hyp_rotator.sv`: the 13-rotation chain with its pipeline registers.
  Valid, exponent and per-rotation direction flags travel with the data.
* `sqrt_scale.sv`: gain-removal multiplier and fraction extraction.
* `sqrt_pack.sv`: exponent halving and repacking.
* `sqrt_cordic_fp.sv`: the top level.

Testbenches (`tb/`). Each one is self-checking and prints
`TB_RESULT checks=N failures=M`:

* `sqrt_ref_pkg.sv`: an independent loop-based integer model in 64-bit
  arithmetic, plus float-to-real helpers.
* `tb_sqrt_cordic_init`, `tb_cordic_hyp_step`, `tb_cordic_hyp_rotator`,
  `tb_sqrt_scale`, `tb_sqrt_pack`: unit tests.
  * The rotator test also checks the pipeline delay and the convergence to
    `K*sqrt(x0^2 - y0^2)`.
  * The scale test recomputes `SCALE_C` from `K`.
* `tb_sqrt_cordic_fp`: end to end at the default parameters. It runs 200,000
  random operands with random gaps and back-to-back runs, plus the range
  boundaries, the four operands of the table above, and a reset in the middle
  of a stream. Each result is checked three ways: bit for bit against the
  model, against the error bounds, and for its latency. It also counts that
  each of these situations actually occurred.
* `tb_sqrt_cordic_fp_latency`: six instances with `LATENCY` = 2, 3, 4, 5, 7
  and 8 on one operand stream.
* `tb_sqrt_cordic_fp_sweep`: the exhaustive accuracy sweep.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        --top-module tb_sqrt_cordic_fp \
        rtl/sqrt_cordic_pkg.sv tb/sqrt_ref_pkg.sv tb/tb_sqrt_cordic_fp.sv
    ./obj_dir/Vtb_sqrt_cordic_fp

Replace the testbench name to run any of the others. Every test finishes in
under 10 seconds. The sweep takes the longest.

## Where this RTL is its own design

The arithmetic is fixed by the algorithm: masks, start values, schedule,
constant, shifts and exponent formula. The RTL reproduces it bit for bit. The
following choices are this implementation's own:

* **Interface.** The algorithm was originally given as a C function and
  synthesised by a high-level-synthesis tool. That tool wraps the function in
  a start/done block interface that is not pipelined: its report shows latency
  2 and initiation interval 3. This RTL uses a plain valid pipeline with
  throughput one per cycle instead.
* **Register placement and reset.** Register placement inside the chain, the
  reset, and the unused sign bit (no check for negative operands) are choices
  made here.
* **Resources not comparable.** The resource figures quoted for the
  synthesised C function (about 800-1100 LUTs, 80-470 flip-flops and 2-4 DSP
  blocks, depending on the device) come from that tool flow. They are not
  expected to match this hand-written pipeline. The pipeline has no timing
  constraints of its own.
