# Tunable approximate floating point multipliers

Multiplying two floating point numbers is dominated by the mantissa
multiplier: the signs are XORed and the exponents added, but the two 24-bit
mantissas need a full 24 x 24 product. Many workloads (image filters, machine
learning, data mining) tolerate a few percent of error in individual
products. This design replaces the mantissa product by something much cheaper
whenever the operands allow it, and checks each operation at run time against
an accuracy setting chosen by the user. Operations that would be too
inaccurate are handed to an ordinary IEEE-754 multiplier, so the worst-case
error is bounded by the setting rather than by the approximation.

Two such multipliers are provided, side by side in one top level:

* **RMAC** replaces the mantissa multiplication by an addition of the two
  fractions, and tunes its accuracy with *N tuning bits* that inspect the
  leading bits of the operands and of the result.
* **CFPU** keeps one operand's mantissa and discards the other's (stage 1),
  or approximates the discarded mantissa by its leading 1 and uses a shift
  and an add (stage 2), against an error bound 2^-N.

Each unit falls back to its own instance of the same exact multiplier,
`fp_mul_exact`.

## Number format

The default format is IEEE-754 single precision: sign, 8-bit exponent (bias
127), 23-bit fraction `f` with a hidden leading 1, so a normal number is
`(1+f) * 2^(e-127)`. Every module takes `EXP_W` and `FRAC_W` parameters, so the
same RTL builds for half precision (5/10) or an 8-bit format (4/3). The
testbenches exercise the single precision defaults, and `tb_rmac_fp16` runs
the RMAC unit in half precision. The tuning input is `$clog2(FRAC_W+1)` bits
wide (5 bits, N = 0..23, in single precision).

The approximate paths only handle normal numbers. A zero, subnormal,
infinite or NaN operand, or an approximate result whose exponent leaves the
normal range, always goes to the exact multiplier.

## RMAC: multiplication by mantissa addition

With `A = (1+fa) 2^ea` and `B = (1+fb) 2^eb`, the exact mantissa is
`(1+fa)(1+fb) = 1 + fa + fb + fa*fb`. RMAC adds the two 23-bit fraction
fields instead of multiplying. If the sum overflows (`fa + fb >= 1`) the carry
goes into the exponent and the low 23 bits stay as the fraction:

| fraction sum      | result mantissa | result exponent  |
|-------------------|-----------------|------------------|
| `fa + fb < 1`     | `1 + fa + fb`   | `ea + eb`        |
| `fa + fb >= 1`    | `2 (fa + fb)`   | `ea + eb + 1`    |

This is the piecewise-linear approximation of logarithmic multiplication. It
never overestimates, and its error is largest (1/9 = 11.1%) at `fa = fb =
0.5`. Examples: `5 x 10 -> 48` (4% low), `50 x -25 -> -1152` (7.84% low),
`12 x 12 -> 128` (11.1% low). The datapath (`rmac_approx`) is one 23-bit adder
plus the exponent adder.

### Accuracy tuning (`rmac_tuner`)

The error depends on how close `fa + fb` is to 1 and on how large both
fractions are. The tuner estimates it cheaply from the first fraction bit
of each operand (`A23`, `B23`, numbering the fraction bits 23 down to 1) and
from the top of the result fraction `C`:

| `A23 B23` | case | what is counted at the top of `C`     | why it is risky                |
|-----------|------|----------------------------------------|--------------------------------|
| `1 1`     | 1    | leading 0s                             | `fa+fb` just above 1           |
| `0 0`     | 2    | leading 1s                             | `fa+fb` just below 1           |
| `1 0`/`0 1` | 3  | leading copies of `C23` (first bit of C) | either side, depending on `C23` |

A longer run means a larger possible error. With `tune_n = N`:

* `N = 0`: tuning is off; every approximation is accepted (error up to 11.1%).
* `N >= 1`: the approximation is rejected and the product re-run exactly when
  the run is **N bits or longer**.

So `N = 1` is the most accurate setting and raising N accepts more
approximations. `50 x -25` (case 1, `C = .0010...`, a run of two 0s) is
re-run exactly at `N = 1` or `2` and accepted at `N = 3` and above. Measured
over 10^6 random products per setting (`tb_hit_rate_sweep`):

| N          | 0     | 1     | 2     | 3     | 4     | 6     | 8     |
|------------|-------|-------|-------|-------|-------|-------|-------|
| hit rate   | 100%  | 24.9% | 56.2% | 76.7% | 87.9% | 96.9% | 99.2% |
| max error  | 11.1% | 4.0%  | 7.4%  | 9.3%  | 10.2% | 10.9% | 11.1% |

"Hit rate" is the share of products delivered by the approximate path.

### RMAC unit timing (`rmac`)

```
cycle         t            t+1             t+2      t+3
accepted      in_valid & in_ready
approximate   decide  ->   out_valid, y
exact re-run  decide  ->   start exact  -> stage 1 -> out_valid, y
in_ready      1            0               0        1     (re-run only)
```

The approximation and the tuning decision are made combinationally in the
cycle the operation is accepted. An accepted approximation is registered and
appears one cycle later. A rejected one is held in an operand register. The
exact multiplier is started from that register in the next cycle, and its
result appears three cycles after acceptance. `in_ready` is low during a
re-run, so results come back in order. `out_valid` is a one-cycle pulse and
there is no output back-pressure. `out_path` (`fp_pkg::res_path_e`) tells
whether `y` came from the approximation (`PATH_APPROX1`) or from the exact
multiplier (`PATH_EXACT`). The exact multiplier's inputs change only when a
re-run starts, so it does not toggle while approximations are accepted.

## CFPU: discard, then shift and add

The CFPU tries three ways of getting the product, each dearer than the last,
and stops at the first that meets the error bound `2^-N` (`tune_n = N`):

1. **Mantissa discarding** (`cfpu_select`). A multiplexer keeps the larger
   fraction `fk` and drops the smaller one `fd`. The result is
   `(1+fk) 2^(ea+eb)`, with relative error `fd/(1+fd)`. It is accepted when
   the first N bits of `fd` are all 0, i.e. `fd < 2^-N`. `N = 0` accepts every
   first-stage result.
2. **Shift and add** (`cfpu_shift_add`, only when `two_stage` is high). `fd`
   is rounded down to its first 1, `2^-k`, and the mantissa becomes
   `(1+fk) + ((1+fk) >> k)`, normalised if it reaches 2. Bits shifted out are
   truncated. What is ignored is the rest `r = fd - 2^-k < 2^-k`, so this
   stage's error is at most half of stage 1's. It is accepted when the first
   N bits of `r` are 0.
3. **Exact** (`fp_mul_exact`).

Timing, counted from acceptance: stage 1 result after 1 cycle; stage 2 after
2; exact after 3 (stage 2 off or skipped) or 4 (stage 2 tried first).
`in_ready` is low while stage 2 or the exact multiplier is busy. `out_path`
reports `PATH_APPROX1`, `PATH_APPROX2` or `PATH_EXACT`. `tune_n` and
`two_stage` are sampled at acceptance.

Measured over 10^6 random products per setting:

| bound `2^-N` | 12.5% | 6.25% | 3.1%  | 1.56% | 0.78% |
|--------------|-------|-------|-------|-------|-------|
| one-stage hit rate | 23.4% | 12.1% | 6.1% | 3.1% | 1.6% |
| two-stage hit rate | 71.9% | 48.8% | 30.9% | 18.6% | 10.9% |

Without a bound (`N = 0`, one stage) every product is approximated by
discarding. The error is then spread almost evenly up to 50% (mean 22.7%),
while untuned RMAC stays below 11.1% (mean 3.8%, most products under 5%).
That gap is why RMAC reaches much higher hit rates for the same accuracy.
`tb_hit_rate_sweep` prints both error histograms.

## Exact multiplier (`fp_mul_exact`)

This is a two-stage pipeline that accepts one operation per cycle.

* Stage 1 registers the sign XOR, the exponent sum minus the bias, and the
  48-bit product of the two 24-bit mantissas.
* Stage 2 normalises a product in [2,4) by one place and rounds to nearest
  even. It then packs the result.

Subnormal operands are read as zero, and results below the normal range
flush to a signed zero. Overflow gives a signed infinity. A NaN operand, or
zero times infinity, gives the quiet NaN `0x7fc00000`. The latency is 2
cycles.

## Top level and files

`approx_fpmul_top` instantiates `rmac` and `cfpu`. Their ports come out
unchanged, prefixed `rmac_` and `cfpu_`, and share `clk` and `rst_n`
(active-low, synchronous). The multipliers are meant to sit in the floating
point lanes of a processor such as a GPU. That host is not part of this RTL.

| file | content |
|------|---------|
| `rtl/fp_pkg.sv` | default widths, `res_path_e` result-path tag |
| `rtl/fp_mul_exact.sv` | exact IEEE-754 multiplier, 2-cycle pipeline |
| `rtl/rmac_approx.sv` | mantissa-addition datapath (combinational) |
| `rtl/rmac_tuner.sv` | run-length accuracy check (combinational) |
| `rtl/rmac.sv` | RMAC unit: approximate, tune, exact re-run |
| `rtl/cfpu_select.sv` | CFPU stage 1: operand selection and discarding |
| `rtl/cfpu_shift_add.sv` | CFPU stage 2: shift and add |
| `rtl/cfpu.sv` | CFPU unit: stage 1, stage 2, exact |
| `rtl/approx_fpmul_top.sv` | top level |

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. They print
`TB_RESULT checks=N failures=M` and stop on a watchdog. The reference
(`tb/fp_ref_pkg.sv`) works on double precision reals, where a single precision
product is exact. It rounds back to single precision itself and models the
approximations from their formulas, not from the RTL's bit manipulations.
The unit testbenches also check the cycle counts above and the path tags.
`tb_approx_fpmul_top` runs both units concurrently at the default
parameters. It requires every mechanism to occur at least once: RMAC hits,
tuning re-runs, special-operand re-runs, all four CFPU outcomes, stalls, and
changes of the tuning setting and of the stage mode. `tb_hit_rate_sweep`
produces the tables above and checks the error bounds, the growth of the
hit rate with N, and that two stages never hit less often than one.
`tb_rmac_fp16` checks the RMAC unit, exact fallback included, in half
precision.

To simulate with Verilator (5.x), for example the top-level test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_approx_fpmul_top.sv \
    --top-module tb_approx_fpmul_top
./obj_dir/Vtb_approx_fpmul_top
```

`tb_hit_rate_sweep` runs 10^6 products per setting and takes about half a
minute. Reduce its `OPS` for quicker runs.

## Design choices and limits

These points are decisions of this implementation rather than fixed parts
of the method:

* **Cycle timing.** The handshake, the register placement and the latencies
  (1/3 cycles for RMAC, 1/2/3/4 for CFPU) are chosen here. The method
  itself is characterised by energy and delay, not by cycles. Energy, power
  and delay figures are not modelled.
* **Tuner rule.** The rule "re-run when the run reaches N; N = 0 turns tuning
  off" was fitted to the method's worked example and to its trend of error
  against N (N = 1, 2, 3 giving increasing maximum errors).
* **CFPU details.** How the user's error limit maps to the CFPU check is
  chosen here: the bound is `2^-N`, stage 1 tests the leading zeros of the
  dropped fraction, and stage 2 tests its remainder. So are the selection
  rule (compare whole fractions) and the truncation in stage 2.
* **Special values.** Rounding mode, flush-to-zero of subnormals and the
  handling of special values are standard choices made here.
* **Scope.** Only multiplication is covered. A fused multiply-add is not
  included.
