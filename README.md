# AWGN channel emulator: Box-Muller tables plus central-limit accumulation

This is synthesizable SystemVerilog for a white Gaussian noise generator and the
additive white Gaussian noise (AWGN) channel built on it. It is meant for FPGA
emulation of a communication link, where bit error rates around 1e-6 or lower
must be measured over billions of symbols. The generator has to produce one
accurate, reproducible Gaussian sample every few clocks, with a tail that
reaches beyond 4 sigma and a period far longer than any run. It must do this
with a few hundred FPGA logic cells and one small RAM block.

The main idea is a two-step construction:

1. A **quantised Box-Muller** sample `n = ±f(x1)·g(x2)`, with
   `f(x) = sqrt(-ln x)` and `g(x) = sqrt(2)·cos(2πx)`, where both functions are
   small ROMs addressed by random bits. Box-Muller is exact in principle, but the
   coarse ROMs leave a visibly rippled density.
2. **Central-limit accumulation:** N = 4 such samples are added. Their
   density is convolved with itself three times, which smooths the ripple
   while keeping the Gaussian shape.

The uniform random bits come from a bank of LFSRs, and each LFSR advances
several sequence positions per clock.

```
            s_1..s_K (K×q bits)   +-------+ f_r(s) (3.m)
 +-------+ --------------------->| f_r   |-----+
 | LFSR  |                        | ROMs  |     x--(4.(m+m'))--trunc--(4.b) n+--±--(4.b) n--+--> Σ of N --> back end --> y
 | bank  | s' (q' bits)  +-----+  +-------+     |                                ^          |    (4+log2N . b)
 |       | ------------->| g   |----(1.m')------+                                |          +--- x_in, sigma
 |       | sign ---------+-----+--------------------------------------------------+
 +-------+
```

`(a.b)` is an unsigned number with `a` integer and `b` fraction bits. The
signed (two's complement) formats after the sign stage are shown the same
way.

## Default configuration

| symbol | parameter | default | meaning |
|---|---|---|---|
| b  | `B` / `B_FRAC` | 6 | fraction bits of every noise sample |
| q  | `Q_F` | 4 | address bits per f_r rank |
| K  | `K` / `K_RANKS` | 5 | ranks of the recursive f quantisation |
| m  | `M_F` | 7 | fraction bits of f_r (f_r is 3+m = 10 bits) |
| δ  | `DELTA_F` | 0.467 | sample position inside an f segment |
| q' | `Q_G` | 8 | g ROM address bits (256 words) |
| m' | `M_G` | 6 | fraction bits of g (g is 1+m' = 7 bits) |
| δ' | `DELTA_G` | 0.5 | sample position inside a g segment |
| N  | `N` / `N_ACC` | 4 | Box-Muller samples per noise sample |
| –  | LFSR lengths | 22, 21 (g), 20, 17, 13, 7, 5 (f ranks 1..5), 15 (sign) | |

These values are the published reference configuration of the design. The
original implementation reported 434 logic cells, one memory block, a 74 MHz
clock and an 18.5 MHz output rate on an older FPGA family.

## The recursive quantisation of f

This is the part that needs the most explanation. `f(x1) = sqrt(-ln x1)` is
steep near `x1 = 0`, and that corner is where the tail lives. A sample
beyond 4 sigma needs `f > 4`, i.e. `x1 < e^-16 ≈ 1e-7`. A uniform
quantisation fine enough for that would need about 24 address bits and a
16-million-word ROM.

Instead, `[0,1)` is cut recursively:

* Rank 1 splits `[0,1)` into 2^q = 16 segments of width 2^-4, and the 4-bit
  random address `s_1` picks one.
* If `s_1 = 0`, the first segment is split again into 16 segments of width
  2^-8, and `s_2` picks one.
* This continues down to rank K = 5 (width 2^-20).

The first non-zero address `s_r` selects the segment
`[s_r, s_r+1)·2^(-r·q)`. Its probability, 2^(-r·q), is exactly its width, so
`x1` stays uniformly distributed. Each rank has its own 16-word ROM:

```
f_r(s) = floor( 2^m · sqrt( -ln( (s + δ) · 2^(-r·q) ) ) )      s = 1..15,  r = 1..K
```

`δ` places the representative point inside the segment. When all K
addresses are zero (probability 2^-20) the output is 0. In hardware this is
five 16×10-bit ROMs, one per rank, read in parallel, and a priority selector
(`f_rom`). The largest value is `f_5(1) = 469/128 ≈ 3.66`.

`g` only needs the first quarter of the cosine, because a separate random
sign bit supplies the symmetry:

```
g(s') = floor( 2^m' · sqrt(2) · cos( π/2 · (s' + δ') · 2^(-q') ) )     s' = 0..255
```

Both tables are computed when the design elaborates, from real-valued
constant functions in `awgn_pkg`. No table file is needed, and changing
`M_F`, `DELTA_F` or similar parameters regenerates the ROMs.

## From table values to a noise sample

`box_muller` multiplies `f_r(s)` (3.m) by `g(s')` (1.m') into a (4.(m+m')) product.
It then truncates (floors) the product to `b` fraction bits to form `n+` in
(4.b) format. The largest `n+` is 329/64 ≈ 5.14. The sign bit then negates
it:

* **two's complement** (default, `ONES_COMPLEMENT = 0`): `n = -n+`. The mean is
  exactly 0. The value 0 keeps the full probability of `n+ = 0`, because
  -0 = 0.
* **one's complement** (`ONES_COMPLEMENT = 1`): `n = ~n+ = -n+ - 2^-b`. This
  saves the incrementer, but the mean becomes `-2^(-b-1)` per sample, i.e.
  `-N·2^(-b-1)` after accumulation. The back end removes that offset exactly.

`clt_accumulator` adds N consecutive samples in one adder with a feedback
register. Its output has format (4+log2 N . b), which is 12 bits signed for
N = 4, and a standard deviation of about sqrt(N).

`awgn_backend` produces the channel output:

```
y = x_in + sigma · (z + c) / sqrt(N)        c = N·2^(-b-1) in one's complement mode, else 0
```

It computes this at one extra fraction bit, so `c` is exact. For N = 4 the
`/sqrt(N)` is a one-bit shift. For an N that is not a power of 4 no shift
is made, and `sigma` must include `1/sqrt(N)`. The scaled noise is floored
to `b` fraction bits. `y` is 2 bits wider than needed, so it never
overflows.

## LFSR bank

One sample consumes K·q + q' + 1 = 29 uniform bits per clock. The bits come
from eight **one-to-many (Galois)** LFSRs (`lfsr`). On each step the top bit
leaves the register and is XORed into the positions of the polynomial's
terms. A module that must deliver 4 bits per clock performs 4 steps per clock:
the loop over steps is unrolled into one XOR network. The 4 output bits are
the 4 top register bits. For `x^5 + x^2 + 1` the register passes through
`00001, 10000, 01101, 01110, 11011, ...` (written x^5..x). A test checks
this against the single-step sequence sampled every fourth step.

| LFSR | length | polynomial | bits/clock | feeds |
|---|---|---|---|---|
| g0 | 22 | x^22+x+1 | 4 | s'[3:0] |
| g1 | 21 | x^21+x^2+1 | 4 | s'[7:4] |
| f1..f5 | 20, 17, 13, 7, 5 | x^20+x^3+1, x^17+x^3+1, x^13+x^4+x^3+x+1, x^7+x+1, x^5+x^2+1 | 4 each | s_1..s_5 |
| sign | 15 | x^15+x+1 | 1 | sign |

All polynomials are primitive. Together the LFSRs hold 120 flip-flops, and the
joint period is lcm(2^n − 1) ≈ 2^98.6 clocks, far beyond the 2^60 requirement.
Keep one property in mind: these lengths are not pairwise coprime in period.
2^20−1 and 2^5−1 share the factor 31, 2^21−1 and 2^7−1 share 127, and 2^15−1
and 2^5−1 share 31. So the LFSRs are not jointly free-running over every
combination. With the default seeds (all 1), the all-zero f address (rank 0)
does not occur in the first 3 million clocks, although its nominal
probability is 2^-20. If that matters, choose lengths whose exponents are
pairwise coprime (for example Mersenne exponents such as 5, 7, 13, 17, 19,
31). Each length needs a polynomial in `awgn_pkg::lfsr_taps`.

## Interface and timing of the top (`awgn_channel_emulator`)

| port | dir | width (default) | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `en` | in | 1 | run the generator (low = stall: everything holds) |
| `x_in` | in | 12 | transmitted sample, signed, 6 fraction bits |
| `sigma` | in | 8 | noise standard deviation, unsigned, 6 fraction bits |
| `noise_valid`, `noise` | out | 1, 12 | accumulated noise, signed (6.6), std ≈ 2 |
| `y_valid`, `y` | out | 1, 16 | `x_in + sigma·noise/2`, signed, 6 fraction bits |
| `bm_rank` | out | 3 | f rank (1..5, 0 = all-zero address) of the current Box-Muller sample |

* One Box-Muller sample is produced per enabled clock, and one noise sample
  per N = 4 enabled clocks. The output rate is f_clk/4, the ratio of the
  original results (74 → 18.5 MHz).
* The first `noise_valid` pulse comes N + 3 = 7 clocks after `en` rises.
  The three extra clocks are the LFSR register, the ROM output register and
  the product register.
* `x_in` and `sigma` are sampled in the clock in which `noise_valid` is high.
  `y_valid` and `y` follow one clock later.
* Dropping `en` freezes the LFSRs. Samples already in the pipeline drain
  into the accumulator, and no sample is lost or repeated.

## Accuracy: what the tables give

The distribution of the generator can be computed exactly from the tables.
A Box-Muller sample takes the value `n+` with probability
`Σ 2^-(r·q + q')` over all `(s, r, s')` that produce it. The sign mirrors this
distribution, and N-fold convolution gives the noise. The end-to-end test does
part of this: it computes E[n²] from the tables and checks the measured
standard deviation of 300 000 noise samples against it, and the two agree to
within 0.2%. A separate distribution test goes further: it compares the full
histogram of a million hardware samples with the exact distribution.

A caveat for users who need a calibrated sigma: every quantisation step is a
floor (f, g and the product truncation). Together they make the samples
slightly too small, so one Box-Muller sample has a variance of 0.970 instead
of 1 (σ ≈ 0.985). For N = 4 and b = 6, the exact density then deviates from
N(0,1) by up to about 17% near 4σ. Against a Gaussian of the same variance,
the worst deviation within 4σ is about 4%. The original work reports about
0.14% for this configuration, and that figure could not be reproduced from
the defining equations above. Rounding instead of flooring everywhere gives a
variance of 1.004 and about 0.9%. Practical remedies:

* scale `sigma` by 1/0.985;
* or raise `M_G`/`B` (b = 8 gives variance 0.979);
* or change the floors in `awgn_pkg` and `box_muller` to rounding.

The same exact computation over the published sweep of b = 1..8 and
N = 2..5 gives the following worst relative errors within 4σ (×1e-3). δ is
0.44, 0.453 and 0.445 for b = 1..3 and 0.467 above. The values are printed by
`tb_accuracy_sweep`:

| b | N=2 | N=3 | N=4 | N=5 |
|---|---|---|---|---|
| 1 | 748 | 804 | 843 | 871 |
| 2 | 549 | 618 | 657 | 690 |
| 3 | 359 | 402 | 434 | 462 |
| 4 | 278 | 285 | 307 | 326 |
| 5 | 216 | 208 | 220 | 230 |
| 6 | 265 | 170 | 174 | 179 |
| 7 | 321 | 155 | 148 | 150 |
| 8 | 561 | 152 | 136 | 136 |

For small b, much of this error is the coarse output grid itself: at b = 1
one LSB is σ/4. For b ≥ 6, the variance deficit described above dominates.
The original reports values between 0.08 and 503 (×1e-3) for the same grid.

## What follows the original design and what is this implementation's own

Taken from the original design:

* the two-step method;
* the recursive f quantisation and both table formulas;
* all parameter values, the bit formats along the datapath, and the N-sample
  adder loop;
* the one's/two's complement sign and its mean correction;
* the multi-step one-to-many LFSR structure, the LFSR lengths and most
  polynomials.

Choices made here:

* the pipeline registers, the `en`/valid handshake and the synchronous reset;
* the seeds (all 1) and which LFSR feeds which address bits;
* the sign LFSR's polynomial (x^15+x+1) and its single step per clock;
* all back-end formats (`X_W`, `SIG_W`, `SIG_F`) and the exact mean
  correction;
* the `bm_rank` monitor port;
* `m' = 6` for g. The original also mentions m' = 7, which fills a 256-byte
  RAM exactly; set `M_G = 7` for that.

Not built: a variant with four Box-Muller generators in parallel and a
4-input adder (one noise sample per clock). How its four generators would get
independent random bits is not specified.

## Files

| file | contents |
|---|---|
| `rtl/awgn_pkg.sv` | parameters, LFSR polynomials, ROM-generating functions |
| `rtl/lfsr.sv` | multi-step one-to-many LFSR |
| `rtl/lfsr_bank.sv` | the eight LFSRs |
| `rtl/f_rom.sv` | K rank ROMs + priority selector |
| `rtl/g_rom.sv` | quarter-cosine ROM |
| `rtl/box_muller.sv` | multiply, truncate, sign (2-stage pipeline) |
| `rtl/clt_accumulator.sv` | N-sample adder loop |
| `rtl/awgn_backend.sv` | mean/sqrt(N) correction, sigma scaling, signal addition |
| `rtl/awgn_channel_emulator.sv` | top |
| `tb/tb_awgn_ref_pkg.sv` | reference models (GF(2) polynomial powers, table formulas) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_awgn_distribution` and `tb_accuracy_sweep` |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/awgn_pkg.sv tb/tb_awgn_ref_pkg.sv tb/tb_awgn_channel_emulator.sv \
    --top-module tb_awgn_channel_emulator
./obj_dir/Vtb_awgn_channel_emulator
```

Replace the testbench name for the others (`tb_lfsr`, `tb_lfsr_bank`,
`tb_f_rom`, `tb_g_rom`, `tb_box_muller`, `tb_clt_accumulator`,
`tb_awgn_backend`, `tb_awgn_distribution`, `tb_accuracy_sweep`). What they
establish:

* `tb_lfsr` reproduces the published 13-step sequences of `x^5+x^2+1`, with
  one and with four steps per clock. It also compares 3000 clocks of a 5-bit
  and a 22-bit register with `x^k mod p(x)` computed by polynomial
  arithmetic, and checks the period of 31 and the hold on `en = 0`.
* `tb_lfsr_bank` compares all 29 output bits with the polynomial model for
  16 000 clocks and checks that the rank-1 addresses are uniform.
* `tb_f_rom` and `tb_g_rom` compare every table entry with the formulas
  evaluated independently, and check the rank priority and the all-zero
  case.
* `tb_box_muller` runs 20 000 random samples through both sign modes and
  checks the 2-clock latency and every rank.
* `tb_clt_accumulator` checks N = 4 and N = 3 group sums, gaps in the input,
  and the output every 4 clocks.
* `tb_awgn_backend` compares `y` with a real-valued model in both sign modes.
* `tb_awgn_channel_emulator` runs the top at its default parameters for
  1.2 million clocks, about 10 s. It compares every noise sample, rank and
  channel output with a bit-exact model. It also checks the latency of 7,
  the spacing of 4, random stalls, the mean and the standard deviation, and
  that every rank 1..5 occurred.
* `tb_awgn_distribution` runs four instances side by side for 4 million
  clocks: (N, b) = (4, 6), (2, 6) and (4, 8), plus the one's complement mode.
  For each of the first three, it computes the exact noise distribution from
  the table formulas and compares it with the hardware histogram. The
  comparison uses a chi-square test over bins of about σ/16, the mean and the
  variance. It also prints the worst relative density error against N(0,1)
  within 4σ: 0.174, 0.265 and 0.136 for the three configurations. For the
  one's complement instance it checks the noise mean of −N/2 LSB and its
  removal in `y`. The run takes about 10 s.
* `tb_accuracy_sweep` runs ten instances for 3 million clocks: b = 1..8 at
  N = 4, each with its own δ, and N = 3 and N = 5 at b = 6. It applies the
  same histogram, mean and variance checks, and checks one output per N
  clocks. It then prints the exact error grid shown above. The run takes
  about 10 s.
