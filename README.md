# Hardware Gaussian noise generator for channel code evaluation

Simulating a channel decoder in hardware, for example an LDPC decoder in its
error-floor region at bit error rates of 1e-9 to 1e-10, needs on the order of
1e12 noise samples. It also needs the rare large samples, 5 sigma and beyond,
to appear as often as they do in a true Gaussian distribution. Those are the
samples that make a decoder fail. This RTL generates N(0,1) samples at one per
clock with the Box-Muller transform:

    x1 = sqrt(-ln u1) * sqrt(2) * sin(2 pi u2)
    x2 = sqrt(-ln u1) * sqrt(2) * cos(2 pi u2)

Here u1 and u2 are uniform on [0, 1). The logarithm, square root, sine and
cosine are not computed exactly. Each is a *non-uniform piecewise linear
approximation*: short segments where the function bends sharply, long ones
where it is nearly straight. The boundaries are placed so that finding the
segment for an input is a leading-zero count or a bit slice, not a search.
Each approximation is good to about 1e-2 (f) and 2e-3 (sin/cos). The
remaining error is hidden by adding two successive samples (the central limit
theorem).

The architecture, the input widths, the LFSR scheme, the segment counts and
the coefficient field widths follow the design as published in "A Hardware
Gaussian Noise Generator for Channel Code Evaluation". Where that description
stops (encodings, segment boundaries for sin, number formats, pipeline depth,
reset, seeding), the choices are this implementation's. They are listed in
[Departures and own choices](#departures-and-own-choices).

## Data flow

```
           +--------+  u1 (32b)  +--------+  f (UQ3.29)
 50 x      |        |----------->| f_eval |-----------+
 60-bit    |  urng  |            +--------+           |      x1 = f*g1      +------+
 LFSRs --> |        |  u2 (18b)  +--------+  g1 -------+--(*)--------------->| acc2 |--+
           |        |----------->| g_eval |  g2 -------+--(*)----+          +------+  |  +---------+
           +--------+            +--------+                     | x2 = f*g2 +------+  +->| out_mux |--> noise
                                                                +---------->| acc2 |---->| (toggle)|    (1 per clock)
                                                                            +------+     +---------+
```

1. **Uniform numbers** (`urng`, `lfsr`). Each of the 50 bits of u1 and u2 comes
   from its own 60-bit LFSR. Independent registers per bit avoid the
   correlation between neighbouring bits of one shift register. The period is
   2^60 - 1 = 1.15e18.
2. **Function evaluation** (`f_eval`, `g_eval`, two multipliers in `gng_core`).
   f(u1) = sqrt(-ln u1) and g1, g2 = sin, cos(2 pi u2) are computed. The
   products f*g1 and f*g2 are formed.
3. **Central limit step** (`acc2`, twice). Each ACC(2) adds two successive
   products. The sum of two unit-variance samples has variance 2. The
   1/sqrt(2) that would rescale it cancels the sqrt(2) in g. Both factors are
   therefore left out: g lies in [-1, 1], and the plain sum is the N(0,1)
   sample.
4. **Output multiplexor** (`out_mux`). Both ACC(2) units finish together every
   other cycle. A toggle flip-flop sends the sin-branch sum out first and the
   held cos-branch sum on the next cycle. The result is one sample per clock.

`gng_top` places `N_INST` such generators side by side, each with its own seed.
The default, `N_INST = 1`, is the single generator. The published parallel
variant uses three.

## Evaluating f(u1) = sqrt(-ln u1)

This is the hardest part. f is very steep at both ends. Near u1 = 0 the
gradient reaches about 5e8. Near u1 = 1, f behaves like sqrt(1 - u1). A
uniform segmentation would need a huge table.

**Segment boundaries.** Below 1/2 the boundaries are at powers of two,
2^(n-32). At or above 1/2 they are at 1 - 2^-n. Every segment is one octave
of u1, or of 1 - u1. The segment of an input is therefore its number of
leading zeros (for u1 < 1/2), or its number of leading ones (for u1 >= 1/2).
`f_eval` computes this with a priority encoder over the 32 bits.

Taken literally, this rule gives about 62 segments. The table has 59 records
(59 x 48 + 21 x 32 = 3504 bits, the published table size). So the innermost
segments at each end are merged:

| index | u1 range | how it is found |
|------:|----------|-----------------|
| 0 .. 28 | [2^-(k+2), 2^-(k+1)) | k+1 leading zeros |
| 29 | [0, 2^-30) | 30 or more leading zeros |
| 30 .. 57 | [1 - 2^-(j+1), 1 - 2^-(j+2)) with j = index - 30 | j+1 leading ones |
| 58 | [1 - 2^-29, 1) | 29 or more leading ones |

u1 = 0 is evaluated as u1 = 2^-32. That caps f at sqrt(32 ln 2) = 4.71, so
the largest single product is 4.71 * sqrt(2) = 6.66 sigma.

**Linear evaluation with scale factors.** Each record holds four fields:
gradient `m` (6 bits), gradient scale `sm` (5 bits), y-intercept `c`
(32 bits) and intercept scale `sc` (5 bits). The evaluator computes

    f = c * 2^(sc-40)  -  m * 2^(sm-5) * u1        (u1 as a fraction of 2^32)

The 6 x 32-bit product `m * u1` is exact. It is shifted left by `sm + 3`, and
`c` is shifted left by `sc`, so both are aligned to 2^-40. One subtraction
follows, then a shift to the 29-fraction-bit output and a clamp at zero. The
gradient of f is negative everywhere, so `m` and `c` are stored unsigned.
Because of the scale factors, a 6-bit gradient covers magnitudes from about 1
to 5e8. A large gradient is only needed where precision matters least.

**Accuracy.** Against the exact function, the worst absolute error is 0.0128,
at u1 = 2^-32. It stays below about 0.01 elsewhere, with the largest errors at
segment ends. The error comes mainly from fitting one straight line over a
whole octave, and from the 6-bit gradient.

## Evaluating sin and cos

`g_eval` takes the two MSBs of u2 as a quadrant and the 16 LSBs as a position
x in [0, 1) within it. Only s(x) = sin(pi/2 * x) is tabulated. The other
values follow from the quadrant:

| quadrant | g1 = sin(2 pi u2) | g2 = cos(2 pi u2) |
|:-:|:-:|:-:|
| 0 | s(x) | s(1-x) |
| 1 | s(1-x) | -s(x) |
| 2 | -s(x) | -s(1-x) |
| 3 | -s(1-x) | s(x) |

g1 and g2 share one table, `g_coeff_rom`, with two read ports. Port A reads
at x. Port B reads at the mirrored position 1 - x, formed exactly as
2^16 - x on 17 bits. There are 21 segments: 4 of width 1/8 on [0, 1/2), 16 of
width 1/32 on [1/2, 1) where the sine bends most, and one for the exact point
x = 1 (which only the mirrored port can reach). The segment index is a slice
of the top bits of x. Each 32-bit record holds gradient `m` (8 bits), scale
`sm` (4), intercept `c` (16, signed) and scale `sc` (4):

    s = m * 2^-(sm+7) * x  +  c * 2^-(14+sc)

The result is rounded to 16 fraction bits and clamped to [0, 1]. The worst
error is 0.0021.

## Coefficient tables

The tables are not stored in files. `gng_coeff_pkg` computes them during
elaboration, with constant functions `f_record(k)` and `g_record(k)` that use
real arithmetic. `f_coeff_rom` and `g_coeff_rom` turn the results into
constant arrays. The records are packed as the `f_coeff_t` and `g_coeff_t`
structs of `gng_pkg`, with the first field at the MSB. Each record comes from
a least-squares fit over its segment:

1. Fit the least-squares line y = C - M*u (for f) or y = M*x + C (for s) to
   the function, sampled at 2049 evenly spaced points of the segment. For f
   at or above 1/2 the fit is done in 1 - u.
2. Round M to the gradient mantissa: 6 bits with M = m * 2^(sm-5) for f, and
   8 bits with M = m * 2^-(sm+7) for s. The mantissa is normalised, so its top
   bit is set.
3. Refit the intercept for the rounded gradient: C = mean(y + M*u) for f, and
   mean(y - M*x) for s.
4. Round C to the intercept mantissa: c * 2^(sc-40) with a normalised 32-bit c
   for f, and c * 2^-(14+sc) with a signed 16-bit c for s.

A different segmentation, or a different fit, needs changes only in
`gng_coeff_pkg` and in the segment decoders of `f_eval` and `g_eval`.

## Number formats

| signal | format | notes |
|---|---|---|
| u1 | 32-bit unsigned fraction | one LFSR per bit |
| u2 | 18-bit unsigned fraction | [17:16] quadrant, [15:0] position |
| f | unsigned, 3 integer + 29 fraction bits | 0 .. 4.71 |
| g1, g2 | signed 18 bits, 16 fraction bits | -1 .. 1 (1.0 = 65536) |
| x1, x2 | signed 25 bits, 20 fraction bits | f*g truncated (floor) |
| noise | signed 16 bits, 11 fraction bits | sum of two x, rounded half up; 1.0 = 2048 |

## Interface and timing

`gng_top #(N_INST = 1, SEED = 64'h0123456789ABCDEF)`

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous, active high; loads the LFSR seeds and clears the pipeline |
| en | in | 1 | clock enable for every register; low freezes the whole generator |
| valid | out | N_INST | instance i has a new sample |
| noise | out | N_INST x 16 | samples, `noise[i]` for instance i |

Cycles are counted in enabled clock edges after reset. f and g are ready after
3 edges and the products after 4. The first pair of sums is registered on
edge 6. `valid` rises after edge 7 and then stays high: one new sample per
enabled edge. Each submodule's header states its own latency.

Seeds: instance i uses `SEED + i * 0xD1B54A32D192ED03`. Its 50 LFSR seeds are
splitmix64 hashes of that value plus multiples of 0x9E3779B97F4A7C15. A zero
result is replaced by 1. Generators with different `SEED` produce unrelated
streams.

## Verification

Every module has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_lfsr` | the seed comes out first; the x^60+x^59+1 recurrence; exact periods 15 and 127 for 4- and 7-bit versions; hold and reset |
| `tb_urng` | recurrence on all 50 lanes; lanes non-constant and pairwise independent; means; hold |
| `tb_f_eval` | 60,000 inputs (boundaries, extremes, all magnitudes) against sqrt(-ln u) in double precision; latency; hold |
| `tb_g_eval` | all quadrants and boundaries against sin/cos; sin^2+cos^2; latency; hold |
| `tb_acc2`, `tb_out_mux` | exact sums and rounding; pulse pattern; a/b order; hold |
| `tb_gng_core` | 200k samples, each checked against the ideal Box-Muller value; first valid after 7 edges; statistics |
| `tb_gng_top` | 3 parallel instances, 300k samples each; each instance checked as above; instances uncorrelated; counts for stalls, both mux inputs, all quadrants, both halves and both ends of the f segmentation, tail samples |
| `tb_gng_full` | default configuration, 4 million samples; full checks plus throughput (samples = enabled cycles - 6) |
| `tb_gng_tail` | default configuration, 20 million samples; counts of samples in the tail bands beyond 3, 4, 4.5 and 5 sigma against the Gaussian expectation |

The system tests use `gng_checker`. It runs a second `urng` with the same
seed and computes each ideal output in double precision. Each output must
match within 0.052, the sum of the evaluators' worst-case errors; the
observed worst is 0.021. At the end, `gng_checker` applies a chi-square test
and a Kolmogorov-Smirnov test. The chi-square test uses 700 bins of width
0.02 on [-7, 7], with sparse tail bins pooled. The expected bin
probabilities include the output rounding. Results of the 4-million-sample
run at defaults:

| statistic | value |
|---|---|
| mean / variance | 0.00087 / 1.00014 |
| lag-1 correlation | 0.0002 |
| chi-square | 409.8 with 436 degrees of freedom, p = 0.81 |
| K-S distance | 0.00064 (5% critical value 0.00068) |
| beyond 4 sigma | 248 (expected 253.4) |
| beyond 5 sigma | 3 (expected 2.3) |

The 20-million-sample tail run (`tb_gng_tail`) counted:

| band of abs(x) | observed | expected |
|---|---|---|
| [3, 4) | 53138 | 52771 |
| [4, 4.5) | 1095 | 1132 |
| [4.5, 5) | 132 | 125 |
| 5 and beyond | 11 | 11.5 |

The K-S distance is close to its 5% limit at 4 million samples. Much larger
runs may resolve the approximation error of f. Statistical quality at 1e9
samples and beyond has not been simulated.

## Simulating

All commands run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/gng_pkg.sv rtl/gng_coeff_pkg.sv \
    tb/tb_gng_full.sv --top-module tb_gng_full
./obj_dir/Vtb_gng_full
```

Replace `tb_gng_full` with any testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and finishes. `tb_gng_full` takes about ten
seconds.

## Departures and own choices

- **59 f segments.** The octave boundary rule gives about 62 segments, while
  the published table has 59 records. The innermost segments at each end are
  merged (see the table above).
- **sin segment boundaries** (4 x 1/8, 16 x 1/32, plus the point x = 1) are
  this implementation's. The published design gives 21 segments chosen for
  local linearity and cheap decoding, but not their positions.
- **Coefficient values** come from the least-squares procedure described
  above. The published values are not available.
- **Scale-factor encoding**, number formats, rounding and the 16-bit output
  width are own choices.
- **Pipeline.** Three stages in each evaluator, one for the multipliers and
  one per ACC(2) and multiplexor. The published design is "pipelined" with no
  further detail.
- **LFSR polynomial** x^60 + x^59 + 1, a primitive trinomial, was chosen here.
  The published design asks only for a maximal-period 60-bit register.
- **LFSR mapping.** The published design packs each 60-bit LFSR into
  shift-register LUTs (SRL16). Those cannot be reset, while this RTL resets
  all 60 bits to the seed. Mapping onto SRLs needs the reset removed from the
  shift body, for example by using power-up initial values.
- **Reset, clock enable and seeding** are additions. The published design
  mentions only that parallel generators need different seeds.
- **Not included:** the LDPC decoder and the software statistics of the
  original evaluation. They consume the noise and are not part of the
  generator.

## Changing it

- **Output width or format:** `OUT_W`/`OUT_FRAC` in `gng_pkg`, and the `DROP`
  of `acc2` follows from `X_FRAC - OUT_FRAC`.
- **More tail range** needs a wider u1. Each extra bit adds to the maximum of
  f = sqrt(U1_W ln 2); 46 bits give 8 sigma. This requires new
  `F_LO`/`F_HI` counts in `gng_pkg`, a matching range rule in
  `gng_coeff_pkg` and the leading-count decoder of `f_eval`, and a wider `f`
  format. The table itself is recomputed during elaboration.
- **Different seeds:** the `SEED` parameter of `gng_top`.
- **More parallel generators:** `N_INST`.
