# Rayleigh fading channel-coefficient generators in SystemVerilog

A mobile radio channel that changes quickly is modelled as a set of complex
gains, one per propagation path. Each gain fades with a Rayleigh-distributed
envelope. The rate of change is set by the maximum Doppler shift `fd`. A
hardware channel simulator has to produce these gains much faster than a PC
can. This RTL generates them with *sum-of-sinusoids* models, following the
FPGA channel simulator described in the thesis "FPGA Channel Simulator of Fast
Rayleigh Fading Channel". A fading gain is a weighted sum of a few cosines
whose frequencies are `fd` times the cosines of fixed arrival angles.

There are three generators:

| Module | Model | Output rate |
|---|---|---|
| `xiao_multipath` (main design) | Xiao's random-phase model, six uncorrelated paths | six complex gains every 8 clocks (12.5 M sets/s per path at 100 MHz) |
| `jakes_single` | Jakes' deterministic model, N = 34 (M = 8) | one complex gain per clock |
| `xiao_single` | Xiao's model, M = 8, one path | one complex gain per clock |

`rayleigh_sim_top` places the three side by side. Each keeps its own ports,
with prefixes `mp_`, `jk_` and `xs_`. They share the clock and the synchronous,
active-high reset.

The models are:

```
Jakes:  u_c(t) = 2/sqrt(N) * sum_{n=0..M} a_n cos(w_n t)
        u_s(t) = 2/sqrt(N) * sum_{n=0..M} b_n cos(w_n t),     N = 4M + 2
        a_0 = sqrt2 cos(pi/4), a_n = 2 cos(pi n/M);  b_n likewise with sin
        w_0 = w_d,             w_n = w_d cos(2 pi n / N)

Xiao:   X_k(t) = 2/sqrt(M) * sum_{n=1..M} (cos psi_{n,k} + j sin psi_{n,k})
                                         * cos(w_d t cos alpha_{n,k} + phi_k)
        alpha_{n,k} = (2 pi n - pi + theta_k) / (4M)
```

In these formulas, `w_d = 2 pi fd`. `theta_k` and `phi_k` are random per path
and realisation. The phases `psi_{n,k}` come from pseudo-random generators.

## Number formats

All values are two's-complement fixed point. The formats are defined in
`rf_pkg`:

| Type | Bits | Meaning |
|---|---|---|
| `angle_t` | 18 | degrees: sign, 12 integer, 5 fraction bits (range ±4096°, step 1/32°) |
| `trig_t` | 12 | sine/cosine: sign, 1 integer, 10 fraction bits |
| `fd_t` | 12 | maximum Doppler shift, unsigned whole Hz (0..4095) |
| `time_t` | 21 | time, unsigned, one LSB = 2^-21 s (about 0.477 µs), so 0..1 s |
| `coef_t` | 16 | channel gain: sign, 4 integer, 11 fraction bits |

These widths are the reference design's. The thesis does not define the time
scale of `t` directly. 2^-21 s per LSB is chosen because it matches its example
that t = 10 LSB is 4.77 µs.

## The arithmetic of one sinusoid

Every term needs the cosine of `w_d t c + phi`, where `c` is the cosine of the
arrival angle. The argument grows without bound, and the table only covers one
turn. So the phase is formed in Doppler *cycles* and only the fraction is kept
(`doppler_phase`):

```
cycles = fd * t            exact, 33 bits with 21 fraction bits
x      = cycles * c        31 fraction bits; keep the top 16 of them
phase  = 360 * frac(x) + phi      in angle_t degrees
```

The phase error from the truncation is below 0.01°, which is well under the
table's step. `phi` must lie in [-360°, +360°) so that the sum stays inside
`angle_t`.

The cosine itself comes from `trig_lut720`. This is a table of 720 entries, one
per half degree, indexed by the angle truncated to a half degree and reduced
modulo 720. Entry `i` is `floor(cos(i * 0.5°) * 1024)`. The sine is the same
table read at `x + 270°`. The table is computed at elaboration by a constant
function, so no data file is needed. The reference design uses this direct
table because it is fast and uses no multiplier. Its alternatives (a 360-entry
table, a two-stage quarter-wave table, Taylor series, CORDIC) are not built.

A table read has one clock of latency and accepts a new angle every clock.

## The single-ray generators

`jakes_single` evaluates all M + 1 = 9 sinusoids in parallel. Its per-term
constants are computed at elaboration from the formulas above:

- `cos(2 pi n / N)` as `trig_t`;
- the weights `2/sqrt(N) a_n` and `2/sqrt(N) b_n` with 15 fraction bits.

The pipeline has five stages: input register, Doppler phase, table, weighting,
sum. `valid` rises five clocks after reset is released. From then on there is
one output per clock.

`xiao_single` has eight `xiao_branch` units in parallel. Each branch has a
4-stage pipeline:

1. It looks up `cos(alpha_n)` from `theta` and `cos/sin(psi_n)`.
2. It forms the Doppler phase.
3. It looks up the cosine of that phase.
4. It forms the two products.

The products are summed and scaled by `2/sqrt(M)`. The latency is 5 clocks.

Each `psi_n` has its own free-running 24-bit PN generator. A pulse on `reseed`
loads all `psi_n` at once with 17 bits of their generators, a uniform angle in
0..4096°. After reset the phases hold the reference design's initial values.

## The six-ray generator: one branch per path, shared over the terms

Six copies of the parallel Xiao generator would not fit the FPGA of the
reference design. Instead, each path has a single `xiao_branch` that is
time-shared over the M = 8 terms. The sequence is:

- A counter `J` runs 1..8.
- `fd`, `t`, `theta_k` and `phi_k` are sampled at `J = 1` and held for the
  frame.
- One term per clock enters each path's branch.
- Each path accumulates its eight products. The accumulator restarts at the
  first term of every frame.
- One clock after the last term the scaled sums of all six paths are
  registered and `valid` pulses.

The coefficients of a frame appear on the 11th rising edge after the edge that
samples its inputs. After that a new set appears every 8 clocks.

The phases `psi_{n,k}` are a 6 × 8 register file. After reset, `psi_{1,k}` is
the reference design's initial value for path `k`, and `psi_{2..8,k}` are the
single-ray initial phases. Each path has its own PN generator, with seeds PN1
to PN6.

**Reseeding is this design's own scheme.** A pulse on `reseed` is remembered
until the next frame starts. Then a 16-frame sequence runs. In its frame
2(n-1), `psi_{n,k}` is loaded at `J = n` from the low 17 bits of generator `k`.
Successive loads are therefore 17 generator shifts apart and use disjoint bits.

Loading all eight phases from eight successive generator states would make
them shifted copies of one another. That measurably correlates the terms and
spoils the statistics. A new phase applies from the frame after its load. A
request that arrives during a sequence starts another sequence afterwards.

## Timing summary

| Module | Accepts | Latency | Output |
|---|---|---|---|
| `trig_lut720` | angle every clock | 1 | cos, sin |
| `doppler_phase` | every clock | 1 | phase |
| `xiao_branch` | every clock | 4 | re, im products (20 fraction bits) |
| `jakes_single`, `xiao_single` | every clock | 5 | `re`, `im`, `valid` |
| `xiao_multipath` | inputs sampled at `J = 1` | 11 edges | `coef[6]`, `valid` pulse every 8 clocks |
| `pn_gen` | shifts while `en` | – | `state`, `bit_o` |

The PN generator is a 24-stage shift register. Register bits 23 and 5 are
XOR-ed into bit 0 (feedback taps (23, 5, 0)). `reset` loads the seed.

## Where this RTL departs from, or adds to, the reference design

- **Reference values.** The thesis prints expected outputs for its examples:
  Jakes 1.51276 / -0.18775 and Xiao 0.60437 / 0.69197. These do not follow
  from its own formulas with its inputs. The formulas give about 0.515 / -0.074
  and 0.410 / 0.524. The testbenches therefore check against the formulas,
  computed in floating point with the same table quantisation.
- **psi_2 value.** The initial phase psi_2 is taken from its binary form,
  18'b0_000000010111_10101 = 23.65625°. psi_8 is likewise taken as 277.90625°.
- **How long phases are held.** `psi` is held until a reseed rather than
  redrawn automatically. `theta_k` and `phi_k` are inputs. The thesis does not
  say how often they change.
- **Path phases beyond the first.** The thesis lists only one initial phase per
  path. `psi_{2..8,k}` default to the single-ray values.
- **Frequency accuracy.** The arrival-angle cosines are quantised to 10
  fraction bits. The Doppler frequency of a term can therefore be off by up to
  about 0.05 %. At large `fd * t` this accumulates into a phase offset, for
  example up to one cycle at 2000 Hz after 1 s.
- **Phase range.** The phase drawn from 17 PN bits spans 0..4096°, which is
  11.4 turns. It is therefore slightly non-uniform modulo 360°. The reference
  design has the same property.
- **Table storage.** Each branch has its own tables: 51 copies of the
  720 × 12-bit table in the top module. On an FPGA these map to block or
  distributed ROM.
- **Not built.** The rest of a channel simulator is not built: the tapped delay
  line with path delays and gains, noise, the DSP, the PCI host interface and
  the converters. The Taylor and CORDIC variants are not built either.

## Fit to the intended use

The thesis targets Doppler shifts up to 2000 Hz. At 150 km/h and 2 GHz the
shift is 279 Hz. About 292 coefficient sets per second per path are needed
there. The `fd` input covers 0..4095 Hz. At 100 MHz the six-ray generator
delivers 12.5 M sets per second per path.

## Testbenches

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_trig_lut720` | every half-degree step, random angles and streaming against the table formula and true cos/sin; the 240° example (`12'b1101_1111_1111`) |
| `tb_pn_gen` | the recurrence for all eight seeds; hold while `en` is low; reload on reset |
| `tb_jakes_single` | 3000 inputs against the formula (tolerance 0.01), latency 5 |
| `tb_xiao_single` | inputs and two reseeds against a floating-point model with a PN model, latency 5 |
| `tb_xiao_multipath` | the reference design's `theta_k`, `phi_k` and `psi_{1,k}`, three reseeds, first `valid` at edge 11, spacing of 8 |
| `tb_rayleigh_sim_top` | all three generators at default parameters, with counts of each mechanism (a six-ray reseed that waits for the next frame, one that starts at a frame boundary, one requested while a reseed sequence runs, single-ray reseeds, back-to-back outputs) |
| `tb_xiao_stats` | 20 realisations × 400 samples at `fd * tau` = 0.025: auto- and cross-correlation of the real and imaginary parts against J0 and 0, Re E[X X*] against 2 J0, envelope against the Rayleigh distribution |
| `tb_multipath_stats` | 60 realisations × 300 sets for all six paths: auto-correlation against J0, cross-correlation between paths, pooled envelope against the Rayleigh distribution |

`tb_ref_pkg` holds the floating-point reference functions.

In `tb_multipath_stats`, a single path is only eight sinusoids with close
frequencies. Its time-averaged power per path therefore scatters between about
0.5 and 1.3. The test bounds each path loosely. It checks the average over the
six paths tightly: power within 1 ± 0.15, mean |R - J0| below 0.15 (observed
0.99 and 0.10).

To simulate with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rf_pkg.sv tb/tb_ref_pkg.sv tb/tb_rayleigh_sim_top.sv \
    --top-module tb_rayleigh_sim_top
./obj_dir/Vtb_rayleigh_sim_top
```

Replace the testbench name to run another one. All of them finish in seconds.
