# Hybrid LUT/CORDIC sine and cosine unit (10-bit, first quadrant)

This unit computes `sin(θ)` and `cos(θ)` for a joint angle in 0–90°. The angle
comes in as a 10-bit code with 0.125° per LSB, and each result is a 10-bit
fraction (2⁻¹⁰ per LSB). It is sized for servo-joint control of a robot
manipulator, where the whole trigonometric unit has to stay small.

The main idea is to trust a small CORDIC where it is good and patch it where it
is not. A 10-bit iterative CORDIC with nine iterations is cheap, but its
quantisation error piles up in two narrow bands: sine near 90° and cosine near
0°. There the CORDIC can be off by up to 0.08. The true values are all close to
1.0, and in 10 bits they differ only in their last two bits. A ROM of four
2-bit words holds those bits. Two comparators on the input angle then choose,
for each output, between the CORDIC result and the ROM value.

Over every angle code from 0 to 720, the RTL gives these errors (sine / cosine):

| | max abs error | mean squared error |
|---|---|---|
| CORDIC alone | 0.079 / 0.079 | 2.30e-4 / 2.30e-4 |
| hybrid (this unit) | 0.0089 / 0.0089 | 5.86e-6 / 5.89e-6 |

The hybrid error is about 9× smaller at worst and 97.5 % smaller on average.
The CORDIC-alone row is this same core with the LUT path switched off.

## Block diagram

```
            +--> cordic_core ----- X (cos), Y (sin) --+
            |      (alpha_rom inside)                 |
 theta -----+--> lut_correction -- LUT sin, LUT cos --+--> threshold_select --> sine, cosine
            |      (2 x lut_rom)                      |     (mux per output)
            +-----------------------------------------+--> comparators on theta
```

`hybrid_trig` is the top level and instantiates the other four modules. All of
them share the types and constants in `trig_pkg`.

## Number formats

| signal | width | format | range |
|---|---|---|---|
| `theta` | 10 | unsigned, 7 integer + 3 fraction bits, 0.125°/LSB | 0..720 (0–90°) |
| `sine`, `cosine` | 10 | unsigned, 10 fraction bits | 0 .. 1023/1024 |
| CORDIC residual angle `Z` | 10 | signed, 0.125°/LSB | |

For example, 85.375° is code `0x2AB`, and 0.994140625 is `0x3FA`. A result of
exactly 1.0 cannot be represented and saturates to `0x3FF`.

## The CORDIC core (`cordic_core`, `alpha_rom`)

This part needs the most explanation, because it is not a textbook CORDIC.

**Folded first step.** A classic rotation-mode CORDIC starts from (K, 0) with
K ≈ 0.6073. It then rotates by 45° and by ±26.57° (shifts 0 and 1). This core
does both steps in one cycle, and the outcome is one of two constant vectors:

* θ ≥ 45°: (X, Y) = (311, 933), pointing at about 71.6°. `Z ← θ − 71.625°`.
* θ < 45°: (X, Y) = (933, 311), pointing at about 18.4°. `Z ← θ − 18.5°`.

The numbers come from K = 622 (0.6073·1024): 311 = K − K/2 and 933 = K + K/2.
Written as a rotation constant, the lower start uses α₀ = −18.5° with direction
d₀ = −1 (the upper one α₀ = 71.625° with d₀ = +1). Both give the `Z` update above
through the usual rule `Z ← Z − d·α`, starting from `Z = θ`.

**Remaining iterations.** Iteration n (n = 1..8) uses shift n+1:

```
d = +1 if Z >= 0 else -1
X <- X - d * (Y >> (n+1))
Y <- Y + d * (X >> (n+1))
Z <- Z - d * alpha_n
```

The constants αₙ for n = 1..8 are 14, 7.125, 3.625, 1.75, 0.75, 0.5, 0.25 and
0.125 degrees. They are close to `atan(2^-(n+1))` but were not obtained by
rounding it (0.75° stands where 0.875° would be the rounded value). They were
picked so that the remaining error collects near 0° and 90°, where the LUT
takes over. A `Z` of exactly zero rotates in the positive direction.

**10-bit wrap-around.** `X` and `Y` are 10-bit unsigned registers. Shifts are
logical and sums wrap modulo 1024. When a value briefly goes negative, the next
shift therefore reads it as a large positive number. This costs accuracy at a
handful of low angles: the worst is sin(4.375°), which gives `0x045`
(0.0674 instead of 0.0763). That is the unit's largest error. The behaviour is
kept on purpose, so that the core matches the reference behaviour bit for bit,
including every intermediate value. If you want a cleaner core, sign-extend
`X` and `Y` by one bit. That lowers the error at those angles, but the results
will no longer match those of this unit.

**Frames.** The iteration counter runs freely through 0..8 and wraps. In
iteration 0 the core samples `theta`. There is no start input.

## The correction LUT (`lut_correction`, `lut_rom`)

Two sets of comparators sort `theta` into one of four groups, one set for sine
and one for cosine. The group index addresses a 4×2-bit ROM holding
00, 01, 10, 11. The result is `{8'hFF, rom[group]}`, so always 0x3FC..0x3FF.

| group | sine, θ (deg) | cosine, θ (deg) | value |
|---|---|---|---|
| 0 | 85.5 | 4.375 | 0x3FC |
| 1 | 85.625 – 86.375 | 3.5 – 4.25 | 0x3FD |
| 2 | 86.5 – 87.375 | 2.375 – 3.375 | 0x3FE |
| 3 | 87.5 – 90 | 0 – 2.25 | 0x3FF |

The sine column is exactly `min(floor(sin θ · 1024), 1023)`. The cosine column
is not mirrored from the sine column: it follows its own published breakpoints.
At 2.375°, 2.5°, 3.5° and 4.375° it sits about one LSB below `floor(cos · 1024)`.
This is kept as specified.

## Path selection (`threshold_select`)

* sine: LUT when θ ≥ 85.5° (code 684), CORDIC otherwise.
* cosine: LUT when θ < 4.5° (90° − 85.5°, code 36), CORDIC otherwise.

Both boundary angles are settled on purpose. At exactly 85.5° the sine uses the
LUT, and at exactly 4.5° the cosine uses the CORDIC. The threshold is the
parameter `TH` of `hybrid_trig` and `threshold_select`. The group boundaries
are tied to the default value, so changing `TH` also means revising the
tables in `trig_pkg`.

## Interface and timing of `hybrid_trig`

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | |
| `rst` | in | 1 | synchronous, active high |
| `theta` | in | 10 | angle code, 0..720 |
| `sine`, `cosine` | out | 10 | results |
| `valid` | out | 1 | high for one cycle per frame, when CORDIC-path results are final |

* The unit works in 9-cycle frames. `theta` is sampled at the clock edge that
  ends iteration 0, and the CORDIC result is final after nine edges. Hold
  `theta` stable for the whole frame, because the path selection follows the
  live input.
* A LUT-path output is combinational from `theta` and is correct in the same
  cycle as the angle.
* Between `valid` pulses, the CORDIC-driven outputs show intermediate iteration
  values. Sample them only while `valid` is high.
* Throughput is one angle per 9 cycles, and there is no back-pressure.
* After reset, `valid` stays low until the first full frame has finished.
* Codes above 720 (beyond 90°) are outside the supported range, and their
  results have no meaning.

## What is specified and what is chosen here

These parts follow the reference design:

* the 10-bit formats;
* the nine iterations and all rotation constants, including the two α₀ values;
* the 85.5° / 4.5° switching thresholds;
* the 4×2-bit ROM and its group values;
* the combinational LUT path.

The start vector, the shift schedule, the direction rule at Z = 0 and the
10-bit wrap-around are not spelled out there. They were reconstructed so that
all published intermediate values (at 85.375°, 85.5°, 4.375° and 4.5°) come out
exactly.

These parts are choices of this implementation:

* the synchronous reset;
* the `valid` output;
* the free-running frame counter, which was chosen because the reference
  interface has no start or valid pins;
* the θ = 45° boundary, which goes to the 71.625° branch;
* the two ROM copies, one for sine and one for cosine.

Not included:

* a quadrant-folding front end for angles outside 0–90°;
* wider word lengths.

Neither is part of this unit's main configuration. A folding stage would map
θ into 0–90° and swap or negate the two outputs.

One measured figure differs from the reference value. The reference gives
0.0098 as the worst sine error, but this RTL measures 0.0089 over all 721 codes.
The cosine worst case (0.0089) and both MSE values agree to within 0.5 %.

## Files

| file | contents |
|---|---|
| `rtl/trig_pkg.sv` | types, formats, constants (rotation angles, start vector, thresholds, group bounds) |
| `rtl/alpha_rom.sv` | rotation-constant table |
| `rtl/cordic_core.sv` | iterative CORDIC, counter, `done` |
| `rtl/lut_rom.sv` | 4×2-bit ROM |
| `rtl/lut_correction.sv` | group comparators and the two ROM reads |
| `rtl/threshold_select.sv` | threshold comparators and output multiplexers |
| `rtl/hybrid_trig.sv` | top level |
| `tb/tb_trig_ref_pkg.sv` | independent integer model of the CORDIC, exact sin/cos |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example, the end-to-end test runs all 721 angles and prints the error
statistics:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_hybrid_trig rtl/trig_pkg.sv tb/tb_trig_ref_pkg.sv tb/tb_hybrid_trig.sv
./obj_dir/Vtb_hybrid_trig
```

Swap in `tb_cordic_core`, `tb_lut_correction`, `tb_threshold_select`,
`tb_alpha_rom` or `tb_lut_rom` to test a single block. The testbenches check:

* `tb_cordic_core` compares all nine intermediate X/Y values of every angle with
  the model.
* `tb_hybrid_trig` checks:
  * same-cycle LUT outputs;
  * the nine-cycle `valid` timing;
  * the published example results;
  * the max-error and MSE bounds;
  * that each path and each start branch was used.
