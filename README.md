# Two-level table-lookup DDFS

This design is a direct digital frequency synthesizer (DDFS). It produces
a cosine sample and a sine sample every clock, with N fractional bits each
(N = 16 by default).

A plain table-lookup DDFS needs about 2^N/8 table words. This one needs three
tables addressed by only N/4 bits, with 544 bits in total at N = 16. It gets
the rest of its accuracy from a short Taylor expansion and from a
three-multiplication form of the angle-addition rotation. There are four
multipliers, all narrower than N x N except for one (N+1) x 3N/4.

At N = 16 the folded cos/sin stay within 2.5 LSB of the exact values at every
angle of the first octant, with 0.64 LSB rms. The full outputs stay within
2.8 LSB over the 117,000 phases of the end-to-end test. The spurious-free dynamic range (SFDR)
measures 106 dBc from 6 kHz to 10 MHz with a 100 MHz clock.

## Signal flow

```
 fcw ─► phase_accumulator ─► angle_mapper ──octant (3)──────────────────┐
        (radians, mod 2π)     │                                         ▼
                              └─theta (N)─► sincos_generator ─p1,p2,p3─► combine_mirror ─► cos_o, sin_o
                                            ├ cos_rom / sin_rom (alpha)
                                            ├ cube_rom (gamma)
                                            ├ beta_unit
                                            └ product_unit
```

| Module | Role |
|---|---|
| `phase_accumulator` | `phase <= (phase + fcw) mod 2π`. This is the only register in the design. |
| `angle_mapper` | Finds the octant (0..7) of the phase and folds the phase to `theta` in [0, π/4]. |
| `cos_rom`, `sin_rom` | cos(alpha) and sin(alpha). Each is N x 2^(N/4) bits. |
| `cube_rom` | gamma³/6. Only its N/4-2 nonzero bits are stored. |
| `beta_unit` | Computes the Taylor terms of cos(beta) and sin(beta). |
| `product_unit` | Forms the three rotation products p1, p2 and p3. |
| `sincos_generator` | Wrapper for the three ROMs, `beta_unit` and `product_unit`. |
| `combine_mirror` | Computes cos/sin(theta) from p1..p3, then unfolds them to the full phase. |
| `tltl_ddfs` | Top level. |
| `tltl_pkg` | Constants (multiples of π/4) and the functions that fill the tables at elaboration. |

## Number formats

Every angle is a radian value in unsigned fixed point with N fractional bits.

- **`fcw`** is N+1 bits wide and must satisfy 0 < fcw < π/2. An assertion
  checks this.
- **Phase** is N+3 bits wide (2π < 8). It wraps at P = round(2π·2^N), which is
  411775 for N = 16, not at a power of two.
- **Output frequency** is f_out = fcw · 2^-N / (2π) · f_clk. The tuning step
  is f_clk / P, which is 243 Hz at 100 MHz.
- **`cos_o` and `sin_o`** are N+1-bit two's complement values with N
  fractional bits. −1.0 is exact. +1.0 is not representable and saturates to
  1 − 2^-N.

Holding the phase in radians saves a multiplication by π/4 between the
accumulator and the generator. The Taylor terms below need the angle in
radians, so the price is a non-binary wrap in the accumulator and seven
constant comparisons in the mapper.

## The two table levels

The mapper gives `theta` in [0, π/4]. It is split as follows:

- **alpha = theta[N-1:3N/4]**: the top N/4 bits, used to address the COS and
  SIN ROMs.
- **beta = theta[3N/4-1:0]**: the rest. beta < 2^-(N/4).
- **gamma = theta[3N/4-1:N/2]**: the top N/4 bits of beta, used to address
  `cube_rom`.

**First level (angle addition).** cos(alpha+beta) and sin(alpha+beta) take four
multiplications written directly. With three products they take three:

```
p1 = cos α · cos β
p2 = sin α · sin β
p3 = (cos α + sin α)(cos β + sin β)
cos θ = p1 − p2
sin θ = p3 − p1 − p2
```

**Second level (beta).** Expand cos β and sin β around gamma. Replace cos γ and
sin γ by their own low-order series. Drop every term below 2^-N. What remains
is:

```
cos β ≈ 1 − (β − γ/2)·γ
sin β ≈ β − γ³/6
```

- γ/2 is a multiple of 2^-N, so β − γ/2 is exact in 3N/4 bits.
- (β − γ/2)·γ is below 2^-(N/2+1). It comes from a 3N/4 × N/4 multiplier and
  keeps N/2 bits.
- γ³/6 is below 2^-(3N/4+2), so only N/4−2 bits are stored. For N = 16 that is
  16 entries of 2 bits.

**Products.** Putting the two levels together:

```
p1 = cos α − cos α · bg                 N × N/2 multiplier,       bg = (β−γ/2)γ
p2 = sin α · sin β                      N × 3N/4 multiplier
p3 = cs + cs · d                        (N+1) × 3N/4 multiplier,  cs = cos α + sin α,
                                                                  d  = sin β − bg  (≥ 0, < 2^-(N/4))
```

Each product is rounded to nearest N fractional bits. The rounding is done by
adding a half-LSB constant into the multiplier. With plain truncation instead,
the errors of the four products all push cos θ the same way. That raises its
worst-case error from 2.0 to 3.6 LSB and lowers the SFDR from 106 to 103 dBc.
With rounding, the worst case over all angles is 2.0 LSB for cos θ and
2.5 LSB for sin θ.

## Octant folding and mirroring

The mapper compares the phase with the boundaries T(k) = round(k·π/4·2^N),
for k = 1..7:

- In an even octant k, `theta` = phase − T(k).
- In an odd octant k, `theta` = T(k+1) − phase.

`combine_mirror` first clamps cos θ and sin θ to [0, 1]. Then, using the octant
number k:

| Octant k | swap cos/sin | negate cos | negate sin |
|---|---|---|---|
| 0 | | | |
| 1 | ✓ | | |
| 2 | ✓ | ✓ | |
| 3 | | ✓ | |
| 4 | | ✓ | ✓ |
| 5 | ✓ | ✓ | ✓ |
| 6 | ✓ | | ✓ |
| 7 | | | ✓ |

In logic terms: swap = k[0]⊕k[1], negate cos = k[1]⊕k[2], negate sin = k[2].

## Timing

Only the phase is registered. Everything from the phase register to
`cos_o`/`sin_o` is combinational: two multipliers and two adders deep,
plus the mapper.

After the k-th rising edge since reset, the outputs hold cos/sin of
(k·fcw mod 2π). A change of `fcw` takes effect at the next edge with no phase
jump.

`rst_n` is an asynchronous, active-low reset that sets the phase to 0. After
reset, `cos_o` reads +1.0, saturated to 1 − 2^-N.

For a faster clock, put a register after `angle_mapper`, or between
`sincos_generator` and `combine_mirror`. Delay the octant by the same number of
stages.

## Parameters

`N` is the only parameter. It is the output precision in fractional bits. It
must be a multiple of 4 and at least 12, and the table functions in `tltl_pkg`
are exact up to about N = 24.

All sizes follow from N:

- Phase: N+3 bits.
- ROMs: 2 × N × 2^(N/4) bits, plus (N/4−2) × 2^(N/4) bits.
- Multipliers: N × N/2, N × 3N/4, (N+1) × 3N/4 and 3N/4 × N/4.

## Where this RTL makes its own choices

The algorithm, table sizes, bus widths and multiplier sizes are those of the
published architecture. The following points are choices of this
implementation:

- **Radian phase.** The phase and `fcw` are radians, so the wrap is at
  round(2π·2^N), not at a power of two.
- **Angle mapper.** Its insides (comparisons with round(k·π/4·2^N)) and the
  octant code are this implementation's own.
- **Rounding.** ROM entries are rounded to nearest, with cos(0) saturated to
  1 − 2^-N. Products are rounded to nearest by adding a half-LSB constant.
- **Output format.** Outputs are two's complement and saturate at +1.0.
  cos θ and sin θ are clamped to [0, 1] before mirroring.
- **Registers and reset.** There is no pipelining and no input or output
  register. The reset is asynchronous, active low.
- **Omitted parts.** A "control logic" block of the original gate-count
  figures is not described anywhere, so it is not built. The DAC that normally
  follows a DDFS is outside this RTL; `cos_o` and `sin_o` are the ports where
  it would connect.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` at the end. To run
one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/tltl_pkg.sv tb/tb_tltl_ddfs.sv \
          --top-module tb_tltl_ddfs -Mdir obj && ./obj/Vtb_tltl_ddfs
```

| Testbench | What it checks |
|---|---|
| `tb_phase_accumulator` | The register against an integer model, with random `fcw` including the largest legal word, plus reset and wraps. |
| `tb_angle_mapper` | All 411775 phases. |
| `tb_cos_rom`, `tb_sin_rom`, `tb_cube_rom` | Every entry against `$cos`, `$sin` and real arithmetic. |
| `tb_beta_unit` | All 4096 beta values: exact integers, and cos β and sin β within 2 LSB. |
| `tb_product_unit` | 20000 random operand sets against the product formulas. |
| `tb_combine_mirror` | Random inputs in all octants, against a table written out per octant. |
| `tb_sincos_generator` | Every theta in [0, π/4]: cos θ and sin θ within 4 LSB, rms below 1 LSB. |
| `tb_tltl_ddfs` | The full design at N = 16. See below. |
| `tb_ddfs_sizes` | The full design at N = 12, 20 and 24, side by side, within 4 LSB of each precision. |
| `tb_sfdr` | SFDR of the full design. See below. |

**`tb_tltl_ddfs`** assumes a 100 MHz clock. It steps through 1 kHz, 10 kHz,
100 kHz, 1 MHz and 10 MHz, then the largest `fcw`, switching on the fly. It
compares every sample with cos/sin of a reference phase, within 4 LSB. It also
requires that each of the following happens at least once: a 2π wrap, every
octant, mirrored octants, a frequency switch and the saturated +1.0 output.

**`tb_sfdr`** picks control words for which the output sequence repeats
exactly after M = P / gcd(fcw, P) samples. It captures one period and takes an
exact DFT, so no window is needed. It requires at least 100 dBc on both
outputs. Measured results:

| fcw | f_out at 100 MHz | SFDR cos | SFDR sin |
|---|---|---|---|
| 25 | 6.07 kHz | 106.2 dBc | 106.3 dBc |
| 175 | 42.5 kHz | 106.4 dBc | 106.0 dBc |
| 4200 | 1.02 MHz | 106.4 dBc | 106.0 dBc |
| 41125 | 9.99 MHz | 106.4 dBc | 106.0 dBc |

All control words of the form 175·K, with K coprime to 2353, visit the same
set of phases in a different order. Their spectra are permutations of one
another, which is why the last three rows match.

## Known differences from the published results

- **SFDR.** The published design reports 102.5–111 dBc over 1 kHz–10 MHz,
  with at least 100 dBc everywhere. This RTL measures a flat 106 dBc. It
  meets the lower bound but not the peaks. The gap most likely comes from
  rounding details that were not published, and from how the original SFDR
  was measured (not given).
- **Gate count and delay.** The published 16-bit design reports 2,797 gates
  and 6.7 ns in a 0.25 µm library. Neither figure has been reproduced here.
