# CORDIC phase estimator for grid synchronisation

A converter that feeds a three-phase grid must know the grid voltage's phase
angle at every sample. Distributed-generation inverters, STATCOMs and active
filters all need it to build their current references. This repository holds
synthesizable SystemVerilog for an estimator that works in the stationary
(alpha-beta) reference frame. It has no feedback loop. The three phase
voltages are projected onto two orthogonal axes, filtered, and scaled to a
unit vector. The vector is then rotated back by the lag the filters
introduced, and its angle is read off. All trigonometry (vector length,
rotation, arctangent) is done by CORDIC: shifts and adds, with no
multipliers apart from a few constant scalings.

The structure follows the CORDIC-based stationary-reference-frame estimator
of the B.Tech thesis *Phase Estimation for Grid Synchronization of DG System
Using CORDIC Algorithm* (NIT Rourkela, 2013). That work gives the block
diagram, the CORDIC iterations and a 16-bit hardware model. The filter, the
number formats, the pipelining and all interface details here are this
design's own choices, listed in the section on departures.

## Signal chain

```
 v_a ─┐                 ┌─ lpf ─ v_alpha_lp ─┐   normalizer            rm_cordic          atan_cordic
 v_b ─┼ clarke_transform┤                    ├─ vm_cordic ─|v|─┐      (rotate by         (atan2)
 v_c ─┘   (abc → αβγ)   └─ lpf ─ v_beta_lp ──┘   two dividers ◄─┘ ──►  +phi_comp) ──────►  theta
                                                  cos(θ-φ), sin(θ-φ)   cos θ, sin θ
```

| stage | module | what it does | latency (clocks) |
|---|---|---|---|
| Clarke transform | `clarke_transform` | α = ⅔(v_a − v_b/2 − v_c/2), β = (v_b − v_c)/√3, γ = ⅔·(v_a+v_b+v_c)/√2 | 1 |
| filters | `lpf` (×2) | first-order low-pass, y += (x − y)/2^LPF_SHIFT | 1 |
| normalisation | `normalizer` = `vm_cordic` + 2 × `fixed_divider` | \|v\| by vectoring CORDIC, then α/\|v\| and β/\|v\| | ITER+2 + 17 |
| delay compensation | `rm_cordic` | rotates the unit vector by `phi_comp` | ITER+2 |
| angle | `atan_cordic` | θ = atan2(sin, cos) | ITER+2 |

All modules share `strf_pkg` (formats, the CORDIC angle table, the inverse
gain) and the one-iteration helper `cordic_stage`. With the defaults
(ITER = 16) a sample reaches `theta` **73 clocks** after it enters. One sample
is accepted every clock. Samples may also come at any lower rate: every
stage moves a valid bit along with its data, and the filters update only on
valid samples.

## Why filter, normalise and rotate

If the grid is balanced and clean, (v_α, v_β) = V·(cos θ, sin θ), and
θ = atan2(v_β, v_α) straight away. Harmonics and unbalance bend that circle.
Low-pass filters bring it closer to the fundamental again. But the filters
lower the amplitude, which also varies with sags and swells. They also make
the vector lag by an angle φ. The chain undoes both effects:

* **Normalisation** divides both components by the vector's length. The
  result (cos(θ−φ), sin(θ−φ)) does not depend on the amplitude. A 0.7 p.u.
  sag yields the same unit vector as a 1 p.u. grid.
* **Delay compensation** rotates that unit vector forward by φ. Both axes
  pass through identical filters and so lag by the same φ, so one rotation
  restores (cos θ, sin θ).

φ is not computed in hardware: it is the input `phi_comp`. At a fixed grid
frequency the filter's lag is a constant. For the first-order filter with
a = 2^−LPF_SHIFT and ω = 2π·f_grid/f_sample:

    phi = atan2((1 − a)·sin ω, 1 − (1 − a)·cos ω)

With LPF_SHIFT = 3, 50 Hz and 10 kHz sampling, φ = 0.2157 rad
(`phi_comp` = 1767). With `phi_comp` = 0 the estimate simply lags by φ. With
LPF_SHIFT = 0 the filter is a plain register and no compensation is needed.

## The CORDIC pipelines

The three CORDIC units share one micro-rotation stage, `cordic_stage`. Stage i
computes

    x' = x − d·(y >>> i),   y' = y + d·(x >>> i),   z' = z − d·atan(2^−i)

The three units differ only in how d is chosen and in what they do before
and after the iterations.

* **Rotation mode** (`rm_cordic`): d = sign(z), which drives the residual
  angle z to zero. The input angle is first wrapped into [−π, π]. A
  pre-rotation by ±90° (x,y → −y,x or y,−x) then brings it into [−π/2, π/2],
  well inside the ±1.74 rad range over which the iterations converge.
* **Vectoring mode** (`vm_cordic`, `atan_cordic`): d = −sign(y), which
  drives y to zero. z collects the angle and x ends as K·|v|. A vector in the
  left half plane is first turned by ±90°, and z starts at ±π/2. A zero
  vector has no direction and is reported with angle 0.
* **Gain**: every micro-rotation lengthens the vector by √(1 + 2^−2i). After
  all stages the gain is K ≈ 1.64676. `vm_cordic` and `rm_cordic` remove it
  with one constant multiplication by 1/K = 0.6072529 (Q0.18, 159188).
  `atan_cordic` returns only an angle, and K does not change angles, so it
  skips the multiplication.

The atan(2^−i) table sits in `strf_pkg::atan_elem`, as round(atan(2^−i)·2^16)
for i = 0…16. Inside the pipelines x and y are 20-bit Q4.16 words: two extra
integer bits for the gain on vectors up to 2√2 long, and two guard bits.
Angles are 19-bit Q3.16. Results are rounded back to the 16-bit boundary
formats at the end. Fully unrolled, each iteration is one pipeline register
stage, so a CORDIC unit accepts a vector every clock.

## Division

`fixed_divider` computes q = a/b in Q2.14 by restoring long division, one
quotient bit per stage (15 stages plus an input and an output register, 17
clocks). The dividend's magnitude is pre-shifted by 14 bits, so the integer
quotient is already Q2.14. The quotient is truncated toward zero. When it
would reach 2.0, every trial subtraction succeeds and all quotient bits come
out as ones, so the result saturates to ±1.99994 with no extra logic. A zero
divisor gives q = 0 and raises `div_by_zero`, which the estimator passes on
as `zero_vec`. In normal operation the divisor is the vector's length, so
|q| ≤ 1.

## Number formats

| quantity | format | 1.0 / π |
|---|---|---|
| voltages (inputs, α, β, γ, cos, sin, \|v\|) | signed 16-bit Q2.14 | 1 p.u. = 16384, range ±2 p.u. |
| angles (`phi_comp`, `theta`) | signed 16-bit Q3.13, radians | π = 25736 |

`theta` lies in (−π, π]. `phi_comp` may be anything in [−4, 4) rad.

## Top-level interface (`strf_phase_estimator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears valid bits and filter states) |
| `in_valid`, `v_a`, `v_b`, `v_c` | in | 1, 16×3 | a grid sample |
| `phi_comp` | in | 16 | filter lag to compensate; keep it constant while samples are in flight |
| `lp_valid`, `v_alpha_lp`, `v_beta_lp`, `v_gamma` | out | 1, 16×3 | filtered α, β and the zero-sequence γ, 2 clocks after the sample, with `lp_valid` |
| `out_valid`, `cos_theta`, `sin_theta`, `theta` | out | 1, 16×3 | the estimate, 73 clocks after the sample |
| `v_mag`, `zero_vec` | out | 16, 1 | length of the filtered vector and a zero-vector flag, aligned with `theta` |

Parameters: `LPF_SHIFT` (default 3) and `ITER` (default 16; the legal range
is 12–17, because 1/K is a single constant). Changing `ITER` changes the
latency to 3·ITER + 25 clocks.

## How well it works

`tb/tb_strf_phase_estimator.sv` runs the design at its default parameters.
The input is a 50 Hz grid sampled at 10 kHz. Every output is compared with a
floating-point model of the same chain, within 0.002 rad and 0.002 p.u. The
results for each grid condition:

| grid condition | result |
|---|---|
| balanced 1 p.u. | estimate within 0.01 rad of the true grid angle |
| compensation off (`phi_comp` = 0) | estimate lags the grid by the filter lag φ (within 0.01 rad) |
| 50° phase jump | back within 0.01 rad of the grid angle after 26 samples (2.6 ms) |
| 0.3 p.u. of 5th and 6th harmonics on each phase | largest deviation from the fundamental's angle 0.21 rad |
| single-phase fault (v_a = 0) | largest deviation 0.52 rad: the unbalance shows up as a negative-sequence ripple that a first-order filter does not remove |
| 0.3 p.u. sag | within 0.01 rad; output vector still of unit length |
| outage (all phases 0) | `zero_vec` set, outputs 0 |
| one sample every third clock | same accuracy |

`tb/tb_strf_unfiltered.sv` runs the chain with filtering and compensation
switched off (`LPF_SHIFT` = 0, `phi_comp` = 0). The input is an ideal grid,
then one period sagged to 0.7 p.u. The estimate then tracks the grid angle
sample by sample, within 0.003 rad. The output vector keeps unit length
through the sag.

The harmonic and fault figures depend mainly on the filter. A lower cut-off
(larger `LPF_SHIFT`) cuts the error but slows the response to a jump. With
LPF_SHIFT = 3 the filter's time constant is about 8 samples.

Each block also has its own testbench in `tb/`. Each compares the block's
outputs with values computed independently (floating-point maths, or exact
integers for the divider) on thousands of random and directed inputs, and
checks the latency.

## Departures from the published design

* **Filter**: the original names a "filter" on each axis but does not
  specify it. Here it is a first-order exponential smoother, chosen as the
  simplest multiplier-free low-pass.
* **Compensation angle**: where φ comes from is not specified. Here it is
  the input `phi_comp`.
* **Hardware model vs. block diagram**: the original 16-bit hardware model
  shows no filters and ends in an arctangent block that outputs θ. The block
  diagram ends at cos θ, sin θ. This design has both: the filters and
  compensator from the diagram, and the arctangent from the hardware model.
  All three outputs are brought out.
* **Divider ports**: the original divider has a separate fractional output
  and a ready-for-data flag. Here the fraction is part of the Q2.14 quotient,
  and a fully pipelined divider is always ready, so neither port exists.
* **Transform scale**: the α-β-γ matrix is used with the amplitude-invariant
  ⅔ factor. With it a 1 p.u. grid gives a 1 p.u. vector. A power-invariant
  √(2/3) scale would only change the vector's length, which normalisation
  removes anyway.
* **Printed equation slips followed the working form**:
  * The rotation output is x·sin δ **+** y·cos δ.
  * Vectoring chooses its direction from the sign of y, not of the angle.
* **Arctangent**: four-quadrant atan2 rather than atan(β/α), so the estimate
  covers the full turn.
* **CORDIC architecture**: fully pipelined, 16 iterations. The original
  relies on a vendor CORDIC core and does not say which architecture or how
  many iterations.
* **Not included**: the synchronous-reference-frame PLL that the original
  uses only as a baseline. There is also no positive-sequence extraction, so
  unbalanced grids leave a ripple on the estimate (see the fault case
  above).

## Simulating

Each testbench is self-contained and ends by printing
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/strf_pkg.sv \
    tb/tb_strf_phase_estimator.sv --top-module tb_strf_phase_estimator -o sim
./obj_dir/sim
```

Replace the testbench name with `tb_strf_unfiltered`, or with any of `tb_clarke_transform`, `tb_lpf`,
`tb_vm_cordic`, `tb_fixed_divider`, `tb_normalizer`, `tb_rm_cordic` or
`tb_atan_cordic` to test a single block. Each run takes well under a second.
The end-to-end testbench also prints the filter lag it applies, the error
figures above, and how often each mechanism occurred.

## Files

`rtl/`: `strf_pkg.sv` (package), `cordic_stage.sv`, `vm_cordic.sv`,
`rm_cordic.sv`, `atan_cordic.sv`, `fixed_divider.sv`, `normalizer.sv`,
`clarke_transform.sv`, `lpf.sv`, `strf_phase_estimator.sv` (top).
`tb/`: one `tb_<module>.sv` per module above except the package and the
stage helper, plus `tb_strf_unfiltered.sv` for the top without filtering.
