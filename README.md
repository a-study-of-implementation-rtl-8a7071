# Digital signal processing for an adaptive array antenna

This RTL covers the digital core of an adaptive array antenna receiver that
samples at the intermediate frequency (IF). Each antenna element has one ADC.
Everything after the ADC is done in logic:

- bring each IF channel down to complex baseband;
- correct the gain and phase differences between the elements;
- steer a two-element beam onto the strongest arrival with maximum ratio
  combining (MRC);
- find the directions of several arrivals, coherent ones included, with the
  MUSIC method. MUSIC needs an eigenvalue decomposition (EVD), which is done by
  a CORDIC-based Jacobi processor.

The top module `adaptive_array_top` holds two engines side by side. They share
only the clock and the active-low asynchronous reset:

```
 adc1, adc2 ──► mrc_receiver ──────────────────────────────► bb1/bb2, w, y
                (2 × quasi-coherent detector → MRC-weight calibration
                 → weight calculation → combiner)

 doa_adc[4] ──► 4 × qcd_cal_channel ──► corr_matrix ──► spatial_smoothing
                (NCO with gain/phase     (8 × 8 real)    (forward-backward,
                 correction)                               on/off)
                                                              │
                                   host load/start/read ──► evd_processor
                                                         (Jacobi + CORDIC)
                                                              │
                          spectrum, doa_deg[2] ◄──────── music_spectrum
                                                        (noise subspace,
                                                         null search)
```

## Sampling at four times the IF: the quasi-coherent detector

The ADC runs at exactly four times the IF carrier, fs = 4·fc. Examples are a
1 MHz IF at 4 Msps, a 10 MHz IF at 40 Msps, or a 70 MHz IF undersampled at
40 Msps, which aliases to fs/4. At fs/4 the local oscillator samples are only
0 and ±1:

- cos(πn/2) is the sequence 1, 0, −1, 0;
- −sin(πn/2) is the sequence 0, −1, 0, 1.

So the NCO and mixer (`qd_nco_mixer`) are a 2-bit phase counter that selects
x, 0 or −x for the I and Q outputs. The counter advances on each valid sample.
The ADC word is 12-bit offset binary and is turned into two's complement by
inverting its MSB. Negating −2048 saturates to +2047.

Each mixer output goes through an 8-tap lowpass FIR (`da_fir_lpf`). The filter
removes the image at 2·fc = fs/2. Its coefficients {1, 10, 41, 76, 76, 41, 10, 1}
add up to 256, so the DC gain is exactly 1. At fs/2 the response is zero.

The filter uses distributed arithmetic, with no multipliers:

1. The four symmetric tap pairs are added first. Each sum is 13 bits.
2. Bit b of the four pair sums forms a 4-bit address into a 16-entry table of
   coefficient sums.
3. The 13 bit planes are weighted by 2^b and added together. The sign plane is
   subtracted.
4. The 26-bit result is rounded, shifted right by 8 and saturated to 12 bits.

The filter has four register stages. `qcd_channel` is one mixer feeding the I
and Q filters. Baseband comes out 5 cycles after the ADC sample, one sample per
clock, with no decimation.

## MRC beamforming for two elements

With baseband samples B1 and B2 of a wave from direction θ, and elements half a
wavelength apart, B2 = B1·e^(−jπ sin θ). The weights computed by
`mrc_weight_calc` are:

    W1* = |B1|²            (real)
    W2* = B1 · B2*         (complex)

- Each 12×12 product is shifted right by 9 and the sums are kept at 16 bits.
- Latency is 2 cycles.

The combiner `mrc_combiner` forms y = W1*·B1 + W2*·B2:

- Each 16×12 product is shifted right by 13.
- Both terms end up with the phase of B1, so they add in phase. This is the
  maximum-ratio combination.
- The direction of arrival can be read from any weight:
  θ = asin(arg(W2*)/π). This step is done in software, outside the RTL.

`mrc_receiver` delays the baseband by the 2-cycle weight latency, so each
weight multiplies the samples it was computed from.

## Calibrating the elements

Real elements differ in gain and phase. Two ways of correcting this are built.

**MRC-weight calibration (`mrc_calibrator`, inside the receiver).**

- Pulse `mrc_cal_start` while a calibration wave arrives from broadside.
  The block then averages r_rr = |x_r|², r_kk = |x_k|² and r_rk = x_r·x_k* over
  64 valid samples.
- It stores w_r = r_rr·r_kk and w_k = r_rk·r_rr. Both are scaled by one common
  power of two, so that the largest component lies in [2^14, 2^15).
- Multiplying by these weights makes both channels equal in amplitude and phase
  to the reference channel's phase.
- While `mrc_cal_en` is high, every later sample is multiplied by the stored
  weights, as (w·x) >> 15. Until a calibration is stored, or while `mrc_cal_en`
  is low, samples pass through with the same 1-cycle latency.
- The correction is strong for the beamformer. Because the weights contain the
  signal power, the calibrated amplitude rises roughly with the cube of the
  input amplitude. Small inputs therefore shrink, and large ones reach the
  12-bit limit. Calibrate and operate at similar input levels.

**NCO-control calibration (`nco_cal_mixer`, in the MUSIC detectors).**

- The switching mixer is replaced by a table NCO: a 32-bit phase accumulator
  and a 1024-entry cosine table computed at elaboration (1.0 = 2^14).
- Per element, a phase offset `doa_cal_phase` (2^16 = 2π) is added to the
  accumulator. An amplitude `doa_cal_amp` (2^14 = 1.0) scales the table
  outputs.
- An element with response g·e^(jε) is corrected by phase ε and amplitude 1/g.
  The phase resolution is 2π/1024.
- With phase 0 and amplitude 1.0 the outputs are bit-identical to the switching
  mixer. Latency is 3 cycles. With the two filters, the `qcd_cal_channel`
  latency is 7.

## MUSIC direction finding

MUSIC looks for the directions whose steering vectors are orthogonal to the
noise subspace of the array correlation matrix. The chain for K = 4 elements
and L = 2 waves is described below.

**Correlation (`corr_matrix`).**

- All K×K products x_i·x_j* are accumulated in parallel over 64 snapshots
  (2^6). The mean is shifted right by 9 more bits and saturated to 16 bits.
- The complex matrix R is turned into the real symmetric 2K×2K matrix
  [[Re R, −Im R], [Im R, Re R]]. Its eigenvalues are those of R, each twice.
- The matrix is streamed out one row per cycle, 8 rows in all.

**Spatial smoothing (`spatial_smoothing`).**

- Coherent waves, such as a direct path and its reflection, make the
  correlation matrix rank-deficient. MUSIC then puts its nulls in the wrong
  places.
- The unit restores the rank by averaging:
  - Forward subarray smoothing: the K elements are split into P = K − M + 1
    overlapping subarrays of M elements, and their M×M matrices are averaged.
  - Forward-backward averaging: the matrix of the array read backwards and
    conjugated, R[M−1−i][M−1−j]*, is averaged in.
- The default M = K keeps the full aperture and the 8×8 EVD. It uses only the
  forward-backward part, which is enough for two coherent waves on four
  elements.
- The rows are stored as they stream in. Once the last row is stored, the
  smoothed rows follow, one per cycle, each computed in a single cycle.
  Division by P or 2P is a rounded reciprocal multiply, exact for powers of
  two.
- `doa_smooth_en` low passes the plain matrix through with the same timing.
- Smaller M can be set on the module. The EVD and spectrum sizes must then be
  reduced to 2M and M.

**Eigenvalue decomposition (`evd_processor`).** This is the hard part.

- It is the cyclic Jacobi method on the 8×8 real matrix A. The pairs (p, q)
  are taken in row order, and 4 sweeps of 28 pairs are done. No convergence
  test is made.
- For each pair, the angle θ = ½·atan2(2·a_pq, a_qq − a_pp) zeroes a_pq.
- A is transformed on both sides as Pᵀ·A·P. The eigenvector matrix E is
  transformed as E·P.

Each pair takes four passes through one set of hardware, 17 cycles each:

| Pass | Work |
|---|---|
| 1 | `cordic_atan` vectors (a_qq − a_pp, 2·a_pq) to get 2θ. |
| 2 | Rows p and q of A are rotated by θ, by eight `cordic_dbl_rotator`s in parallel (`cordic_matrix_rotator`). |
| 3 | Two rotators turn the 2×2 block (p, q) from the right. Because A is symmetric, the rest of columns p and q equals the rotated rows, so rows p and q are written to `evd_matrix_ram` both as rows and as columns. |
| 4 | Rows p and q of Eᵀ are rotated. E is stored transposed, so that row k is eigenvector k and E·P is also a row rotation. |

Each pass starts on the cycle the previous result appears, and the next pair's
rows are read while pass 4 runs. A decomposition therefore takes 4 · 28 · 4 · 17 + 2 = 7618 cycles, which is
76.2 µs at 100 MHz. Afterwards the diagonal of A holds the eigenvalues and E the
eigenvectors, with 1.0 = 2^14.

**CORDIC details.**

- Both CORDIC units are unrolled to B + 1 = 17 stages, with a register after
  each stage. One result leaves per cycle.
- `cordic_atan` folds x < 0 by negating both inputs and carries 4 guard bits.
  The angle is 18 bits wide, with 2^17 = π.
- `cordic_dbl_rotator` performs the micro-rotation by atan(2^−k) twice in
  stage k. Each stage then turns by 2·atan(2^−k) with gain 1 + 2^−2k, so the
  total gain needs no square root. It is removed at the output by
  K = ½·∏(1 − 2^−(4i−2)), using shift-and-subtract steps instead of a
  multiplier. Stage 0 is an exact 90-degree turn. Data carry 5 guard bits and
  outputs are saturated to 16 bits.

**Spectrum (`music_spectrum`).**

- It reads the 8 eigenvalues and picks the 2(K − L) = 4 smallest. Ties go to
  the lower index.
- It then reads the matching eigenvectors. Each real eigenvector is the
  complex vector u + jv.
- For each angle from −90° to +90° in 1° steps it accumulates
  D(θ) = Σ |a(θ)ᴴ·u_k|², with a_k = e^(−jπk·sin θ). The steering table is
  computed at elaboration. One eigenvector is processed per cycle.
- D is the denominator of the MUSIC spectrum, with 2^14 = 1.0. It is streamed
  as `spec_valid`, `spec_angle` and `spec_den`. The L deepest local minima of D
  are the spectrum peaks and are reported in `doa_deg`.
- Start to done takes 181 · 8 + 2 · 8 + 7 = 1471 cycles.

**Chain and ports.**

- `doa_start` runs the whole chain. Correlation rows pass through the
  smoothing unit into the EVD load port. The EVD starts one cycle after the
  last row, and the spectrum unit starts when the EVD is done.
- From `doa_start` to `doa_done` takes 64 + 8 + 9 + 7618 + 1471 + 1 = 9171
  cycles, with a sample on every clock.
- The EVD processor also has a host port (`evd_ld_*`, `evd_start`, `evd_rd_*`).
  Any symmetric 8×8 matrix can be decomposed on its own through it while the
  chain is idle.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `adaptive_array_top` | `EVD_SWEEPS` | 4 | Jacobi sweeps |
| | `DOA_K` | 4 | MUSIC elements (EVD size 2·DOA_K) |
| | `DOA_L` | 2 | waves to locate |
| | `DOA_AVG_LOG2` | 6 | log2 of the snapshots averaged |
| `da_fir_lpf` | `COEFS`, `OUT_SHIFT` | see above | filter |
| `mrc_calibrator` | `CAL_LOG2` | 6 | log2 of the calibration average |
| `spatial_smoothing` | `M`, `FB` | K, 1 | subarray size, forward-backward on |
| `nco_cal_mixer` | `FTW`, `LUT_BITS` | fs/4, 10 | NCO frequency, table size |
| `music_spectrum` | `ANG_MIN`, `ANG_STEP`, `ANGLES` | −90, 1, 181 | scan grid |

Types and widths shared by the modules are in `rtl/aa_pkg.sv`: 12-bit ADC and
baseband, 16-bit weights and output.

## How far it can be trusted

Every module has a self-checking testbench in `tb/` that compares it with
values computed independently in the testbench.

- Detector and FIR are checked bit-exactly.
- Weights and combiner are checked exactly against integer models.
- CORDIC angle and rotation are checked against `$atan2`, `$cos` and `$sin`
  within a few LSB.
- The EVD is checked through the residuals |A·e − λ·e| and the orthogonality
  of E, on diagonal, random and degenerate matrices, and by its cycle count.
- The MUSIC spectrum is checked against a floating-point model on built
  eigenbases.

`tb/tb_adaptive_array_top.sv` runs the top at its default parameters:

- a two-element wave sweeping −60° … +60°, tracked within 2°;
- element errors of 0.8 at −20° and 0.55 at +50°, corrected by a broadside
  calibration, after which a wave from +30° is tracked again;
- three host decompositions;
- one MUSIC run on four elements with gain and phase errors, corrected through
  the NCO settings. Two waves at −5° and +20° are found to within 2°; in the
  run shown they are found exactly;
- a second MUSIC run with the two waves made coherent and smoothing on, which
  again finds −5° and +20° exactly. Without smoothing, the same data give 3°
  and −44°.

Each testbench was also run against a copy of its module with one deliberate
bug, and failed every time.

Limits:

- The MUSIC chain was exercised with two waves, uncorrelated and coherent,
  at one pair of directions and levels. The number of waves L is a fixed
  parameter, not estimated from the eigenvalues.
- With 64 snapshots, residual cross-correlation between the waves can move a
  null by a degree or two. For example, with larger and closer amplitudes the
  +20° wave came out at +22°.
- The Jacobi processor always runs a fixed number of sweeps. The tests require
  every residual |A·e − λ·e| to stay below 1% of the largest eigenvalue after
  four sweeps at 16 bits.
- The design was checked in simulation only. No clock rate or FPGA resource
  figures come from an implementation run.

## Where this design departs from the described system

- **CORDIC pipelining.** The CORDIC cascades are registered per stage rather
  than purely combinational. The Jacobi schedule still spends B + 1 = 17 cycles
  per operation. Its 7618 cycles stay within the cycle budget of
  (4·N(N−1)·2 + 1)·(B + 1) = 7633 for N = 8, B = 16.
- **FIR output scaling.** The FIR output is the sum divided by the coefficient
  sum, then saturated. It is not the top 12 of 26 bits, which would discard six
  bits of a 12-bit signal.
- **Scaling, averaging and coefficients.** All scaling shifts, averaging
  lengths, the FIR coefficients, the table sizes and the handshakes are choices
  of this design.
- **Calibration weight normalisation.** The MRC-weight calibration normalises
  its weights by a power of two, so that a stored calibration cannot overflow.
- **Spatial smoothing scheme.** The smoothing is forward-backward averaging
  with optional forward subarrays, a standard choice for this step.
- **Where the NCO calibration is used.** It is applied in the four MUSIC
  detectors. The two-element receiver uses the switching mixer and the
  MRC-weight calibration.
- **Not built:**
  - the DOA arctangent/arcsine of the receiver, and the 1/D division of the
    MUSIC spectrum (both are left to software);
  - the ADCs, the sample buffer memory, the control processor and the
    board-to-board link used to grow the array to 12 elements.

## Simulating

Any testbench runs with Verilator 5 from the repository root. For example, the
full end-to-end test:

```
verilator --binary --timing -Wno-fatal -j 0 --top-module tb_adaptive_array_top \
    rtl/aa_pkg.sv rtl/*.sv tb/tb_adaptive_array_top.sv
./obj_dir/Vtb_adaptive_array_top
```

List `rtl/aa_pkg.sv` first, because the other files import it. Every
testbench ends by printing `TB_RESULT checks=N failures=M` and stops itself
with a watchdog if the design hangs.

| Testbench | Module |
|---|---|
| `tb_qd_nco_mixer` | `qd_nco_mixer` |
| `tb_da_fir_lpf` | `da_fir_lpf` |
| `tb_qcd_channel` | `qcd_channel` |
| `tb_mrc_weight_calc` | `mrc_weight_calc` |
| `tb_mrc_combiner` | `mrc_combiner` |
| `tb_mrc_calibrator` | `mrc_calibrator` |
| `tb_mrc_receiver` | `mrc_receiver` |
| `tb_nco_cal_mixer` | `nco_cal_mixer` |
| `tb_cordic_atan` | `cordic_atan` |
| `tb_cordic_dbl_rotator` | `cordic_dbl_rotator` |
| `tb_cordic_matrix_rotator` | `cordic_matrix_rotator` |
| `tb_evd_matrix_ram` | `evd_matrix_ram` |
| `tb_evd_processor` | `evd_processor` |
| `tb_corr_matrix` | `corr_matrix` |
| `tb_spatial_smoothing` | `spatial_smoothing` |
| `tb_music_spectrum` | `music_spectrum` |
| `tb_adaptive_array_top` | `adaptive_array_top` |

The end-to-end test takes a few minutes. The others take seconds.
