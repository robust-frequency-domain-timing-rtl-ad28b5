# Frequency-domain timing synchronizer for 128-FFT OFDM (IEEE 802.11ad)

An OFDM receiver samples its ADC with a clock that is never quite the
transmitter's. This has two effects:

- **Phase error.** The first samples of a packet land at an arbitrary fraction
  of a sample away from the best instant.
- **Sampling clock offset (SCO).** A frequency error of a few hundred ppm makes
  that fraction drift from symbol to symbol.

At 2.64 GS/s, a drift of 400 ppm moves the sampling instant by about 1/20 of a
sample every OFDM symbol.

The usual fix is to interpolate the samples, or to pull the ADC clock with a
PLL. This design does neither. The ADC clock comes from a multiphase clock
generator that offers 16 phases per sample period. The synchronizer only has
to choose the phase: a 4-bit `phase_sel`, one step being π/8, or 1/16 of a
sample.

Everything is measured after the FFT, in the frequency domain. A sampling delay
of τ samples rotates subcarrier k by −2πkτ/128. So the phase error shows up as
a straight line of phase across the band:

- The slope of that line gives the phase error.
- The change of the slope from one symbol to a later one gives the SCO.
- The common offset of the line, which is the same on every subcarrier, gives
  the carrier frequency offset (CFO).

The RTL works on the 128 FFT bins of each symbol. It does three things:

1. **Acquisition.** Measures the phase error, SCO and CFO on six STF preamble
   symbols. The STF symbols are repetitions of a known Golay sequence.
2. **Correction.** Moves the ADC phase to cancel the phase error. It then keeps
   stepping the phase to follow the SCO.
3. **Pilot tracking.** On the data symbols, watches the four pilot tones and
   corrects what is left, one π/8 step at a time.

A boundary detector also finds the whole-sample cyclic delay of the first STF
symbol.

## Signal flow

```
 FFT out ─► data_buf ─► correlation ─► angle ─► angle_buf ─┬─► timing_acq ─┐
 (32 bins/clk)  │            ▲                              ├─► cfo_est     │
                │         ga_buf (reference C[k])           └─► sco_est ─► sco_out
                │                                                           │
                ├─► pilot_track (data symbols) ──────────┐                  │
                └─► boundary_detect (first STF)          ▼                  ▼
                                       sync_ctrl ──► phase_ctrl ──► phase_sel (to the clock generator)
```

Each block:

- **`data_buf`.** A ping-pong buffer holding one FFT symbol.
  - The input is 4 beats of 32 bins.
  - While the next symbol is written, the buffer replays the stored one beat by
    beat to the correlation.
  - It also shows the whole stored symbol at once, for pilot tracking and
    boundary detection.
- **`ga_buf`.** Holds the reference spectrum C[k], which is the 128-point DFT of
  the Golay sequence. It is loaded once through `ref_we`, `ref_addr` and
  `ref_data`.
- **`correlation`.** Splits the 128 bins into 8 groups of 16 adjacent
  subcarriers. Each group gives corr_g = Σ R[k]·conj(C[k]). Two units give two
  groups per clock.
- **`angle`.** A CORDIC that turns each corr_g into its angle.
- **`angle_buf`.** Keeps the 8 group angles of each of the six captured STF
  symbols, one symbol per column. The controller picks two columns at a time.
- **`timing_acq`.** Works on one STF symbol.
  1. Unwraps the 8 angles in order of frequency.
  2. Fits a least-squares line.
  3. Returns the sampling phase error as 0…2π.
- **`sco_est`.** Takes the angle differences between STF symbols j and j+Δ.
  It fits a line to them and divides by Δ, which gives the phase drift per
  symbol.
- **`cfo_est`.** Takes the mean of the same kind of differences and divides it
  by Δf = f_c·Δ·128/f_s. The result is in 1/16 ppm.
- **`sco_out`.** A 4-deep FIFO of SCO estimates, one per pair (0,2), (1,3),
  (2,4) and (3,5). It outputs their mean, corrected for the known step the
  controller applied during acquisition (next section).
- **`pilot_track`.** Works on the data symbols, in four steps:
  1. Removes the known pilot values and their ±1 polarity from each pilot.
  2. Takes the phase differences of the pilot pairs (27, 54) and (78, 105).
  3. Averages them over 8 symbols.
  4. Asks for a ±π/8 step when the average exceeds the difference that a π/8
     timing error produces.
- **`phase_ctrl`.** Owns `phase_sel`.
- **`sync_ctrl`.** Runs the acquisition sequence.
- **`boundary_detect`.** Correlates one symbol against all 128 cyclic shifts of
  the reference and returns the best one.

## The acquisition sequence

This is the part that takes the most care, because the controller moves the
sampling phase while it is still measuring.

1. `pkt_start` says that the packet is found and the FFT window sits on the
   STF. The next six STF symbols are tagged for capture into the angle buffer
   as columns 0–5.
2. At the first captured symbol, the controller shifts the ADC phase by +π
   (8 steps). The first STF is therefore sampled at φ₀ and the following ones
   at φ₀+π. The sixth symbol is marked as the timing reference.
3. When the sixth symbol's angles are stored, two estimators start together:
   - timing acquisition, on column 5;
   - CFO estimation, on columns (5−Δ, 5).
4. The four SCO pairs then run one after another.
5. The pair (0, 2) straddles the π step and sees an extra phase change of π.
   Spread over the four estimates in the mean, that is π/(Δ·4).
   `sco_out` adds that amount back with the step's sign.
6. When the SCO mean, the phase and the CFO are all ready, `acq_load` hands the
   phase and the SCO to `phase_ctrl`.
   - The measured phase was true at the marked symbol, several symbols ago.
     So the controller adds SCO × (symbols since the mark) before correcting.
   - It takes the phase the short way round, so the correction is at most
     ±π.
7. From then on:
   - every symbol adds the SCO to a phase-error accumulator;
   - when the accumulator passes half a step, `phase_sel` moves one step and
     one step is taken off the accumulator;
   - pilot steps are applied directly.

With Δ = 2, tracking starts 87 symbols after `pkt_start`, the six preambles
included.

## Number formats

| Quantity | Format |
|---|---|
| FFT bins, reference | 12-bit signed I and Q (`cplx_t`) |
| Group correlation | 30-bit signed I and Q (`csum_t`) |
| Angles | 16-bit, `PI_Q` = 4096 counts per π. 8192 counts = 2π = one sample of sampling phase |
| Phase error `phase_shift` | 0…8191 counts: the sampling phase by which the ADC samples late |
| SCO `sco_out` | Drift per symbol, in angle counts with 4 fraction bits (8192·16 = one sample per symbol) |
| CFO `cfo_out` | 1/16 ppm of the carrier |
| `phase_sel` | 0…15. +1 samples 1/16 of a sample earlier |

The linear regressions use group-centre frequencies as abscissae, in units of
8 bins: ±1, ±3, ±5, ±7. Their sum is zero, so the intercept drops out and the
sum of squares (168) is a constant. The slope is scaled to the whole band, so
the regression returns −2πτ directly, in angle counts. The group approximation
costs less than 0.2 % of slope on the Golay spectrum.

## Interface and timing (top: `fd_timing_sync`)

- **Clock and input rate.**
  - One clock of the design is the 12 ns pipeline clock.
  - A 128-bin symbol arrives in 4 beats of 32 bins (`in_valid`, and `in_first`
    on beat 0), once every 48.48 ns. Symbols may come back to back, and the
    input is never stalled.
  - `in_kind` says whether a symbol is STF, data or other.
- **Configuration.**
  - `delta` is Δ, the symbol interval between the two symbols of a pair
    (default 2).
  - `delta_f` is Δ·128·f_c/f_s: 5818 for 60 GHz and 2.64 GS/s with Δ = 2.
- **Results.** Each result has a one-clock valid pulse:
  - `phase_valid` with `phase_shift`;
  - `cfo_valid` with `cfo_out`;
  - `sco_valid` with `sco_out`;
  - `boundary_valid` with `boundary_shift` and `boundary_power`.
- **Tracking.**
  - `tracking` is high from the acquisition load until the next `pkt_start`.
  - `comp_step` shows each SCO compensation step.
  - `pilot_valid` and `pilot_step` show each pilot decision.
  - `pilot_avg` shows the averaged pilot difference.
- **Latencies from start to done.**
  - timing acquisition: 35 clocks;
  - CFO: 34 clocks;
  - one SCO pair: 67 clocks;
  - boundary detection: 513 clocks (128 shifts × 4 clocks + 1).

## Where this design departs from the published scheme, or fills gaps

- **Word lengths and group size.** The source gives no word lengths, so all of
  them are this design's. Neither does it give the group size: 8 groups of 16
  subcarriers matches its drawing of two correlation units side by side.
- **Arctangent.** The source draws an Im/Re divider followed by an arctangent.
  A CORDIC is used instead.
- **Conjugate.** The source's correlation formula prints R·C without a
  conjugate. The conjugate is used here, because the phase of R relative to C
  is what is wanted.
- **Timing acquisition.** The source describes deciding the phase by comparing
  correlations of the two STFs sampled π apart. Here the phase comes from the
  slope of the sixth STF symbol alone; the π step is kept because the SCO
  output stage has to account for it.
- **SCO estimation.** The source's algorithm chapter also fits a parabola
  P = aφ² + bφ + c to correlation powers. The hardware follows its block
  diagram instead, which works on angle differences.
- **SCO output (partial).** The source draws an SCO adjustment with the
  timing phase shift and the CFO as inputs, but does not describe it.
  - Here the adjustment removes the one deliberate phase change that an STF
    pair can see during acquisition: the π step. The acquired phase is
    applied only after all estimates are done.
  - The CFO input is not used: a CFO is common to all groups and cancels in
    the slope fit.
- **Boundary detection.** The source draws 128 correlators side by side. Here
  one 32-lane correlator is reused for all shifts, and the shifted references
  come from twiddle factors rather than a stored 128×128 table.
  - The twiddle table is round(2047·cos(2πm/128)), m = 0…127. The sine is the
    cosine a quarter period later.
  - Boundary detection only reports its result. Placing the FFT window is left
    to the logic in front of the FFT.
- **Pilot tracking.** Both pilot pairs are averaged together; 8 symbols give
  16 differences. The polarity generator x¹⁵+x¹⁴+1 is seeded with
  x₁…x₁₅ = 000010100001011 and shifts its new bit in at x₁.
- **Phase controller and control.** Both are this design's own. The source
  names a phase controller and a control mux but does not design them.
- **Outside the RTL.** Two parts are not in the RTL:
  - the multiphase clock generator that `phase_sel` drives;
  - the ADC and FFT in front of the synchronizer.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against values computed independently, mostly in floating point, and checks
latencies.

The end-to-end test, `tb_fd_timing_sync`, runs the top at its default sizes
with a closed-loop channel model:

- **Symbols.** Every symbol is built in the frequency domain from the Golay STF
  or from data with the four pilots. The symbol is delayed by τ, rotated by the
  CFO, and given ±2 LSB of noise.
- **Closed loop.** τ grows with the SCO and falls by 1/16 sample for every step
  of `phase_sel`.
- **Packets.** Three packets run: +200 ppm SCO with +10 ppm CFO, −300 ppm
  with −5 ppm, and +400 ppm with +20 ppm. Timing jumps of ±0.17 sample are
  injected during tracking.

It checks:

- the acquired phase, SCO, CFO and boundary;
- that the sampling error stays within π/8 plus margin while tracking;
- that no pilot step points away from a clear error;
- that tracking starts within 92 symbols.

It also counts each mechanism and fails if one never happens: boundary
detection, π step, acquisition load, SCO compensation up and down, and pilot
steps up and down.

The channel has no multipath. Error rates are not simulated.

Two handshake rules are also checked by immediate assertions in the RTL:
`sdiv` must not get `start` while busy, and `data_buf` must see `in_first`
on the first beat of every symbol. Synthesis ignores them.

To run a testbench with Verilator:

```
verilator --binary --timing -Irtl rtl/fd_sync_pkg.sv rtl/*.sv tb/tb_fd_timing_sync.sv \
          --top-module tb_fd_timing_sync -o sim && ./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Sizes against the published figures

| Figure | Published | This design |
|---|---|---|
| FFT size | 128 | 128 |
| Symbol period | 48.48 ns | 4 clocks of 12 ns |
| Clock phases | 16 | 16 |
| Captured preambles | 6 | 6 |
| Pilot average | 8 symbols | 8 symbols |
| Tracking start | within 92 symbols (6 preambles included) | after 87 symbols |
| SCO range | −300…400 ppm | ±0.82 phase steps per symbol fits the formats; +200, −300 and +400 ppm are simulated |

## Warnings that stand

Lint reports a few warnings, each on purpose:

- Several dividers leave `busy` unconnected, because their users wait for
  `done`.
- The phase controller's own `tracking` flag is left open in the top, because
  the controller block gives the same signal.
- The CORDIC drops guard bits of its rounded result.
- The unwrap loop uses only the low bits of its integer indices.

Each module's opening comment names its warning.
