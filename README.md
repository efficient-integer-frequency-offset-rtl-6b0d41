# Folded integer-frequency-offset estimator and compensator for OFDM

A large carrier frequency offset in an OFDM receiver has two parts. The
*fractional* part (less than two sub-carrier spacings when the short preamble
repeats four times per symbol) is estimated and removed in the time domain
before the FFT. What is left is an *integer* frequency offset (IFO): the
FFT output comes out cyclically rotated by a whole number of sub-carriers.
This RTL measures that rotation on the long preamble and undoes it on the
following symbols. Both steps work on the FFT output stream, one sub-carrier
per clock, and cost little hardware. The design follows the architecture of
"Efficient Integer Frequency Offset Estimation Architecture for Enhanced OFDM
Synchronization" and is set up for IEEE 802.16-2009 (256-point FFT).

The estimator's main idea is to fold the work. Eight offsets are possible.
Each one would normally need its own correlator over 100 pilots. Instead:

* After fractional correction, the remaining offset can only be a multiple of
  four sub-carriers. For a CFO range of -14..+18 sub-carriers that leaves
  eight candidates, -12, -8, ..., +16. The stream is assumed to be shifted by
  +12 sub-carriers before the FFT. The candidates then become
  eps' = 0, 4, ..., 28, all rotations in the same direction, so
  compensation needs only a 28-sample buffer.
* Only the pilots at multiples of four are used: 4..100 and 156..252, 50
  of the 100. Such a pilot arrives at most once every four clocks. One
  multiply-accumulate unit can therefore serve four candidates in the four
  clocks between two pilots. Two MACs cover all eight candidates.
* The known-pilot products for the eight candidates are copies of one
  sequence, slid by one place per candidate. A 32-entry circular register
  per preamble half therefore holds them all: 64 entries instead of 400.
* The known-pilot products are reduced to values with real and imaginary
  parts in {-1, 0, +1}. The received product is cut to a few bits (Q1.2 by
  default). Each MAC is then a pair of add/subtract/skip operations with no
  multiplier.

## Estimation metric

For received FFT output Y and known preamble X, the estimator computes, for
each candidate eps' = 4j:

    P(r)      = conj(Y(r-2)) * Y(r)                     (differential pilot product)
    U_j(r)    = sgn(conj(X(r-2-eps')) * X(r-eps'))      (parts in {-1,0,+1})
    V_j       = sum over used pilots r of conj(U_j(r)) * P4(r)
    estimate  = argmax_j |V_j|,   IFO = 4*j - 12

Here P4 is P cut to its F+1 most significant bits. Using the product of
neighbouring pilots cancels the channel phase and a residual timing error,
which turns into a phase ramp across sub-carriers. In components, with
U = Ur + jUi and P4 = Pr + jPi:

    Re V += Ur*Pr + Ui*Pi
    Im V += Ur*Pi - Ui*Pr

## Datapath (`ifo_estimator`)

    Y_k ──┬──────────────────────┐
          └─ D ── D ── conj ──── x ── D (P_k) ── top F+1 bits ── P_4k latch
                                                                   │
              pil_reg (2 x 32 coef, 8-tap window) ── tap 7-ph ── MAC1 ── COR1 (V0,V4,V8,V12)
                                                  └─ tap 3-ph ── MAC2 ── COR2 (V16..V28)
                                                                   │
                                                     argmax over the 8 |V| ── est_idx

| module     | role |
|------------|------|
| `pk_gen`   | Two sample delays and a 3-multiplier complex product form P_k = conj(Y_{k-2}) Y_k. The result is shifted back to Q1.15, saturated, registered as 16 bits, and its top F+1 bits are output as P_4k. |
| `pil_reg`  | Two circular 32-entry registers of `coef_t` (one per preamble half). They have a write port and an 8-entry window. Tap `7-j` is the coefficient for candidate `4j` at the current pilot. |
| `ml_mac`   | Combinational multiplierless complex MAC `V + conj(U)*P4`, with V in Q7.F (F+7 bits). |
| `cor_bank` | Four accumulators with a feedback mux. The selected V is read, updated and written back in one clock. |
| `ifo_ctrl` | Sub-carrier counter, used-pilot detection, the four-phase MAC schedule, PilReg rotation and ArgMax start. |
| `argmax`   | Sequential scan, one candidate per clock, using `|Re|+|Im|`. The first maximum wins. |

### The four-phase schedule

Say a used pilot enters at clock t. At t+1 its P_k is in the `pk_gen`
register and is latched into P_4k. In clocks t+2..t+5 (`mac_ph` = 0..3),
MAC1 updates V_{4·ph} and MAC2 updates V_{16+4·ph}, each with its own
window tap. In phase 3 the active PilReg half rotates by one place, so the
window moves on to the next pilot. The next used pilot enters at t+4 at the
earliest, so its P_4k latch coincides with phase 3 of the previous one.
Phase 3 still reads the old latch value. An assertion in `ifo_ctrl` checks
that the phases never overlap. Per preamble the MACs work for 4 × 50 = 200
clocks.

### PilReg layout

Candidate eps' at pilot r needs the normalised product of X at r-2-eps' and
r-eps'. Pilots and candidates both step by four, so the product for
(pilot n, candidate j) equals the product for (pilot n+1, candidate j+1).
Each half is stored as one 32-entry run:

    lower half, entry e (0..31):  sgn(conj(X(4e-26)) * X(4e-24))     indices mod 256
    upper half, entry e (0..31):  sgn(conj(X(4e+126)) * X(4e+128))

Before its n-th pilot, a half has rotated n times. Window tap i then holds
entry n+i, and candidate j reads tap 7-j. A half rotates 25 times during
the preamble. The controller then adds 7 more rotations (32 in all), so the
register is back in its loaded order for the next preamble and needs no
reload. The values depend on the preamble sequence in use, so they are
loaded through the write port (`pil_we`, `pil_side`, `pil_addr`,
`pil_data`) while `busy` is low. The testbench package shows how to compute
them (`pil_entry` in `tb/tb_ofdm_pkg.sv`).

### Timing

* The input takes one sample per `in_valid` clock and has no back-pressure.
  Idle clocks may appear anywhere.
* `est_valid` rises 15 clocks after sub-carrier 252 of the preamble entered.
  In a gap-free stream that is 12 clocks after its last sample, so the
  estimate is ready within a cyclic prefix of 12 samples or more.
* A preamble start that arrives while `busy` is high is ignored and flagged
  on `missed`.

## Compensation (`ifo_comp`)

With eps' ≥ 0, input position p holds sub-carrier p-eps'. The compensator
keeps the first eps' samples of a symbol in a 28-entry buffer. It passes
positions eps'..N-1 straight through as sub-carriers 0..N-1-eps', then sends
the held samples as sub-carriers N-eps'..N-1. The held samples leave during
the clocks in which the next symbol's first samples are being stored. The
buffer is read before it is written, so a gap-free stream keeps flowing.
Sub-carrier 0 (`out_sop`) leaves one clock after input position eps'
arrived.

The shift is sampled at `in_sop`. A new shift that is *smaller* than the
number of held samples still waiting would make the two symbols' outputs
collide. In that case the previous shift is kept for that symbol, `deferred`
pulses, and the new value applies at the next symbol start with enough gap.
An assertion checks that direct and held samples never compete for the
output.

## Top level (`ifo_top`)

`ifo_top` connects the estimator to the compensator through a 3-bit register
that holds the shift in force. The register resets to 3 (eps' = 12, no
offset) and is loaded on `est_valid`. The preamble itself leaves with the
previous shift. The new estimate applies from the next symbol start.

| port | width | meaning |
|------|-------|---------|
| `in_valid`, `in_sop`, `in_preamble` | 1 | FFT stream. `in_sop` marks sub-carrier 0. `in_preamble` (with `in_sop`) marks the long preamble. |
| `in_re`, `in_im` | YW=16 | FFT output, Q1.15, already carrying the +12 sub-carrier pre-offset |
| `pil_we`, `pil_side`, `pil_addr[4:0]`, `pil_data` | | PilReg load port. `pil_data` is `coef_t {re[1:0], im[1:0]}`. |
| `busy`, `missed` | 1 | estimation running, ignored preamble |
| `est_valid`, `est_idx[2:0]`, `est_ifo[5:0]` | | new estimate: eps' = 4·est_idx, IFO = 4·est_idx − 12 (signed) |
| `out_valid`, `out_sop`, `out_re`, `out_im`, `deferred` | | compensated stream |

The parameters are `N` = 256, `YW` = 16 and `F` = 2 (P_4k in Q1.F, V in
Q7.F). F = 1, 2, 7 and 15 are the wordlengths the published study compares.
The pilot positions and the candidate set are those of the 802.16-2009
long preamble and are fixed in `ifo_pkg`.

## What is not included

* The **rest of the receiver**: frame detection, fractional-offset
  estimation and correction, fine timing, cyclic-prefix removal and the
  FFT. In particular, the +12 sub-carrier pre-offset must be applied in the
  time domain before the FFT, for instance by the fractional-offset rotator.
  It is not done here.
* The **DSP48 variant** of the MAC. The published study also maps each
  component update onto a DSP slice used as a 3-input adder. Only the
  logic-only form is built.
* The **conventional sign-bit correlator** used as a baseline, and the
  802.16 preamble sequence itself (the pilot store is loadable instead).

## How far to trust it, and where it departs from the published design

Checked by simulation:

* every module against its own model;
* the estimator against an independent evaluation of the metric above,
  written in plain index arithmetic without the folded layout. This
  includes all eight accumulator values and the result for each trial.
  Noise-free trials must recover the true offset;
* the whole stage end to end against a scoreboard of every output sample;
* the four wordlengths in AWGN with residual timing offset, and in two
  three-tap Rayleigh channels with the SUI-1 and SUI-2 delay/power profiles.

With 150 preambles per point at 0 dB, the wrong-estimate counts were 4
(Q1.1), 0 (Q1.2), 0 (Q1.7) and 0 (Q1.15). At -3 dB they were 36, 31, 30 and
28. At 3 dB and above all four wordlengths made no error. So going from 1 to
2 fractional bits matters most, as the published study reports.

In the frequency-selective channels, at 6 dB average SNR, the counts were
20/10/8/8 (SUI-1) and 19/6/5/5 (SUI-2) out of 150. At 20 dB there were no
errors. These channels give every tap Rayleigh fading with no line-of-sight
component, so deep flat fades are common. The published SUI curves should
therefore not be compared with these numbers directly. In every trial, and
at every wordlength, the RTL result matched the reference model bit for bit.

These are this design's own choices, not taken from the published design:

* the stream interface, reset, the 16-bit Q1.15 input and the scaling of P_k;
* `|Re|+|Im|` as the ArgMax magnitude. The published LE version spends its
  only three DSP blocks on P_k, which suggests a multiplier-free ArgMax.
  `SQ_MAG=1` on `argmax`/`ifo_estimator` selects the exact Re²+Im²;
* the PilReg write port and the 7 realigning rotations;
* the numbering of the lower PilReg half. The published layout labels the
  lower run for candidate 0 as sub-carriers 0..96, while the used lower
  pilots are 4..100. This design follows the pilot positions, so its lower
  entries sit 4 sub-carriers above those labels. The upper half matches
  exactly;
* the conjugation. The metric is formed as conj(U)·P, which makes the sum
  coherent. The published MAC equations use this form, but the compact
  correlation formula omits the conjugate;
* the accumulators wrap instead of saturating. With 50 pilots and U on the
  axes, |V| < 50 fits the Q7 range;
* the deferral rule in the compensator and the `missed` flag;
* a preamble shorter than 256 samples is not detected.

## Files and simulation

`rtl/` holds one module or package per file. `ifo_pkg.sv` must be read
first. `tb/` holds one self-checking testbench per module, plus:

* `tb_ofdm_pkg.sv`: preamble generator, channel and reference model;
* `tb_ifo_top.sv`: end-to-end test at default parameters. It covers
  deferral, missed preambles, in-symbol gaps, back-to-back symbols, the
  maximum and zero shifts, and a pilot reload;
* `tb_wordlength_channels.sv`: the wordlength study in AWGN, SUI-1 and
  SUI-2-like channels, printing the number of failed estimations.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ifo_top \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ifo_pkg.sv tb/tb_ofdm_pkg.sv tb/tb_ifo_top.sv
    ./obj_dir/Vtb_ifo_top

To simulate another testbench, replace `tb_ifo_top` with its name. Each run
takes a few seconds at most. The testbenches use only `$urandom`, so
verilator's two-state simulation is sufficient.
