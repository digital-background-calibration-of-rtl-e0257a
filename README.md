# Background capacitor-mismatch calibration for a pipelined ADC

A pipelined ADC is only as linear as its first few stages. Each stage
samples its input `x` onto a set of capacitors, subtracts a coarse DAC
value chosen by its sub-ADC digits `D_i`, and amplifies the remainder (the
residue `r`) for the next stage. If the sampling capacitors `C_S,i` do not
match the feedback capacitor `C_F`, the DAC levels and the stage gain are
wrong. The output then carries a signal-dependent error that no amount of
digital redundancy removes.

This RTL measures those mismatches while the converter runs, with no test
signal and no extra analog precision, and removes them in the digital
output. The analog side needs only a few extra switches per stage. On
every sample a pseudo-random sign `N` decides whether `C_F` stays in
feedback (`N = +1`) or trades places with one sampling capacitor `C_S,k`
(`N = -1`). The swap turns the mismatch into a term of the residue whose sign
follows `N`. `N` is random and independent of the input, so correlating the
corrected residue with `N·D_1` isolates that term. An LMS loop drives it to
zero.

The design targets a 13-bit converter:

| | |
|---|---|
| stage 1 | 2.5 bits: three sampling capacitors, gain 4, digits `D_1..D_3` in {-1,0,+1} |
| stages 2..12 | 1.5 bits: one sampling capacitor, gain 2 |
| calibrated | stages 1, 2 and 3, all at once and in the background |
| LMS step | ε = 2^-22 |

A second, independent unit supports interstage-gain calibration: it
corrects a residue for a 4th-order opamp gain error and measures how much
of a dither sequence leaks into the output. It is only partly built (see
"Interstage-gain path").

## The arithmetic of one stage (`capcal_stage`)

Units are Vref = 1. The mismatches are `dC_i = (C_S,i − C_F)/C_F`.
`d_i` is the digit that drives capacitor `i`. To first order in the
mismatches, the residue of an m-bit stage is

    r = 2^m·x − ΣD + Σ_i dC_i·t_i,        t_i = x − d_i

For the capacitor `k` that sits in feedback (`N = −1`), charge conservation
gives `t_k = x − r` instead. `C_F` is then driven by the digit that
capacitor `k` would have received. For a 1.5-bit stage this reduces to the
familiar

    r = 2x·(1 + N·dC/2) − D·(1 + N·dC)

**Digit routing.** In a multi-bit stage the outer digits are often zero,
and a capacitor driven by a zero digit cannot be measured. So whenever
`k ≠ 1`, the most significant digit `D_1` (non-zero for most inputs) is
routed to capacitor `k`, and `D_k` goes to capacitor 1. The MDAC switches
and the digital model must apply the same routing. `swap_ctrl` supplies `k`
to both.

**Correction.** The stage cannot know `x`, so it uses
`x_est = (R + ΣD)/2^m`, where `R` is the digitised residue from the later
stages:

    R̂ = R − Σ_i est_i · t_i(x_est)          (t_k = x_est − R when swapped)
    X  = (R̂ + ΣD) / 2^m                     → R of the previous stage

**Estimation.** Only the estimate of the paired capacitor `k` moves, and
only when `D_1 ≠ 0`:

    est_k ← est_k − 2^-MU · R̂ · N · D_1

Averaged over `N`, the product `R̂·N·D_1` equals a negative multiple of
`est_k − dC_k`. The input-dependent part of `R̂` is multiplied by a
zero-mean `N`, so it only adds noise. A small step trades convergence time
for residual noise in the estimate. With ε = 2^-22 and 0.25 % mismatches,
about 3·10^7 samples are needed. The estimate lives in an accumulator with
`FRAC + MU` fraction bits, so the tiny step is not lost. `est_o` is its top
part, with 24 fraction bits.

Data formats (`capcal_pkg`): signals are `sig_t`, 23-bit two's complement
with 20 fraction bits. Estimates are `est_t`, 26 bits with 24 fraction bits.
Digits are `digit_t`, 2-bit signed. These widths are this design's choice.
They sit well above the converter's 13 bits.

## The back end (`capcal_adc_top`)

Per enabled clock (`smp_en`, one sample per enable):

1. `swap_ctrl` × 3 issue `ctrl_o[s] = {swap, k}` for the sample being taken
   now. Each stage has its own LFSR seed, so the three `N` streams are
   uncorrelated. In stage 1, `k` steps round-robin over the three
   capacitors.
2. The analog front end applies the controls. `ALIGN_LAT` (6) samples
   later it returns all digits of that sample together, already deskewed,
   on `st1_dig_i` and `dig_i`. Internal delay lines hold each stage's
   control until its correction runs.
3. `digit_combiner` adds the digits of stages 4..12 with weights
   `2^-1 .. 2^-9` to form stage 3's digitised residue.
4. Three `capcal_stage` instances correct stages 3, 2 and 1 in turn, one
   register per stage. `dout_o` therefore belongs to the sample whose
   controls left `ctrl_o` `ALIGN_LAT + 3` enabled samples earlier.

The back end has three operating modes:

| `swap_en` | `cal_en` | behaviour |
|---|---|---|
| 0 | 0 | plain converter; mismatch shows as harmonics |
| 1 | 0 | swapping only: the mismatch error is spread into noise (better SFDR, not SNDR) |
| 1 | 1 | swapping, correction and background estimation |

Estimates are updated only when both enables are on. Without swapping the
LMS rule has no zero-mean `N` and would drift. With `cal_en = 0` the
estimates hold their values, but the correction is not applied.

Reset (`rst_n`, synchronous, active low) clears the estimates to zero and
reloads the LFSR seeds.

## Interstage-gain path (`gaincal_correct`, `gaincal_stats`)

A finite, nonlinear opamp gain scales the residue by `1 + dg`, where
`dg = dg0 + dg2·r² + dg4·r⁴`. The odd terms vanish in a fully differential
stage. To measure the error, a ±1 dither `PN` is added at the sub-ADC input.
The top outputs it on `gc_pn_o` and aligns it internally by `ALIGN_LAT`.
The dither changes the sub-ADC decision, and the redundancy absorbs that
change only if the gain is right.

* `gaincal_correct` applies `R_corr = R·(1 − g0 − g2·R² − g4·R⁴)`. This is
  a first-order inverse of the error model. The coefficients are inputs.
* `gaincal_stats` forms `Z = Y_PN − D`, where `D` is the sub-ADC decision
  without dither (`gc_d0_i`). Over blocks of 2^`GC_LOG_N` samples it reports
  the means of `PN·Z`, `PN·Z·Z²` and `PN·Z·Z⁴`. With a correct gain they are
  zero up to noise. Each grows with its own order of error.

**Not built:** the loop that turns these three statistics into `g0, g2,
g4`. The published method refers to earlier work for that rule and does not
give it, so the coefficients must come from outside, for example from
firmware. The end-to-end test shows what works today. With zero
coefficients against a model stage with `dg0 = −0.05`, the `PN·Z`
statistic is about 2.7·10^-3. With the model's coefficients it falls to
noise (below 5·10^-4).

## How far it has been checked

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. A real-valued model of the switched-capacitor
stages (`tb/adc_model_pkg.sv`) computes the residues by charge conservation,
including the swap and the digit routing.

| testbench | what it shows |
|---|---|
| `tb_pn_lfsr` | bit stream equals the polynomial recurrence; holds when disabled; balanced |
| `tb_swap_ctrl` | `k` sequence, `N` off/on, `N` follows the LFSR, every capacitor swapped |
| `tb_digit_combiner` | exact binary-weighted sums |
| `tb_capcal_stage` | 1-, 1.5-, 2.5- and 3.5-bit stages side by side: every output equals the correction formula evaluated from the block's own estimates; with about 1 % mismatch all estimates converge to the model values within 1.5·10^-3 (step 2^-18, 2^-17 for the 3.5-bit stage) |
| `tb_gaincal_stats` | block means against real arithmetic, valid pulse once per block |
| `tb_gaincal_correct` | correction formula; removal of a modelled gain error |
| `tb_capcal_adc_top` | whole back end with dropped sample enables: exact with no mismatch; estimates settle and RMS error falls from 1.5·10^-3 to 1.0·10^-4 (step 2^-17); gain statistics with and without correction |
| `tb_capcal_adc_full` | default parameters (ε = 2^-22), every stage mismatched with σ = 0.25 %, 0.95 Vref sine input; two windows of 2^20 samples with swapping and calibration off, two with swapping only, then calibration |

`tb_capcal_adc_full` takes about 2.5 minutes (76 windows of 2^20 samples).
Without swapping the SNDR is 66.7 dB; swapping alone spreads the error into
noise and gives 64.5 dB. With calibration on, the SNDR reaches 74 dB after
44 windows (about 4.6·10^7 samples) and peaks at 78.1 dB. After 72 windows
the stage-1 estimates are still settling towards the model values.
Published behavioural results for this configuration reach 74 dB after
about 3·10^7 samples and settle near 77 dB, so convergence here is about
1.5 times slower. The gap has not been analysed. Possible causes are the
mismatch of the uncalibrated stages 4..12 in this model, the random draw of
mismatches, and the first-order correction.

Not verified: a hardware front end (the timing contract above is assumed).
Stages of up to 3.5 bits (`M ≤ 3`, seven sampling capacitors) are supported
and tested at block level; `k` is 3 bits wide.

## Where this departs from or goes beyond the published method

* The multi-bit residue with `C_S,k` in feedback (`t_k = x − r`) and the
  first-order correction using `x_est` are derived here. The method states
  only that the 1-bit analysis carries over.
* The round-robin choice of `k`, the LFSRs, the word widths, `ALIGN_LAT`,
  the block length of the gain statistics and all reset behaviour are
  choices of this design.
* Updates are gated off when swapping is off.
* For `Z = Y_PN − D`, `D` is taken as the decision without dither. This is
  the reading under which an exact gain leaves no trace of `PN`.

## Simulating

Files: one module or package per file in `rtl/` and `tb/`. Read the
packages first. Example for the end-to-end test:

    verilator --binary --timing -Irtl -Itb \
      rtl/capcal_pkg.sv tb/adc_model_pkg.sv \
      rtl/pn_lfsr.sv rtl/swap_ctrl.sv rtl/capcal_stage.sv rtl/digit_combiner.sv \
      rtl/gaincal_stats.sv rtl/gaincal_correct.sv rtl/capcal_adc_top.sv \
      tb/tb_capcal_adc_top.sv --top-module tb_capcal_adc_top
    ./obj_dir/Vtb_capcal_adc_top

Swap the last file and `--top-module` for any other testbench. To trade
convergence speed for accuracy, change `MU`. To fit a different pipeline,
change `NSTG`, `NCAL` and `ALIGN_LAT`. The first calibrated stage is always
the 2.5-bit one.
