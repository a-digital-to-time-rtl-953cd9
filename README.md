# DTC-assisted phase detector with background DTC gain calibration

An all-digital PLL compares the phase of its oscillator (here CKV/2, the
oscillator divided by two) with a reference clock FREF once per reference
cycle. A plain time-to-digital converter (TDC) would have to cover a whole
CKV/2 period to do that, which costs power. In this design the *expected*
fractional phase is known in advance from the frequency command word, so a
6-bit digital-to-time converter (DTC) delays the FREF edge by exactly that
amount. The delayed edge FREF_DLY then lands at an almost constant phase of
CKV/2, and the TDC only has to resolve what is left.

That only works if the DTC's step size is known in units of the CKV/2
period. The step drifts with process, voltage and temperature, so the design
estimates it continuously in the background: a wrong estimate leaves a
saw-tooth in the phase error that follows the predicted phase, and a
sign-sign LMS loop drives that saw-tooth to zero.

The RTL here contains the digital part (phase accumulator, phase
prediction, DTC decoder, variable-phase counter, phase-error adder and the
calibration) as synthesizable SystemVerilog, plus timing models of the two
analog parts (the DTC delay line and the TDC) so that the whole phase
detector can be simulated end to end. The DCO and loop filter that would
close the PLL are not part of it.

## Signal flow

```
 FCW ─► Σ (fcw_accumulator) ─► PHR = PHR_I.PHR_F
                                   │
            PHR_F ─► phase_prediction: DTC_ctrl = round((1 − PHR_F) · 1/K_DTC)
                                   │
 FREF ─► dtc_decoder ─► dtc_core (64 stages) ─► FREF_DLY
                                                   │
 CKV/2 ─► tdc (phase of CKV/2 at FREF_DLY) ─► PHF  │
 CKV/2 ─► ckv_counter, captured at FREF_DLY ─► PHV │
                                   │
       phase_error: PHE = PHR_I − PHV − PHF  ─► PHE (to the loop filter)
                                   │
       kdtc_cal(PHR_F, PHE_F) ─► 1/K_DTC ─► back to phase_prediction
```

All phases are fixed point in units of one CKV/2 period: 8 integer bits
(wrapping modulo 256) and 12 fractional bits. 1/K_DTC is the number of DTC
steps in one CKV/2 period, with 6 integer and 8 fractional bits.

Why the phase error comes out flat when the gain is right: at reference edge
k the CKV/2 phase is PHR[k] minus a constant, and the DTC adds
(1 − PHR_F)·g periods, where g = (1/K_DTC used) / (true 1/K_DTC). The
captured phase PHV + PHF is therefore PHR_I + PHR_F + (1 − PHR_F)·g plus a
constant, and

    PHE = PHR_I − PHV − PHF = const − 1 + (1 − PHR_F)·(1 − g)

With g = 1 PHE is constant; with g ≠ 1 it is a saw-tooth in PHR_F whose
slope is (g − 1). In a locked loop the constant is removed and PHE_F, the
fractional part of PHE read as a signed number in [−0.5, 0.5), is the
saw-tooth itself.

## The DTC delay line (`dtc_core`, `dtc_decoder`)

The DTC is a chain of 64 identical stages. Each stage has a clock feeder
(CF) that can inject FREF into the stage's input node, and a delay element
(DE) of two gated inverters that passes the node on to the next stage. The
decoder picks one feed-in stage i = 63 − DTC_ctrl (`ek`, one-hot). Stages
after it only pass the edge on; the CFs there are bypassed and add no delay.
The DEs ahead of the feed-in point carry nothing and are switched off (`eb`
low) to save power. While FREF is low every CF presets its node high; when
FREF rises the selected CF pulls its node low, the falling edge runs through
64 − i DEs, and an output inverter turns it into the rising FREF_DLY.

The delay is therefore a fixed offset plus DTC_ctrl unit steps. In the model
the offset is CF_PS + UNIT_PS + OUT_PS (the DE of the feed-in stage is part
of the offset) and the step is UNIT_PS = 22.3 ps, the measured step of the
fabricated DTC. CF_PS = 30 ps and OUT_PS = 15 ps are placeholders. The
stages are otherwise identical, so the measured random non-linearity of the
real circuit (peak DNL 2.2 LSB, INL 1.7 LSB) is not modelled. One layout
effect can be modelled: the wiring of the middle stages differs, which gives
a DNL peak in the middle of the code range. The parameter MID_EXTRA_PS
(default 0) adds delay to the delay element of stage 31, which the edge
first passes at code 32. A setting of 6.7 ps reproduces a 0.3 LSB DNL
spike there.

`dtc_core` is a timing model written with continuous-assignment delays and
is not meant for synthesis. `dtc_decoder` is ordinary combinational logic.

## Phase prediction and phase error (`fcw_accumulator`, `phase_prediction`, `ckv_counter`, `tdc`, `phase_error`)

- `fcw_accumulator` adds FCW every reference cycle. It outputs both the
  current phase and the next one, so that the code for the next edge can be
  registered a cycle early.
- `phase_prediction` multiplies (1 − PHR_F), taken as a 13-bit number so
  that PHR_F = 0 gives exactly 1, by 1/K_DTC. It rounds to the nearest
  code, limits the result to 63 and registers it.
- `ckv_counter` counts CKV/2 rising edges and captures the count at the
  FREF_DLY edge. This is the same instant at which the TDC measures, so PHV
  and PHF always describe one moment and PHV + PHF is continuous across a
  CKV/2 edge.
- `tdc` is a behavioural model. It gives the time from the last CKV/2 rising
  edge to FREF_DLY, floored to 22 ps steps and divided by the last CKV/2
  period. Measuring back to the last edge matches the minus sign of PHF in
  the phase-error sum. The real converter's circuit is not modelled.
- `phase_error` forms PHE modulo 256 periods and exposes its signed fraction
  PHE_F.

## Gain calibration (`kdtc_cal`)

The calibration minimises E(e²), where e is the phase error caused by a
wrong 1/K_DTC. Setting the derivative with respect to 1/K_DTC to zero gives
the condition E(e·(1 − PHR_F)) = 0: the loop has to remove any correlation
between the phase error and the predicted phase. Full multiplications are
avoided by using signs, and the hardware is three small pieces, updated once
per reference cycle while `en` is high:

| stage | operation |
|---|---|
| error | e = (PHR_F − 0.5) · Sign(PHE_F), with Sign(0) = 0 |
| IIR filter | ε[n] = −2^−b · e[n] + (1 − 2^−a) · ε[n−1] |
| accumulator | 1/K_DTC[n+1] = 1/K_DTC[n] + 2^−μ · ε[n] |

Subtracting 0.5 centres PHR_F, and the sign of PHE_F says on which side of
the ideal line the phase error lies. If 1/K_DTC is too small, PHE_F is
positive for small PHR_F and negative for large PHR_F. Then e is negative
on average, ε is positive and 1/K_DTC grows. Too large, and the opposite
happens. At the right value the signs no longer correlate with PHR_F, and
the estimate only dithers. The IIR filter averages e over about 2^a cycles.
This speeds up the early, coherent part of convergence while smoothing the
random part. μ sets the step size of the accumulator.

Defaults: a = 4, b = 2, μ = 8 (all as shifts). Internally the filter and
accumulator keep 24 fractional bits in 32-bit signed words. The accumulator
saturates to [0, 64). `load` sets the estimate to `invk_init` and clears
the filter; reset sets it to 32.0. The values of a, b and μ are this
implementation's choices, picked so the loop settles in a few thousand
reference cycles.

## Clocking and timing

The digital part runs on `ckr`, a retimed reference clock supplied from
outside. It must rise after the TDC result for a FREF edge is available
(the DTC delay is at most about 1.5 ns plus one CKV/2 period). It must also
rise early enough for the new DTC code to settle before the next FREF rising
edge. The falling edge of a 50 % duty-cycle FREF, i.e. `ckr = ~fref`,
satisfies both at 32 MHz. A new code therefore reaches the decoder while
FREF is low, when every node of the line is preset high, so changing
`ek`/`eb` causes no glitch on FREF_DLY.

On each `ckr` edge:

1. PHE of the edge just measured, paired with the PHR_F that produced it,
   updates the calibration.
2. PHR advances by FCW.
3. The DTC code for the next edge is registered from the new PHR_F and the
   1/K_DTC in use before this update.

Latency from FCW/1/K_DTC to the DTC code is one reference cycle.

## Where this differs from, or adds to, the circuit it describes

- Word widths (8.12 phase, 6.8 for 1/K_DTC, 32-bit calibration words), the
  calibration constants a, b, μ, rounding of the DTC code, Sign(0) = 0,
  saturation, reset values and the `ckr` clocking scheme are this design's
  own.
- The calibration's error term follows the block diagram:
  (PHR_F − 0.5) multiplied by the sign of PHE_F. One could also read the
  method as using the sign of PHR_F − 0.5 as well; that variant is not
  built. The IIR feedback factor is taken as 1 − 2^−a, the stable reading.
- The DTC code d feeds stage 63 − d, so the delay is offset + d steps. The
  delay element of the feed-in stage is counted in the offset.
- The DTC and TDC are timing models only: ideal, mismatch-free stages, and
  a TDC that reports a normalised fraction directly rather than a raw code.
- The DCO, loop filter and the rest of the PLL are not included. PHE is the
  output of this block.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_dtc_decoder` | all 64 codes: one-hot `ek`, contiguous `eb`, d+1 enabled elements |
| `tb_dtc_core` | FREF→FREF_DLY delay for every feed-in stage, one unit step per code, return to low |
| `tb_dtc_core_mid` | decoder and delay line with MID_EXTRA_PS = 6.69 ps: DNL/INL over all codes, +0.3 LSB DNL only at code 32 |
| `tb_tdc` | PHF for 200 random offsets after a CKV/2 edge |
| `tb_fcw_accumulator` | running sum with wrap and enable against a 64-bit model |
| `tb_ckv_counter` | captured count, held between captures, wrap |
| `tb_phase_prediction` | code = round((1−PHR_F)·1/K_DTC), limiting at 63, one-cycle latency, hold |
| `tb_phase_error` | PHE and signed PHE_F for random inputs against real arithmetic |
| `tb_kdtc_cal` | bit-exact error/IIR/accumulator arithmetic; convergence from below and above for two DTC gains |
| `tb_dtc_tdc_pd` | the complete block at default parameters, described below |
| `tb_dtc_tdc_pd_integer` | integer channel (FCW = 38): constant DTC code, locked PHE within ±0.03 periods, 1/K_DTC held |

`tb_dtc_tdc_pd` runs FREF at 32 MHz and CKV/2 at 1216.224 MHz, i.e.
FCW = 38 + 29/4096, a 2.432448 GHz carrier. The DTC step is 22.3 ps, so the
correct 1/K_DTC is 36.87. The testbench closes a simple proportional phase
loop: each cycle it shifts the CKV/2 edges by −0.05·PHE_F periods, standing
in for a locked type-II PLL. It loads 1/K_DTC = 30 with calibration off and
sees a PHE saw-tooth (slope −0.11 against PHR_F, rms 0.042 periods). It
then enables calibration: 1/K_DTC settles at 36.78, the slope drops to
−0.0005 and the rms to 0.0026 periods. Finally it reloads 46, and the
estimate comes back to 37.06. Every cycle it also checks the DTC code against its own phase
accumulator, the FREF→FREF_DLY delay against the code, and PHF against the
CKV/2 phase it generated. It counts that the code reached both ends of its
range, that PHR_F and PHV wrapped, and that the estimate rose, fell, held
and was loaded. It takes a few seconds.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/dtc_pkg.sv tb/tb_dtc_tdc_pd.sv --top-module tb_dtc_tdc_pd -o sim
./obj_dir/sim
```

Any other testbench works the same way; replace the file and top-module
name. `--timing` is needed for the delays in the DTC and TDC models and in
the testbenches. Every file uses `timescale 1ps/1fs`.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `CTRL_W` / `N_STAGES` | 6 / 64 | all | DTC code width and number of stages |
| `INT_W`, `FRAC_W` | 8, 12 | phase path | integer / fractional phase bits |
| `INVK_FRAC` | 8 | prediction, calibration | fractional bits of 1/K_DTC |
| `IIR_A`, `IIR_B`, `MU_SHIFT` | 4, 2, 8 | `kdtc_cal` | a, b, μ of the calibration |
| `DTC_UNIT_PS` / `UNIT_PS` | 22.3 | `dtc_core` | DTC step |
| `CF_PS`, `OUT_PS` | 30, 15 | `dtc_core` | feeder and output delays |
| `MID_EXTRA_PS` | 0 | `dtc_core` | extra delay of the middle delay element |
| `TDC_RES_PS` / `RES_PS` | 22.0 | `tdc` | TDC step |

The shared defaults live in `rtl/dtc_pkg.sv`.
