# 9-bit hybrid digital pulse width modulator (DPWM) for a 1 MHz buck converter

A digitally controlled buck converter needs a "time-domain DAC": a block that
turns the controller's duty word into a switch-on time. At 1 MHz switching
with 9 bits, one step is 1000 ns / 512 = 1.953 ns. A plain counter would need
a 512 MHz clock for that. A plain delay line would need 512 matched cells.

This design splits the word instead:

* **The upper five bits** (DWORD[8:4]) are counted in whole periods of a
  32 MHz reference clock, 31.25 ns each. The same 5-bit counter divides the
  reference down to the 1 MHz switching clock.
* **The lower four bits** (DWORD[3:0]) pick one of 16 evenly spaced phases of
  that reference. A 16-cell delay line makes the phases. A delay-locked loop
  (DLL) holds the line at exactly one reference period, whatever the process,
  supply and temperature.

The pulse starts on the switching-clock edge. It ends on the selected phase
edge inside the selected reference period. Its width is
`DWORD * T_SW / 512`. With `DWORD = 0` the output stays low.

The DLL's analog parts (current DAC, current-starved delay cells, skew
buffer) are written as behavioural models with real-valued currents and
delays. Everything else is synthesizable RTL.

## Block map

```
Delay-locked loop (dll):
  clk --clk_gate(en)--> ck_ref --> icdl, 16 cells --> phases[15:0], ck_fb = phases[15]
  ck_ref samples ck_fb in phase_detector --> decr
  ck_ref --skew_buf--> clk1, which clocks updn_counter(decr) --> code[6:0]
  code, itrim, i_bias --> idac --> control current --> icdl

Supporting circuit:
  clk, dword --> dpwm_counter --> cnt, end_count, end_phase, pulse_en, ck_sw
  phases, end_phase --> dpwm_phase_mux --> ck_mux
  ck_sw, ck_mux, cnt, end_count, pulse_en, en --> dpwm_pulse_gen --> pwm
```

| File | Role |
|---|---|
| `rtl/dpwm_pkg.sv` | Widths, counts and the reference period shared by all blocks |
| `rtl/dpwm_top.sv` | The modulator: DLL plus supporting circuit |
| `rtl/dll.sv` | Delay-locked loop, 16 phases of the reference |
| `rtl/dll_phase_detector.sv` | One D flip-flop: samples the line output on the reference edge |
| `rtl/dll_updn_counter.sv` | 7-bit saturating up/down counter, the loop state |
| `rtl/dll_idac.sv` | Current DAC with two trim legs (behavioural) |
| `rtl/dll_icdl.sv` | 16-cell current-controlled delay line (behavioural) |
| `rtl/dll_clk_gate.sv` | Latch-based clock gate for low-power mode |
| `rtl/dll_skew_buf.sv` | Delay buffer that clocks the counter after the detector (behavioural) |
| `rtl/dpwm_counter.sv` | 5-bit coarse counter, switching clock, word capture |
| `rtl/dpwm_phase_mux.sv` | 16:1 phase multiplexer |
| `rtl/dpwm_pulse_gen.sv` | Comparator and the two pulse flip-flops |

## How one pulse is timed

Each period the counter runs from 0 to 31. On the reference edge that ends
count 31 it captures the word, subtracts one, and splits the result:

* `end_count = (D-1)[8:4]` is the reference period in which the pulse ends.
* `end_phase = (D-1)[3:0]` selects the phase.

The subtraction follows from the tap convention. Tap `i` is the output of cell
`i`, so it lags the reference edge by (i+1)/16 of a period. Ending on tap
`end_phase` in slot `end_count` gives exactly `D` steps of 1.953 ns. The
capture happens once per period, so a word that changes mid-pulse cannot
shorten or lengthen the pulse in progress. A word applied before the counter
wraps takes effect in the next period.

The pulse itself follows a fixed sequence:

1. The switching clock `ck_sw` (high for counts 0..15) rises and sets the
   output flip-flop DFF_02. It is not set when the word is zero.
2. The comparator raises `CR` while the count equals `end_count`.
3. The first edge of the selected phase `ck_mux` that sees `CR` high sets
   DFF_01. Its output `R_FF` clears DFF_02, which ends the pulse.
4. DFF_01 is held in reset while the output is low. `R_FF` is therefore a
   short self-clearing pulse, and the next period's set is never blocked.

**The hardest detail: the comparator window.** The compare is one reference
period wide and starts at a rising reference edge. Phase 15 lags by a full
period, so its edge lands on the next counter edge, exactly where `CR` ends.
With a real delay line that edge lands a few picoseconds either side, and the
pulse would come out either right or one whole coarse step long.

The fix is a second copy of the compare, re-timed on the falling reference
edge, which runs half a period later:

* End phases 0..7 (taps at 1/16..8/16) use the direct compare.
* End phases 8..15 (taps at 9/16..16/16) use the re-timed copy.

Either way the sampling edge falls at least 1/16 of a period inside its
window. A re-timed window carried over from count 31 is masked at the start of
the next period. Otherwise a late phase-15 edge from the previous period could
end the new pulse at once.

The window and its mask are this design's own. The source only says that the
comparator and multiplexer must not glitch.

## The delay-locked loop

* **Phase detector.** One flip-flop samples the line output `ck_fb` on the
  rising reference edge:
  * It reads 1 when the line is shorter than a period. The counter then
    steps down, giving less current and more delay.
  * It reads 0 when the line is longer. The counter then steps up.
* **Counter.** The 7-bit counter is clocked by `clk1`, which the skew buffer
  delays 1 ns behind the reference, so it never takes a decision the detector
  is still making.
  * It resets to 64.
  * It saturates at 0 and 127. A request beyond either limit raises a
    one-cycle `underrun` or `overrun` flag.
* **Current DAC.** It sums binary-weighted legs, so the control current is
  `I_BIAS * (code + 28*ITRIM[0] + 40*ITRIM[1])`.
* **Delay cells.** Each cell delays by `X_PVT * (VDD/2) * C_L / I`.

The model is calibrated so that the typical corner (`X_PVT = 1.0`), with both
trims on and code 64, gives 16 x 1.953 ns = 31.25 ns. `X_PVT` scales every
cell. Two settings reproduce the source's corner data:

* `0.8256`: the fast corner, 25.8 ns at code 64. It locks near code 41.
* `1.312`: the slow corner, 41 ns at code 64. It locks near code 105.

The loop moves at most one code per reference cycle. From reset it reaches
its lock band in 23 cycles at the fast corner and 42 cycles (1.3 µs) at the
slow corner. That is well inside the 15–20 µs the rest of a converter takes
to start after reset.

Limits of this loop. They are properties of the single-flop detector; the
model reproduces them and does not correct them:

* **Line shorter than half a period.** The detector samples the wrong edge,
  reads "too long", and drives the code the wrong way, up to 127. The trims
  and cell sizing must keep the line above T/2 at every corner. The source
  quotes 24 ns as the worst fast-corner line at code 64, against the 15.6 ns
  limit.
* **Line between 1.5 and 2 periods.** The loop settles on two periods. The
  detector cannot tell 2T from T.
* **Dither.** In lock the code dithers over three adjacent codes, not two. An
  edge takes a whole period to cross the line and sees the code change on the
  way. At the slow corner one code is about 0.18 ns of line. This moves the
  last tap by a fraction of an LSB. The worst width error measured over the
  end-to-end test is 0.12 LSB typical, 0.14 LSB fast and 0.07 LSB slow. The
  source's accuracy target is 0.4 LSB. Measured on a single cell, the dither
  spreads its delay by about 30 ps in the typical corner. A two-code dither
  would give half that. 30 ps is the source's jitter budget.

## Low-power (PFM) mode

At light load a buck converter switches to pulse-frequency modulation, which
has its own comparator loop. With `en = 0`:

* The DLL's reference is stopped by a latch-based clock gate. The latch is
  transparent while the clock is low, so it never cuts a clock pulse.
* The counter holds its code, so the loop is still locked when `en` returns
  to 1.
* `pwm` is cleared at once and held low.
* The coarse counter and `ck_sw` keep running for the rest of the converter.

Keeping `ck_sw` running and holding `pwm` low are this design's choices.

## Parameters and ports of `dpwm_top`

| Parameter | Default | Meaning |
|---|---|---|
| `X_PVT` | 1.0 | Corner factor on every cell delay (1.0 typical, 0.8256 fast, 1.312 slow) |
| `CL_FF` | 286.458 | Load capacitance per delay cell, fF (calibration) |
| `SKEW_NS` | 1.0 | Delay from the DLL reference to the counter clock, ns |

The fixed sizes are in `dpwm_pkg`:

* 9-bit word, split into 5 coarse and 4 fine bits.
* 16 phases and 32 reference periods per switching period.
* A 7-bit DAC that resets to 64.
* Trim weights 28 and 40.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 32 MHz reference |
| `rst_n` | in | 1 | Asynchronous reset, active low |
| `en` | in | 1 | 1 = PWM mode, 0 = PFM / low power |
| `dword` | in | 9 | Duty word, taken once per period |
| `itrim` | in | 2 | DAC trim legs (28·I and 40·I) |
| `i_bias` | in | real | DAC unit current, µA |
| `pwm` | out | 1 | Modulator output |
| `ck_sw` | out | 1 | 1 MHz switching clock |
| `dll_code` | out | 7 | DLL control code |
| `dll_overrun` | out | 1 | Increment requested at code 127 |
| `dll_underrun` | out | 1 | Decrement requested at code 0 |

## Departures from the source design and things left out

* **The word arrives as D-1.** The counter and phase select work on D-1, and
  the late-phase compare is re-timed on the falling edge (see above). The
  source gives the set/compare/sample/reset sequence but not this alignment.
* **Trim-leg mapping.** `ITRIM[0]` is taken to drive the 28·I leg and
  `ITRIM[1]` the 40·I leg. The source does not say which bit drives which.
* **Pins left out:**
  * the counter's `CY_CHG` pin, whose function is not described;
  * the delay line's `CAP<33:0>` load-trim pins;
  * the counter's inverted output `QN`, which is produced but not used.
* **Idealised analog behaviour.**
  * Cells have equal rise and fall delays; the pseudo-symmetric cell's
    picosecond skew is not modelled.
  * The multiplexer and flip-flops have no delay. The source removes their
    combined error by delaying the set clock by 0.2 LSB, which has no
    counterpart here.
  * A cell's delay is fixed by the control current at the moment an edge
    enters it.
* **Parts of the converter, not of the modulator.** These are not included:
  the power stage, the ADC, the digital PID compensator and the PFM
  controller. Their connection points are the `dword`, `pwm` and `en` ports.

## Simulating

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops. Build one with Verilator 5 (the
analog models need `--timing`):

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/dpwm_pkg.sv \
          tb/tb_dpwm_top.sv --top-module tb_dpwm_top
./obj_dir/Vtb_dpwm_top
```

| Testbench | What it checks |
|---|---|
| `tb_dpwm_full` | The top at its default parameters: lock, then 40 periods of words checked to half an LSB |
| `tb_dpwm_top` | Five modulators at typical, fast, slow and the two saturating corners. It covers words 0 and 511, words on and next to multiples of 16, and random words; it checks each width to half an LSB and the worst error to 0.4 LSB; the mode switch; overrun and underrun. It counts every mechanism and fails on any that never occurred |
| `tb_dll` | Lock codes worked out from the delay law at six corners; phase spacing; switching jitter of one cell; saturation and flags; the T/2 failure; clock gating with the code held |
| `tb_dpwm_pulse_gen` | All 512 words against ideal phases, to 1.5 ps; then a line 0.4 % too long, with words ending in the last slot followed by words ending on tap 15 |
| `tb_dpwm_counter`, `tb_dpwm_phase_mux` | Count, switching clock and word split; mux select |
| `tb_dll_*` | Each DLL part on its own: detector sense, counter saturation and flags, DAC sum, cell delays, gate glitch-freedom, skew |

Edit the testbenches to try other corners: `X_PVT` on `dpwm_top` or `dll`.
`itrim` and `i_bias` can also be changed at run time.
