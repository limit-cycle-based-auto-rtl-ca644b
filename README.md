# Limit-cycle auto-tuning controller for a digitally controlled buck converter

A digitally controlled switch-mode supply needs compensator gains that match
its power stage, but the output capacitance and the load are rarely known in
advance and can change in use. This controller finds them out by itself. When a
disturbance upsets the loop, it falls back to a slow, safe compensator. Once
the output is back in regulation, it coarsens its own DPWM on purpose, from 8
bits to 4. A loop whose actuator is coarser than its sensor cannot settle: it
falls into a small, steady oscillation, a *limit cycle*. The peak-to-peak
amplitude and the period of that oscillation depend on the output capacitor C
and the load R. So the controller measures the two, looks up the nearest
pre-calibrated operating point, and loads that point's PID coefficients
together with an estimate of R and C.

The target is a 12 V to 5 V, 10 W buck converter switching at 200 kHz, with a
20 uH inductor and 38 to 150 uF of output capacitance. The RTL is the digital
part only. The power stage, the sensing divider and the ADC are outside it,
reached through ports.

## Blocks

| file | role |
|---|---|
| `lco_pkg` | widths, the coefficient triple `coef_t`, the table word `lut_entry_t`, the mode enum |
| `error_subtractor` | e[n] = v_ref - ADC code, saturated to 8 bits signed |
| `pid_compensator` | incremental PID `u += a*e[n] + b*e[n-1] + c*e[n-2]`, one shared multiplier |
| `hl_dpwm` | counter DPWM, 8-bit, or 4-bit when `low_res` is set; gives the per-period strobe |
| `dead_time` | two non-overlapping gate drives from c(t) |
| `instability_detector` | flags a disturbance; signals "start identification" once regulation returns |
| `amplitude_estimator` | A_max, A_min and the peak-to-peak amplitude of the error |
| `zero_cross_logic`, `lc_counter`, `lc_timer`, `frequency_detector` | the period measurement, wrapped in `frequency_extractor` |
| `coef_lut` | 30 calibrated words, searched for the nearest (amplitude, period) |
| `autotune_sequencer` | the mode state machine |
| `auto_tuner` | detector, estimators, table and sequencer together |
| `lco_digital_controller` | top: the loop plus the auto-tuner |

## The loop and its timing

The clock runs at 256 times the switching frequency (51.2 MHz for 200 kHz), so
the DPWM is a plain 8-bit counter compared against the duty command. At each
counter wrap, `adc_sample` pulses. The controller takes `adc_code` with that
strobe, forms e[n] one clock later, and has a new duty command 5 clocks after
that. The command is applied from the next counter wrap. That gives exactly
one switching period of loop delay. The duty and the resolution only change
at a period boundary, so no period is ever cut short.

The PID is written in velocity form. The three table coefficients are the
taps a, b, c of `u[n] = u[n-1] + a e[n] + b e[n-1] + c e[n-2]`. They are
signed 10-bit numbers in units of 1/64 of a duty LSB per error LSB
(`ACC_FRAC = 6`). For a positional PID with gains Kp, Ki, Kd, the taps are
a = Kp+Ki+Kd, b = -Kp-2Kd and c = Kd. The accumulator is clamped to the duty
range, which also stops integrator wind-up. One multiplier serves all three
taps over three clocks.

## The tuning sequence

`autotune_sequencer` has five modes. `mode` shows which one is active.

1. **NORMAL**: the tuned coefficients, 8-bit DPWM. The instability detector
   is armed. A disturbance (|e| > `E_DIST` = 16 LSB) moves to REGAIN.
   The threshold sits above the error of an ordinary load step under a
   tuned set, so such a step is ridden out and does not trigger a retune.
   For `BLANK_PERIODS` = 100 periods after a tuning the detector stays disarmed,
   so that the dying limit cycle is not taken for a new disturbance.
2. **REGAIN**: the slow coefficient set `slow_coef`, a top-level input, brings
   the output back. The controller also starts here after reset. When |e| has
   stayed within `E_REG` = 2 LSB for `N_REG` = 64 periods after a disturbance,
   the detector issues the start signal I.
3. **SETTLE**: the DPWM drops to 4 bits. The slow set stays in use. After
   `SETTLE_PERIODS` = 100 periods the limit cycle has grown, and the
   measurement starts.
4. **IDENTIFY**: the amplitude and the period are measured (next section).
5. **LOOKUP**: the table is searched. A hit loads its coefficients and R/C
   estimates, then NORMAL. A miss, or an identification that gave up, goes
   back to REGAIN and keeps the slow set.

## Measuring the limit cycle

This is the least obvious part of the design.

**Amplitude.** The estimator follows the error. It declares a maximum when
the slope turns from rising to falling, and a minimum for the opposite turn.
The peak-to-peak amplitude is the difference between the last maximum and the
last minimum. A quantised error has flat tops and one-LSB noise, so a turn
only counts once the error has moved `HYST` = 2 LSB back from the running
extremum. Without that, noise shows up as extra extrema.

**Period.** Four blocks work together.
- The comparator logic watches the error against zero. It pulses `start` at
  the first change of side and `stop` at the third, which is one full
  oscillation. A sample exactly at zero keeps the previous side.
- The counter counts switching periods between `start` and `stop`.
- The timer opens a window of `TIMER_LEN` = 200 periods, and the counter only
  runs inside it.
- The frequency detector judges the outcome:
  * **A full period was counted, and the extrema are symmetric** within
    `SYM_TOL` = 1 LSB. Then T_LC, the period in switching periods, is the
    result.
  * **Counted, but lopsided.** The reference is moved one LSB against the
    asymmetry, and the window restarts. The error is v_ref minus the
    measurement, so a positive A_max + A_min lowers v_ref.
  * **The window closed with no full period** (T_LC = 0: the duty happened to
    sit on a 4-bit level and nothing oscillates). The reference is moved down
    one LSB, which pushes the duty off the level, and the window restarts.
  * **`MAX_TRIES` = 4 attempts.** The last symmetric-or-not count is accepted.
    If there never was an oscillation, the identification reports failure.

  The offset only applies during IDENTIFY. It is dropped when tuning ends.

The design keeps the period T_LC and does not divide it into a frequency
f = f_sw / T_LC. The two carry the same information, and the table search
works on the period directly, with no divider.

## The coefficient table

`coef_lut` holds 30 words. Each word is 64 bits: a valid bit, the calibrated
amplitude and period, the three coefficients, an R code and a C code. The
system writes the words through `lut_wr_*`; reset clears them. A lookup visits
one word per clock. It keeps the valid word with the smallest
|amplitude difference| + |period difference|, and on a tie the lower address.
`done` comes 31 clocks after `lookup`. Writing during a search is forbidden,
and an assertion checks it.

The table holds operating points, not a formula. The intended use is to
calibrate it once:
1. Run the converter at each (R, C) point.
2. Let it identify with an empty table.
3. Store the measured (amplitude, period) with that point's coefficients and
   R/C codes.

The end-to-end testbench does exactly this over 6 loads x 5 capacitors. The
R and C codes mean whatever the calibration puts in them; in the testbench
they are ohms and microfarads.

## What is given and what is chosen

These follow the published design:
- the overall loop;
- the idea of detecting instability, retreating to a slow compensator and
  identifying only after regulation returns;
- 8-bit DPWM in operation and 4-bit during identification;
- amplitude from the turning points of the error difference;
- the period from three zero crossings, counted in switching periods inside a
  timer window;
- the T_LC = 0 case handled by a small reference change;
- the same block making the extrema symmetric;
- three 30-word, 10-bit coefficient tables that also give R and C estimates;
- the converter's ratings.

These are this design's own choices, because the source does not give them:
- every threshold and length named above;
- the disturbance threshold of 16 LSB;
- the clock rate and the counter DPWM;
- the 8-bit ADC and error widths;
- the velocity-form PID and its scaling;
- the hysteresis in the extremum and zero-crossing logic;
- the direction and size of the reference steps and the retry limit;
- the blanking after tuning;
- how the table is addressed: nearest neighbour over stored features;
- the fall-back on a miss;
- the dead time (4 clocks, 78 ns);
- the values of the slow set.

Further departures:
- The original prototype split the controller between a DSP board and an
  FPGA that held only the DPWM. Here everything is one clocked RTL design.
- The original marks an extremum at the sample just before the slope changes
  sign. The hysteresis here reports the same peak value, a few periods later.
- The original's table coefficients came from a digital redesign of the PID
  for each (R, C) point. Here the table is writable, and its contents are left
  to the calibration. The testbench uses three hand-tuned sets, chosen by
  capacitance.
- The original also suggests measuring the period from the low bits of the
  duty command instead of the error. That variant is not built.

The source's instability detector is taken from other work and not
described. The threshold detector here is the simplest one that behaves as
described.

In the test plant, the measured limit cycles are 17 to 52 switching periods
long (3.8 to 11.8 kHz) and 5 to 19 LSB peak-to-peak (0.25 to 0.95 V). That is the
same order as the published measurements, not the same values. The table's
contents belong to the converter that calibrates it.

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/lco_pkg.sv tb/tb_lco_digital_controller.sv \
    --top-module tb_lco_digital_controller -o sim
./obj_dir/sim
```

Use the same command for any `tb/tb_<module>.sv`.

`tb/buck_plant_model.sv` is a behavioural buck stage for the end-to-end test.
It uses real arithmetic and forward Euler with one step per clock. It has
ideal switches, 0.1 ohm of inductor resistance, 0.02 ohm of capacitor ESR, an
ADC of 50 mV per code, and an added capacitor that arrives uncharged.

`tb_lco_digital_controller` runs the top at its default parameters, in about
10 s:
- it calibrates all 30 points;
- it loads the table, tunes at start-up, and then sees C step from 38 to
  150 uF: the step is detected, the converter regains regulation, identifies
  the 150 uF word and regulates within 2 LSB;
- it regulates a load step to 3.1 ohm (2.5 W to 8 W at 5 V);
- it scans the reference until a T_LC = 0 window occurs and is recovered
  from.

It counts every mechanism and fails if one never happened:
- instability;
- identification starts;
- T_LC = 0 and symmetry retries;
- table hits and misses;
- 4-bit periods;
- dead time;
- gate overlap, which must never happen.

`tb_load_transient` repeats the published comparison of a 2.5 W to 8 W load
step (10 to 3.125 ohm, 38 uF) under the slow set and under the tuned set. In
the model, the tuned set peaks at 10 LSB and recovers in 53 periods. The slow
set peaks at 13 LSB and recovers in 58 periods. The testbench checks that the
tuned loop stays in normal mode and is no worse on either measure. The gain
over the slow set is smaller than the published one, because the slow set
used here is only moderately slow.

The unit testbenches compare each block with an independent model: random
stimuli for the subtractor, the PID, the DPWM, the dead time, the table search
and the counter, and scripted sequences for the rest.

## Limits

- The controller does not retune after a load step that does not trip the
  detector. That is by design: the detector only reacts to large errors.
- A load below the calibrated range (3.1 ohm against a 5 ohm lowest point)
  maps to the nearest word.
- The period counter saturates at 255 switching periods (0.8 kHz).
- The window of 200 periods must hold 1.5 periods of the slowest limit
  cycle, so oscillations slower than about 1.5 kHz need a longer
  `TIMER_LEN`.
- The behavioural plant is idealised. On real hardware, the thresholds,
  `SETTLE_PERIODS` and the slow set should be checked again.
