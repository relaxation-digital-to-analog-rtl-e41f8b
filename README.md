# Relaxation DAC with foreground digital self-calibration

A relaxation DAC (ReDAC) makes an analog voltage from an N-bit word with no
matched components at all. A three-state buffer drives a single RC low-pass
network, one bit per clock period T, LSB first. In each period the capacitor
moves towards VDD·b_i by a fraction 1 − exp(−T/RC). If T = RC·ln 2, every period
halves the charge already on the capacitor and adds VDD·b_i/2. After N periods
the capacitor holds exactly

    V_DAC(n) = n / 2^N · VDD.

The buffer is then released and the capacitor holds the value.

Linearity therefore depends on one quantity only, the ratio T/RC. If T is off by
ΔT, the converter bends around mid-scale. The step between codes 2^(N−1) − 1 and
2^(N−1) is no longer 1 LSB but about 1 + 2^N·ln2·ΔT/T LSB. The worst INL is then
about 2^(N−1)·ln2·ΔT/T LSB. At 10 bits, a 1 % period error costs about 3.5 LSB.

This design tunes T automatically, without a reference voltage or a fast clock.
The ReDAC clock comes from a voltage-controlled relaxation oscillator, VCO1. A
second oscillator, VCO2, together with a counter, re-measures the DAC output. The
controller drives the difference between the outputs for 2^(N−1) and
2^(N−1) − 1 to zero. Once that difference is zero, the mid-scale error is at
most 1 LSB at the calibration resolution.

## Architecture

```
                +----------------------------- CLK_ReDAC ----------------------------+
                |                                                                    |
  din --> cal_fsm --conv_start/code--> redac_ctrl --buf_data/buf_en--> redac_rc_model --v_c--+--PG1--C_VCO1--> relax_vco (VCO1)
            ^  |                      (+ redac_shift_reg) --cap_reset-->                     |
            |  +-- set_vco1 / set_vco2 ------------------------------------------------------+--PG2--C_VCO2--> relax_vco (VCO2)
            |  +-- cnt_clr / cnt_en --> binary_counter <------------- CLK_TEST --------------------------------------+
            +------------- m ------------+
```

| Module | Kind | Role |
|---|---|---|
| `redac_selfcal_top` | simulation model | The whole converter: digital part plus analog models, wired as above |
| `cal_fsm` | synthesizable | Calibration controller, holds the calibration word CAL, then runs normal mode |
| `redac_ctrl` | synthesizable | ReDAC control unit: one frame of N+2 clock periods per conversion |
| `redac_shift_reg` | synthesizable | Parallel-load shift register, LSB first |
| `binary_counter` | synthesizable | Counts rising and falling edges of CLK_TEST in a window (the VCO-ADC) |
| `redac_rc_model` | behavioural | Three-state buffer, R, C, and a capacitor reset switch |
| `pass_gate_hold` | behavioural | Pass gate PG1/PG2 with its hold capacitor C_VCO1/C_VCO2 |
| `relax_vco` | behavioural | Relaxation VCO, period T = 2·C·V_TRIP / I(V_VCO) |

All digital logic runs on CLK_ReDAC, the output of VCO1, except the counter,
which runs on CLK_TEST from VCO2. The analog parts are real-valued models. They
use `real` ports, `$exp` and `#` delays, so the top is a simulation model and not
a netlist.

## The calibration loop

The controller repeats three steps, all at the current VCO1 frequency:

1. **Set the clock.** It converts CAL and closes PG1 for `SET_CYCLES` periods,
   so the ReDAC output sets the VCO1 control voltage V_VCO1. A higher V_VCO1
   means less current in the oscillator and a longer period. V_VCO1 = 0 V, the
   state after power-up, is the fastest clock.
2. **Measure the upper code.** It converts 2^(N−1) and closes PG2, which sets
   V_VCO2. It then clears the counter and opens it for H periods of CLK_ReDAC.
   The count is m_hi ≈ 2·H·T_CLK_ReDAC / T_CLK_TEST.
3. **Measure the lower code.** The same for 2^(N−1) − 1 gives m_lo.

Then dm = m_hi − m_lo. If dm = 0 the controller stops and enters normal mode.
Otherwise it sets CAL ← CAL + BETA·dm, saturated to 0…2^N − 1, and starts again
at step 1.

**Why this sign.** The VCO frequency falls as its control voltage rises, so dm
has the opposite sign to the voltage step V(2^(N−1)) − V(2^(N−1) − 1). If the
clock is too slow (ΔT > 0), the step is too large and dm is negative. CAL then
decreases, V_VCO1 falls and the clock speeds up. With BETA > 0 the loop is
negative feedback.

**Why an offset in the ADC does not matter.** Only the difference of two counts
is used. Any constant offset in the VCO2 ADC, and any fixed error added when PG2
samples the output, cancel in dm. Near convergence, VCO2 sees almost the same
voltage in steps 2 and 3, so its nonlinearity does not matter either.

**Why the hold capacitor matters.** Closing PG1 shares charge between the ReDAC
capacitor C (450 fF) and C_VCO1 (1 pF by default). Each update therefore moves
V_VCO1 only part of the way towards V_DAC(CAL). The held voltage acts as a
low-pass filter on CAL, which keeps the loop from ringing. It also gives V_VCO1
finer than 1-LSB steps while CAL is still moving.

Timing of one iteration, in CLK_ReDAC periods:

    3·(N+3) + 3·SET_CYCLES + 2·(2·SYNC_WAIT + H) + 1

With the defaults (N = 10, SET_CYCLES = 4, SYNC_WAIT = 8, H = 1024) this is
2132 periods, about 85 µs at 40 ns; the end-to-end bench measures 84 µs.

## The ReDAC frame

`redac_ctrl` turns one conversion into N+2 clock periods. The length matches the
converter's sampling period T_conv = (N+2)·T:

| Period | buf_en | Other outputs | What happens |
|---|---|---|---|
| 0 (LOAD) | 0 | cap_reset = 1 | The shift register holds the code and C is discharged to 0 V |
| 1 … N (DRIVE) | 1 | buf_data = b0 … b(N−1) | The buffer drives VDD·b_i |
| N+1 (HOLD) | 0 | done = 1 | C holds V_DAC(code) |

A new `start` is accepted in the HOLD period, so back-to-back frames give one
sample every N+2 periods. At 39.9 ns per period that is 479 ns per sample, about
2.1 MS/s. In normal mode `sample_valid` (which equals `done`) marks the HOLD
period in which `v_out` is valid. The next frame starts by discharging C.

## Counter and clock-domain crossing

`clr` and `en` come from the CLK_ReDAC domain. They pass through two-flop
synchronizers in the CLK_TEST domain, and one counter on each edge of CLK_TEST
does the counting. The window seen by the counter is delayed by 2–3 CLK_TEST
periods but keeps its length. The controller holds `clr` for `SYNC_WAIT`
periods. After the window it waits another `SYNC_WAIT` periods before reading
`m`, which is static by then. This requires
`SYNC_WAIT · T_CLK_ReDAC > 3 · T_CLK_TEST`. With the defaults, VCO2 runs at about
65 ns against 320 ns.

Each count carries about ±1 of quantization, so dm carries about ±2. That sets
the resolution of the loop. With H = 1024, one count of dm corresponds to about
0.4 LSB of the mid-scale step.

## Parameters

| Parameter | Default | Where | Origin |
|---|---|---|---|
| `N` | 10 | all | converter resolution |
| `R_OHM`, `C_F`, `VDD` | 128 kΩ, 450 fF, 0.6 V | `redac_rc_model` | converter values, T* = RC·ln2 = 39.93 ns |
| `H` | 1024 | `cal_fsm`, top | chosen, see below |
| `BETA` | 1 | `cal_fsm`, top | chosen |
| `CNT_W` | 16 | counter, `cal_fsm` | chosen |
| `CAL_INIT` | 0 | `cal_fsm` | chosen (V_VCO1 = 0 V, fastest clock) |
| `SET_CYCLES`, `SYNC_WAIT` | 4, 8 | `cal_fsm` | chosen |
| `C_VCO1_F`, `C_VCO2_F` | 1 pF, 100 fF | top | chosen |
| `C_OSC_F`, `V_TRIP`, `I_MAX_A`, `V_SLOPE` | 100 fF, 0.3 V, 2.41 µA, 0.3 V | `relax_vco` | chosen so that V_VCO = 147.8 mV gives T = 40.8 ns |

H and C_VCO1 were chosen by simulating the loop:

- **H = 256:** the count quantization is as large as the signal, and the loop
  stops up to 0.8 % away from T*.
- **H = 1024 with C_VCO1 = 100 fF:** the loop keeps oscillating.
- **H = 1024 with C_VCO1 = 1 pF:** the loop stops at −0.16 %. The ideal stopping
  point, where the mid-scale step is 0, is −0.14 %.

## Departures and choices

These are choices made here, not part of the calibration scheme:

- **Capacitor reset.** The reset of the ReDAC capacitor is an ideal switch,
  closed during the LOAD period. The scheme needs v_C = 0 at the start of each
  conversion, but the mechanism is a choice here.
- **Charge sharing.** The pass gates share charge once, at the moment they close.
  Charge injection and the load the hold capacitors put on C are not modelled.
- **VCO current law.** The oscillator current is modelled as I = I_MAX·exp(−V/V_SLOPE),
  with the transistor in weak inversion. The period formula T = 2·C·V_TRIP/I is
  the oscillator's own.
- **Stop rule and iteration limit.** The loop stops only when dm = 0 and has no
  iteration limit. Saturation of CAL is added.
- **Start-up.** Calibration starts by itself after reset. A pulse on `cal_start`
  in normal mode runs it again, starting from the current CAL.
- **Calibration resolution.** Calibration runs at the converter's own N bits.
  Calibrating at N+E bits, which would shrink the remaining INL towards
  2^−E LSB, is not built.

## Verification

Each module has a self-checking bench in `tb/`. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Bench | What it checks |
|---|---|
| `tb_redac_shift_reg` | Bit order, hold, and load priority |
| `tb_redac_ctrl` | Every period of a frame, and the N+2 sample period for back-to-back frames |
| `tb_binary_counter` | Count against 2·H·T_ReDAC/T_TEST (±2) for random VCO2 periods, clear, and hold |
| `tb_cal_fsm` | The controller with the real `redac_ctrl` and a simple plant: codes per step, pass-gate order, window length, every CAL update, both saturation limits, the stop at dm = 0, iteration length, and normal mode |
| `tb_redac_rc_model` | Output against the closed form V_DD·(1−a)·Σ b_i·a^(N−1−i), for T at T* and at ±5 % |
| `tb_pass_gate_hold` | The charge-sharing formula, hold, and convergence |
| `tb_relax_vco` | Period against the formula, the 147.8 mV / 40.8 ns point, and monotonicity |
| `tb_redac_selfcal_top` | The whole converter at its default size (details below) |

`tb_redac_selfcal_top` proceeds as follows:

1. Start from a 24.9 ns clock.
2. Calibrate: 14 CAL updates, about 1.26 ms of simulated time.
3. Check that dm = 0 and that the VCO1 period is within 0.5 % of RC·ln2. The
   result is 39.86 ns.
4. Convert all 1024 codes. Each is checked against the closed form at the
   measured period.
5. Check linearity. Endpoint INL is 0.57 LSB maximum, DNL 1.15 LSB maximum, and
   V(512) − V(511) = −0.15 LSB.
6. Check the (N+2)·T sample period, run a second calibration through `cal_start`,
   and count each loop mechanism.

`tb_redac_sine_workload` compares the calibrated converter with one whose clock
is 3.2 % fast. The fast-clock converter is `redac_ctrl` and `redac_rc_model`
clocked by the bench. Both convert a sine at 90 % of full scale, 100 samples per
period, over 4 periods. The bench fits the samples at the known frequency and
takes SNDR and ENOB from the residual and THD from harmonics 2 to 5:

| Converter | SNDR | THD | ENOB | max INL |
|---|---|---|---|---|
| Calibrated (period 39.86 ns, 478 ns per sample) | 60.8 dB | −72.3 dB | 9.81 bits | 0.57 LSB |
| Clock 3.2 % fast | 39.3 dB | −44.0 dB | 6.24 bits | 11.06 LSB |

For the fast clock, the first-order estimate 2^(N−1)·ln2·|ΔT|/T is 11.4 LSB. The
analog models are ideal apart from the period error, so these figures bound what
real transistors would reach.

Run any bench with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl tb/tb_redac_selfcal_top.sv \
              --top-module tb_redac_selfcal_top && ./obj_dir/Vtb_redac_selfcal_top

The full-size run takes well under a second of wall time. The synthesizable
modules (`cal_fsm`, `redac_ctrl`, `redac_shift_reg`, `binary_counter`) lint clean
under `verilator --lint-only -Wall`, apart from a note about the asynchronous
reset also appearing in assertions. They use no vendor primitives.

Not covered: SFDR, and any noise, mismatch or charge-injection effect in the
analog parts.
