# Minimum-deviation digital controller for buck converters

A voltage-mode digital controller for single- and two-phase synchronous buck
converters that, on a load step, brings the output back with close to the
smallest voltage deviation the power stage allows, without knowing the
inductor or capacitor values. In steady state it is an ordinary
PID + digital PWM regulator. When the output moves past a threshold it takes
the switches over for one short, fully determined switching sequence:

1. it turns the main switch fully on (load increase) or off (load decrease),
   so the inductor current slews towards the new load current as fast as the
   power stage allows;
2. it waits for the output-voltage extreme point (valley or peak). At that
   instant the capacitor current is zero, so the inductor current equals the
   new load current;
3. it emits one on/off action whose lengths come only from the duty ratio D.
   This action gives the inductor current the DC value and ripple of the new
   steady state;
4. it hands control back to the PID, preset to the new duty ratio.

The only information needed is the time of the extreme point and the
steady-state duty ratio. The RTL targets the reference operating point:
12 V to 1.8 V, 500 kHz switching, 0.47 uH per phase, 400 uF. It includes the
asynchronous track-and-hold ADC (a behavioural model of its analog front end
plus the digital error decoder), a duty ratio corrector that learns
loss-related duty offsets, a dual-extreme-point variant that reduces the
effect of detection delay, interleaved two-phase operation, and inputs for an
external RC-matched transient detector for output capacitors with large ESR.

In closed-loop simulation against a switching model of the power stage
(`tb/tb_mdc_top.sv`), a 5 A to 25 A step gives about 70 mV of deviation. The
same step gives about 365 mV with the PID alone.

## Block diagram

```
 vout, vref (analog)                                       c[1:0] to the gate drivers
      |                                                         ^
      v                                                         |
 adc_frontend_model --st_h/st_l/dy_h/dy_l--> adc_error_decoder  |
                                                  | e[n]        |
             +------------------+-----------------+             |
             v                  v                 v             |
   valley_point_detector   pid_compensator    current_          |
   (valley/peak pulses)--> (d[n], d_int) <--> reconstruction -->dpwm
                                   ^          _logic  sw_on/sw_off, restart
                                   |             ^ |
                                   +--d_est-- duty_ratio_corrector
 ext_lohi/ext_hilo/ext_valley (off-chip detector) --> sync --> reconstruction logic
```

| Module | File | Role |
|---|---|---|
| `mdc_top` | `rtl/mdc_top.sv` | Wires everything; synchronises the external detector inputs |
| `mdc_pkg` | `rtl/mdc_pkg.sv` | Widths (`DPWM_BITS` = 13, `ERR_BITS` = 7) and the state enum |
| `adc_frontend_model` | `rtl/adc_frontend_model.sv` | Behavioural model of the ADC's analog part (not synthesizable) |
| `adc_error_decoder` | `rtl/adc_error_decoder.sv` | Comparator edges to the signed error e[n] |
| `valley_point_detector` | `rtl/valley_point_detector.sv` | Extreme points from the sign change of the slope of e[n] |
| `pid_compensator` | `rtl/pid_compensator.sv` | Steady-state compensator |
| `dpwm` | `rtl/dpwm.sv` | 13-bit, two-output interleaved PWM with per-phase overrides |
| `current_reconstruction_logic` | `rtl/current_reconstruction_logic.sv` | Mode controller and switching-sequence engine |
| `duty_ratio_corrector` | `rtl/duty_ratio_corrector.sv` | Learns the loss-related duty offset per step size |

Clocking: a single clock drives all logic. The DPWM is a plain counter, so the
clock is 2^13 x 500 kHz = 4.096 GHz at the default parameters. This is a
simulation-level reference, not a practical clock. A silicon version would use
a hybrid counter/delay-line DPWM, which is not included here (see
"Departures" below). Every duration below is in clock cycles, and one
switching period T is 2^DW cycles.

## The reconstruction sequence

This is the part that needs the most care, and the reason the controller
exists.

**Light-to-heavy step (states LH1 and LH2).** When e[n] = Vref - vout reaches
`e_lohi`, the controller enters LH1 and forces every enabled phase's main
switch on. The inductor current ramps up at (Vin - Vout)/L. Meanwhile the
output keeps falling, because the capacitor still supplies the difference
between the load and the inductor current. The output reaches its valley when
the inductor current reaches the new load. At the valley point the controller
enters LH2 and produces:

* main switch on for `D*T/2`, then
* main switch off for `(1-D)*T`,

where D is the duty-ratio estimate `d_est`. After the on interval the current
is half a ripple above the load. After the off interval it is half a ripple
below the load. That is exactly the valley of a steady-state ripple waveform
at the new load, and a normal PWM period can start from it. To make that
period start without a glitch, the DPWM counter is restarted at that moment
(`dpwm_restart`) so that its period begins where the sequence ends. The
sequence does not try to recover the charge the capacitor lost before the
valley. It only stops the deviation from growing, and it leaves the converter
in a state from which the PID removes the remaining offset without a second
large excursion. That keeps the inductor current close to the new load
throughout, with no large current overshoot.

**Heavy-to-light step (HL1 and HL2).** When e[n] falls to `e_hilo` (output
too high), the main switches are forced off. The current falls at Vout/L until
the output peaks. HL2 then keeps the switch off for a further `(1-D)*T/2`,
which lands the current on its ripple valley at the new load.

**Two phases.** With `two_phase` set, LH1 turns both main switches on. At the
valley point the leading phase runs the single-phase sequence above. The
lagging phase is switched off for `(1-D)*T/2`, which places it half a period
behind the leading one, as in interleaved steady state. The first phase to
finish restarts the DPWM counter at its own period start (0 for phase 1,
T/2 for phase 2). A phase still in its sequence keeps its override until its
own timer ends. For a heavy-to-light step both phases get the
`(1-D)*T/2` extension.

**Dual-extreme point.** The valley is detected late: with a 4 mV quantization
step the output has to rise one full step before the slope is seen to change
sign. During that delay the inductor current rises at the steep
(Vin - Vout)/L slope, so it overshoots. With `dual_en` set, the off part of
LH2 is changed. After the `D*T/2` on-time, the switch stays off until the next
output peak, which is the moment the current falls back to the load current.
Then a further `(1-D)*T/2` of off-time follows. The peak is passed on the
shallow Vout/L slope, so the same detection delay costs much less current
error. The wait has a timeout of one period. With the ADC as the detector,
the peak after an accurate reconstruction is often smaller than one
quantization step, and then the timeout ends the wait. With the external
detector, the capacitor-current zero crossing is seen directly and the peak
is found.

**Choosing D.** D_old is read from the PID just before the ramp starts. The
value read is the PID's integrator, not its full output (see the PID section).
At the extreme point, the corrector adds its learned offset for this
direction and ramp length, giving `d_est`. The PID is preset to `d_est` while
the sequence runs (`tr_mode` high), so the hand-back starts from the new
duty ratio.

## Mode controller and adaptive threshold

`current_reconstruction_logic` has six states:

| State | Meaning | Leaves to |
|---|---|---|
| S1 | PID, nominal thresholds `e_lohi`/`e_hilo` | LH1 / HL1 when a threshold is crossed (or the external detector fires) |
| LH1 | All main switches on, time t_cr counted | LH2 at the valley point; HL1 if the error reverses past `e_hilo` |
| LH2 | Reconstruction sequence | S2 when all phases are done |
| HL1 | All main switches off, time t_cf counted | HL2 at the peak point; LH1 if the error reverses past `e_lohi` |
| HL2 | Reconstruction sequence | S2 |
| S2 | PID, threshold raised to the extreme error of the last ramp | S1 when e[n] = 0; LH1 / HL1 if \|e\| reaches the raised threshold |

S2 prevents toggling between modes. Small follow-up disturbances, or small
mismatches left by the sequence, cannot re-trigger suppression, because the
threshold is now the size of the transient just handled. A genuinely larger
step still re-triggers. The raised threshold is never below the nominal one.
The external detector triggers only from S1, because its window is fixed.

Once e[n] has stayed at zero for `RECOVER_PER` (16) switching periods in S1,
the output is considered recovered. The controller then pulses `corr_wr`, so
the corrector stores the duty ratio the PID settled on.

Thresholds matter in practice. Any mismatch at the end of a sequence makes the
output drift, and if that drift reaches the trigger threshold the controller
starts another transient. The end-to-end test uses +-12 LSB (48 mV). With
+-6 LSB the residual error after a sequence, which comes mostly from the
late valley detection, kept re-triggering the suppression logic.

## Track-and-hold ADC

The ADC measures only the error, not the absolute voltage. It has four
comparators and no flash array.

*Analog front end* (`adc_frontend_model`, behavioural): a preamplifier forms
kv = k (Vref - vout) with k = 5. Two **static** comparators at +-k Vq2
(Vq2 = 8 mV) give a three-level steady-state error and define a zero-error
bin. Two **dynamic** comparators keep a window of +-k Vq1 (Vq1 = 4 mV) around
the signal. When the signal leaves the window, the hold signal opens, and
after the S/H settling time (2 ns) the window is re-centred on the signal.
The window therefore moves in a staircase of Vq1 steps. Each upward crossing
is a rising edge of `dy_h`, and each downward crossing is a falling edge of
`dy_l`. Voltages are modelled as microvolt integers.

*Error decoder* (`adc_error_decoder`, RTL): the comparator outputs are
synchronised with two flip-flops. Their edges then step a 64-bit
thermometer-code register up or down. The register converts to a signed
count, e in -32..+32 (+-128 mV). Whenever both static comparators are low
(inside the zero bin), the register is reset to zero. This is the
self-calibration: errors that accumulate from missed or extra steps during
fast slopes are cleared at every zero crossing. Outside the zero bin, the
count is used if its sign agrees with the static comparators; otherwise the
static +-1 is used. This guards against a count that has lost track during a
steep edge. Latency from a comparator edge to e[n] is 4 clock cycles.

The decoder counts synchronously at the system clock instead of clocking the
register from the comparators. At 4.096 GHz this is far faster than the
front end's 15 ns per step. It avoids an asynchronous clock domain, and it is
still limited by the front end's input slew limit of 4 mV / 15 ns
(about 0.26 V/us).

## Steady-state loop: PID and DPWM

`pid_compensator` is a positional PID evaluated once per switching period (at
the DPWM period start):

```
i[n] = sat(i[n-1] + KI*e[n])
u[n] = sat(i[n] + KP*e[n] + KD*(e[n] - e[n-1]))     d[n] = u[n] >> FRAC
```

The defaults are Kp = 5, Ki = 2 and Kd = 40 duty LSB per error LSB, stored
as `KP`/`KI`/`KD` scaled by 2^6. They were tuned on the reference power stage.
They give a loop of roughly fsw/15 crossover with the 4 mV error LSB and the
1.46 mV-per-count DPWM gain.

The integrator value `d_int` is brought out and used as the steady-state duty
ratio (D_old before a transient, D_new for the corrector). Reading the full
output instead picks up the derivative term's response to single quantization
steps, which can be a hundred or more counts. In simulation that made the
reconstructed current wrong and led to sustained toggling between the modes.
While `tr_mode` is high, the integrator and output are preset to `d_steady`
and the error history follows e[n], so there is no derivative kick at
hand-back.

`dpwm` is a trailing-edge counter PWM. Phase 1 is high while `cnt < d`, and
phase 2 is the same comparison against `cnt - T/2`. Each phase latches d[n]
at its own period start. The per-phase `sw_on` / `sw_off` inputs override the
PWM (`c = sw_on | (~sw_off & pwm)`). The synchronous rectifier command is the
complement of `c`. `restart` / `restart_val` load the counter.

## Duty ratio corrector

Conduction and switching losses make the real steady-state duty ratio depend
on the load, so D_old is not exactly right after a step. Without correction
the sequence leaves a current error, and the PID has to remove it, possibly
re-triggering suppression. The corrector keeps a 16-entry table, with 8
entries for each step direction (`hl`). Each entry is addressed by the
measured ramp time (t_cr or t_cf) truncated by 11 bits, which gives 0.5 us
bins, the last bin covering everything above 3.5 us. The ramp time is a proxy
for the size of the load step. At the extreme point (`corr_rd`), the address
and D_old are latched, and `d_est = D_old + table[address]` is produced when
`corr_en` is high. After recovery (`corr_wr`), the entry is replaced by
D_new - D_old. The table starts at zero after reset.

## External transient detector inputs

With a high-ESR output capacitor, the output voltage jumps by I*ESR at a load
step. The ADC-based trigger and valley detection then become unreliable. For
that case an analog detector outside this logic compares vout with an RC copy
of the capacitor voltage vc1. It has three comparators: vout above
vc1 - dVth, vout above vc1 + dVth, and vout above vc1. With `ext_det_en` set:

* `ext_lohi` low starts a light-to-heavy transient;
* `ext_hilo` high starts a heavy-to-light transient;
* rising / falling edges of `ext_valley` replace the ADC valley / peak points
  (vout equals vc1 when the capacitor current is zero).

All three inputs are synchronised with two flip-flops.

## Top-level interface (`mdc_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock (2^DW x fsw) and asynchronous active-low reset |
| `vout_uv`, `vref_uv` | in | int | Analog inputs of the ADC model, in microvolts |
| `supp_en` | in | 1 | Enable the suppression logic (off = plain PID) |
| `dual_en` | in | 1 | Dual-extreme point sequence |
| `two_phase` | in | 1 | Drive two interleaved phases |
| `corr_en` | in | 1 | Apply the duty ratio correction |
| `e_lohi`, `e_hilo` | in | EW | Nominal thresholds in error LSB (positive / negative) |
| `ext_det_en`, `ext_lohi`, `ext_hilo`, `ext_valley` | in | 1 | External detector |
| `c` | out | 2 | Main switch commands of phases 1 and 2 |
| `state`, `tr_mode`, `thr` | out | 3, 1, EW | Mode, suppression active, S2 threshold |
| `e_n`, `e_static`, `e_zero` | out | EW, 2, 1 | ADC error, static decision, zero bin |
| `d_n`, `d_est` | out | DW | PID output and the duty ratio used by the sequence |
| `valley_point`, `peak_point`, `dpwm_restart`, `corr_wr` | out | 1 | Event strobes |

Main parameters: `DW` = 13 (DPWM bits), `LEVELS` = 64 (ADC count range),
`TW` = 16 (ramp-time counter, 16 us at 4.096 GHz), `ABITS` = 3 and
`T_SHIFT` = 11 (corrector table), `KP`/`KI`/`KD`/`FRAC` (PID), `ADC_K` = 5,
`VQ1_UV` = 4000 and `VQ2_UV` = 8000 (ADC model).

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  +libext+.sv rtl/mdc_pkg.sv tb/tb_mdc_top.sv --top-module tb_mdc_top -O3
./obj_dir/Vtb_mdc_top            # add +trace for a per-period trace
```

Replace `tb_mdc_top` with any other testbench name.

| Testbench | What it checks |
|---|---|
| `tb_adc_frontend_model` | Static thresholds; one window step per 4 mV of slow ramp; 2 ns hold pulse |
| `tb_adc_error_decoder` | Random up/down step counts, zero-bin reset, saturation, sign merge rule, 4-cycle latency |
| `tb_valley_point_detector` | Random piecewise-monotonic error against a reference model |
| `tb_pid_compensator` | Cycle-by-cycle match with a reference PID, including saturation, preset and hand-back |
| `tb_dpwm` | Period of 2^13 cycles, high time = d, half-period phase shift, overrides, counter restart |
| `tb_duty_ratio_corrector` | d_est against a reference table through random rd/wr sequences |
| `tb_current_reconstruction_logic` | Exact D*T/2, (1-D)*T, (1-D)*T/2 intervals for all sequence variants; S2 threshold; LH1/HL1 reversals; corrector strobes |
| `tb_mdc_top` | Closed loop with a switching buck model at the default parameters (see below) |
| `tb_mdc_slow_pid` | Closed loop with a slow integrator: 5->30 A steps before and after the corrector learns; regulation, table write and use, smaller deviation once corrected |

`tb_mdc_top` uses `tb/buck_plant_model.sv`, a per-clock Euler model of one or
two buck phases (12 V, 0.47 uH and 8 mOhm per phase, 400 uF, ESR as an
input). The model also produces the three outputs of an ideal RC-matched
detector. The test simulates about 8 ms of converter time, which takes about
15 s in Verilator. Typical results for deviations from 1.8 V:

| Scenario | Max deviation |
|---|---|
| PID only, 5 to 25 A / 25 to 5 A | 365 mV / 371 mV |
| Suppression, 5 to 25 A / 25 to 5 A | 71 mV / 186 mV |
| With learned correction, 5 to 25 A / 25 to 5 A | 77 mV / 160 mV |
| Successive 5 to 12 A, then 12 to 30 A | 57 mV, 75 mV |
| Two phases, 5 to 30 A / 30 to 5 A | 69 mV / 154 mV |
| External detector (2 mOhm ESR), 5 to 25 A / 25 to 5 A | 28 mV / 108 mV |
| Dual-extreme, ADC detection / external detection, 5 to 25 A | 74 mV / 41 mV |

Heavy-to-light deviations are larger than light-to-heavy ones because the
current can only fall at Vout/L (3.8 A/us), against (Vin - Vout)/L
(21.7 A/us) for a rise. The test also counts each mechanism and fails if any
never occurs: both ramps, both sequences, S2 entry and exit, re-triggering
from S2, corrector write and use, dual-extreme peak
detection, DPWM restart, external triggering, zero-bin resets and phase-2
pulses. It also checks the on and off times of single-phase sequences in the
closed loop.

## Departures and limits

* **DPWM.** The reference design uses a hybrid counter/delay-line DPWM and
  PID whose structure is not available here. This DPWM is counter-only, which
  needs the 4.096 GHz clock. Functionally it is the same modulator.
* **ADC.** The analog front end is a behavioural model, and the synthesizable
  top therefore includes one non-synthesizable instance. Vq2 = 8 mV and the
  64-level range are choices; only Vq1 < Vq2 and the 4 mV step are given. The
  thermometer register is stepped synchronously after synchronisers, not
  clocked by the comparators. Preamplifier filtering and comparator delay are
  not modelled.
* **Error sign.** e = Vref - vout, positive for an output drop. One amplifier
  drawing labels the output k(vout - Vref). The state-transition conditions
  (light-to-heavy on a positive error) decided the sign used.
* **Two-phase lagging off-time.** The written description gives (1-D)T for
  the lagging phase's off-time. The timing diagram shows (1-D)T/2, which is
  what is implemented, and with which the interleave comes out right. The
  heavy-to-light two-phase sequence is not specified; both phases simply get
  the single-phase extension.
* **D_old / D_new** come from the PID integrator rather than its full output
  (see the PID section).
* **Added mechanisms not in the reference:** DPWM counter restart at the end
  of a sequence; a one-period timeout on the dual-extreme peak wait; a
  16-period recovery wait before a corrector update; a floor on the S2
  threshold; external-detector triggering only from S1; the ADC sign
  merge rule.
* **PID gains and thresholds** are tuned for the reference 12 V to 1.8 V power
  stage only.
* **Not included:** the test and debug logic of the reference chip, the
  analog RC-matched detector (only its inputs), and the power stage (a model
  exists only in the testbench).
* **Slow-PID corrector experiment.** The reference shows the corrector's
  benefit with a deliberately slow compensator, for 0 to half load and 0 to
  90 % load steps. `tb_mdc_slow_pid` reproduces the second comparison only
  in part: a 5 A to 30 A step with the integral gain cut to a quarter. The
  improvement it shows is small (about 74 mV against 82 mV of deviation),
  far less than in the reference, probably because D_old is taken from the
  integrator here, which already filters out the derivative kicks. The half-load step without correction is not run
  separately.
