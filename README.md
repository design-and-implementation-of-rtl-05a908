# Pulsed I/Q LLRF regulator for an RFQ cavity

This is the FPGA part of a low-level RF (LLRF) system for a pulsed
radio-frequency quadrupole (RFQ). The RFQ runs at 324 MHz with pulses of
250–2000 µs at 50 Hz. The field must be held to 1 % in amplitude and 1° in
phase. The cavity's resonance must also track the drive, so that little
power is reflected.

The system does not mix the cavity signal down to an intermediate frequency
and sample it there. An analog front end demodulates the RF straight to
baseband I and Q. Fourteen-bit ADCs sample those voltages at 104 MHz. This
design regulates I and Q directly and returns I and Q drive words to 14-bit
DACs, which feed an IQ modulator. The front end then needs only the RF
reference and its second harmonic, and no set of phase-locked clocks.

The RTL holds two loops:

* **Amplitude/phase loop.** It has two identical I and Q channels: filter,
  offset removal, a 2×2 phase rotation, PI regulation against a reference,
  an open/closed-loop switch with feed-forward, a second rotation and output
  offset removal.
* **Tuning loop.** It measures the phase between the cavity's forward and
  probe signals. During the settled part of each pulse, it commands the tuner
  inwards or outwards whenever that phase leaves a ±2° window around its set
  point.

## Signal chain

```
            cfg.lpf_en   cfg.*_in_ofst   cfg.teta     cfg.iref/qref  cfg.kp/ki  cfg.closed_loop  cfg.i_ff/q_ff   cfg.teta    cfg.*_out_ofst
                |             |             |              |(+)          |           |                |(+)           |             |
adc_cav ──► lpf ──► ofst_comp ──► phase_shifter(1) ──► (-) pi_ctrl ──► drive_sum (switch + FF) ──► phase_shifter(2) ──► ofst_comp ──► clip ──► dac_act
 (I,Q)     1 clk     1 clk           2 clk               2 clk             1 clk                    2 clk              1 clk       14 bit
                                       ▲                                                               ▲
                                       └──────────── sincos_gen (one CORDIC for both shifters) ────────┘

adc_fwd ──► cordic_vec ─┐
                        ├─► phase_disc: dphi = ∠prb − ∠fwd ──► tuning_ctrl (±thresh window) ──► tuner_in / tuner_out
adc_prb ──► cordic_vec ─┘                                          ▲ enable = tune_en & settled & mag_ok
rf_gate ──► pulse_timer ──► pulse_on (gates references, feed-forward, PI), settled (gates the tuner)
```

It takes 10 clocks (96 ns) from an ADC word to the DAC word it causes. On top
of that comes the smoothing of the low-pass filter when it is on: a
time constant of 16 clocks, or 154 ns.

## Number formats

| quantity | format |
|---|---|
| ADC and DAC words | 14-bit signed two's complement |
| internal I/Q samples (`sample_t`) | 18-bit signed, on the ADC scale; the 14-bit word is sign-extended, which gives 4 bits of headroom |
| angles (`teta`, `dphi`, `tune_phi_sp`) | 16-bit unsigned fraction of a turn: 65536 = 360°, so 2° = 364 |
| `tune_thresh` | 15-bit, same units as the angles |
| rotation coefficients | 18-bit signed, 1.0 = 2^16 |
| `kp` | 18-bit signed, 1.0 = 4096 (12 fraction bits) |
| `ki` | 18-bit signed integral gain per sample, 1.0 = 65536 (16 fraction bits) |
| `settle_cycles`, `pulse_count` | 20-bit clock counts, up to 10 ms at 104 MHz |

All arithmetic saturates instead of wrapping. The exceptions are the angles,
which wrap by design.

## The amplitude and phase loop

**Error and PI.** Each channel forms `err = ref − meas`, where `meas` is the
filtered, offset-corrected and rotated cavity signal. The output is
`u = kp·err/2^12 + acc/2^16`, with `acc += ki·err` every clock. The
integrator is clamped so that it can never hold more than the full output
range. After saturating, the loop therefore recovers at once. The integrators
are held at zero while the loop is open or the RF gate is low, so every pulse
starts from a clean state. `mon.pi_sat` reports clipping.

**Open and closed loop.** `drive_sum` computes `ff + (closed_loop ? u : 0)`.
* In open loop (`closed_loop = 0`), the modulator sees only the feed-forward.
  Use this to fill the cavity for tests, or to check that the loop will be
  stable before closing it.
* In closed loop, the feed-forward adds to the PI output. Use it to cancel a
  predictable disturbance, such as beam loading, before the loop has to react.

The references and the feed-forward are applied only while `rf_gate` is
high. Between pulses the drive is zero.

**The two phase shifters and how to set Teta.** Both shifters turn their
I/Q input by the same angle Teta: `I' = I cos − Q sin`, `Q' = I sin + Q cos`.
Around the loop, the signal passes both shifters and the plant. The plant
is the DAC, modulator, amplifier, cavity, demodulator and ADC, and it adds
its own phase φ. The total loop phase is therefore φ + 2·Teta. The I and Q
regulators are decoupled only when that total is zero, so the optimum is
**Teta = −φ/2**.

When the loop is locked, the rotated measurement equals the reference. The
cavity field as the demodulator sees it is therefore the reference turned by
−Teta. `sincos_gen` recomputes cos/sin continuously with a serial CORDIC
(18 clocks per result). `mon.coef_valid` is low for up to 36 clocks after
Teta changes.

**Filter and offsets.** `lpf` is a first-order IIR, `y += (x − y)/2^4`. Its
update and output are both rounded, so a constant input comes out exactly.
Set `lpf_en = 0` to bypass it. The loop meets its targets without the
filter too, which the testbench confirms. The input offsets (`*_in_ofst`)
are subtracted after the filter; set them to the offsets of the demodulator
and ADCs. The output offsets (`*_out_ofst`) are subtracted before the DACs;
set them to the modulator's carrier leakage, as seen in DAC units.

## The tuning loop

`phase_disc` runs the forward and probe I/Q pairs through two pipelined
CORDIC vectoring units (`cordic_vec`, 16 stages with 6 guard bits). It
outputs the difference of the two angles, modulo a turn, 19 clocks after its
inputs. `mag_ok` is low when either signal is too small for its phase to mean
anything.

`tuning_ctrl` forms `err = dphi − tune_phi_sp`, which wraps at ±180°:
* `err > +thresh`: it raises `tuner_in`.
* `err < −thresh`: it raises `tuner_out`.
* `tune_invert` swaps the two, to match the mechanics of a given tuner.

The commands are levels: they stay high as long as the condition holds. An
assertion checks that they are never high together.

The tuning loop is enabled only when three things hold:
* `tune_en` is set;
* `pulse_timer` reports `settled`, meaning at least `settle_cycles` clocks
  have passed since the RF gate rose;
* `mag_ok` is high.

The tuner therefore never chases the filling transient or noise between
pulses. That keeps it from moving back and forth all the time and wearing
out.

## Settings and monitoring

The control computer owns every setting. The top takes them as one packed
struct, `llrf_pkg::llrf_cfg_t`, with these fields: `iref`, `qref`, `i_ff`,
`q_ff`, `kp`, `ki`, `teta`, the four offsets, `closed_loop`, `lpf_en`,
`tune_en`, `tune_invert`, `tune_phi_sp`, `tune_thresh` and `settle_cycles`.
You must add the register bus or host link that writes them; see below.

The top returns `llrf_mon_t`:
* the rotated cavity I/Q;
* the drive I/Q;
* the PI and DAC clipping flags;
* the discriminator phase and tuning error;
* the pulse state, settled flag, pulse count and pulse-start strobe;
* `coef_valid`.

## Files

| file | contents |
|---|---|
| `rtl/llrf_pkg.sv` | widths, `iq_t`, ADC/DAC structs, settings and monitor structs, CORDIC arctangent table `atan(2^-i)/(2π)·2^20` |
| `rtl/llrf_top.sv` | the complete FPGA program |
| `rtl/lpf.sv`, `rtl/ofst_comp.sv`, `rtl/phase_shifter.sv`, `rtl/sincos_gen.sv`, `rtl/pi_ctrl.sv`, `rtl/drive_sum.sv` | amplitude/phase loop blocks |
| `rtl/pulse_timer.sv`, `rtl/cordic_vec.sv`, `rtl/phase_disc.sv`, `rtl/tuning_ctrl.sv` | pulse bookkeeping and tuning loop |
| `tb/<block>_tb.sv` | one self-checking testbench per block |
| `tb/cavity_model.sv` | behavioural plant for simulation only: converter delay, loop phase, detuned first-order cavity, ADC/modulator offsets, tuner that moves one step per clock |
| `tb/llrf_top_tb.sv` | end-to-end test at default parameters |
| `tb/llrf_workload_tb.sv` | 2 ms pulses at 50 Hz, and a sweep of the Teta stability margin |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
They use only `verilator`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
          rtl/llrf_pkg.sv tb/llrf_top_tb.sv --top-module llrf_top_tb -Mdir obj
./obj/Vllrf_top_tb
```

Replace `llrf_top_tb` with any other testbench name. The end-to-end test
takes about half a second, and the workload test about five.

What the end-to-end test establishes, with the plant model:

* **Latency.** An ADC word reaches the DACs in 10 clocks.
* **Open loop.** The DAC words equal the feed-forward turned by Teta, less
  the output offsets, to within 1 LSB. The cavity fills to the matching field.
* **Closed loop, with and without the LPF.** The field stays within 1 % and
  1° of the reference from 20 µs into each 250 µs pulse until its end. The
  plant's ADC and modulator offsets are cancelled by the offset settings.
  This holds at 8 reference phases around the circle and at amplitudes from
  500 to 6000 LSB.
* **Feed-forward step.** A 1500 LSB step on a 4000 LSB field is removed to
  within 1 %/1° in 2.7 µs.
* **Teta change while running.** The coefficients revalidate and the loop
  keeps regulating.
* **Clipping.** An unreachable reference clips both the PI output and the
  DAC words, and the loop recovers afterwards.
* **Tuning.** A detuning of ±10° is pulled back inside the ±2° window, by
  inward and by outward moves respectively. No tuner command is ever issued
  outside the settled part of a pulse.

The workload test holds 2 ms pulses at a 20 ms period in tolerance from
20 µs to the end of the pulse. It then sweeps Teta away from its optimum. With
this plant model and gains (Kp = 2.0, Ki = 0.023 per sample), the field stays
regulated for offsets of −20° to +20°. That is ±40° of loop phase, because
both shifters turn by Teta.

## How far to trust it, and where it departs from the reference system

The block structure, the order of the blocks, the signs at the summing
nodes, the open/closed-loop switch, feed-forward, offsets, the use of one
angle for both phase shifters, and the ±2° tuning window all follow the
reference system. Everything listed below is this design's own choice,
because the reference system states only what each block does:

* word widths and number formats;
* the first-order IIR as the low-pass filter;
* the sign convention of the offsets (subtracted);
* CORDIC generation of the rotation coefficients;
* the CORDIC phase discriminator and its `mag_ok` qualifier;
* integrator clamping and clearing;
* detecting "settled" as a programmable delay from the start of the pulse;
* the tuner's direction mapping and level-command interface;
* signed two's-complement converter words.

Known differences and gaps:

* **Phase margin.** The reference system reports a margin of about ±55° on
  the phase-shifter setting. Here, with both shifters turning by Teta, a
  Teta error of e turns the loop by 2e. With the simulated plant, the loop
  holds its tolerance for |e| ≤ 20°. The reference system's figure comes
  from its own cavity, amplifier and gains, so the two numbers cannot be
  compared directly. If your hardware needs the loop phase to move by Teta
  only, give the second shifter its own angle; it is a one-line change in
  `llrf_top`.
* **Feed-forward and references are constants during a pulse.** There are
  no on-chip waveform tables. Shaped pulses or beam-loading compensation
  must be written by the host while the pulse runs, or added as a memory.
* **Spare converters.** The board has 8 ADCs and 8 DACs. This design uses 6
  ADCs (cavity, forward and probe I/Q) and 2 DACs (Iact, Qact); the rest are
  left free.
* **Not included.** The analog front end is not part of this RTL: the IQ
  demodulators and modulator, the frequency doubler for the 2·f_RF LO, and
  the signal conditioning. Nor are the ADC and DAC chips (their 4×
  interpolation happens inside the DAC), the control computer and its link
  (the settings are a plain input struct), or the tuner motor driver.
* **Timing closure.** The design has not been checked against timing at
  104 MHz. The longest combinational paths are the saturating adders after
  the PI multipliers, and the 20-bit CORDIC stages.
