# APEX LLRF signal processing in SystemVerilog

This is the FPGA signal processing of a low-level RF (LLRF) controller for a
normal-conducting VHF photo-injector gun. The cavity runs at 186 MHz; its
drive laser must stay phase-locked to the cavity field. The RF is mixed down in
analog hardware to an intermediate frequency of 14.3 MHz. Four ADCs sample it
at 100 MHz.

The digital design has two jobs:

* **Drive the cavity.** A short feedback path works on raw IF samples. There is
  no down-conversion or filtering in that path, so its latency is a few clocks.
* **Watch everything else.** A monitor path mixes every input to baseband and
  decimates it. The results feed four consumers: a waveform recorder, a
  cavity-decay recorder, interlocks, and a laser phase-lock loop that steers
  two piezo actuators.

The same logic runs on every board of the system. A board that only monitors
simply leaves the feedback path switched off.

The whole design works because of one number. The IF is exactly one seventh of
the clock (f_IF = f_clk/7 = 14.29 MHz), so 14 clocks always hold exactly two
whole IF periods. The mixers, the integrators and every decimation rate are
built around that 14-clock beat.

## Signal flow

```
adc[0..3] ─┬─ infilt ─(−)─ fdbk_gain ─ drive ──┐ (to the DAC output stage)
           │       source ┘   ▲ closeloop/rf_on │
           │   rotdds A ──────┘                 │
           │                                    ▼ (drive fed back as a 5th input)
           └─ cim_12: 12 × (mixer + 2 integrators), LO A / LO B, serial chain
                   │  one 36-bit word per clock, 12 words per 14-clock frame
        ┌──────────┼──────────────────┐
   ccfilt(wave)  ccfilt(decay)     ccfilt(laser)
   R=14·wave_per R=14·decay_per    R=14·laser_per
   >>(2·wave_shift+1)  >>9           >>11
        │          ├ reflect_trip     └ laser: CORDIC → piloop3 → mdac_seq (piezo DAC)
   half_band       ├ mon_inlk (CORDIC + limits)     └ freq
        │          └ decay_buf (starts at pulse end)
   wave_buf (freezes after a fault)
```

`timing` makes the 14-clock sample strobe and the decimated strobes.
`trapezoid` makes the RF pulse. `lb_regs` holds the host registers.
`slow_chain` and `timestamp` carry slow readout values out.

## The monitor path: mixers, serialized CIC

This is the least obvious part of the design.

Each of the 12 channels (`mon_chan`) does the same three things:

1. It multiplies its IF input by a cosine or a sine LO. The product keeps 16
   bits.
2. It feeds the product through two accumulators in series. These are the
   integrator half of a two-stage CIC filter.
3. It never clears the accumulators. The second one wraps freely in 36 bits.

A CIC decimating by R has a DC gain of R². The largest supported R is 64·14 =
896, so the output needs 16 + 2·log2(896) ≈ 36 bits. Modular arithmetic makes
the wrap harmless, as long as the final comb output fits.

The 12 channels are six I/Q pairs:

| pair | input | LO |
|---|---|---|
| 0–3 | adc1 … adc4 | DDS A |
| 4 | the drive word (top 14 bits) | DDS A |
| 5 | one ADC chosen by `xsel` (00 = adc1 … 11 = adc4) | DDS B |

DDS B can be tuned away from the IF to look at harmonics or interference.

**Serialization.** Every 14 clocks, `samp` copies all twelve second-stage
accumulators into a 12-register shift chain (`sr_out` of each channel). The
chain then shifts one word per clock. The twelve values leave on the 12 clocks
after `samp`, as `sr_valid` / `sr_ch` = 0…11. Two clocks per frame are idle.

**Combs on the stream.** The comb half of the CIC runs on this serial stream,
which saves eleven copies of the comb. There are three instances of `ccfilt`,
one per use. Each keeps only every `per`-th frame (from `timing`'s strobes) and
forms two first differences against the previous kept frame. Those differences
use 12-word delay lines, one word per channel. Finally it shifts right by a
fixed amount and saturates to 20 bits. The decimation is therefore R = 14·per
clocks.

The shift amounts are:

| path | shift | choice of R |
|---|---|---|
| waveform | 2·wave_shift+1 | set by the user, R = 14·wave_per |
| decay / interlock | 9 | R = 14·decay_per |
| laser | 11 | R = 14·laser_per |

When the user changes R, they must pick `wave_shift` so that the output does not
saturate. The gain from an ADC amplitude A to the comb output is about
0.3 · A · R² / 2^shift. The factor 0.3 is the LO amplitude (79590 / 2^17) times
the ½ of the mixing product.

After its comb, the waveform path runs through `half_band`. This is a symmetric
11-tap half-band FIR, applied per channel on the stream. Its taps are
(2, 0, −9, 0, 39, 64, 39, 0, −9, 0, 2)/128, with unity DC gain. It does not
decimate further.

## The RF feedback path

* **infilt** smooths the raw cavity probe (adc1):
  y = x[n−1] + ½x[n−2] − ¼x[n−3] − ¼x[n−4].
* **source** makes the IF set point. It computes
  (setp_re·cos + setp_im·sin) from LO A, scaled by the pulse envelope.
* **fdbk_gain** forms err = source − infilt. It then applies

  (Kpa + Kpb z⁻²) · (1 + (Kia + Kib z⁻²) · (1 − z⁻¹)/(1 − z⁻¹ + c z⁻² + d z⁻³))

  Two-tap filters (`phshift`) on an IF signal sampled at 7 points per period
  act as complex gains. So (Ka + Kb z⁻²) sets both gain and phase shift of the
  loop. `bandpass3` is a resonator at the IF, so it acts as the integrator of
  the loop.
* **closeloop** selects the output. When 0, the drive is the set point itself
  (open loop). When 1, it is the filter output. When `rf_on` is low, the drive
  is forced to 0.

Gains are signed 18-bit with 15 fraction bits (1.0 = 32768). `c` and `d` use
the same format. Latency from probe sample to drive word is 5 clocks.

**trapezoid** makes the RF pulse. Its period and width are in clocks, and its
envelope ramps up and down by `ramp` per clock. It can also start from
`trig_in` (`ext_trig`). `trig_out` marks each pulse start. The pulse end
triggers the decay recorder.

## Decay, reflection and interlocks (decimated by 14·decay_per)

* **decay_buf** records 2048 stream words (170 frames) after each pulse ends.
  This holds the free decay of the cavity field for off-line frequency
  analysis.
* **reflect_trip** watches one pair, `refl_ch` (default adc4, the reflected
  wave). It compares I²+Q² with a threshold that follows the cavity filling
  transient:

  thresh = th_init·(1 − decaycoef^n) + th_noise

  Here n counts samples since pulse start, and decaycoef is unsigned with
  1.0 = 2^17. When the power exceeds the threshold, a sticky `reflect_fault`
  is set.
* **mon_inlk** takes each pair's amplitude from a pipelined CORDIC. It compares
  the amplitude with a per-pair upper and lower limit. One of four trip modes is
  chosen per pair: above upper, below lower, inside the range, or outside it.
  Trips latch; `interlock` is their OR. CORDIC magnitudes carry the CORDIC gain
  1.6468, and the limits must include it.

Any latched fault drops `rf_permit1/2`, forces `rf_on` and the drive to 0, and
freezes the waveform buffer.

## Waveform recorder

`wave_buf` is an 8192-word circular buffer of the half-band stream. When a
fault rises, it keeps writing `post_trig` more words and then freezes. At that
point `boundary` points at the oldest word, so the record holds both the lead-up
to the fault and its aftermath. Writing `buf_sync` re-arms the buffer. Read
ports on both buffers have one clock of latency.

## Laser synchronization (decimated by 14·laser_per)

`laser` picks one pair, `laser_ch` (default adc2). A CORDIC gives the pair's
amplitude and phase, with the phase in turns, 20 bits.

`piloop3` then works on the phase error e = phase − setpoint:

* I1 += Ki·e.
* A one-pole smoother follows: L += pole·(I1 − L).
* The fast piezo word is Kp·e + L.
* A second, slower integrator, I2 += Ki2·e, gives the slow piezo word.

`mdac_seq` writes the two words to an external multi-channel DAC:

1. load the fast word (address 0);
2. load the slow word (address 1);
3. trigger.

It waits while `mdac_busy` is high. An assertion checks that `mdac_load`
never rises while the DAC is busy.

`freq` sums the phase differences over 2^freq_len samples. The sum is a
frequency offset in turns per window.

## Host interface and slow readout

The host writes 32-bit words to 7-bit addresses. The bus is write-only. The
map is in `rtl/apex_pkg.sv` (`lb_addr_e`):

| addr | register | addr | register |
|---|---|---|---|
| 0–2 | DDS A step_h, step_l, modulo | 19 | ctrl: b0 closeloop, b1 rf_enable, b2 ext_trig |
| 3–5 | DDS B step_h, step_l, modulo | 20–22 | pulse period, width, ramp |
| 6 | xsel | 23–28 | laser ch, setpoint, Kp, Ki, pole, Ki2 |
| 7–10 | wave_per, wave_shift, decay_per, laser_per | 29–32 | refl_ch, th_init, th_noise, decaycoef |
| 11–12 | set point re, im | 33 | clear pulses: b0 interlock, b1 reflection, b2 buf_sync |
| 13–18 | Kpa, Kpb, Kia, Kib, c, d | 34–37 | inlk_mode, inlk_en, post_trig, freq_len |
| | | 40–45 / 48–53 | upper / lower limit of pairs 0–5 |

**DDS phase step.** The DDS step has a 20-bit coarse part and a 12-bit fine
part. The fine accumulator wraps at 4096 − modulo and carries into the coarse
part. This makes rational frequencies exact. The reset values give exactly
f_clk/7: 2^20/7 = 149796 + 2340/4095, modulo 1.

**Slow readout.** A `slow_snap` pulse copies 44 bytes into an 8-bit shift
chain. Each `slow_op` then moves the next byte to `slow_out`, most significant
first. The bytes are:

| bytes | contents |
|---|---|
| 0–5 | timestamp |
| 6–9 | laser amplitude |
| 10–13 | laser phase |
| 14–17 | frequency |
| 18–19 | fast piezo word |
| 20–21 | slow piezo word |
| 22–39 | six pair amplitudes, 24 bits each |
| 40 | {trips[5:0], reflect_fault, interlock} |
| 41 | {wave_frozen, decay_done, rf_on, permit} |
| 42–43 | feedback error |

## Widths and latencies

| item | value |
|---|---|
| ADC / LO / mixer product | 14 / 18 / 16 bits |
| integrators | 36 bits |
| stream after comb | 20 bits |
| CORDIC | 18 stages, latency 19 clocks |
| DDS LO | lags its phase accumulator by 20 clocks |
| comb | 2 clocks after the stream word |
| half_band | 1 clock |
| feedback | 5 clocks from ADC to drive |

## Where this design departs from, or adds to, its source description

The block partition follows the published design: the module names, the
14-clock common factor, the three comb paths with shifts 2·wave_shift+1, 9 and
11, the coefficient values of the half-band filter and the input filter, the
feedback transfer function, the reflection threshold formula, the four
interlock modes, the 12 serialized channels, and the 7/32-bit write-only bus.

The following are this design's own:

* All bit widths, fixed-point formats, rounding, saturation, register
  addresses and reset values.
* The placement of the half-band and input-filter taps. The source gives the
  coefficient values; the order here is a reading of them.
* The wiring inside `piloop3`: Kp, Ki, a pole smoother and a slow integrator.
* The sign convention of the error (set point minus probe).
* Buffer depths (8192 and 2048 words), the post-trigger freeze, and decay
  recording from the end of each pulse.
* The trapezoid envelope and trigger handling, the piezo-DAC handshake, and
  the slow readout contents.
* Sticky faults with clear bits, per-pair interlock enables, and the permit
  logic.

Not built:

* The output stage between the feedback result and the board's DAC. The
  16-bit `drive` word is brought out instead.
* The second DAC's outputs.
* The ADC/DAC chips, the analog RF chain, the USB link and host software, and
  the external piezo DAC. The testbench models that DAC as a busy signal.

The CORDIC gain is not removed anywhere. The amplitudes read out are 1.6468
times the I/Q magnitude.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`, named
`tb_<module>`. Each testbench compares the module with an independent model
written in the testbench. Examples:

* exact CIC sums;
* double-precision filters;
* `$atan2` / `$sqrt` for the CORDIC;
* a behavioural piezo DAC with a busy signal.

Each testbench also checks latencies, and has a watchdog. It prints one line,
`TB_RESULT checks=N failures=M`.

`tb_apex_dsp` runs the full top level at its default sizes. It:

* programs the registers;
* runs three RF pulses in open and closed loop;
* records a decay;
* locks a simulated laser phase;
* switches xsel and the decimation rate;
* trips the interlock and the reflection fault;
* checks the waveform freeze;
* reads the slow chain.

It counts each of these mechanisms and fails if any never happened. It takes
about 10 s with Verilator.

To simulate with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/apex_pkg.sv tb/tb_apex_dsp.sv --top-module tb_apex_dsp
./obj_dir/Vtb_apex_dsp
```

Replace `apex_dsp` with any other module name to run its testbench. The
testbenches use only two-state logic and `$urandom`.
