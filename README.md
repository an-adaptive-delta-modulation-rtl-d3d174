# Adaptive delta modulator with a logic-controlled step size

Delta modulation sends one bit per sample: the encoder keeps a running
estimate `r` of the input, compares the input with it, sends `1` if the input
is above and `0` if below, and moves `r` one step up or down. With a fixed step
the coder either cannot follow a steep signal (slope overload) or chatters
around a quiet one (granular noise). This design adapts the step size from
the pattern of the last four bits. A small block of combinational logic looks
at a 4-bit word of recent bits and closes one or more of five switches that
add +2, +1, 0, -1 or -2 times a basic increment `Delta_o` to the step size:

    Delta_n = Delta_(n-1) + K_n * Delta_o,    Delta_o = 0.5 V

The decoder holds an identical copy of the step-size logic and integrator.
From the received bits alone it rebuilds the same step size and estimate.

This RTL is a fixed-point, sampled-data version of a circuit that was
originally built from op-amps, sample-and-holds, analog switches and TTL/CMOS
logic. The logic parts are described gate for gate. The analog parts (adder,
integrator, switches, summing amplifier, filters) become arithmetic on
numbers. The adjustable sample-clock oscillator becomes a programmable
counter (`vco`). It runs on a fast system clock `clk` and produces a one-clock
pulse `sample_en` at each sampling instant. Every other block runs on `clk` and
acts only on the cycles where `sample_en` is high.

## Number format

All voltages are 12-bit two's complement numbers with 1 LSB = 1/64 V, so the
range is about ±32 V. `Delta_o` = 0.5 V = 32 LSB. The step size stays between
`DELTA_MIN` = 32 LSB (0.5 V) and `DELTA_MAX` = 256 LSB (4 V). The integrator,
summer and filters saturate at the ends of the 12-bit range instead of
wrapping. The word width, LSB weight and step limits are this design's own
choices.

## Signal path

```
 x ─► band-pass ─► x_filt ─►(compare)─► bit_now ─► J-K sampler ─► bit_out ──► channel ─► demodulator
      300-3400 Hz            ▲   │
                             │   └─► step_size_logic ─► Delta ─┐
                             │                                  ▼
                             └──────────── r ◄──── integrator (r ± Delta)
```

`adm_modulator`:

1. `butterworth_bandpass` band-limits the input to 300–3400 Hz.
2. `quantiser_sampler` forms `e = x_filt - r`. Its bit is `1` when `e >= 0`.
   A J-K flip-flop holds that bit for one sample period as `bit_out`.
3. `step_size_logic` takes the bit and produces the step size `Delta`.
4. `integrator` adds `+Delta` (bit 1) or `-Delta` (bit 0) to `r`.

`bit_now` is the bit while it is being sampled. The modulator's own loop uses
it, so `r` moves on the same sample edge that sends the bit and the loop adds
no delay. The held `bit_out` goes to the channel.

`adm_demodulator` uses the received bit for its own `step_size_logic` and
`integrator`, then band-pass filters the integrator output `r` into `y`.

## The step-size decision

This is the heart of the design and the part to read carefully.

### Bit history: SIPO, counter, PIPO

`shift_register` has three parts:

- A 4-bit serial-in/parallel-out register takes every sample bit. The newest
  bit enters at the top.
- A binary counter divides the sample clock by four.
- The counter clocks a 4-bit parallel-in/parallel-out register. On the fourth
  sample of each word, that register latches the four newest bits, including
  the one just taken.

So the decision logic sees a new word once every four samples, not a sliding
window. On the sample after the latch, `step_size_register` applies the word's
`K_n * Delta_o` once. The step size therefore changes at most once per four
samples. Before the first word is latched, all switches are open.

### Logic equations

The word's bits are named A = b_n (newest), B = b_(n-1), C = b_(n-2),
D = b_(n-3). In the code these are `abcd[3]` down to `abcd[0]`. The
`adaptation_logic` module is five sums of products:

| output | equation | switch level |
|---|---|---|
| C1 | A'B'C' + ABC | +2 Delta_o |
| C2 | ABC'D' + A'B'CD | +1 Delta_o |
| C3 | B'C'D' + BCD | 0 |
| C4 | A'B'C'D' + A'B'CD + A'BCD' + AB'CD' | -1 Delta_o |
| C5 | A'B'CD + AB'CD | -2 Delta_o |

Runs of equal bits mean the estimate is chasing the input (slope overload), so
they raise the step. Alternating patterns mean the estimate is hunting around
the input (granular noise), so they lower it.

The outputs are **not** one-hot. Three words turn on more than one switch.
`summing_amplifier` adds the levels of all closed switches, as a summing amplifier
with one input per switch would. This gives the net change per word
(word = ABCD):

| word | switches | K | word | switches | K |
|---|---|---|---|---|---|
| 0000 | C1 C3 C4 | +1 | 1000 | C3 | 0 |
| 0001 | C1 | +2 | 1001 | – | 0 |
| 0010 | – | 0 | 1010 | C4 | −1 |
| 0011 | C2 C4 C5 | −2 | 1011 | C5 | −2 |
| 0100 | – | 0 | 1100 | C2 | +1 |
| 0101 | – | 0 | 1101 | – | 0 |
| 0110 | C4 | −1 | 1110 | C1 | +2 |
| 0111 | C3 | 0 | 1111 | C1 C3 | +2 |

The table is not symmetric: 1010 lowers the step but 0101 does not, and 0011
lowers it while 1100 raises it. This follows from the equations as written.
To change the policy, edit the five lines of `adaptation_logic.sv`. Also
update the minterm masks in `tb/adm_tb_pkg.sv`, which the testbenches use as
the reference.

## Modulator and demodulator in lock-step

Both sides start from the same reset. The modulator raises `bit_valid` with
its first sample. The demodulator ignores the channel until `bit_valid` is
high, so both word counters stay in phase. With a clean channel, the
demodulator's integrator output `demod_r` and step size equal the modulator's
`r` and `Delta` exactly one sample earlier. The end-to-end test checks this
on every sample.

One wrong channel bit (input `chan_flip` of `adm_system`) gives the two sides
different words. From then on their step sizes differ, and they come back
together only when both reach the same step-size limit. This is the
transmission error that appears when the two sides' switch settings disagree.

## Sample clock

`vco` counts from 0 to `period-1` on `clk`. Its square wave `sq` is high for
the first `high_time` counts of each period, so both frequency and duty cycle
can be set. `sample_en` is high on the first clock of each period. A new
setting takes effect from the next period. Out-of-range values are forced
into range. In `adm_system` the inputs are `vco_period` and `vco_high`. For
example, a 17 kHz sample rate from a 1.7 MHz clock needs `vco_period` = 100.

## Band-pass filter

`butterworth_bandpass` is a second-order Butterworth low-pass at 3400 Hz
followed by a second-order Butterworth high-pass at 300 Hz. Both sections
are `biquad` instances in direct form I, with 14-bit fractional coefficients
and 4 extra internal fraction bits. The coefficients come from the bilinear
transform at fs = 17 kHz. With K = tan(π·fc/fs) and N = 1/(1 + √2·K + K²):

- low-pass: b = (K²N, 2K²N, K²N)
- high-pass: b = (N, −2N, N)
- both: a1 = 2(K² − 1)N, a2 = (1 − √2·K + K²)N

Each value is scaled by 2^14 and rounded. For another sample rate, recompute
the ten parameters. Measured at 17 kHz, the gain is 0.71 at 300 Hz, 0.99 at
1 kHz, 0.70 at 3400 Hz, 0.03 at 50 Hz and 0.04 at 7 kHz. Each section adds
one sample of latency, so the filter adds two.

Each section is a second-order Butterworth with damping √2. This gives 3 dB
points at exactly 300 and 3400 Hz. A fourth-order Butterworth polynomial,
(s² + 0.765s + 1)(s² + 1.848s + 1), is sometimes quoted for this filter. It
belongs to a fourth-order low-pass, not to a low-pass/high-pass pair, so it
is not used.

## Where this design makes its own choices

- Fixed-point format, step limits, and saturation in place of op-amp rails.
- Bit order A = newest.
- Weighted outputs that add rather than being one-hot.
- The step updates once per 4-bit word, on the sample after the word is latched.
- The modulator loop uses the bit while it is sampled (no extra loop delay).
- Synchronous active-high reset: step = `DELTA_MIN`, estimate = 0, registers = 0.
- `bit_valid` start-up alignment and the `chan_flip` test input.
- Both filters are digital and run at the sample rate. In an analog build the
  input filter would come before sampling.
- The sample-clock oscillator is a counter on a fast clock. Frequency and
  duty cycle are set by two integers.

## Modules

| file | role |
|---|---|
| `rtl/adm_pkg.sv` | switch count and switch weights |
| `rtl/adaptation_logic.sv` | C1..C5 from the 4-bit word |
| `rtl/shift_register.sv` | SIPO, divide-by-4 counter, PIPO |
| `rtl/cmos_switches.sv` | gates ±2, ±1, 0 × Delta_o by C1..C5 |
| `rtl/summing_amplifier.sv` | sum of the switch outputs = K_n·Delta_o |
| `rtl/step_size_register.sv` | Delta_n = clamp(Delta_(n-1) + K_n·Delta_o) |
| `rtl/step_size_logic.sv` | the five blocks above, bit stream → Delta |
| `rtl/integrator.sv` | r ± Delta with saturation |
| `rtl/quantiser_sampler.sv` | e = x − r, sign bit, J-K sampler |
| `rtl/biquad.sv`, `rtl/butterworth_bandpass.sv` | 300–3400 Hz band-pass |
| `rtl/adm_modulator.sv`, `rtl/adm_demodulator.sv` | the two ends |
| `rtl/vco.sv` | sample clock with adjustable period and duty cycle |
| `rtl/adm_system.sv` | top: sample clock, modulator, channel (with `chan_flip`), demodulator |

Where they apply, modules take the parameters `DATA_W` (12), `DELTA0` (32),
`DELTA_MIN` (32) and `DELTA_MAX` (256). `shift_register` also takes
`WORD_LEN` (4), and `vco` and `adm_system` take `CNT_W` (16), the width of
the sample-clock counter.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`, except
`biquad`, which is tested through `tb_butterworth_bandpass`. Each prints a
line `TB_RESULT checks=N failures=M` and stops. `tb/adm_tb_pkg.sv` holds the
reference model: minterm tables for C1..C5 and a behavioural model of the
step path and integrator. For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal rtl/adm_pkg.sv tb/adm_tb_pkg.sv -y rtl -y tb \
    tb/tb_adm_system.sv --top-module tb_adm_system -Mdir obj && obj/Vtb_adm_system
```

`tb_adm_system` runs the top at its default parameters. The sample clock first
ticks every four clocks, and every seven clocks in the second phase:

- 400 idle samples, then a 1 kHz sine at 17 kHz whose amplitude rises from
  0.5 V to 6 V.
- Each sample, it checks the bits, the estimate and the step sizes against
  the model.
- It checks the output power (within 0.8–1.4 of the input's).
- It checks that the adaptive coder's rms tracking error is below that of a
  fixed-step (0.5 V) delta modulator on the same input. Typical values are
  125 LSB against 157 LSB.
- It inverts one channel bit and checks that the demodulator then departs
  from the modulator.
- It counts each mechanism and fails if one never occurs: every switch, the
  multi-switch words, the idle 1010 pattern, overload words, both step-size
  limits, step changes, the channel error and both sample-clock settings.

The test finishes in well under a second.

## Performance across the speech band

`tb_workload_speech_band` codes single tones at a 17 kHz sample rate. For
each tone it compares the modulator estimate with the band-passed input. It
also runs a fixed-step (0.5 V) delta modulator on the same samples. SNR is
measured at the best alignment of up to three samples:

| tone | slope per sample | SNR, adaptive | SNR, fixed 0.5 V step | output / input power |
|---|---|---|---|---|
| 300 Hz, 2 V | 0.22 V | 10.3 dB | 10.9 dB | 0.48 |
| 1 kHz, 2 V | 0.74 V | 0.7 dB | 7.9 dB | 1.32 |
| 1 kHz, 6 V | 2.22 V | 4.2 dB | 0.9 dB | 1.02 |
| 2 kHz, 4 V | 2.96 V | 0.4 dB | 0.9 dB | 1.15 |
| 3.4 kHz, 2 V | 2.51 V | −3.4 dB | 1.7 dB | 0.65 |
| 1 kHz, 0.5 V | 0.18 V | 0.8 dB | 1.2 dB | 0.50 |

The adaptive step clearly pays off only deep in slope overload at low and
middle frequencies (the 1 kHz, 6 V row). Elsewhere the step-size policy of
the five equations does about as well as a fixed step, or worse. The power
ratio at 300 Hz is about 0.5 because the input and output filters each pass
half the power at the band edge. The testbench checks the 1 kHz, 6 V
advantage, the output power, and that the demodulator follows the
modulator. The other figures are measured values, not pass/fail limits.

## Limits

- The step-size policy comes from the five equations above. It has not been
  tuned for speech. See the table above for what it achieves.
- Word-rate adaptation reacts to a slope change only after up to eight
  samples.
- The quantisation-noise comparison with a linear delta modulator at a higher
  sample rate has not been reproduced. Only the same-rate comparison above is
  tested.
