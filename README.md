# Two-microphone adaptive beamformer for hearing aids

A hearing aid that must pick one talker out of a room of other talkers cannot
rely on spectral noise subtraction: the interference looks exactly like the
wanted signal. What still differs is the direction it comes from. This design
is a small, low-power ASIC datapath that combines two omnidirectional
microphones into a directional microphone whose null follows the loudest
interferer behind or beside the wearer, while sound from straight ahead
passes unchanged.

The RTL is SystemVerilog-2017, synthesizable, with one shared 16x16
multiplier and about 470 flip-flops in total.

## Signal model

The front microphone gives `a(n)`, the back microphone `b(n)`. They are
`d` = 1.2 cm apart, and the ADC samples at `Fs = c/d` (about 28.3 kHz with
c = 340 m/s). At that rate sound needs exactly one sample period to travel
from one microphone to the other. The acoustic delay therefore becomes a
single register.

Two fixed cardioids are formed from the microphones and their one-sample
delayed copies:

    x1(n) = a(n) - b(n-1)     null at 180 deg (behind)
    x2(n) = b(n) - a(n-1)     null at   0 deg (in front)

The output subtracts a scaled back-facing cardioid:

    y(n) = x1(n) - G(n) * x2(n)

Sound from the front has `x2 = 0`, so it reaches `y` whatever the value of
`G`. An interferer at angle `theta` is cancelled when
`G = (1 + cos theta) / (1 - cos theta)`. That gives `G = 0` for 180 deg,
`G = 1/3` for 120 deg and `G = 1` for 90 deg. The relation is nearly
independent of frequency as long as the microphone spacing is small compared
with the wavelength. `G` is adapted by LMS (stochastic gradient descent on `y^2`):

    G(n+1) = G(n) + 2*mu * y(n) * x2(n),   2*mu = 0.25

`G` is limited to [0, 1], so the null can sit anywhere from 90 to 180 deg.
It never enters the front half-plane.

A differential pair has a high-pass response of about +6 dB/octave. A
first-order IIR low-pass filter flattens it at low frequencies:

    z(n) = C3*z(n-1) + C1*y(n) + C2*y(n-1),   C1 = C2 = 0.2759, C3 = 0.9758

Its DC gain is about 23.

## Number format

Every sample, `G` and both coefficients are 16-bit two's complement with 14
fraction bits (Q2.14, range [-2, 2)). The ADC word is offset binary with
2^15 meaning silence. `adc_normalize` maps it to [-1, 1) without an adder:

    S = { ~RADC[15], ~RADC[15], RADC[14:1] }

Products are 32-bit Q4.28. They return to Q2.14 by keeping bits [29:14],
which is a floor operation. The LMS increment is bits [31:16] of `y*x2`;
that is the 2-bit shift for `2*mu = 0.25` and the truncation together.

The following are this design's own choices, not the reference algorithm:

- `x1`, `x2`, `y`, `temp` and `z` saturate instead of wrapping.
- `z` is rounded to nearest. Half an LSB is added in the three-operand adder.
- The coefficients are the nearest Q2.14 codes: C1 = C2 = 4520 (0.27588)
  and C3 = 15988 (0.97583).

## Rates and downsampling

The delay needs `Fs = c/d`, but speech needs far less than 28 kHz.
`input_frontend` forms the delayed pair at the full rate and then keeps only
every second sample set `{a(n), b(n), a(n-1), b(n-1)}`. Here `n-1` is the ADC
sample just before `n`, so the delay stays one full-rate period. The rest of
the design runs at 14.2 kHz.

## The four-state schedule: one multiplier for everything

This is the central idea and the part that takes the most care to follow.
A direct implementation needs five multiplications per sample:
`G*x2`, `y*x2`, `C1*y(n)`, `C2*y(n-1)` and `C3*z(n-1)`. This design reduces
that to four and runs them one after another on a single multiplier:

- Because `C1 = C2`, the filter is computed as `C1*(y(n) + y(n-1))`. This
  removes one product.
- The remaining products are spread over a Gray-coded four-state controller,
  one product per state.

| state | code | multiplication | stored at the end of the state |
|-------|------|----------------|--------------------------------|
| S0 | 00 | C1 * temp | `x1 = a(n)-b(n-1)`, `x2 = b(n)-a(n-1)`, product `Pt` |
| S1 | 01 | G * x2 | `z = Pt + Pz (+ round)` through the carry-save adder; product `G*x2` |
| S2 | 11 | C3 * z | `y = x1 - G*x2`, `temp = y(n) + y(n-1)`, product `Pz` |
| S3 | 10 | y * x2 | `G = clamp(G + (y*x2)/4)` |

Follow one sample through the table:

1. S2 of sample `n` forms `y(n)` and `temp = y(n) + y(n-1)`.
2. S0 of sample `n+1` multiplies `temp` by C1.
3. S1 of sample `n+1` adds that product to `C3*z`. The `C3*z` product was
   made in S2 of sample `n`, right after `z` was updated in S1.

So the `z` that appears in S1 is the filtered value of the previous sample's
`y`. The output has one downsampled sample of latency.

Successive state codes differ in one bit (S0 -> S1 -> S2 -> S3 -> S0), which
reduces glitches on the state decode. Assertions in `beamformer_core` check
this, and they check that no product is issued while the multiplier is busy.

### Timing

Every state does the same three things:

1. It issues its multiplication in its first cycle.
2. It waits 16 cycles for the multiplier.
3. It stores its results one cycle later.

A state therefore lasts 18 cycles. After S3 the controller stays in S3 until
a sample is pending, and accepting it costs one more cycle:

- **Clock:** 73 cycles per downsampled sample. The clock must be at least
  73 x 14.2 kHz, about 1.04 MHz, which is 37 cycles per ADC strobe.
- **Output latency:** `z_valid` comes 37 cycles after the core accepts its
  input strobe.
- **Buffering:** one sample. A sample that arrives while another is still
  waiting replaces it and sets the sticky `overrun` output.

## Blocks

| module | what it is |
|--------|-----------|
| `beamformer_top` | the complete design: front end plus core |
| `input_frontend` | normalises both ADC words, one-sample delay, downsampling by 2 |
| `adc_normalize` | offset-binary to Q2.14 bit mapping |
| `beamformer_core` | Gray-coded controller, datapath registers, operand multiplexer for the shared multiplier |
| `booth_r4_mult` | sequential signed radix-4 Booth multiplier |
| `fixed_beamformer` | cardioid differences `x1`, `x2` and `y = x1 - G*x2` |
| `lms_gain_update` | the LMS step with shift, truncation and [0, 1] clamp |
| `iir_equalizer` | `temp = y(n) + y(n-1)` and the `z` update |
| `csa_adder3` | three-operand adder: one carry-save row and one carry-propagate adder |
| `bf_pkg` | shared types, Q2.14 constants, coefficients, state encoding, saturation helpers |

### The radix-4 Booth multiplier

`booth_r4_mult` recodes the 16-bit multiplier into 8 digits in
{-2, -1, 0, +1, +2}. Each digit is chosen from three overlapping bits. Each
digit takes two cycles: add the selected multiple of the multiplicand, then
shift the combined `{accumulator, multiplier}` register right by two. A
16x16 product therefore takes 16 cycles, half of what a radix-2 Booth unit
needs. The operands are captured on the `start` edge. `done` pulses 16 cycles
later, and `product` holds its value until the next start. The width is the
parameter `W`, which must be even.

## Interface of `beamformer_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `adc_valid` | in | 1 | one pulse per ADC sample (Fs) |
| `radc_a`, `radc_b` | in | 16 | front / back ADC words, offset binary |
| `z`, `z_valid` | out | 16, 1 | equalised output (Q2.14) and its update pulse, once per two ADC samples |
| `y` | out | 16 | beamformer output before the equaliser |
| `g` | out | 16 | adaptive gain, Q2.14 in [0, 1] |
| `state` | out | 2 | Gray-coded controller state |
| `overrun` | out | 1 | sticky: an input sample was lost |
| `g_clamp_lo`, `g_clamp_hi`, `z_sat` | out | 1 | one-cycle pulses when G is clamped at 0 or 1, or z saturates |

After reset, `G = 0` (null behind) and all filter state is zero. The
microphones, amplifiers and ADC are outside the design. The ADC words and
the sample strobe come in as ports.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values computed independently. Every testbench prints
`TB_RESULT checks=N failures=M`.

- **`tb_booth_r4_mult`:** corner and random products, and the 16-cycle latency.
- **`tb_adc_normalize`:** all 65536 ADC codes.
- **`tb_input_frontend`:** downsampling phase and delayed values, with
  irregular strobe gaps.
- **`tb_fixed_beamformer`, `tb_lms_gain_update`, `tb_iir_equalizer`,
  `tb_csa_adder3`:** random and saturating cases. The equaliser test also
  checks the DC gain of the recursion.
- **`tb_beamformer_core`:** compares `z`, `y` and `G` bit for bit with the
  integer model in `tb/bf_ref_pkg.sv`. It checks the 37-cycle output
  latency, the 73-cycle spacing of back-to-back samples, overrun, the Gray
  steps, and both G clamps and z saturation.
- **`tb_beamformer_top`:** runs the whole design at its only configuration.
  It synthesises plane-wave tones from 180, 60 and 120 deg, then
  uncorrelated full-scale noise, then an over-fast strobe. Every output is
  compared bit for bit with the model. It checks that G reaches 0 and
  clamps at 1, and that the mean G at 120 deg matches the least-squares
  optimum (0.3365 against 0.3378). It also requires downsampling, every
  state, both clamps, saturation and overrun to have occurred.
- **`tb_workload_snr`:** the interference experiment. A 500 Hz tone from
  the front stands in for speech, and a 1.8 kHz tone is the interferer.
  Results:

  | interferer | mean G | least-squares optimum | SNR improvement |
  |------------|--------|-----------------------|-----------------|
  | 180 deg | 0.004 | 0 | 50 dB |
  | 150 deg | 0.068 | 0.074 | 43 dB |
  | 105 deg | 0.580 | 0.593 | 40 dB |
  | 120 deg | 0.330 | 0.338 | 42 dB |
  | 90 deg | 0.958 | 1 | 33 dB |

  A second run uses a broadband interferer in place of a competing talker:
  40 random sinusoids between 200 Hz and 4 kHz, applied with the exact
  fractional delay. It gives about 32 dB improvement from 180, 150 and
  105 deg, and G settles within 0.01 of the tone optimum.

  These are ideal, echo-free plane waves with perfectly matched
  microphones. Measurements of the real device in a conference room
  reported about 21 dB against a tone and 15 dB against a speech
  interferer. No recorded speech is simulated here.

Floor truncation in the LMS step biases G slightly downwards. This shows as
0.958 instead of 1 at 90 deg and a few thousandths below the optimum
elsewhere.

To simulate one testbench with plain Verilator, from the directory that holds
`rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_beamformer_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/bf_pkg.sv tb/bf_ref_pkg.sv tb/tb_beamformer_top.sv
    ./obj_dir/Vtb_beamformer_top

Replace the top module and file for other testbenches; `bf_ref_pkg.sv` is
only needed by the core and top tests.

## Departures and open points

- **Multiplier timing.** Only the cycle count is specified. The split into an
  add cycle and a shift cycle per Booth digit is this design's own, as is
  the start/busy/done handshake.
- **Per-state operations.** The exact assignment of additions to states
  follows the written description of the optimised schedule: `y` in S2,
  `z` in S1, `temp` in S2, `C1*temp` in S0 and the `z` product in S2. The
  `x1`/`x2` subtractions are placed in S0.
- **The `z` product.** One description of the schedule names it `C2*z`.
  The filter equation multiplies `z(n-1)` by `C3`, and `C3` is used.
- **Three-operand adder.** With `C1 = C2` merged, only two addends remain
  for `z`. The third input of the carry-save adder is used for rounding.
  Truncating instead would mean tying it to zero.
- **Clock frequency.** Not specified. The 73-cycle figure above sets the
  minimum.
- **Reset values, overrun detection and saturation.** All are this design's
  own choices.
- **Downsampling phase.** The kept phase (the second of each pair of
  strobes) is arbitrary.
- **Baseline architectures not built.** The earlier versions of the
  architecture are not included: five multipliers, then two multipliers
  with radix-2 Booth units, then one radix-2 multiplier. Only the final
  single radix-4 multiplier version is built.
- **Not characterised.** Area and power of this RTL have not been measured.
  The silicon figures for the final version were 0.054 mm^2 and 60.5 uW
  in a 0.18 um process.
- **Lint note.** Verilator's `SYNCASYNCNET` note on `rst_n` comes from the
  assertions' `disable iff`, which samples the asynchronous reset.
