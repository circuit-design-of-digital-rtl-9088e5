# Dual closed-loop FPGA controller for an interferometric fiber optic gyroscope

A fiber optic gyroscope (FOG) measures rotation through the Sagnac effect.
Light travels both ways around a fiber coil. Rotation shifts the phase of
the two waves apart, and a photodetector sees the interference. This RTL is
the digital part of a closed-loop FOG. The FPGA reads the detector through a
12-bit A/D converter. It drives the integrated-optics phase modulator through
a 16-bit main D/A converter. It adds its own phase shift, which cancels the
Sagnac phase exactly. That feedback phase is the measured rotation rate.

A second, slower loop keeps the modulator's gain calibrated. It trims the
reference voltage of the main D/A converter through a 14-bit assistant D/A
converter, written over SPI. This keeps the modulator's wrap-around (the
"2π reset") exactly 2π as the analog parts drift with temperature.

The structure follows a published FPGA design for a FOG with a 650 m coil.
That design names the blocks, their connections, the converter widths, the
sample-rate requirement and the pins. It does not give the word widths,
gains, serial formats or reset behaviour. Those are this design's choices and
are marked as such below and in each file's header.

## Modulator phase arithmetic

Everything turns on one convention: **full scale of the main D/A converter is
2π of modulator phase**. So a 16-bit code is a phase in units of
2π/65536, and π/2 is 16384. The analog gain that makes this true is what the
second loop maintains.

Two waves meet at the detector. Each has passed the modulator once, one
transit time τ apart, so the phase difference between them is
φ(t) − φ(t − τ). The modulator waveform is the sum of two parts:

* **Square wave (bias).** The waveform adds π/2 during one τ and 0 during the
  next. The difference therefore alternates between +π/2 and −π/2. With the
  bias, the detector power is `Pd·(1 ∓ sin Δφ)` in the two halves. Subtracting
  the halves gives `−2·Pd·sin Δφ`. That signal is linear around zero and
  carries the sign of the residual phase Δφ.
* **Ladder (staircase).** Every τ the ladder rises by the *step height*. The
  difference φ(t) − φ(t − τ) is then the step height itself, a constant
  phase of either sign. The first loop sets the step height to minus the
  Sagnac phase.

The ladder is an accumulator that wraps modulo 2^24 (16 D/A bits plus 8
fractional bits). When the ladder passes full scale, the code falls back by
2^16. That jump of one full scale is the **2π reset**. A phase of exactly 2π
is invisible to the interferometer, so the reset needs no comparator; the
adder's overflow is the reset. Adding the bias can also wrap the code. Such a
wrap is undone in the next half cycle.

## Signal flow

```
 AD[11:0] ─► adc_if ─► demodulator (Dem) ─ERD─► step_integrator (ADD1) ─step─► ladder_gen (ADD2)
                 ▲          ▲     │                                                │ ladder
                 │     mod_timing │                                                ├──► idm (IDM) ──up──┐
               ADCLK  (half cycle,│                                                ▼                    │
                      window)     │                                         wave_composer ──code──► main_dac_if ─► BD[15:0], DACLK
                                  │                                                │
                                  │                                         reset_flag (RF)
                                  ▼                                                │ rf, dir
                             erd_select (RD / CD) ◄────────────────────────────────┘
                                  │ RD, CD
                                  ▼
                             gain_loop (SUB + accumulator) ◄── up
                                  │ aux code
                                  ▼
                             spi_dac_if ─► SDACS2, FS2, SDACLK2, SDAIN2   (assistant D/A → main D/A reference)

 step ─► rate_output ─► parallel rate word, S+/S- serial frame
```

### First loop: rate

`mod_timing` counts A/D samples. A half cycle is 48 samples, which is one
transit time; the square wave therefore runs near the coil's eigenfrequency.
Integration uses the last 32 samples of each half. The first 16 are skipped,
so the spikes at the square-wave edges are not summed. At the end of every
period (+π/2 half, then −π/2 half), `demodulator` outputs

    ERD = Σ(+π/2 half) − Σ(−π/2 half)  ≈  −2 · 32 · Pd · sin(Δφ)

`step_integrator` adds `ERD · 2^K_SHIFT` to the step height. That is the
integrator `Δφ' = K·ΔP`. The residual then decays by the factor (1 − 2·Pd·K)
per period and converges when `0 < Pd·K < 1/2`. Pd is counted here in A/D
LSB summed over the window. With K_SHIFT = 4, K is 1/16 of a D/A LSB per ERD
count. A test detector with Pd = 1000 LSB gives a loop factor of about 0.38.
The step height is clipped just below ±π/2. Beyond that the demodulated error
changes sign and the loop would lock onto a wrong point.

`ladder_gen` adds the step height at every half-cycle boundary.
`wave_composer` takes the top 16 bits and adds 16384 in the +π/2 half.
`main_dac_if` puts the code on BD and pulses DACLK one clock later.

### Second loop: keeping a reset at exactly 2π

This is the hardest part of the design to follow.

Let the modulator gain be off by a factor (1 + ε). In a normal half cycle the
phase difference is (step ± π/2)·(1 + ε). The error in the ±π/2 part is the
same in both halves, so it cancels in ERD. The error in the step part is
removed by the first loop. A half cycle that contains a reset is different.
Its code difference carries an extra ∓65536 codes, which the modulator
applies as ∓2π·(1 + ε). The interferometer ignores the 2π but sees the
leftover ∓2π·ε.

So the ERD of a period that holds a reset differs from that of a normal
period by an amount proportional to ε. The sign follows the direction of the
reset. The sign does not depend on which half the reset fell in: an error in
the + half lowers Σ(+), and one in the − half raises Σ(−). Both lower ERD.

* `reset_flag` (RF) compares each new code with the previous one as plain
  integers. A jump larger than half of full scale is a reset, up or down.
  The resets of a period's two halves are summed. A wrap caused only by the
  bias returns in the next half and nets to zero, so it is not counted. A
  period whose net count is not zero is a *reset period*.
* `erd_select` stores the ERD of reset periods in RD and of normal periods
  in CD.
* `idm` (IDM) tells a rising ladder from a falling one. It uses the sign of
  the modular difference of successive ladder values. A rising ladder resets
  downward and a falling one upward.
* `gain_loop` forms `RD − CD`, gives it the sign from IDM, shifts it right by
  A_SHIFT and subtracts it from the assistant D/A code. The code starts at
  mid-scale and is clipped to 0…16383. It settles where a reset leaves no
  error, that is where the reset voltage is exactly 2π.
* `spi_dac_if` sends every new code to the assistant converter. A code that
  arrives during a frame is held, and only the newest held code is sent
  next.

The sign convention assumes that a larger assistant code raises the main
converter's reference and so the modulator gain. If the board is wired the
other way, invert `up` at the `gain_loop` input, or swap the sign in
`gain_loop`.

The first loop also sees the reset-period ERD, as the block diagram this
design follows draws it. While the gain is off, each reset kicks the step
height briefly. The kick disappears as the second loop converges.

### Rate output

The step height in ladder LSB (2π = 2^24) is the Sagnac phase. `rate_output`
sums it over 3160 ladder updates, about 20 ms at 156 kHz modulation. It
presents the 40-bit sum on `rate` with `rate_valid`. It also sends the sum
on the S+/S- pair as a UART frame: 8N1 at clk/260 (115200 baud at 30 MHz),
header 0xA5, then 5 bytes MSB first. If a window closes while a frame is
still being sent, that window goes out only in parallel, and `dropped`
pulses. Converting the word to deg/s needs the optical wavelength and coil
diameter:

    Ω = λ·c / (2π·L·D) · Δφ,   Δφ = rate · 2π / 2^24 / 3160 per transit time

## Timing

| quantity | value at defaults |
|---|---|
| system clock | 30 MHz assumed (nothing in the RTL depends on the absolute value) |
| A/D sample | every CLK_DIV = 2 clocks (15 MHz) |
| half cycle (τ) | 48 samples = 96 clocks = 3.2 µs |
| modulation period | 192 clocks, 156.25 kHz (the coil's eigenfrequency is about 158 kHz; 47 samples would give 159.6 kHz) |
| integration window | last 32 samples of each half |
| ERD | 1 clock after the last sample of the −π/2 half |
| step height | 1 clock after ERD |
| new main D/A code | BD 3 clocks, DACLK edge 4 clocks after the last sample of a half |
| RF for a period | settles after the −π/2 half's code, before that period's ERD |
| assistant D/A frame | 16 bits, 4 clocks per bit, 65 clocks |
| rate word | every 3160 half cycles |

The 4-clock latency of the D/A update lands inside the 16 samples that are
not integrated. In a real system the optical transit time and the converter
delays must be aligned with the window as well. Set HALF_SAMPLES so that a
half cycle equals the coil transit time at your A/D clock.

## Pins of `fog_fpga_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous reset, active low (RST) |
| ad | in | 12 | A/D output bus AD[0..11], offset binary |
| adclk, opdis_n | out | 1 | A/D clock; A/D output disable, active low (held inactive) |
| bd, daclk | out | 16, 1 | main D/A bus and latch clock (rising edge latches) |
| sdacs2_n, fs2_n, sdaclk2, sdain2 | out | 1 | assistant D/A SPI: chip select, frame sync (= chip select), clock (idle low, converter samples on rising edge), data |
| s_p, s_n | out | 1 | serial rate output, true and complement |
| rate, rate_valid | out | 40, 1 | parallel rate word |
| step | out | 24 | step height, signed, 2π = 2^24 |
| aux | out | 14 | assistant D/A code |
| status | out | `fog_status_t` | loop events: resets and their direction, reset periods, second-loop updates, IDM direction, saturation, SPI busy, dropped rate frames, period end |

The converter board this design was drawn against also routes a second
serial port (chip select, clock, data, frame sync) to the A/D side. Its
purpose is not known, so it is not driven.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| CLK_DIV | 2 | top, adc_if | clocks per A/D sample |
| HALF_SAMPLES | 48 | top, mod_timing | samples per half cycle (must be at least 32 to meet the sampling requirement) |
| INT_SAMPLES | 32 | top, mod_timing | integrated samples per half |
| K_SHIFT | 4 | top, step_integrator | first-loop gain, 2^K_SHIFT ladder LSB per ERD count |
| A_SHIFT | 3 | top, gain_loop | second-loop gain, 2^-A_SHIFT |
| SCLK_HALF | 2 | top, spi_dac_if | clocks per half SPI clock |
| OUT_HALVES | 3160 | top, rate_output | rate window in ladder updates |
| BAUD_DIV | 260 | top, rate_output | clocks per serial bit |

The widths live in `fog_pkg`: ADC_W 12, DAC_W 16, AUX_W 14, FRAC_W 8
(fractional ladder bits), ERD_W 20 and RATE_W 40. The converter widths, the
32-sample window and the ≥15 MHz sample rate come from the source design.
All gains, the fraction width, the clock, the serial formats and the rate
window are this design's own choices.

Choose the loop gains together with your detector amplitude. Pd·K must stay
below 1/2, where Pd counts the 32 summed samples. The second loop gain scales
with Pd times how strongly the assistant code moves the gain.

## How far it has been checked

Each module has a self-checking testbench in `tb/` that compares it with a
reference computed in the testbench. The end-to-end testbench
`tb_fog_fpga_top` runs the top at its default parameters against
`fog_plant_model`. That behavioural model stands for the converters, the
modulator with a gain error that the assistant code can correct, the coil
delay, and a cosine interferometer with noise. It runs three scenarios:

* Sagnac phase +0.10 rad with a +3 % gain error. The step height settles
  within 0.1 % of the Sagnac phase. The second loop brings the gain error
  below 0.01 %.
* Sagnac phase −0.15 rad with a −2 % gain error. This gives a rising ladder
  with upward resets. The results are the same.
* A phase beyond π/2, which must saturate the step height.

`tb_fog_workloads` measures the two figures a gyroscope is judged by, on
the same model and at default parameters:

* **Scale factor.** The Sagnac phase is stepped through ±0.05, ±0.1, ±0.2 and
  ±0.4 rad, and one full rate word is read at each step. The least-squares
  slope is within 0.01 % of the ideal −2^24/(2π)·3160 per rad. It is the
  same for both rotation directions within 0.01 %. It is unchanged between
  +3 % and −3 % modulator gain error, which is what the second loop is for.
* **Zero offset.** With no rotation, 32 rate words average about 41 ladder
  LSB per update (1.5·10⁻⁵ rad), with a spread of about 47. The spread is the
  detector noise carried through the loop. A rate word is the ladder's net
  movement over its window, so the noise shows up as a random walk of the
  ladder. Converting these figures to deg/h needs the coil diameter and the
  wavelength.

The end-to-end test also decodes the serial rate frames and checks the main D/A update
interval (96 clocks). It checks that the model's assistant converter
receives every SPI code. It counts each loop mechanism and fails if any
never occurs. Together with the block tests, each testbench has been run
against a deliberately broken copy of its module and fails on it. The
testbenches end by printing `TB_RESULT checks=N failures=M`.

What has not been checked: real converter timing (setup and hold, pipeline
delays of a particular A/D), the optical transit time against the
integration window, noise performance, temperature drift, and the scale
factor and bias stability of a real coil. None of these can be shown in
simulation without the analog parts.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_fog_fpga_top \
    rtl/fog_pkg.sv rtl/*.sv tb/fog_plant_model.sv tb/tb_fog_fpga_top.sv -o sim
./obj_dir/sim
```

A block test needs only the package, the module (and `uart_tx.sv` for
`rate_output`) and its testbench, e.g. `tb/tb_gain_loop.sv` with
`rtl/fog_pkg.sv rtl/gain_loop.sv`. The end-to-end test finishes in about a
second, the workload test in about ten. Edit `phi_s` and `eps0` in them to
try other rotations and gain errors.

## Not in this RTL

The light source and its power control, the coupler, the Y-waveguide, the
coil, the PIN/FET detector, the preamplifier, the converter chips, the buffer
between the assistant and main converters, the post amplifier that drives
the modulator differentially, and the board's power and ground design are
analog or physical parts. They appear only as the behavioural testbench
model.
