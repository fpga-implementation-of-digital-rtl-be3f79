# Digital PLL frequency synthesizer with programmable dividers

This is a phase-locked loop that multiplies a low-frequency square wave by
a programmable ratio, `f_out = (N'/M') * f_in`. It is built around a
numerically controlled oscillator (NCO) made of an integrator and a
comparator with hysteresis. The loop is mixed-signal:

- an XOR gate compares the phases of the divided input and the divided output;
- an external RC network averages the XOR output;
- an external 12-bit ADC digitises the average;
- the ADC code, scaled, sets the NCO frequency.

Everything digital is in this RTL. The RC filter and the ADC are off-chip
parts, and the top level brings their signals out as pins.

With a 100 MHz board clock, the NCO runs at 390.625 kHz (100 MHz / 256) and
steps in 97.66 Hz increments. Its centre frequency is 781 Hz. The loop
follows inputs from about 280 Hz to 1.73 kHz. A typical use: a 50 Hz input,
input divider M' = 1, and feedback divider N' = 10 … 30 give an output of
500 Hz … 1.5 kHz.

```
           +--------+   ref   +-----+  pd_out  ~~~~~~~~~~~~   ~~~~~~~~~
 fin ->sync| /2M'   |-------->| XOR |--------->  RC filter  -->  ADC    ~~ off-chip
           +--------+         +-----+          ~~~~~~~~~~~~   ~~~~~~~~~
                                 ^ fb                            | adc_cs_n/sclk/sdata
           +--------+            |                          +------------+
           | /2N'   |------------+                          | adc_spi_if |
           +--------+                                       +------------+
               ^                                                  | code (12 b)
               |                                            +----------------+
               |                                            | adc_normalizer |
               |                                            +----------------+
               |      +-----+   Nin (16 b)                        |
   fout <------+------| NCO |<------------- nin_sel ? nin_direct : Nin_loop
                      +-----+
                         ^ ce  (clk_prescaler, every pre_ratio clocks)
                         | integ --> integrator_dac_map --> dac (8 b)
```

## The NCO: integrator and comparator with hysteresis

The NCO is the part that takes the most explaining. It has no phase
accumulator and no lookup table. It is a digital relaxation oscillator:

- **mux_sw** passes `+Nin` or `-Nin`, chosen by the oscillator output.
- **integrator**: an accumulator adds the mux_sw output on every enabled clock.
- **comp_hys**: a comparator `out = (integ >= thr)`. The threshold `thr` is
  `+Nr` or `-Nr`, chosen by `out` as it was one enabled clock earlier.

While `out` is low, the threshold is `+Nr` and the integrator climbs by
`Nin` on each enabled clock. At the clock where it reaches `+Nr`, `out` goes
high. From then on the threshold is `-Nr` and the integrator falls. When it
passes below `-Nr`, `out` goes low again. The integrator traces a triangle
from −Nr to +Nr, and `out` is a square wave with a 50 % duty cycle.

Because the threshold comparison is `>=`, each ramp overshoots its threshold
by one step. When `Nin` divides `2*Nr`, each half period is exactly
`2*Nr/Nin + 1` enabled clocks, so

```
T_out = (4*Nr/Nin + 2) * Ts        f_out ~= Nin / (4 * Ts * Nr)
```

With `Nr = 1000`:

| NCO clock | Nin = 1 | Nin = 20 |
|---|---|---|
| 100 MHz | 4002 clocks, 24.99 kHz | 202 clocks, 495.0 kHz |
| 1.5625 MHz (100 MHz / 64) | 390.43 Hz | 7.735 kHz |
| 390.625 kHz (100 MHz / 256) | 97.6 Hz | 1.93 kHz |

Against the ideal `Nin/(4 Ts Nr)`, the two overshoot clocks cost a frequency
error that grows with `Nin`: 0.05 % at Nin = 1 and 1 % at Nin = 20. The
integrator's range is −(Nr + Nin) … +Nr. Changing `Nin` takes effect on the
next clock, with no phase jump at the output. `Nin = 0` freezes the
oscillator.

`comp_hys` is its own module (`rtl/comp_hys.sv`). `mux_sw` and the
integrator are the two statements at the top of `rtl/nco.sv`.

## Closing the loop

**Phase detector.** The phase detector is an XOR gate, registered once so
that the pin carries no glitches. Take two 50 % square waves of equal
frequency. The XOR output's mean is `VDD * dphi/pi` for 0 ≤ dphi ≤ π, which
is a detector gain of 3.3 V/π. The loop settles at whatever phase gives the
filter voltage that the output frequency needs. At the centre frequency,
that phase is 90°.

**Normalisation.** `adc_normalizer` turns the ADC code into the NCO input:

```
Nin = N0 + round((code - 2048) * MUL / 2^SHIFT),   clipped at 0
N0 = 8, MUL = 346, SHIFT = 16
```

- Half the supply (code 2048) gives `Nin = 8`, which is 781 Hz: the centre
  frequency.
- The slope is 6.55 Nin per volt, which is 640 Hz/V, for a 3.3 V, 12-bit
  converter.
- The full ADC range covers Nin = 0 … 19, which is 0 … 1.86 kHz. This bounds
  the lock range from above.

**Quantised control.** The NCO input is an integer, so the loop can only set
the frequency in 97.66 Hz steps. For an input between two steps, the ADC
code crosses a step boundary back and forth. `Nin` then alternates between
the two neighbouring values, and their average matches the input. The phase
stays bounded, so the long-run output frequency is exact. The cycle-to-cycle
period still jitters by up to one step.

The same holds with the dividers in the loop. There the XOR output has a
low frequency: 50 Hz for a 25 Hz divided reference. The 100 Hz RC filter
barely smooths it, so `Nin` swings widely within each reference period. The
average frequency is still correct. This matches the end-to-end test, which
counts output edges over 20 input periods.

**Measured behaviour.** All figures are from simulation with the
behavioural filter and ADC models in `tb/`:

| condition | result |
|---|---|
| 780 Hz input | followed, error < 0.5 % |
| input walked up from 780 Hz | followed up to 1.73 kHz |
| input walked down from 780 Hz | followed down to 280 Hz |
| from reset, input at 381, 481 or 1081 Hz | acquired without help |
| from reset, input at 281, 1181 or 1281 Hz | not acquired |

So the loop captures over roughly 380 … 1100 Hz, a width of about 700 Hz,
but once locked it holds over 280 … 1730 Hz. An XOR loop's capture range is
narrower than its lock range. This is why the end-to-end test reaches
1.5 kHz by walking the input up in 80 Hz steps.

## Programmable dividers

`freq_divider` counts rising edges of its input. After `N'` edges it toggles
its output and restarts. The result is `f_in / (2N')` with a 50 % duty
cycle, so only even ratios are possible. The counter is not clocked by the
divided signal. Instead, the input is sampled on `clk`, and its rising edges
are detected there, which keeps one clock domain. The output toggles one
clock after the completing edge.

`N' = 0` bypasses the divider, so the plain loop (`f_out = f_in`) is
available. Factors are 8 bits wide and may change at run time. Both loop
dividers use the same module: `m_div` on the input and `n_div` in feedback.
With both in use, `f_out = (N'/M') * f_in`.

## Clocking and modes

One clock, `clk` (100 MHz), with an asynchronous active-low reset `rst_n`.

The NCO's clock is a clock enable from `clk_prescaler`: one pulse every
`pre_ratio` clocks. Useful settings:

| pre_ratio | NCO clock | use |
|---|---|---|
| 256 | 390.625 kHz | closed loop; gives the 97.66 Hz/step gain |
| 8 | 12.5 MHz | stand-alone NCO, slow enough for an 8-bit observation DAC |
| 1 | 100 MHz | stand-alone NCO at full rate |

`nin_sel = 1` opens the loop and drives the NCO from `nin_direct`. This is
how the NCO is characterised alone. `nin_sel = 0` closes the loop.

The external input `fin` is asynchronous and passes through a two-flop
synchroniser.

## ADC interface

`adc_spi_if` reads a converter of the AD7476A type, the one on a Digilent
PmodAD1. One frame works like this:

1. Chip select goes low.
2. Sixteen serial clocks follow. The converter sends four zeros, then 12
   data bits, MSB first. Each bit is driven on a falling edge of the serial
   clock.
3. Chip select goes high for a quiet time.

The interface reads each bit at the instant it drives the serial clock low.
At the defaults, the serial clock runs at 12.5 MHz and a frame takes 136
clocks, about 735 kS/s. Conversions run continuously. Each new code
produces a one-clock `valid` pulse, and `adc_normalizer` updates `Nin` on
that pulse.

## Top-level ports (`dpll_synth_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock, asynchronous active-low reset |
| `fin` | in | 1 | reference input (asynchronous) |
| `m_div`, `n_div` | in | 8 | divider factors M', N' (f/2M', f/2N'); 0 = bypass |
| `pre_ratio` | in | 9 | NCO clock enable every `pre_ratio` clocks |
| `nin_sel`, `nin_direct` | in | 1, 16 | open-loop select and NCO input |
| `pd_out` | out | 1 | XOR detector output to the RC filter |
| `adc_cs_n`, `adc_sclk` | out | 1 | serial ADC control |
| `adc_sdata` | in | 1 | serial ADC data |
| `fout` | out | 1 | synthesizer output |
| `nin` | out | 16 | NCO input in use |
| `dac` | out | 8 | integrator scaled to 0 … 255 for an 8-bit observation DAC |

Parameters with their defaults:

- `NR = 1000`
- `NORM_N0 = 8`, `NORM_MUL = 346`, `NORM_SHIFT = 16`
- `SCLK_HALF = 4`: serial-clock half period in clocks
- `QUIET_HALVES = 2`: chip-select-high time in serial half periods

Shared widths are in `rtl/dpll_pkg.sv`:

- `Nin`, `Nr`: 16 bits
- integrator: 20 bits, signed
- divider factors: 8 bits
- ADC code: 12 bits

## The off-chip parts

**Loop filter.** A first-order RC low-pass filter, R = 15.8 kΩ and
C = 100 nF, with a corner at about 100 Hz. It is driven by `pd_out` and
feeds the ADC input. A lag-lead variant (a resistor in series with C) adds
a zero and more phase margin, and needs no RTL change.

**ADC.** A 3.3 V, 12-bit converter. If it has a different reference
voltage, change `NORM_MUL` to keep 640 Hz/V, or set your own loop gain.

Testbench models of both parts are in `tb/rc_lpf_model.sv` and
`tb/adc_ad7476_model.sv`.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. To build and run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dpll_synth_top \
  -y rtl -y tb +libext+.sv rtl/dpll_pkg.sv tb/tb_dpll_synth_top.sv
./obj_dir/Vtb_dpll_synth_top
```

| testbench | checks |
|---|---|
| `tb_comp_hys` | random integrator values and enables against a reference model |
| `tb_nco` | period, duty cycle and integrator swing for Nin = 1 … 20; 390.43 Hz and 7.735 kHz at a 1.5625 MHz NCO clock |
| `tb_freq_divider` | input edges per output half period for several N', and bypass |
| `tb_xor_phase_detector` | truth table, and mean output against phase offset |
| `tb_clk_prescaler` | enable spacing for ratios 1, 8, 64, 256 and random ratios |
| `tb_adc_spi_if` | codes against the ADC model, 16 serial clocks per frame, 136-clock frame |
| `tb_adc_normalizer` | mapping, rounding, clipping and hold |
| `tb_integrator_dac_map` | end points, clipping, random values |
| `tb_dpll_synth_top` | see below |
| `tb_dpll_lock_range` | walks the input to find the lock range; acquisition from reset at ±300 Hz from the centre (±400 and ±500 Hz are reported) |

`tb_dpll_synth_top` is the end-to-end test, at the default parameters. It
runs these phases in order:

1. Open-loop NCO at /1: checks the period and the DAC swing.
2. Open-loop NCO at /8: checks the period.
3. Closed loop at 780 Hz and at 1.5 kHz, with the dividers bypassed.
4. Synthesizer: 50 Hz input, N' = 10 and 30.

It covers about 2 s of simulated time and takes about 2 minutes.
`tb_dpll_lock_range` covers 3 s of simulated time.

## Design choices

These points are not fixed by the loop's description. They are this
design's choices:

- **One clock domain.** The master clock is a clock enable, and the dividers
  detect edges.
- **Registered XOR output.**
- **Divider bypass** at factor 0.
- **Run-time modes.** The prescaler ratio and the open-loop NCO input are
  run-time inputs.
- **Normalisation.** A gain applied about mid-scale plus an offset `N0`,
  rounded. A pure gain cannot give both the 781 Hz centre frequency and the
  640 Hz/V slope. This form also puts the upper lock edge near 1.7 kHz.
- **ADC frame timing** and serial-clock rate.
- **Bit widths and reset values.**

## Limitations

- The frequency resolution of the loop is one NCO step, 97.66 Hz at
  390.625 kHz. The output frequency is exact only on average, and the period
  jitters by about one step. A finer step needs a larger `Nr` with the
  normalisation gain scaled to match. The RTL allows this, but it has not
  been verified here.
- The loop characteristics depend on the external filter and converter. The
  simulations use ideal models: no noise, and no ADC nonlinearity or
  aperture effects.
- Loop stability at very low reference frequencies is limited. The 100 Hz
  filter corner passes much of the XOR ripple.
