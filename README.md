# Two-channel DDS sine generator for railway track circuits

A railway track circuit has a signal supply at one end of an isolated rail
section and a phase-sensitive receiver at the other. The supply sends a 75 Hz
or 275 Hz signal into the rails. A second output, shifted in phase (often by
90 degrees), goes to the receiver as a reference. A train shorting the rails
changes the amplitude and phase of the rail signal, and the receiver detects
that change. Older supplies make square waves, which are rich in harmonics.
This design replaces the supply's signal generator with a digital one. It
makes two sine waves of the same frequency with a selectable phase difference,
and outputs them as pulse-width-modulated logic signals. These drive the
existing power amplifiers and output transformers.

The generator is a direct digital synthesizer (DDS). A phase accumulator
advances by a frequency-dependent increment at a fixed sample rate. Its top bits
address a sine table. The sample rate is chosen so that each 8-bit sample lasts
exactly one PWM period.

```
 freq[5:0] ──► freq_tab ──phase_inc(24)──┬─► dds_logic_0 (shift 0) ──addr0(10)─► ┌──────────┐ data0 ┌──────────┐──► pwm0
          └──────────────► freq digits   │                                      │ sine_lut │──────►│pwm_logic │
 phase[3:0]─► phase_tab ──phase_shift(10)┴─► dds_logic_1 (shift φ) ──addr1(10)─► │ 1024 x 8 │──────►│          │──► pwm1
          └──────────────► phase digits                                         └──────────┘ data1 └──────────┘
 pb_sw ─────► display_logic ──► display[31:0]  (frequency or phase, four 7-segment digits)
 clk24m, reset ─► clk_gen ──► reset_int, ce6m (6 MHz), ce24k (23.4375 kHz)
```

## Numbers that fix the design

| quantity | value | why |
|---|---|---|
| PWM step rate f_pwm | 6 MHz | 24 MHz / 4; chosen to suit the power amplifier |
| sample resolution R | 8 bits | 256 PWM steps per period |
| DDS sample rate f_clk | f_pwm / 2^R = 23 437.5 Hz | one sample per PWM period |
| accumulator width M | 24 bits | resolution f_clk / 2^24 = 0.0014 Hz |
| phase shift width P | 10 bits | 360/1024 = 0.35 degree per unit |
| quantized phase N | 10 bits | table address; N > R + 0.956 keeps phase-truncation spurs below amplitude-quantization noise |
| sine table | 2^N x R = 8192 bits | one dual-port ROM shared by both channels |

Output frequency: `f_o = phase_inc * f_clk / 2^M`. Phase shift:
`phase_shift / 2^P` of a turn. The worst-case phase-truncation spur is
`-6.02 N + 3.992 = -56.2 dBc`. The amplitude-quantization noise is
`-6.02 R - 1.761 = -49.9 dB`.

## The DDS channel (`dds_logic`)

Each channel has three parts. An input register holds the phase increment.
An M-bit register and adder form the accumulator. A second adder adds the
P-bit phase shift, aligned to the top of the accumulator word. The quantizer
keeps the top N bits of the sum as the table address; the low 14 bits are
simply dropped. The address is combinational from the accumulator: there is no
register after the shift adder.

The two channels get the same increment and are reset together. They
therefore stay in lock step, including when the frequency changes: both
increment registers load the new value on the same strobe. Their phase
difference is exactly the phase shift word. Channel 0 has its shift tied to 0
and is the reference.

The table is kept outside the DDS module so that its form can change, for
example to a quarter-wave table. The module is parameterised in M, P and N.

## Sine table and modulation depth (`sine_lut`)

The power stage must not see duty cycles near 0 % or 100 %, so the table's
amplitude is reduced instead of using full scale. Word k is

```
lut[k] = round(128 + A * sin(2*pi*k/1024)),   A = 256 * (0.5 - 0.0525) = 114.56
```

With duty = word/256, the ideal sine swings between 5.25 % and 94.75 %.
After rounding the words span 13..243 (5.1 % .. 94.9 %). The table is filled
by an `initial` loop using `$sin`. Synthesis keeps it as one 8192-bit memory
with two synchronous read ports, so one FPGA block RAM is enough. The read has
one clock of latency.

## PWM and the clock plan (`clk_gen`, `pwm_logic`)

The whole design runs on the 24 MHz clock. `clk_gen` is a 10-bit counter.
Its bit 1 and bit 9 are the divided clocks `clk6m` and `clk24k`. The strobes
`ce6m` (every 4 clocks) and `ce24k` (every 1024 clocks) act as clock enables.
Every `ce24k` coincides with a `ce6m`.

`pwm_logic` has one 8-bit counter shared by both outputs, stepping on
`ce6m`. An output is high while `counter < sample`. Both samples are latched
when the counter wraps, so a period never mixes two samples. One PWM period is
256 x 4 = 1024 clocks, exactly one DDS sample.

The alignment works out as follows:

1. The accumulators step on the last count of the 1024-clock cycle.
2. The ROM outputs the new sample one clock later.
3. The PWM counter wraps on the fourth clock of the next cycle and picks up that sample.

`reset` is active high and asserts `reset_int` at once. `reset_int` is
released on the second clock edge after `reset` falls.

Latency from a code change to the PWM outputs:

* A new phase shift reaches the table address at once and the outputs at the next or the following sample, depending on where in the period it arrives.
* A new frequency takes one sample more to change the phase slope, because the increment register sits in between.
* Both show up within two sample periods (about 85 µs).
* The phase stays continuous across a frequency change.

## Selection codes and display (`freq_tab`, `phase_tab`, `display_logic`)

| input | code | meaning |
|---|---|---|
| `freq[5:0]` | 0..20 | 74.0 .. 76.0 Hz in 0.1 Hz steps |
| | 21..41 | 274.0 .. 276.0 Hz in 0.1 Hz steps |
| | 42..63 | unused, gives 75.0 Hz |
| `phase[3:0]` | 0..12 | 0 .. 180 degrees in 15 degree steps |
| | 13..15 | unused, gives 180 degrees |

`phase_inc = round(f * 2^24 / 23437.5)`, for example 53687 for 75.0 Hz
(74.99987 Hz) and 196853 for 275.0 Hz. The setting error is at most 0.0007 Hz.

`phase_shift = round(deg * 1024 / 360)`. This is exact for multiples of 45
degrees and within 0.18 degree otherwise (15 degrees gives 43, i.e. 15.12).

Both tables are computed at elaboration from functions in `dsg_pkg`. Each
also gives four BCD digits for the display.

`display` drives four seven-segment digits. Each digit is
`{dp,g,f,e,d,c,b,a}`, active high, with the leftmost digit in bits 31:24.

* The frequency is shown as ` 75.0` / `275.0`, with the decimal point on the second digit from the right.
* The phase is shown as `  90`. Leading zeros are blanked.
* After reset the frequency is shown. Each press of `pb_sw` toggles between frequency and phase.
* The button is synchronised and debounced. A new level must hold for `DEB_TICKS` = 240 sample periods (about 10 ms).

## Spectral purity

The spectrum testbench computes a Blackman-Harris-windowed DFT of one second
of the simulated samples, from 2 to 800 Hz. It finds:

| output | largest component away from the carrier | origin |
|---|---|---|
| 75.0 Hz | -65.3 dBc at 113 Hz | rounding pattern of the table words |
| 275.0 Hz | -60.9 dBc at 75.5 Hz | phase truncation (increment 196853 has low bits 245, an error sawtooth at 350.5 Hz) |

Both are well below the -56.2 dBc phase-truncation bound. A generator built
this way was reported to measure better than -66 dBc and -60 dBc. That
measurement was on the analog output, and its table content is not known.
The 75 Hz figure here is therefore 0.7 dB short of that report. It depends on
the table's exact rounding: a table centred on 127.5 instead of 128 measures
-66.4 dBc. The 275 Hz spur is set by the widths M and N alone.

## Where this design makes its own choices

The following are known to follow the generator as built:

* the block structure and bus widths;
* M, P, N and R;
* the clock rates;
* the single shared dual-port ROM;
* the 5.25..94.75 % modulation limit;
* the frequency and phase ranges and steps.

The following are this design's own choices:

* **Clocking.** The design uses one clock domain with enables, instead of separate 6 MHz and 23.4 kHz clock nets.
* **Table content.** The table's exact formula and rounding are assumed.
* **PWM.** Counter-compare PWM, with samples latched at the period start.
* **Selection codes.** The code layout and the fallback for unused codes are assumed.
* **Display.** The display encoding, digit format and button behaviour (toggle, debounce) are assumed.
* **Reset.** The reset polarity and its synchroniser are assumed.
* **Flip-flop count.** The design has 127 flip-flop bits, against 115 in the built generator. The extra bits mostly come from the debounce counter and the registered display.

The following are not included:

* external synchronisation of the supply, which is known only by name;
* the power amplifiers, output transformers, power circuit and supervising circuit of the supply;
* the phase-sensitive receiver.

## Files

| file | contents |
|---|---|
| `rtl/dsg_pkg.sv` | widths, rates, table functions |
| `rtl/dsg_top.sv` | top level |
| `rtl/clk_gen.sv` | divider, strobes, reset synchroniser |
| `rtl/freq_tab.sv`, `rtl/phase_tab.sv` | selection tables |
| `rtl/dds_logic.sv` | DDS channel |
| `rtl/sine_lut.sv` | dual-port sine ROM |
| `rtl/pwm_logic.sv` | two PWM outputs |
| `rtl/display_logic.sv` | seven-segment display and push button |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_dsg_top.sv` | end-to-end test at full size |
| `tb/tb_dsg_spectrum.sv` | spectrum test at 75 Hz and 275 Hz |

`tb_dsg_top` runs the top with default parameters for about 820 samples.
Along the way it:

* covers a full 75 Hz period at 90 degrees;
* steps the phase;
* jumps to 275 Hz;
* tries the unused codes;
* goes to 74 Hz at 15 degrees;
* presses the button.

It recovers every sample from the PWM high times and checks each against an
independent model of accumulator and sine. It also checks the 1024-clock
period, the display contents and how many samples each change takes. Each
testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/dsg_pkg.sv \
          tb/tb_dsg_top.sv --top-module tb_dsg_top -o sim
./obj_dir/sim
```

Replace `tb_dsg_top` by any other testbench name. The end-to-end test takes
under a second. The spectrum test takes about 20 s, most of it in the DFT.
`tb_display_logic` and `tb_dds_logic` override parameters: a short debounce
and explicit widths, respectively.

## Changing it

* **Widths.** M, P, N and R are parameters of `dds_logic`, `sine_lut` and `pwm_logic`. The top takes them from `dsg_pkg`.
* **Derived rates.** The DDS rate is `24 MHz / DIV_DDS`, and `DIV_DDS / DIV_PWM` must equal 2^R for one sample per PWM period. `FCLK_DECIHZ` in the package follows `DIV_DDS`.
* **Frequency bands.** Edit `FREQ_LO_DECIHZ`, `FREQ_HI_DECIHZ` and `FREQ_STEPS` in `dsg_pkg`.
* **Modulation limit.** Set by `DUTY_MIN_PERMYRIAD` of `sine_lut`.
* **Smaller table.** A quarter-wave table can replace `sine_lut` without touching `dds_logic`.
