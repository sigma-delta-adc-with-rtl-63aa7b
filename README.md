# Configurable sigma-delta ADC for biomedical signals

This is a low-power sigma-delta analog-to-digital converter. One converter serves two kinds of
sensor signal, and a DSP picks between them at run time:

| mode | use | oversampling | word rate | band | output |
|------|-----|--------------|-----------|------|--------|
| bio-electric (`mode = 0`) | EEG, ECG | 256 | 2.5 kHz | 1.25 kHz | 10-bit |
| bio-image (`mode = 1`) | near-infrared imaging | 32 | 20 kHz | 10 kHz | 8-bit |

A second-order switched-capacitor modulator samples the input at 640 kHz and produces a 1-bit
stream. A multistage decimation filter turns that stream into words. The DSP is the SPI master.
It reads the words over a mode-3 SPI link and sets the mode over the same link. The whole chip
runs from a single 1.28 MHz clock.

The digital part (`adc_digital` and everything below it) is synthesizable RTL. The modulator and
its four-phase clock generator are analog circuits, so they are written as behavioural models.
These models make the end-to-end simulation possible: an analog voltage goes in and SPI words
come out.

## Hierarchy

```
sigma_delta_adc            top; real-valued input vin, SPI pins, drdy, mode
├── nonoverlap_clkgen      behavioural: p1/p2/p1d/p2d (+ complements) from the 640 kHz clock
├── sd_modulator           behavioural: 2nd-order loop, 1-bit quantiser and DAC
└── adc_digital            synthesizable
    ├── decimation_filter
    │   ├── cic_filter     sinc^4, R = 16, as a 61-tap FIR on the bit stream
    │   ├── cos_comp       ((1+z^-4)/2)^3, decimate by 2
    │   ├── sin_comp       ((-1+6z^-8-z^-16)/4)^4, decimate by 2
    │   ├── hb_decim x4    half-band low-pass filters, each decimating by 2
    │   └── mode_output    mode multiplexer and quantiser
    └── spi_slave          CPOL = 1, CPHA = 1, 16-bit frames
adc_pkg                    shared types, coefficient tables and functions
```

## The modulator loop

`sd_modulator` is a discrete-time model of the loop. It has two delaying integrators and a
comparator. A 1-bit DAC feeds ±VREF back into both integrators:

```
u1[n+1] = u1[n] + a1*vin[n] - b1*v[n]
u2[n+1] = u2[n] + a2*u1[n]  - b2*v[n]
y[n]    = (u2[n] >= 0)   v = y ? +VREF : -VREF
```

- The coefficients are a1 = b1 = 0.25, a2 = 1 and b2 = 0.5.
- VREF is 0.75 V, which sets the input full scale to ±0.75 V.
- The state is updated on the rising edge of the delayed phase `p1d`.
- The model is ideal. It has no opamp gain limit, no kT/C noise and no clock feedthrough. An
  optional comparator offset is available as a parameter.

`nonoverlap_clkgen` builds the two clock phases the switches need from a cross-coupled pair of NOR
gates followed by inverter delay chains. `p1` and `p2` never overlap. `p1d` and `p2d` are copies
that fall a little later, so the switches on the sampling node open before the others. The gate
delays are parameters (a few tenths of a nanosecond). They are illustrative values, not
characterised ones.

## Decimation filter

The hardest part to follow is where each filter runs. The design has two competing
descriptions:

- **Block view.** The comb (CIC) filter decimates by 16. Sine and cosine compensators follow it,
  and then four half-band stages each decimate by 2.
- **Transfer-function view.** The compensators are written with delays of 4 and 8 *modulator*
  samples: `(1+z^-4)/2` and `(-1+6z^-8-z^-16)/4`. If they ran after a full decimation by 16,
  those delays would not exist.

This design keeps the transfer functions exactly. It spreads the last factor of 4 of the CIC's
decimation over the compensators:

```
1-bit @640k -> CIC sinc^4 (R=16), output every 4th bit      -> 160 kHz, 17-bit unsigned
            -> to signed: 2*(v - 2^15), full scale = ±2^16  (18-bit samples from here on)
            -> cos_comp  [1 3 3 1]/8,  keep every 2nd        ->  80 kHz
            -> sin_comp  9 taps /256,  keep every 2nd        ->  40 kHz
            -> hb1  31 taps /2^14, keep every 2nd            ->  20 kHz   bio-image tap
            -> hb2  15 taps /2^10                            ->  10 kHz
            -> hb3  15 taps /2^10                            ->   5 kHz
            -> hb4  23 taps /2^12                            ->   2.5 kHz  bio-electric tap
```

- At 160 kHz, one cosine-filter delay is 4 modulator samples. At 80 kHz, one sine-filter delay is
  8 modulator samples.
- By the noble identities, the overall response is the same as running all three filters at
  640 kHz and keeping one sample in 16.
- The combined response is flat across the 10 kHz image band. It has deep nulls at the images that
  fold into the band.

### CIC as a FIR on bits

The input is one bit wide, so the fourth-order comb filter is built as its impulse response: 61
taps, the coefficients of `((1 - z^-16)/(1 - z^-1))^4`. The taps are 1, 4, 10, 20, … up to 2736
in the middle. They sum to 2^16.

- Each output is therefore a sum of constants, chosen by which bits are set.
- Seventeen groups of taps have constants that share no set bit. For example, taps 0, 1, 2 and
  15 are 1, 4, 10 and 816, which are 0b1, 0b100, 0b1010 and 0b1100110000. The sum of a group's
  terms is then a bitwise OR with no carries. The groups, listed in `adc_pkg::CIC_GRP`, cover 39
  taps. A check at elaboration confirms that each group is disjoint.
- The 22 remaining taps form 11 mirrored pairs of equal value. Each pair is reduced with two
  gates: `a*x1 + a*x2 = (x1 XOR x2)*a + (x1 AND x2)*2a`.
- So only 28 partial words reach the adder tree, instead of 61.
- The coefficients are computed in `adc_pkg::cic_coef`. Tap k is the number of ways to write k as
  a sum of four integers between 0 and 15, which equals
  `sum_j (-1)^j C(4,j) C(k-16j+3, 3)`. There is no stored table.

### Compensators

`cos_comp` is three cascaded `(1+z^-1)/2` stages. Together they form the 4-tap filter
`[1 3 3 1]/8`, which lowers the CIC's aliasing near the first null.

`sin_comp` is four cascaded `(-1+6z^-1-z^-2)/4` stages. Together they form the 9-tap filter
`[1 -24 220 -936 1734 -936 220 -24 1]/256`. This filter lifts the passband droop of the CIC.
It has a gain of 2 at its Nyquist rate, so the datapath keeps one guard bit above the 17 CIC
bits.

### Half-band stages

Each half-band filter is a direct-form FIR:

- Symmetric taps are pre-added, and the zero taps are skipped.
- The centre tap is 1/2.
- Coefficients are integers over a power of two: 2^14 (hb1), 2^10 (hb2, hb3) and 2^12 (hb4).
- The multiplications are by constants, so synthesis reduces them to shifts and adds.

The quantised coefficients do not sum exactly to one:

| filter | DC gain |
|---|---|
| hb1 | 16364/16384 |
| hb2, hb3 | 1018/1024 |
| hb4 | 4072/4096 |

The bio-electric path therefore has a DC gain of about 0.981. It is kept as designed; the
testbenches expect it.

The quantised coefficients also fall slightly short of the specification they were designed for:

| filter | pass band / rate | ripple target | ripple reached | attenuation target | attenuation reached |
|---|---|---|---|---|---|
| hb1 | 8 kHz / 40 kHz | 0.012 dB | ±0.0125 dB | 57 dB | 56.8 dB |
| hb2, hb3 | 3.5 kHz / 20 kHz, 1.75 kHz / 10 kHz | 0.05 dB | ±0.060 dB | 45 dB | 43.2 dB |
| hb4 | 1 kHz / 5 kHz | 0.05 dB | ±0.053 dB | 45 dB | 44.3 dB |

`tb_hb_decim` measures these values from each instance's impulse response.

### Arithmetic

- After the CIC, every sample is 18-bit signed, with ±2^16 as full scale.
- Each stage computes in a wider accumulator. It then rounds to nearest (adds half an LSB, then
  shifts) and saturates to 18 bits.
- A stage produces one output for every second input, one clock after that input.
- All stages run on the 1.28 MHz clock with valid strobes. No stage needs more than one clock per
  input.

## Output word and modes

`mode_output` takes the hb1 output in bio-image mode and the hb4 output in bio-electric mode. It
quantises the sample to B = 8 or 10 bits as an **offset-binary** code:

```
code = clamp( round(s * 2^B / 2^17) + 2^(B-1),  0 .. 2^B - 1 )
```

An input of 0 V gives mid-scale (128 or 512), and ±0.75 V gives the ends of the range. The
16-bit word sent over SPI is `{mode, 5'b00000, code[9:0]}`. In 8-bit mode, bits 9:8 are zero.

In bio-image mode the hb2 to hb4 stages receive no input strobes, so they do not switch. After a
mode change, the first few words still mix history from the previous setting. The filter
pipeline needs a few output periods to settle.

## SPI link

`spi_slave` is a mode-3 slave (clock idles high, data changes on the falling SCLK edge, the master
samples on the rising edge). Frames are 16 bits, MSB first.

- **MISO.** On every frame, the slave sends the latest output word. That word is held in a
  register in the `clk` domain and frozen while `ss_n` is low, so it cannot change during a frame.
  `miso_oe` is high while the slave is selected.
- **MOSI.** If bit 15 of the received word is set, bit 0 becomes the new mode. Any other word is
  ignored, so the master can send zeros while reading.
- **Clock domains.** The SPI shift registers run on SCLK. The mode register crosses into the `clk`
  domain through a two-flip-flop synchroniser. `ss_n` is also synchronised before it freezes the
  holding register and clears `drdy`.
- **Timing rule.** Because of that synchronisation, the master must wait at least 3 `clk` periods
  (about 2.4 µs) between pulling `ss_n` low and the first falling SCLK edge.
- **drdy.** This output rises when a new word is ready and falls when the next frame starts. The
  master can poll it or use it as an interrupt.

## Where this design departs from the source

These points are this design's own choices. The source does not give them, or leaves them
ambiguous:

- The multirate split of the comb decimation described above.
- The order of the compensators: cosine first, then sine. Both are linear, so the order changes
  only the rounding.
- The 18-bit internal width, and round-to-nearest with saturation between stages.
- The offset-binary output code and the 16-bit SPI word layout, including the mode bit and the
  mode-write command.
- The 16-bit SPI frame, `drdy`, the holding register, and the rule of 3 clocks from select to
  first clock.
- The 640 kHz sampling clock is derived as `clk/2` inside `adc_digital`. Modulator bits are
  captured at the `clk` edge where that clock rises.
- The reset state: all filter state is zero, and the mode is bio-electric.
- The clock-generator delays, and the update edge in the modulator model.
- Output precision. The source reports about 80 dB SNR for a digital simulation of the
  bio-electric path. A 10-bit word cannot carry that, so this design follows the stated 10-bit
  and 8-bit resolutions. The SNDR measured at the words is close to the limit set by those bit
  widths.

## Not included

This repository contains only behavioural models of the analog circuits:

- the bootstrapped switches
- the opamps
- the comparator transistor level
- the correlated-double-sampling integrators

It also leaves out:

- the pads and the scan chain
- the sensor front ends, their multiplexer and the DSP

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a run that hangs. For example, with
Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/adc_pkg.sv rtl/*.sv \
          tb/tb_sigma_delta_adc.sv --top-module tb_sigma_delta_adc -o sim
./obj_dir/sim
```

Replace the testbench and top module name to run any other testbench. The testbenches that use
`real` signals and delays need `--timing`.

| testbench | what it checks |
|---|---|
| `tb_cic_filter` | Outputs and latency against a reference convolution of random bit streams with box-filter taps. |
| `tb_cos_comp`, `tb_sin_comp`, `tb_hb_decim` | Random and full-scale inputs against an integer model of the same taps, rounding and saturation. Also checks the output rate. `tb_hb_decim` runs all four coefficient sets. |
| `tb_mode_output` | Code formula, clamping and word layout in both modes. |
| `tb_spi_slave` | Mode-3 frames: MISO bit order and timing, mode writes, ignored words. |
| `tb_decimation_filter` | A modulator model inside the testbench drives DC and sine inputs. Checks DC codes, sine amplitude and the 20 kHz / 2.5 kHz word periods. |
| `tb_nonoverlap_clkgen` | Phases never overlap. The delayed phases trail the main ones. |
| `tb_sd_modulator` | Bit density follows the input across the range, and the loop stays stable. Measures the in-band SNDR of the bit stream for a 0.375 V peak-to-peak sine: 95.4 dB at 400 Hz with OSR 256, and 51.0 dB at 3.2 kHz with OSR 32. |
| `tb_adc_digital` | Sampling-clock rate, SPI reads, mode writes through the synchroniser, `drdy`. |
| `tb_sigma_delta_adc` | Whole chip at default parameters. Drives DC and sine inputs in both modes, then reads every word over SPI. Checks codes, amplitude and word rates. Fits a sine to 200 or 400 words and checks the SNDR. The measured values are 55.8 dB for 10-bit words and 43.3 dB for 8-bit words, with a 0.375 V amplitude. An ideal quantiser gives 55.9 and 43.9 dB. Counts SPI reads, mode switches, `drdy` events and words of each width. Runs in a few seconds. |

The analog models use `real` ports, so only `adc_digital` and its sub-blocks are meant for
synthesis.
