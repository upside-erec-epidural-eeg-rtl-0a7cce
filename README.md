# eREC: 64-channel epidural EEG recorder with on-chip PLV/PAC features

eREC is a recording chip for electrodes placed on the dura, above the
cortex. It digitises 64 channels of microvolt-level brain signals (1-500 Hz)
while it ignores electrode DC offsets of tens of millivolts. It sends the raw
codes off-chip on one serial pin. In parallel it computes two
oscillation-synchrony features:

- the **phase-locking value (PLV)** between two channels;
- the **phase-amplitude coupling (PAC)** between a slow and a fast band of one
  channel.

An external stimulator can use these features as biomarkers for closed-loop
stimulation. A 4-wire SPI port with ten 32-bit registers configures the chip
and reads the results back.

The SystemVerilog here models the whole chip:

- the mixed-signal recording channel, as a behavioural model;
- everything digital around it, as synthesizable RTL.

The feature path computes phase without CORDIC, sine/cosine tables or
multipliers in the filters. It is the least obvious part, so most of this
document explains it.

```
 vin_uv[0..63] ──► afe_channel ──q──► rec_channel_dig ──10 bit──┐   (x64)
   (real, µV)      (analog model)      counter, artifact logic   │
                        ▲ sw (bias switches)  ◄── sw_int / sw_ext │
                                                                 ▼
 conv_timing ── rstc/rsti/rstf/fch/conv_last/per_rst ──► all channels
                                                                 │
          channels 0..31                         channels 32..63 │
   data_serializer #0 ──da──┐            ┌──db── data_serializer #1
     (320:10 mux, 10:1 mux) │            │   (320:10 mux, 10:1 mux)
        │ borrowed mux      ▼            ▼          │ borrowed mux
        ▼                 ddr_mux ──► dout          ▼
      feu #0  ──► plv[0], pac[0]             feu #1 ──► plv[1], pac[1]

 cs_n/sclk/mosi/miso ◄──► spi_slave ◄──► reg_bank ──► configuration of all blocks
                                                ◄── PLV/PAC, status
 feout: monitor pin, source chosen in CTRL
```

All of the chip except the SPI slave and the register bank runs on one
512 kHz clock, `clk`. The SPI side runs on `sclk`.

Top-level module `erec`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | 512 kHz chip clock |
| rst_n | in | 1 | asynchronous reset, active low |
| vin_uv | in | real [64] | electrode voltage against the reference, in µV (model input) |
| cs_n, sclk, mosi | in | 1 | SPI slave |
| miso | out | 1 | SPI slave |
| dout | out | 1 | DDR raw-data stream, 1.024 Mbit/s |
| sync | out | 1 | first bit of a frame |
| feout | out | 1 | monitor pin |
| plv | out | 16 [2] | PLV of each half, Q.8 (also in registers 5, 7) |
| pac | out | 32 [2] | PAC of each half (also in registers 6, 8) |

## Recording channel and the incremental ADC

Each channel is AC-coupled. The input capacitors block the electrode DC
offset. A switchable bias network sets the amplifier's input common-mode, so
no pseudo-resistors are needed. After that comes a chopped OTA that works as
the integrator of a **first-order incremental delta-sigma modulator**. A
clocked comparator produces a bitstream `q`, and a feedback current DAC
closes the loop.

The analog part is `afe_channel`, a behavioural model with real-valued
input. The model does the following:

- It maps the input to `u = 0.5 + v/(2·2 mV)`, clipped to [0, 1]. The full
  scale is therefore ±2 mV, which covers the required 3 mVpp linear range.
- Each clock, the integrator adds `u` and subtracts the previous decision.
- The AC coupling is a slow DC tracker with a time constant of `HP_CYCLES`
  clocks (about 2 s).
- While the bias switches are closed, the tracker snaps to the present
  input.
- Noise, chopping ripple and OTA non-idealities are not modelled.

The digital half is `rec_channel_dig`. It is what makes the ADC
*incremental*: the modulator is reset at the start of every conversion, and
its ones are counted.

- **Conversion length.** A conversion is 512 clocks, which gives 1 kS/s per
  channel: the Nyquist rate of the 500 Hz band.
- **Sequencing.** One shared sequencer, `conv_timing`, frames the
  conversions for all 64 channels:
  - In cycle 0, `rstc`, `rsti` and `rstf` reset the integrating capacitor,
    the OTA and the IDAC, and clear the counters.
  - In cycles 1..510, a 9-bit up-counter counts `q`.
  - In cycle 511 (`conv_last`), the result is latched:
    `D_out = {count[8:0], q}`.
- **Result.** The LSB is the comparator's last decision, which adds the
  residue's sign as one more bit of resolution. The result is 10 bits,
  about 0..1020 over the full input range, one per channel per millisecond.
  `dout_valid` pulses in the next cycle.
- **Chopper clock.** `fch` is `clk/FCH_DIV`, 128 kHz by default.

## Artifact recovery and the periodic bias reset

A stimulation pulse or movement can drive an AC-coupled input far beyond
±2 mV. The coupling capacitor would then take seconds to discharge. The
bias switches `sw` short that recovery, and each channel drives them through
a 2:1 mux:

- **`sw_sel = 1`**: the switches follow register bits `sw_ext`, one per
  channel.
- **`sw_sel = 0`**: the switches follow the channel's own `sw_int`.
  - `sw_int` rises for the whole next conversion when a conversion's count
    lies within `ART_MARGIN` (4) codes of either rail, which means the input
    saturated.
  - It also rises when the sequencer requests a periodic reset.

**Periodic reset.** With `CTRL.per_en` set, `conv_timing` raises `per_rst`
in the last conversion of every `per_period` conversions. The default
period of 1000 gives the 1 Hz reset used in the bias-network simulations.
Every channel then closes its switches for one conversion.

**Recovery time.** With a 30 mV step on a channel, the channel is flagged at
the end of the saturated conversion, the switches are closed during the
next one, and the codes are back in range in the one after that. Recovery
takes 2 ms.

**Monitoring.**

- `STATUS.n_art` counts the channels whose `sw_int` is high.
- `feout` can show "any channel in recovery".

The saturation rule, the margin and the one-conversion switch pulse are
this design's choices. The specification only asks for fast artifact
recovery through the bias network.

## Raw-data path: serializers, DDR output and frame format

Each half of the array (32 channels, 320 bits per conversion) has a
`data_serializer` built from two muxes in series:

1. a 320:10 `word_mux` picks a channel;
2. a 10:1 `word_mux` picks a bit of that channel's result.

The split exists so that the feature-extraction unit can borrow the 320:10
mux.

**Frame.** A frame starts two clocks after `conv_last` and carries one bit
per clock:

- channel 0 comes first, each result MSB first;
- 320 bits in all, so 320 of the 512 clock slots are used;
- `sync` is high with the first bit of channel 0.

**Borrowed mux.** In the 32 clocks after the last bit, the 320:10 mux steps
through the channels once more, one per clock, for the feature-extraction
unit. Each result appears on `fe_word`, with its channel number on `fe_ch`
and `fe_valid` high. Together with the frame, 352 of the 512 clocks of a
conversion are used.

**DDR output.** `ddr_mux` merges the two lines `da` (channels 0..31) and
`db` (channels 32..63) onto `dout` at 1.024 Mbit/s:

- `da` is sampled on the falling edge of `clk` and driven onto `dout` while
  `clk` is high;
- `db` is sampled on the rising edge and driven onto `dout` while `clk` is
  low.

Each register is selected only in the half period in which it does not load.
A receiver can therefore sample `dout` in the middle of each half period:

- high half: bit *k* of half 0;
- low half that follows: bit *k* of half 1;
- `sync` marks *k* = 0.

With `CTRL.ser_en` low, the lines stay at zero.

## Feature extraction: PLV and PAC without phase angles

Each half has one feature-extraction unit, `feu`. Through the borrowed
mux it receives every channel of its half once per millisecond. Each of its
32 channels has a complex signal extractor, so the band signals of all 64
channels are always current.

One PLV/PAC unit per half then works on register-selected inputs: two
channels a and b and three band indices. Over a window of
2^`WIN_LOG2` = 1024 samples (about 1 s) it reports:

- `PLV = | mean over n of exp(j(θa[n] − θb[n])) |`, the phase locking of
  channels a and b in band `plv_band`;
- `PAC = | mean over n of A_hi[n]·exp(j θ_lo[n]) |`, where A_hi is the
  amplitude of channel a in band `pac_hi` and θ_lo is the phase of channel
  a in band `pac_lo`.

A PLV of 1 means a constant phase difference. PAC is large when the
amplitude of the fast band rises at one particular phase of the slow band.

### Band splitting: multi-rate lowpass bank plus the Hoda wavelet

`complex_signal_extractor` converts a channel into six complex band
signals. The code is first made signed by subtracting mid-scale. It then
passes a cascade of six `lpf_dec2` stages:

- Each stage is a [1 2 1]/4 binomial lowpass followed by decimation by two.
- The filter needs shifts and adds only.
- It has a zero at half the input rate, and its DC gain is one.

Stage k runs at fs/2^(k+1). Its output also feeds a `hoda_wavelet`. This is
a complex exponential at a quarter of the stage rate, under an 8-sample
rectangular window, so its coefficients are j^m:

```
I[n] = x[n]   − x[n−2] + x[n−4] − x[n−6]
Q[n] = x[n−1] − x[n−3] + x[n−5] − x[n−7]
```

Every coefficient is 0 or ±1, so the filter is a handful of adders. For a
tone at the centre frequency, (I, Q) rotates by 90° per sample with a
constant magnitude: four times the tone amplitude. The negative-frequency
image cancels exactly.

Each wavelet output is therefore an analytic signal of one octave. With
fs = 1 kS/s the six band centres are:

| band | 0   | 1    | 2  | 3  | 4   | 5   |
|------|-----|------|----|----|-----|-----|
| Hz   | 125 | 62.5 | 31 | 16 | 7.8 | 3.9 |

The lowest band updates once every 64 ms. Every band's output is
registered and holds between updates, so the feature unit can sample all
bands at one moment.

**Widths.** Samples are 14 bits signed inside the bank. I and Q are 17 bits
(`SMP_W`, `CPX_W` in `erec_pkg`).

### Magnitude: alpha-max-plus-beta-min

`lsce` estimates `|z| ≈ 15/16·max(|I|,|Q|) + 15/32·min(|I|,|Q|)` with four
shifted adds:

- The error lies between −6.3 % and +4.8 % at all angles.
- The unit is combinational.
- It is used for the four input magnitudes and for the two final feature
  magnitudes.

### Sine and cosine directly from the complex sample

Phase is never computed as an angle. For z = I + jQ:

```
cos θ = I/|z|      sin θ = Q/|z|
```

and the sine and cosine of a phase difference follow from the
angle-difference identities:

```
cos(θa − θb) = cos θa·cos θb + sin θa·sin θb
sin(θa − θb) = sin θa·cos θb − cos θa·sin θb
```

`plv_pac_unit` works through each sample in a sequence:

1. It latches four complex inputs: a and b in the PLV band, and channel a's
   low and high PAC bands.
2. It forms six ratios (cos/sin of a, of b and of the PAC phase band) with
   **one shared restoring divider**, `udiv_seq`. The divider takes 25
   cycles per quotient.
3. It then accumulates four sums:
   - cos(θa − θb)
   - sin(θa − θb)
   - A_hi·cos θ_lo
   - A_hi·sin θ_lo

After 1024 samples, the magnitudes of the two sums are taken with `lsce`
and divided by the window (a shift).

**Fixed-point formats.**

- sin/cos values are signed Q.8 (F = 8 fraction bits). A quotient is
  clipped to 1.0, because the magnitude estimate may be low by up to 6 %.
- **`plv`** is unsigned Q.8: 256 means perfectly locked.
- **`pac`** is in the units of |z|: about 4× the band amplitude in ADC codes.
- The error of `lsce` outweighs the quantisation of sin/cos.

**Timing.** One sample costs 6·(17+8)+8 = 158 clocks, well within the
512 clocks of a conversion. `feu` ticks the unit `N_BANDS+3` clocks after
the last channel's sample, once every band has settled. `feat_valid` pulses once
per window. The results also appear in registers 5..8.

What follows the specification and what is this design's own:

- **From the specification:** the structure of the feature path:
  - lowpass bank with multiplier-less wavelets;
  - a magnitude estimator;
  - sine/cosine from the complex signal instead of CORDIC or tables;
  - a final PLV/PAC stage.
- **This design's own:**
  - the filter taps and wavelet coefficients;
  - the number of bands;
  - the window;
  - the fixed-point formats;
  - the divider;
  - one PLV/PAC unit per half, with its channels and bands chosen by
    register, and PAC taken within channel a;
  - one extractor per channel rather than one shared, time-multiplexed
    extractor.

## SPI interface and register map

`spi_slave` is a mode-0 slave: it captures `mosi` on the rising edge of
`sclk` and shifts `miso` on the falling edge. A frame is 40 bits, MSB first:

```
cs_n ‾‾\__________________________________________/‾‾
mosi    [W 0 0 0 A3 A2 A1 A0][ 32 data bits (write) ]
miso    [     (low)         ][ 32 data bits (read)  ]
```

- **Write (W = 1).** The register bank, also clocked by `sclk`, stores the
  data on the 40th rising edge.
- **Read (W = 0).** The addressed register is loaded on the falling edge
  after bit 8 and shifted out during the data bits.
- **Framing.** A rising edge of `cs_n` ends or aborts a frame. Because
  `sclk` is not free-running, the master must raise `cs_n` once after
  power-up before its first frame.

| addr | name     | access | contents |
|------|----------|--------|----------|
| 0 | CTRL     | RW | [0] serializer enable, [1] FEU enable, [3] sw_sel, [7:4] feout source, [8] periodic reset enable, [31:16] reset period in conversions. Reset value 0x03E8_0003 |
| 1 | SW_LO    | RW | sw_ext for channels 0..31 |
| 2 | SW_HI    | RW | sw_ext for channels 32..63 |
| 3 | FEU0_CFG | RW | [4:0] channel a, [12:8] channel b, [18:16] PLV band, [22:20] PAC phase band, [26:24] PAC amplitude band. Reset value 0x0042_0100 |
| 4 | FEU1_CFG | RW | as 3, for channels 32..63 (indices within the half) |
| 5 | FEU0_PLV | RO | [15:0] PLV, Q.8 |
| 6 | FEU0_PAC | RO | PAC |
| 7 | FEU1_PLV | RO | [15:0] PLV, Q.8 |
| 8 | FEU1_PAC | RO | PAC |
| 9 | STATUS   | RO | [22:16] channels in artifact recovery, [15:0] conversion counter |

Writes to read-only addresses are ignored. Unused bits and addresses above 9
read as zero. A band index above 5 selects band 5.

`feout` sources:

| value | source |
|-------|--------|
| 0 | conversion strobe |
| 1 | `sync` |
| 2 | FEU0 result strobe |
| 3 | FEU1 result strobe |
| 4 | any channel in recovery |
| 5 | bitstream `q` of channel 0 |

## Clocks, resets and crossings

The design has two clock domains:

- **`clk` (512 kHz):** channels, sequencer, serializers, DDR stage and
  feature units. The DDR stage also uses its falling edge.
- **`sclk`:** SPI slave and register bank.

**Crossings.** The configuration crosses from `sclk` to `clk` without
synchronisers. It is meant to be written while recording is idle or to be
quasi-static. The read-only values cross the other way; they change at
most once per conversion, so a read that overlaps an update can see a
mixed word.

**Reset.** `rst_n` is an asynchronous, active-low reset for the `clk`
domain and the register bank.

## Departures from the specification and open points

- **Register map and SPI frame format.** Both are this design's own. The
  specification gives only ten addresses of up to 32 bits, write-read and
  read-only registers, and the capture/shift edges.
- **Conversion length.** 512 cycles (1 kS/s) is assumed. The specification
  gives the 512 kHz clock and the 500 Hz bandwidth.
- **Features.** The number of bands, all filter and wavelet coefficients,
  the word widths, the window and the PLV/PAC formulas and scaling are
  assumed. Only the structure of the feature path is specified.
- **Features per channel.** The specification's power and area figures are
  per channel, which implies that every channel's bands are extracted; this
  design does that. It does not say which PLV/PAC pairs are computed from
  them. This design computes one PLV and one PAC per half, selected by
  register, which matches the room in a ten-register bank.
- **Register bank.** One register bank serves the whole chip.
- **Multiplexed pins.** The specification mentions multiplexed input and
  output pins for real-time monitoring and control. Only the output side
  exists here (`feout`); no input pin overrides internal signals.
- **Analog parts.** The channel's analog part is a behavioural model. It
  uses `real` ports, so it simulates but does not synthesise. The bias and
  reference generation, the OTA itself and the pads are not modelled.
- **Scaling.** The design is built at the prototype's 64 channels. The
  1024-channel version planned for later would need ten times the raw
  output rate of one `dout` pin.

## Verification

Every block has a self-checking testbench in `tb/`. Each one:

- prints `TB_RESULT checks=N failures=M`;
- stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| tb_conv_timing | pulse positions and period of rstc/rsti/rstf/conv_last, fch division, periodic-reset request every third conversion |
| tb_rec_channel_dig | code against the count of a random bitstream, LSB, valid timing, saturation flag, periodic reset, sw mux |
| tb_afe_channel | ones per conversion against u·cycles for several DC inputs; a DC step removed at once by the bias switches |
| tb_word_mux | every select value with random data; zero for out-of-range selects |
| tb_ddr_mux | the order of da and db bits on dout, two per clock period |
| tb_data_serializer | bit and channel order, frame length, sync timing, borrowed-mux words and cycles, enable |
| tb_spi_slave | write frames (one wr_en pulse, address, data), read frames (MSB first), miso low while idle |
| tb_reg_bank | every address written and read back, field masks, read-only protection, reset values |
| tb_lpf_dec2, tb_hoda_wavelet | every output against the filter sum computed from the input history; wavelet tone response and rejection of DC and fs/2 |
| tb_lsce | estimate between 0.93 and 1.05 of the true magnitude, random and corner cases |
| tb_complex_signal_extractor | a tone at each band centre: gain of its band, rejection in the others, update rate |
| tb_plv_pac_unit | PLV near 1 for locked phasors and near 0 for alternating ones; PAC against a floating-point reference; cycles per tick; one result per window |
| tb_feu | 32 channels in, two of them selected: PLV for locked tones and for tones with periodic 180° phase jumps; PAC present; nothing while disabled |
| tb_erec | whole chip at default sizes (see below) |

`tb_erec` runs the full 64-channel chip for about 1060 conversions (about
1 s of signal) with every parameter at its default:

- The inputs are a large electrode DC offset plus a sine on each channel.
- The testbench configures the chip over SPI and decodes `dout` frame by
  frame from `sync`.

It checks:

- every serialized code against the channel's result;
- every code against an ideal ±2 mV incremental ADC, within 4 codes;
- a 30 mV artifact on one channel and its recovery within two conversions;
- PLV and PAC of both feature units: locked tones against detuned ones, and
  coupled against uncoupled amplitude;
- SPI readback of the results;
- the `feout` sources;
- the periodic reset.

It counts each mechanism and fails if one never occurred. It needs a few
seconds of wall time.

To run a testbench with Verilator 5, from the top of the tree:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/erec_pkg.sv \
          tb/tb_erec.sv --top-module tb_erec -o sim
./obj_dir/sim
```

Substitute another testbench name for `tb_erec`.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| erec | CONV_LEN | 512 | clocks per conversion |
| feu | N_FE_CH | 32 | channels per unit (one extractor each) |
| erec, feu, complex_signal_extractor | N_BANDS | 6 | octave bands |
| erec, feu, plv_pac_unit | WIN_LOG2 | 10 | log2 of the feature window in samples |
| conv_timing | FCH_DIV | 4 | chopper clock divider |
| rec_channel_dig | CNT_BITS, ART_MARGIN | 9, 4 | counter width, saturation margin in codes |
| afe_channel | FS_UV, HP_CYCLES | 2000.0, 1e6 | full scale in µV, AC-coupling time constant in clocks |
| hoda_wavelet | L | 8 | wavelet length (even) |
| erec_pkg | N_CH, ADC_BITS, SMP_W, CPX_W, FRAC_W | 64, 10, 14, 17, 8 | chip-wide sizes |
