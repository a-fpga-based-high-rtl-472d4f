# FPGA ECG monitor: acquisition, double FIR filtering and wave analysis

An electrocardiogram picked up by electrodes carries two kinds of noise that
swamp its small features: 50 Hz hum from the power line and broadband
high-frequency interference. This design cleans the signal on an FPGA and
measures the heartbeat in hardware, so no DSP or microcontroller is needed.
It runs from a 50 MHz clock and handles one ECG sample every 3.33 ms (300 Hz).
Each sample comes either from a 12-bit serial ADC (a Digilent PMOD AD1) or
from an on-chip ROM that holds a test beat. The sample then goes through two
linear-phase FIR filters in a row:

1. a 45–55 Hz band-stop that removes power-line hum;
2. a 0.05–100 Hz band-pass that removes high-frequency noise.

A time-domain analyzer finds the P, Q, R, S and T waves of each beat in the
filtered signal. It reports their amplitudes above the signal's DC level,
their positions, their durations, and the PR, QRS, QT and ST intervals in
milliseconds.

The RTL follows the structure of a published Spartan-6 design. That design
also contains a vendor FFT core, which computes a short-time Fourier
transform, and a vendor logic-analyzer core. Neither is included here. The
ports they would use are brought out of the top (see "What is not here").

```
            sim_or_real
                |
 ecg_rom ----->|\
                | |--> pfir (notch, 101 taps) --> pfir (band-pass, 51 taps) --+--> stft_din
 adc_interface->|/                                                            |
   ^  ^                                                                       +--> ecg_wave_analyzer --> wave_res
   |  sample_tick (CLK_HZ / FS_HZ)
 PMOD AD1 (2 x ADCS7476)
```

## Files

| file | contents |
|---|---|
| `rtl/syn_top_ecg.sv` | top: sample timer, source switch, the two filters, the analyzer |
| `rtl/adc_interface.sv` | serial-to-parallel interface for both PMOD converters |
| `rtl/ecg_rom.sv` | 160-sample test beat, computed at elaboration |
| `rtl/pfir.sv` | parallel transposed-form FIR (used for both filters) |
| `rtl/pfir_pkg.sv` | the two quantised coefficient sets |
| `rtl/ecg_wave_analyzer.sv` | DC level, P/Q/R/S/T detection, durations, intervals |
| `rtl/ecg_pkg.sv` | shared widths and the `wave_result_t` struct |
| `tb/tb_*.sv` | one self-checking testbench per block, plus two for the top |
| `tb/adcs7476_model.sv` | behavioural model of one serial converter |

## Sample timing

All logic runs on `clk_50MHz` and uses a synchronous active-high `rst`. A
counter divides the clock by `CLK_HZ/FS_HZ` (166 666) to make `sample_tick`.
The tick goes to only one source, picked by the two-flop-synchronised
`sim_or_real` input:

- `sim_or_real = 0`: the ROM sends its next sample one clock later.
- `sim_or_real = 1`: the ADC interface starts a conversion, and the sample
  arrives 61 clocks later (at `SCLK_HALF = 2`).

The ROM address is frozen while the ADC is selected. When you switch back,
the beat continues where it left off.

Each filter stage adds one clock of latency. The filters are symmetric, so
their group delays are 50 samples (notch) and 25 samples (band-pass). A
feature of the ECG therefore shows up in the filtered stream 75 samples
(250 ms) after it entered.

## The ADC frame

The two converters of the PMOD share chip select and serial clock. The
interface shifts both data lines in at once, and `ECG_CHANNEL` (default 2)
picks which converted word is filtered. A frame runs as follows:

- On `start_tick` the 4-bit counter goes to 0 and `adc_cs_bar` falls.
- `adc_sclk` starts high and has a period of `2*SCLK_HALF` clocks
  (12.5 MHz at the default).
- Each converter puts out 16 bits, MSB first, changing on falling `sclk`
  edges: four leading zeros, then DB11..DB0.
- At each rising edge the interface increments the counter and compares the
  **new** value:
  - above 3: the data bit is shifted in, so the zeros are skipped;
  - equal to 15: the shift register plus the bit just received becomes
    `pdata`, `pvalid` pulses, and chip select goes high.
- `pclk` is high while the counter is above 8.

Chip select rises after the 15th rising edge. By then DB0 has been captured,
so the 16th clock of the converter's data sheet is not issued. The interface
stays idle, with chip select and `sclk` high, until the next tick.

## The filters

`pfir` is a fully parallel FIR in transposed form. On every input strobe
the sample is multiplied by all coefficients at once:

- product 0 goes into the first partial-sum register;
- register *i* plus product *i+1* goes into register *i+1*;
- the last register plus the last product is the filter sum.

The sum is rounded to nearest, shifted right by 15 bits and saturated to
16 bits. It is then registered, so `out_valid` follows `in_valid` by one
clock. The state only moves on a strobe, so a sample can arrive as often
as every clock.

Coefficients are 16-bit signed integers with 15 fractional bits, made with
the windowed-sinc method (Hamming window, fs = 300 Hz). The formulas are in
the header of `pfir_pkg.sv`. The band-stop is normalised to unit DC gain and
the band-pass to unit gain at the centre of its pass band.

| set | taps | design | measured after quantisation |
|---|---|---|---|
| `FILTER_NOTCH` | 101 | band-stop 45–55 Hz | 48 dB down at 50 Hz, DC gain 0.9999 |
| `FILTER_BPF` | 51 | band-pass 0.05–100 Hz | 84 dB down at 150 Hz, DC gain 0.992 |

The original design asks for 40 dB of hum rejection and 60 dB of
high-frequency rejection, but gives neither the tap counts nor the
coefficients. The tap counts above are the smallest that meet those figures.
With only 51 taps, the 0.05 Hz lower edge of the band-pass cannot take
effect, so the filter behaves as a 100 Hz low-pass. That keeps the DC level,
which the analyzer needs.

The converter word is unsigned. It enters the notch filter zero-extended to
16 bits, so the ECG keeps its DC offset all the way through the chain.

## The wave analyzer (the part to read carefully)

`ecg_wave_analyzer` splits the filtered stream into frames of `FRAME_LEN`
(160) samples. While a frame arrives, the analyzer does three things:

- adds up the samples, to get the DC level (the truncated mean);
- tracks the frame's largest sample, which is taken to be the **R** peak;
- writes every sample into a 512-entry circular history buffer.

The other waves are found only after R is known. Once `TW` samples have
arrived after R (this may be in the next frame), the buffer is read from
R−`PW` to R+`TW` at one sample per clock. The waves are the first extremes in
fixed windows around R:

| wave | window (samples from R) | criterion |
|---|---|---|
| P | −60 … −13 | maximum |
| Q | −12 … −1 | minimum |
| S | +1 … +12 | minimum |
| T | +13 … +105 | maximum |

The windows come from typical ECG timing at 300 Hz. A PR interval is at
most 0.20 s, which is 60 samples. A QT interval is at most 0.44 s, which is
about 132 samples. The QRS complex is about 0.09 s wide.

Each result in `wave_result_t` contains:

- `dc_value`;
- the five wave values minus `dc_value` (Q and S come out negative);
- the five wave positions, counted from the first sample of the frame (P can
  be negative and T can be past the frame's end);
- four intervals in ms, measured **between wave peaks**:
  - PR = Q − P
  - QRS = S − Q
  - QT = T − Q
  - ST = T − S
- five wave durations in ms (P, Q, R, S and T width), defined below.

A wave's duration is its width at half amplitude. After the peaks are
found, a second pass over the same buffered samples counts, for each wave,
the samples in its window that lie beyond half of the wave's amplitude,
measured from `dc_value` on the wave's side. R uses the window from −12 to
+12. Because the amplitude is measured from the DC level rather than from
the wave's own base, a small wave that sits below the DC level (such as the
P wave of the test beat) is only counted near its tip.

The conversion to ms is samples × 1000 / `FS_HZ`, rounded.

Keep these limits in mind when you read the numbers:

- **Intervals run peak to peak.** Clinical intervals run from a wave's onset
  to another wave's onset or end. This design detects no onsets, so its QRS
  and PR come out shorter than clinical values and its ST longer.
- **Frames are not aligned to beats.** Frames have a fixed length, and each
  frame's maximum is taken as R. A beat that does not fit one frame can be
  reported twice or not at all. With the ROM, one beat is exactly one frame.
  With a real 72 bpm heart at 300 Hz, one beat is 250 samples, so some frames
  will have a T or P wave as their maximum.
- **The first frame after reset gives no result.** It only fills the history
  buffer, so that the P window never reads memory that was never written.
- **Rate limit.** The two passes take `2*(PW+TW)+8` clocks. If a frame
  completes while the previous one is still waiting or being scanned, that
  frame is skipped and `frame_dropped` pulses. To avoid this, samples must
  be at least 8 clocks apart. At 300 Hz they are 166 666 clocks apart.

Run on the ROM beat, the analyzer reports DC 1118, R +1427, Q −237, S −370,
P +78 and T +216 (LSB). The intervals are PR 110 ms, QRS 57 ms, QT 317 ms and
ST 260 ms. The durations are P 13 ms, Q 20 ms, R 23 ms, S 20 ms and
T 53 ms.

## The test beat

The ROM content is made by a formula, so no data file is needed. For
address n (0..159):

- baseline 1024;
- P and T: parabolic bumps at n = 12 and n = 140;
- Q, R and S: triangles at n = 43, 52 and 61 (R height 1600);
- 50 Hz interference: 100·{1, ½, −½, −1, −½, ½}[n mod 6];
- 150 Hz interference: 60·(−1)ⁿ.

The exact formula is in `ecg_rom.sv`. Because 160 is not a multiple of 6,
the 50 Hz tone jumps phase once per beat, where the ROM wraps.

## Top-level ports

| port | dir | width | meaning |
|---|---|---|---|
| `clk_50MHz`, `rst` | in | 1 | clock, synchronous reset |
| `sim_or_real` | in | 1 | 0 = ROM, 1 = ADC |
| `adc_sdata1`, `adc_sdata2` | in | 1 | PMOD data lines |
| `adc_clk_out`, `adc_cs_bar` | out | 1 | PMOD clock and chip select |
| `stft_din_valid`, `stft_din` | out | 1, 16 | filtered stream for an external FFT/STFT core |
| `ecg_noisy_valid`, `ecg_noisy` | out | 1, 16 | unfiltered source sample (logic-analyzer probe) |
| `ecg_filtered` | out | 16 | last filtered sample (probe) |
| `wave_valid`, `wave_res` | out | 1, struct | analysis result |
| `frame_dropped` | out | 1 | a frame was skipped |

Top parameters: `CLK_HZ` (50 000 000), `FS_HZ` (300), `SCLK_HALF` (2),
`ECG_CHANNEL` (2) and `FRAME_LEN` (160). The filter tap counts are fixed by
the coefficient sets in `pfir_pkg`.

## What is not here, and where this RTL departs from its source

- **STFT and its frame memory.** In the source these are a vendor FFT core
  with its own block RAM, and the transform length, window and output format
  are not given. The source's top has a 16-bit output `ecg_spec_data`
  carrying the spectrum. Here the filtered 16-bit stream is brought out as
  `stft_din` instead.
- **Where the analyzer gets its input.** In the source's block diagram the
  analyzer (the "magnitude and phase comparator") follows the STFT. Its
  described job, though, is time-domain measurement of the P–T waves, and
  here it takes the filtered samples directly. A final "ECG signal analysis"
  stage appears only as a name in the source and is not built.
- **No check against normal ranges.** The source lists textbook ECG values
  (for example PR 0.12–0.20 s, QT 0.35–0.44 s) next to the analyzer. No
  comparison against them is built. Those ranges are measured from wave
  onsets, while this design measures between peaks, so a normal beat would
  be flagged: the test beat gives PR 110 ms.
- **The on-chip logic analyzer.** It is replaced by the `ecg_noisy` and
  `ecg_filtered` probe ports.
- **Invented content.** The coefficients, tap counts and ROM contents were
  not published and were made for this design.
- **Sample rate.** The source designs its filters for 300 Hz, but describes
  the ROM beat as 160 samples at 72 bpm, which implies about 192 Hz. Both
  sources here run at 300 Hz, so the ROM beat repeats every 0.53 s.
- **Choices of this design.** The source does not specify these:
  - the analyzer's algorithm (frames, windows, peak-to-peak intervals,
    half-amplitude durations);
  - the switch encoding;
  - the sample timer;
  - the ADC idle state between frames;
  - rounding and saturation in the filters.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Build
and run one with Verilator 5 from the repository root, for example the
end-to-end test:

```
verilator --binary --timing -Wno-fatal --top-module tb_syn_top_ecg \
  -y rtl -y tb +libext+.sv -Irtl rtl/ecg_pkg.sv rtl/pfir_pkg.sv \
  tb/tb_syn_top_ecg.sv
./obj_dir/Vtb_syn_top_ecg
```

| testbench | what it checks |
|---|---|
| `tb_adc_interface` | 200 frames against two converter models: both words, latency of 30·`SCLK_HALF`+1 clocks, 15 `sclk` edges with CS low, `pclk`, stray ticks ignored |
| `tb_ecg_rom` | two beats against the formula, wrap after 160 samples, valid strobe |
| `tb_pfir_pkg` | both coefficient sets: tap counts, symmetry, gain at DC, 10, 50 and 150 Hz (pass bands within 3 %, 50 Hz at least 40 dB down in the notch, 150 Hz at least 60 dB down in the band-pass) |
| `tb_pfir_notch`, `tb_pfir_bpf` | bit-exact against a reference convolution (including saturation); 50 Hz (or 150 Hz) tone attenuated by at least 40 dB (or 60 dB); 10 Hz tone kept within 3 % |
| `tb_ecg_wave_analyzer` | 40 random beats (R near both frame edges included) against a reference model, peaks, intervals and durations; deadline per result; frames dropped under overload |
| `tb_syn_top_ecg` | ROM → ADC → ROM at a shortened sample period (200 clocks): every source sample, every filtered sample bit-exact against reference filters, interference removal (mean distance to the interference-free beat, filtered the same way, falls from about 60 LSB to 6 LSB; at most 10 allowed), wave positions of the ROM beat (±2 samples), nonzero durations with R and Q narrower than T, no dropped frames; counts ROM samples, ADC frames, switches and results |
| `tb_syn_top_ecg_full` | the same with every top parameter at its default: about 113 million clocks, roughly a minute of simulation |

The simulator has no X state, so every register that is read is reset. The
analyzer's history buffer is not reset, and the first-frame rule above keeps
unwritten entries from being read.

To change the filters, replace the arrays in `pfir_pkg.sv`. Any odd or even
tap count works, as long as the coefficients are symmetric, or the reversed
coefficient order of the transposed form is taken into account (see the
header of `pfir.sv`). To analyse a different beat length, change
`FRAME_LEN` and the window parameters of `ecg_wave_analyzer`. Its elaboration
checks reject windows that do not fit the frame or the buffer.
