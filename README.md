# Frequency-domain narrowband PLC channel emulator

A power-line communication (PLC) transceiver is normally tested on a live
mains network, which is hazardous and never behaves the same way twice. A
channel emulator sits between transmitter and receiver instead and imposes a
reproducible power-line channel: multipath attenuation and delay, background
noise and impulsive noise. This design is such an emulator for the CENELEC
narrowband range (40-90 kHz), written as synthesizable SystemVerilog.

Its main idea is to apply the channel in the **frequency domain**. The
Zimmermann-Dostert multipath model gives the channel as a transfer function
H(f), not as an impulse response. Time-domain emulators have to turn H(f)
into FIR coefficients, usually on a PC or DSP next to the FPGA. Here H(f) is
kept as a table of complex values, one per FFT bin. Each block of input
samples is transformed, multiplied bin by bin with H, given Gaussian noise,
and transformed back. The chip then needs no external coefficient generator.

```
ADC code ─► linear    ─► 512-pt ─► × H(k) ─► + AWGN ─► 512-pt ─► real ─► + impulsive ─► parallel ─► DAC
(18 bit)    regression   FFT        (table)   (table)   IFFT      part     noise (table)   to serial   (24-bit SPI word)
```

## Blocks and files

| Block | Module (`rtl/`) | What it does |
|---|---|---|
| Top | `plc_channel_emulator` | Wires the chain together, tags samples with their frame position and lines up the table reads. |
| Linear regression | `linear_regression` | Turns an ADC code into a signed 4.14 voltage: y = ⌊5x/16⌋. |
| FFT / IFFT | `streaming_fft`, `sdf_stage` | A pipelined radix-2 transform, one sample per strobe. Forward mode is unscaled. Inverse mode scales by 1/N. |
| Channel transfer function | `channel_tf_lut` | 512 × (Re, Im) table of H(f) in Q2.16 format, loadable at run time. |
| Multiplier | `complex_multiplier`, `product_term`, `sign_converter`, `sign_corrector` | M = H·Y, built from four sign-magnitude product terms and two adders. |
| AWGN | `awgn_lut` | 1024-pair table of Gaussian samples, with enable and gain. |
| Impulsive noise | `impulsive_noise_lut` | 2048-sample table holding one damped-sinusoid impulse, with enable and gain. |
| Adders | `noise_adder` | Registered saturating adders: two for the AWGN, one for the impulse. |
| Parallel to serial | `parallel_to_serial` | 16-bit DAC code framed in a 24-clock SPI word (CS/LD, SCK, SDI). |
| Shared constants | `plc_pkg` | Word widths, a saturation function and a bit-reversal function. |

The ADC (an 18-bit SAR converter) and the DAC (a dual 16-bit serial DAC) are
outside the design. The top takes the ADC's parallel code together with a
conversion strobe (`adc_valid`), and it drives the DAC's three serial pins.
`tb/ltc2752_model.sv` is a behavioural model of the DAC's serial input, used
by the testbenches.

## Number formats along the chain

| Point | Format | Notes |
|---|---|---|
| ADC code | 18-bit unsigned | One LSB is 5 V / 2^18 = 19.07 µV. |
| After linear regression | signed 4.14 in 18 bits | The value is volts × 2^14. Codes 1…10 give 0,0,0,1,1,1,2,2,2,3. |
| FFT input | same value, sign-extended to 28 bits | The imaginary part is 0. |
| FFT output, M, IFFT input | 28-bit signed re/im | The forward transform is unscaled. An 18-bit input grows at most 9 bits, so it cannot overflow. |
| H(k) | 18-bit signed Q2.16 | 1.0 = 65536 and 0.8 = 52429. The range is ±2. |
| IFFT output, output sample | 28-bit signed, back in 4.14 volts | The 1/N comes from halving after each of the 9 stages, with truncation. |
| DAC code | 16-bit unsigned | code = clamp(0.8·y, 0, 65535), so 0…5 V maps to the full code range and an ADC code x comes back as about x/4. |

All adders and rescaling points saturate instead of wrapping.

## Streaming transforms without a reorder memory

This is the least obvious part of the design.

**Single-path delay feedback.** `streaming_fft` chains log2(N) = 9 copies of
`sdf_stage`. Each stage has a feedback memory of L complex words. Over a
group of 2L samples:

- In the first half, the stage stores each incoming sample and outputs the
  butterfly difference it stored during the previous group.
- In the second half, it forms the butterfly of the stored sample x[p] and
  the incoming x[p+L]. It outputs the sum and stores the difference.

So every sample leaves a stage exactly L samples after it entered. A
forward/inverse pair adds 2·(N−1) = 1022 samples of delay from input to
output. Each stage also adds one register clock.

**Two flavours.** The forward FFT uses decimation in frequency (DIF):

- Delays run N/2, N/4, …, 1.
- Twiddles are applied to the difference on its way out.
- Input is in natural order. Output position p holds bin bitrev(p).

The inverse FFT uses decimation in time (DIT):

- Delays run 1, 2, …, N/2.
- Twiddles are applied to the second input before the butterfly.
- It accepts input in bit-reversed order and returns natural order.

Feeding the forward output straight into the inverse input therefore gives
time samples back in order. Neither transform needs the 2×512-word reorder
buffer a natural-order FFT would need. Between the two transforms, the
H-table and AWGN-table reads use `bitrev(position)` as the bin number.

**Position tags instead of counters.** Every sample travels with `idx`, its
position in the 512-sample frame. The top's counter numbers the input
samples. Each stage derives from `idx` its half-group (one bit of `idx`), its
memory address (low bits) and its twiddle index, and it passes on
`idx − L`. The stages therefore stay aligned to the frame without
per-stage start offsets, and the output `out_idx` says exactly which sample
is coming out.

**Twiddles.** Stage k needs exp(∓jπm/L) for m < L. These are computed at
elaboration with `$cos`/`$sin` into a per-stage constant table, rounded to
Q2.16. There is no ROM file.

**Rate.** Every stage advances only on its input strobe, so samples may
arrive on any clock, with any spacing. One sample per clock is the maximum.

**Blocks, not sliding windows.** The channel acts on each 512-sample frame as
a circular convolution, without overlap-add. This is what an
FFT → multiply → IFFT chain does. It gives small discontinuities at frame
edges when H is not flat. With H = 1 the output equals the input to within
2 LSB.

## The channel table

`channel_tf_lut` holds Re H and Im H for the 512 bins of a transform
sampled at `FS` (default 1 MHz). Bin k stands for f = k·FS/N below N/2 and
for (k−N)·FS/N above it. The attenuation uses |f|. The stored response is
therefore conjugate-symmetric, and the inverse transform yields a real
signal. The top keeps only the real part of the IFFT output.

The default contents are the rectangular form of the multipath model:

```
Re H(f) =  Σ g_i · exp(−(a0 + a1·|f|^k)·d_i) · cos(2π f d_i / vp)
Im H(f) = −Σ g_i · exp(−(a0 + a1·|f|^k)·d_i) · sin(2π f d_i / vp)
```

They are evaluated at elaboration for the model's four-path reference
channel:

- g = 0.64, 0.38, −0.15, 0.05
- d = 200, 222.4, 244.8, 267.5 m
- a0 = 0, a1 = 7.8·10⁻¹⁰ s/m, k = 1
- vp = 1.5·10⁸ m/s

You can change the table in two ways:

- Set `H_INIT_FLAT`/`H_FLAT_GAIN` at build time for a flat channel, such as
  1.0 (transparent) or 0.8.
- Write bins at run time through `h_wr_en/h_wr_addr/h_wr_re/h_wr_im`, one bin
  per clock. Keep H(N−k) = conj H(k), or the imaginary part that is dropped
  at the IFFT output will carry signal.

Reads are synchronous, like block RAM.

## The sign-magnitude multiplier

Each of the four products ac, bd, bc and ad (H = a + jb, Y = c + jd) goes
through a `product_term`:

1. Both operands pass a `sign_converter` (two's complement if negative).
2. The magnitudes are multiplied as unsigned numbers.
3. A `sign_corrector` compares the two sign bits and negates the product
   when they differ.

The bd term uses the other corrector variant, which negates when the signs
are **equal**. This folds j² = −1 into the sign, so both output adders only
add: Re M = ac + (−bd) and Im M = bc + ad. The sums are rounded by the 16
fraction bits of H and saturated to 28 bits. The multiplier has one register
stage.

## Noise sources

- **AWGN** (frequency domain): `awgn_lut` stores 1024 pairs of independent
  Gaussian samples with σ = 4096 LSB. They are built at elaboration by the
  Box-Muller method from a fixed linear-congruential sequence, so every build
  has the same noise. Each FFT bin reads the next pair. The pair is scaled by
  `awgn_gain`/4096, which makes `awgn_gain` the per-component standard
  deviation in the frequency domain. After the 1/N inverse transform, the
  time-domain rms is `awgn_gain / √512`. One LSB of the 4.14 output is
  61 µV, so 100 mV rms needs gain ≈ 37068 and 100 µV needs gain ≈ 37.
- **Impulsive noise** (time domain): `impulsive_noise_lut` holds 2048
  samples. The first 64 are a damped sinusoid, 1 V · e^(−n/12) · sin(2πn/8);
  the rest are silence. An impulse therefore recurs every 2048 output
  samples. `imp_gain` = 4096 plays it at 1 V peak, and `imp_active` marks
  the affected samples.

Both sources have an enable input. Disabled, they add exactly zero.

## DAC interface and sample-rate limits

`parallel_to_serial` sends each output sample as a 24-bit word
`{command 0011, address 0000, code[15:0]}`, MSB first:

1. CS/LD falls.
2. SDI changes while SCK is low, and the DAC samples it on the rising edge.
3. CS/LD rises after the 24th bit, which loads and updates the DAC.

SCK is clk/(2·`DAC_CLK_DIV`), so one word takes 50 clocks at
`DAC_CLK_DIV` = 1. The samples must therefore come at least 50 clocks apart.
At a 137.5 kHz sample rate that means clk ≥ 6.9 MHz. One extra sample can
wait in a holding register. Beyond that, samples are dropped, and each drop
pulses `dac_overrun`. `out_valid/out_sample/out_idx` show every output
sample before serialisation.

## Clocking and reset

There is one clock. Samples enter with `adc_valid` and stay one per strobe
through the whole chain. Reset (`rst_n`) is asynchronous and active low. It
clears the pipeline registers, the frame counter and the table pointers. It
does not clear the H table, so a table loaded before a reset is kept.

## What is assumed and how far to trust it

These points follow the design description:

- the block chain;
- the 18-bit ADC code and the 4.14 format with its conversion table;
- N = 512;
- 28-bit transform words, with the IFFT output truncated to 28 bits;
- the sign-converter / unsigned-multiplier / sign-corrector structure,
  including the inverted corrector for bd;
- noise taken from stored tables, AWGN added in the frequency domain and
  impulses in the time domain;
- a 24-clock serial DAC word.

These are this design's own choices:

- **Transforms.** The source design uses a vendor FFT core. Here the
  transforms are this design's SDF pipelines, with its own internal widths,
  rounding and bin ordering.
- **Linear regression.** The straight-line fit quoted with the conversion
  table does not reproduce the table. The table was followed: y = ⌊x·5/16⌋,
  i.e. 5 V full scale. The ADC's input range is also quoted as 0–4.096 V,
  which does not match the table's 19.07 µV step. The table was followed
  there too.
- **Real part, not magnitude.** A "magnitude converter" after the IFFT is
  mentioned, while the block diagram takes the real part. The real part is
  used. A magnitude would rectify the signal.
- **Channel parameters.** The multipath parameters are the model's published
  four-path example, not values given for this emulator. The source design
  computes its tables offline. Here they are computed at elaboration.
- **Noise tables.** Table sizes, the noise shapes and the gain controls are
  this design's.
- **DAC word.** The command and address nibbles, the SPI polarity and the
  0–5 V code scaling are this design's. Check them against the DAC you use.
- **Interfaces.** The strobe-based streaming interface, the H write port,
  the overrun flag and the saturation everywhere are additions.

The end-to-end test reproduces a per-frame circular convolution through the
default multipath channel to within 3 LSB. With H = 1 the output matches the
input to within 2 LSB, and with H = 0.8 it matches 0.8 × input to within 1
LSB.

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/plc_pkg.sv tb/tb_plc_channel_emulator.sv \
          --top-module tb_plc_channel_emulator -Mdir obj -o sim && ./obj/sim
```

Replace the testbench name to run another one. Verilator finds the other
modules through `-Irtl -Itb`.

| Testbench | Checks |
|---|---|
| `tb_plc_channel_emulator` | The whole emulator at default size, in seven phases: the multipath channel against a DFT/IDFT reference, H = 1, H = 0.8, AWGN rms, the impulse waveform, both noises together, and a DAC overrun. It also checks every DAC word against its output sample and requires that each mechanism happened. |
| `tb_paper_scenarios` | The emulator's bench scenarios: a flat noise floor, sines at 46 Hz, 132 Hz and 1.33 kHz with H = 1, 11 Hz and 1 kHz with H = 0.8, 100 µV and 100 mV AWGN, and the impulse alone and with AWGN. Samples come at a 137.5 kHz rate. |
| `tb_fft`, `tb_ifft` | 512-point transforms against a direct DFT, with gapped strobes and latency. |
| `tb_channel_tf_lut` | Every bin against the model, conjugate symmetry, the flat table and the write port. |
| `tb_complex_multiplier`, `tb_product_term`, `tb_sign_converter`, `tb_sign_corrector` | The multiplier's pieces, exhaustively over signs and randomly over values. |
| `tb_awgn_lut`, `tb_impulsive_noise_lut`, `tb_noise_adder` | Noise statistics, waveform, gain, enable and saturation. |
| `tb_linear_regression`, `tb_parallel_to_serial` | The conversion table and the serial word format and timing. |

The full-size end-to-end test runs in a few seconds.

## Changing it

- `N` (top, or `streaming_fft`): any power of two. The tables follow it.
  Keep the AWGN table at least N deep.
- Word widths are parameters of each module. Their defaults come from
  `plc_pkg`.
- To change the channel, edit the path list in `channel_tf_lut` (functions
  `g_of`/`d_of` and the constants `A0`, `A1`, `KEXP` and `VP`), or load the
  table at run time.
- Noise shapes: the `impulsive_noise_lut` parameters are `PEAK`, `TAU`,
  `F_NORM` and `IMP_LEN`. The `awgn_lut` parameters are `SEED`, `DEPTH` and
  `SIGMA_LOG2`.
