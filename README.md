# Wideband power-line channel emulator: frequency-domain datapath

A power-line modem has to be tested against a channel that is frequency-selective,
attenuates strongly above a few MHz and is full of noise. Testing on a live mains network
is hazardous and cannot be repeated. This design is the digital core of an emulator that
sits between two modems instead. It samples the transmitted signal and multiplies its
spectrum by the frequency response of one of four reference power-line channels. It then
adds a noise scenario drawn at random, and hands the result back for conversion to analog.

The key idea is to work in the frequency domain. Once the signal has been through a
4096-point FFT, the channel's effect is one complex multiplication per bin, and the noise
is one complex addition per bin. Both the channel responses and the noise spectra are
precomputed tables. The hardware is therefore a short, fully pipelined stream. It handles
one bin per clock at 100 MHz and never stalls.

## Signal path

```
 ADC code (14 b)                                       user switches (4 b)
      |                                                       |
 linear_regression --16 b--> [FFT core] --29 b + bin--> input reg --+--> channel_selector
                                                               |     |
                                  channel_lut (4 x 4096 x re/im) <---+
                                  bg / nb / imp noise tables (4096 x re/im)
                                                               |
                                    complex_mult (2 clocks)    |  noise delayed 2 clocks
                                                               v
                        lfsr_rng --3 b--> noise_selector (add + saturate)
                                                               |
                                                     29 b --> [IFFT core] --> DAC
```

`plc_emulator_top` wires these blocks together. The FFT and IFFT cores and the analog
front end are not part of the RTL. Their connections are ports of the top:

| Port group | Direction | Meaning |
|---|---|---|
| `adc_valid`, `adc_code[13:0]` | in | ADC sample, two's complement |
| `fft_xn_valid`, `fft_xn_re[15:0]`, `lr_y_full[26:0]` | out | Regression output to the FFT input, one clock after the sample. `lr_y_full` is the value before truncation. |
| `fft_xk_valid`, `fft_xk_index[11:0]`, `fft_xk_re/im[28:0]` | in | FFT output bins in natural order, with their index. Gaps in `valid` are allowed. |
| `sw_channel[3:0]` | in | Channel selector switches |
| `rng_run`, `rng_load_seed`, `rng_seed[31:0]` | in | Random generator run/stop switch and seed |
| `ifft_xn_valid`, `ifft_xn_sof`, `ifft_xn_re/im[28:0]` | out | Bins for the IFFT, 5 clocks after the matching `fft_xk` bin. `sof` marks bin 0. |
| `noise_code`, `noise_sat`, `channel_*`, `rng_state` | out | Status: the active scenario, saturation flag, selected channel, invalid switch code |

### Frames and selection timing

A frame is the 4096 bins from index 0 to index 4095. The channel switch setting is
captured when bin 0 enters, and so is the random noise code when bin 0 reaches the noise
adder. Both hold for the rest of the frame. Moving a switch in the middle of a frame
therefore changes nothing until the next frame, and a spectrum is never split between two
channels or two noise scenarios.

Bins must arrive in index order, with bin 4095 followed by bin 0 of the next frame. An
assertion in the top (`a_bin_order`) reports any other order. Gaps between valid bins are
allowed.

The 5-clock frequency-path latency is made up as follows:

- 1 clock: input register. It lets the selector capture the switches before the tables are addressed.
- 1 clock: table read.
- 2 clocks: multiplier.
- 1 clock: noise adder.

## Number formats

Every frequency-domain value is 29-bit two's complement with 14 fractional bits (Q15.14):
FFT output, transfer function, noise, and the IFFT input. The widths are linked:

- The FFT input is 16 bits wide.
- An unscaled 4096-point FFT grows the value by log2(4096) + 1 = 13 bits, giving 29 bits.
- The transfer functions use the same 29 bits, so that a multiplier operand is symmetric.

The bin spacing, 100 MHz / 4096 = 24.414 kHz, equals the HomePlug AV carrier spacing. The
band of interest, 0.5–10 MHz, is bins 20 to 410.

## The ADC line fit (`linear_regression`)

The ADC code is not itself the amplitude the FFT should see. Two straight lines fitted to
amplitude against code convert it. The sample's sign bit selects the line:

- positive: `Y = 512*x - 1279`
- negative: `Y = 512*x + 29360128`

Here `x` is the 16-bit FIFO word: the 14-bit code sign-extended to 16 bits, read as an
unsigned number. The negative-line offset is 512 × 0xE000, so the lines only make sense for
that word. `Y` is held exactly in 27 bits (`lr_y_full`). Fourteen bits of it, starting at
bit 9, go to the FFT input as a sign-extended 16-bit word.

Bit 9 was chosen to undo the slope of 2^9, and the truncation rule is this design's own.
Be aware that with these constants a negative code leaves the truncation with its top bit
inverted, while a positive code stays two's complement. The FFT of a sine therefore shows
extra odd harmonics and a DC offset. The accuracy test below starts from whatever this
stage delivers, so it measures the channel path, not the fit. All slopes, offsets and the
truncation position are parameters, so a different fit can be dropped in.

## Channel multiplication (`complex_mult`)

The product `(a + jb)(c + jd)` is expanded term by term: `re = ac - bd`, `im = ad + bc`.
Each partial product is computed in sign-magnitude form:

1. Both factors are made positive.
2. The magnitudes are multiplied into a 58-bit register.
3. The sign is restored by a two's complement.

Every partial product therefore fits twice the operand width without a guard bit. The
two sums are formed at 59 bits. Fourteen fractional bits are then dropped and the low 29
bits kept. This is a plain truncation that wraps on overflow. Each output component is at
most |X|·|H| in magnitude. Overflow therefore cannot happen while the bin's magnitude |X|
stays below 2^28 and the channel gain |H| is at most 1. All four channels and the
"no transfer function" gain of 1.0 meet the gain condition.

## Channel tables (`channel_lut`, `channel_selector`)

Each reference channel is a Zimmermann–Dostert multipath response:

    H(f) = sum_i g_i * exp(-(a0 + a1*f^k)*d_i) * exp(-j*2*pi*f*d_i/vp)

It is stored as two memories, one real and one imaginary, addressed by `{channel, bin}`.
Bins above 2048 hold the complex conjugate of bin 4096-k, and bin 2048 is real, so the
emulated channel keeps the time signal real.

The tables are computed in an `initial` block with `$exp/$cos/$sin`. On an FPGA this
becomes ROM initialisation, and no data file is needed. The four channels are 150 m good,
150 m medium, 150 m bad and 250 m good. Their path parameters (gains, lengths, `a1`, with
`a0 = 0`, `k = 1` and `vp = 1.5e8 m/s`) are this design's own, not measured reference
data. They give responses of the right character:

| Channel | Level near DC | Level at 10 MHz | Other features |
|---|---|---|---|
| 150 m good | about -21 dB | about -34 dB | |
| 150 m medium | about -21 dB | about -72 dB | |
| 150 m bad | about -19 dB | about -54 dB | notch of about -64 dB near 4.8 MHz |
| 250 m good | about -18 dB | about -78 dB | |

To use measured channels, replace the `G`, `D`, `A0`, `A1` and `KX` tables in
`channel_lut.sv`.

The selector switches use a thermometer code:

| `sw_channel` | Transfer function |
|---|---|
| `0000` | none (H = 1.0) |
| `0001` | 150 m good |
| `0011` | 150 m medium |
| `0111` | 150 m bad |
| `1111` | 250 m good |

Any other setting also means "none" and raises `channel_code_err`.

## Noise scenarios (`*_noise_lut`, `noise_selector`, `lfsr_rng`)

Three noise spectra are precomputed tables, added after the channel multiplication:

- **Background** (`bg_noise_lut`): coloured noise with magnitude `N_INF + N_0*exp(-f/F_1)`.
- **Narrowband** (`nb_noise_lut`): a sum of Gaussian peaks `A_k*exp(-(f-f0_k)^2/(2B_k^2))`
  at 3.9, 7.1 and 9.6 MHz, standing for radio broadcast and amateur interference.
- **Impulsive** (`imp_noise_lut`): the exact spectrum of four damped 2 MHz bursts per
  frame (decay constant 0.1 µs).

Background and narrowband noise get a fixed pseudo-random phase per bin. All three are
conjugate-symmetric. Their amplitudes are in Q15.14 units of the multiplier output and are
this design's choice; scale them to set the signal-to-noise ratio.

`noise_selector` decodes a 3-bit code:

| Code | Noise added |
|---|---|
| 000 | none |
| 001 | impulsive |
| 010 | narrowband |
| 011 | background |
| 100 | impulsive + background |
| 101 | impulsive + narrowband |
| 110 | background + narrowband |
| 111 | all three |

It adds the enabled spectra to the bin and saturates the sum to 29 bits (`noise_sat`).

The code comes from `lfsr_rng`. This is a 32-bit register that shifts left each clock; its
new bit 0 is the XOR of bits 31, 29 and 2. Its low three bits are copied into a random
number register. `rng_run = 0` freezes both, which is how a particular scenario is
selected on the bench. `rng_load_seed` loads a new seed, and an all-zero state reloads the
seed.

No primitive three-term polynomial of degree 32 exists, so this generator is not
maximal-length. It only has to spread choices over eight cases, and the tests see all
eight.

## Departures and own choices, in one place

- Sizes and formats follow the published emulator: 4096 points, 100 MHz, 16-bit FFT
  input, 29-bit Q15.14 values, two line equations, FOIL sign-magnitude multiplication, the
  selector codes and noise codes, a 32-bit three-tap generator.
- Not taken from it: the channel path parameters, the noise models' constants and phases,
  the third generator tap and the seed, the truncation position of the line fit,
  saturation in the noise adder, capture of selections at frame start, the pipeline depth,
  and reset behaviour (asynchronous, active low; no transfer function and no noise after
  reset).
- Outside the RTL: the FFT/IFFT cores (a vendor core; any streaming unscaled 4096-point
  FFT that outputs natural-order bins with an index fits), the ADC/DAC card with its clock
  tree, and the card's LVDS capture logic.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| Testbench | What it checks |
|---|---|
| `tb_linear_regression` | Both equations against integer arithmetic; 1-clock latency |
| `tb_complex_mult` | Against 64-bit products, including the most negative operands; 2-clock latency; throughput |
| `tb_channel_lut` | All 16,384 entries against the model to within 1 LSB; hand-worked DC gains; conjugate symmetry; unity bypass |
| `tb_bg_noise_lut`, `tb_nb_noise_lut`, `tb_imp_noise_lut` | Magnitude or value per bin against the model; symmetry; phase spread |
| `tb_channel_selector` | All 16 switch settings |
| `tb_lfsr_rng` | Bit-exact against a model; stop, seed load and zero guard; all eight codes |
| `tb_noise_selector` | All eight codes; saturation; code capture at frame start |
| `tb_plc_emulator_top` | Twelve full 4096-bin frames at default parameters, every bin predicted and compared |
| `tb_workload_tone` | Accuracy of a 1.23 MHz tone through each channel |

`tb_plc_emulator_top` predicts each bin from the table contents it reads from the
design; the table testbenches check those contents against the models. It also checks the 5-clock latency and counts the mechanisms it
exercises: every channel code including an invalid one, every noise code, a stopped and a
running generator, a seed load, a switch moved mid-frame, saturation, input gaps and both
regression lines.

`tb_workload_tone` sends a 4096-sample 1.23 MHz tone through the regression stage. A
floating-point FFT in the testbench stands in for the FFT core. The emulator output is
compared with the floating-point product of spectrum and channel model. The error at the
tone bin is 0.02–0.06 % across the four channels, and the mean over all significant bins
is below 0.11 %.

The reference models for the tables live in `tb/plc_ref_pkg.sv`, written independently of
the RTL.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/plc_pkg.sv tb/tb_plc_emulator_top.sv --top-module tb_plc_emulator_top -o sim
    ./obj_dir/sim

Swap in any other `tb_*.sv` and its module name. Every testbench finishes in a few seconds;
the tables are computed at start-up.

## Files

- `rtl/plc_pkg.sv`: widths, the complex bin type, noise-code decoding, fixed-point rounding.
- `rtl/plc_emulator_top.sv`: the top.
- `rtl/linear_regression.sv`, `complex_mult.sv`, `channel_lut.sv`, `channel_selector.sv`,
  `bg_noise_lut.sv`, `nb_noise_lut.sv`, `imp_noise_lut.sv`, `noise_selector.sv`,
  `lfsr_rng.sv`: the blocks.
- `tb/`: testbenches and the reference-model package.

The table-filling `initial` blocks use real arithmetic. FPGA synthesis tools accept this
for ROM initialisation, but some open-source synthesis front ends do not. For those, the
same tables can be generated once from the formulas above and loaded with `$readmemh`.
