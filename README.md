# Two-stage decimation filter with split-table distributed-arithmetic FIR

This is a decimation filter for a MEMS accelerometer read out through a
third-order single-bit sigma-delta modulator. The modulator produces one bit
per cycle of a 62.5 kHz clock. The filter turns that bit stream into 20-bit
samples at 625 Hz, an overall decimation of 100. A single filter with the
required sharpness would need an order in the thousands, so the work is split
into two stages:

1. a 6-section CIC (cascaded integrator-comb) decimator, R = 25, which needs
   only adders and brings the rate down to 2.5 kHz;
2. a 48th-order (49-tap) low-pass FIR that decimates by 4. It uses no
   multipliers: it is built with **distributed arithmetic (DA)**, and its
   coefficient table is split into 13 small tables.

Everything runs from one 4 MHz crystal clock. The filter also makes the
modulator's 62.5 kHz clock itself, by dividing the crystal clock by 64.

```
            4 MHz clk
               |
           +-------+  osr_clk (62.5 kHz) ------------------------> to modulator
           |clk_div|  osr_en (1 pulse / 64 clk)
           +-------+      |
 xin (1 bit) ------> +-----------------+ 29 bit, 2.5 kHz  >>>9   +--------+ 20 bit, 625 Hz
                     | cic_decimator   |------------------------>| fir_da |--> fir2_yout
                     | 6 x integ, /25, |      cic_yout (20 bit)  | /4, DA |    fir2_out
                     | 6 x comb        |                         +--------+
                     +-----------------+
```

| Point in the chain      | Rate      | Clocks of 4 MHz per sample | Word            |
|-------------------------|-----------|----------------------------|-----------------|
| `xin`                   | 62.5 kHz  | 64                         | 1 bit (+1 / -1) |
| CIC output / FIR input  | 2.5 kHz   | 1600                       | 29 bit, cut to 20 |
| `fir2_yout`             | 625 Hz    | 6400                       | 20 bit signed   |

## Files

| File | Contents |
|------|----------|
| `rtl/decim_pkg.sv` | rates, stage counts, word widths, the 49 FIR coefficients |
| `rtl/clk_div.sv` | divide-by-64: `osr_clk` and the sample enable `osr_en` |
| `rtl/cic_integrator.sv` | one CIC integrator (accumulator) |
| `rtl/cic_comb.sv` | one CIC comb, differential delay M |
| `rtl/cic_decimator.sv` | 6 integrators, down-sampler by 25, 6 combs |
| `rtl/da_lut.sv` | one partition of the DA table (16 words, contents computed from the coefficients) |
| `rtl/fir_da.sv` | the DA FIR: sample buffer, 13 tables, adder, shift-accumulator, decimation by 4 |
| `rtl/decim_filter_top.sv` | the complete filter |
| `tb/tb_*.sv` | one self-checking testbench per module, plus a whole-filter step test |
| `tb/sd_modulator3.sv` | behavioural third-order single-bit modulator, used as test stimulus |

## Clocking and the sample enables

The whole design uses the single 4 MHz clock `clk`. Slower logic runs on
one-cycle enables instead of derived clocks. `clk_div` counts 0..63.
`osr_clk` is high for counts 32..63 and drives the modulator. `osr_en` is
high during count 63, the cycle just before `osr_clk` falls. The CIC samples
`xin` on that edge, half an OSR period after the rising edge on which the
modulator is expected to change it. `rst` is an asynchronous reset, active
high, used throughout.

## CIC decimator

Each of the six integrators adds its input on every `osr_en`. The input bit
is read as +1 (`1`) or -1 (`0`). A phase counter keeps one sample in 25 and
passes it to the six combs, which therefore run at only 2.5 kHz and need just
one delay register each (M = 1). The transfer function is
`((1 - z^-25) / (1 - z^-1))^6`. Its DC gain is 25^6 = 244 140 625.

Register width follows the usual CIC bit-growth rule,
`N*log2(R*M) + Bin` = 6 * 4.64 + 1. That gives 28 magnitude bits plus a
sign, so **29 bits**. The integrators are allowed to overflow and wrap. This
is correct in two's complement: the combs take differences, and the final
result always fits in 29 bits, so the wraps cancel.

Timing:

- The integrator chain adds one input-sample delay per stage after the
  first, and the down-sampler register adds one more.
- Decimated sample `j` is therefore the 145-tap CIC impulse response
  applied to the input window that ends at input sample `25j + 18`.
- The comb chain is pipelined on `clk`, not on samples.
- `out_valid` rises 7 clk cycles after the `osr_en` that completed the
  group.

At the top, the 29-bit result is shifted right by 9 into the FIR's 20-bit
input. Full scale there is +476 837 and -476 838 (the shift rounds towards
minus infinity).

## The distributed-arithmetic FIR (`fir_da`)

The FIR is the hardest part of the design to follow.

**The arithmetic.** The filter computes `y = sum_k h[k] * x[n-k]` over 49
taps. Write every 20-bit two's-complement sample through its bits `x_b`:

```
x = -2^19 * x_19 + sum_{b=0..18} 2^b * x_b
y = sum_{b=0..18} 2^b * P_b  -  2^19 * P_19,     P_b = sum_k h[k] * x_b[n-k]
```

`P_b` depends only on the 49 bits that make up bit plane `b`, so a table can
hold it. One table addressed by all 49 bits would need 2^49 words. The taps
are therefore split into groups of 4: taps 0-3, 4-7, ..., 44-47, and tap 48
alone. Each group has its own 16-word table (`da_lut`) holding every subset
sum of its four coefficients. The 13 table outputs are added to give `P_b`.
The table memory is 13 x 16 words instead of 2^49, and the adder that joins
the tables sits behind a pipeline register, so it does not slow the clock.
The group size is the `LUT_ADDR_W` parameter.

**The shift-accumulator.** Shifting each `P_b` left by `b` would need a
barrel shifter. Instead, the bit planes are processed LSB first, and each
cycle does

```
acc <= (acc >>> 1) + (P_b << 19)        // b = 1 .. 18
acc <=               (P_0 << 19)        // b = 0
acc <= (acc >>> 1) - (P_19 << 19)       // b = 19, the sign plane
```

After the 20th plane, `acc` holds exactly `sum 2^b P_b` with the sign plane
negated. No bits are lost: the accumulator is 45 bits wide, and every right
shift drops only zeros. The result has 19 fraction bits, because the
coefficients are scaled by 2^19. The output is `floor(acc / 2^19)`,
saturated to the 20-bit range.

**Buffer and decimation.**

- `x_buf` is a 49-word delay line, shifted on every input.
- Only every 4th input starts a computation. There is no polyphase split:
  the three inputs in between are only stored.
- On the starting input, the new buffer contents are copied into a working
  register array, which is then shifted right one bit per cycle. Its LSBs
  are the table address.
- Because of the copy, the delay line may take new samples while a
  computation runs.

**Pipeline and timing** (cycle 0 is the `in_valid` cycle of the 4th input):

| Cycle  | Working copy     | Table output | Adder register | Accumulator |
|--------|------------------|--------------|----------------|-------------|
| 0      | loaded           |              |                |             |
| 1..20  | planes 0..19     |              |                |             |
| 2..21  |                  | `P` parts    |                |             |
| 3..22  |                  |              | `P_b`          |             |
| 4..23  |                  |              |                | updated, `out_valid` in cycle 23 |

The latency is `IN_W + 3` = 23 cycles. A new computation must not start
while one is running, so inputs may come no faster than one every 6 cycles.
An assertion in `fir_da` flags an overrun. In the full filter the inputs are
1600 cycles apart, so the DA engine is idle almost all the time. That margin
is what allows a single bit-serial engine with no multiplier.

## Coefficients and the filter response

The coefficient set in `decim_pkg` is a design choice; no set is inherited.
It is a 49-tap linear-phase equiripple low-pass for a 2.5 kHz input, with
pass band 0-100 Hz, stop band 200-1250 Hz and stop-band weight 10. It is
scaled to unity DC gain and quantised to 18-bit integers in units of 2^-19.

What it achieves:

- about 0.74 dB of pass-band ripple;
- about 47 dB of stop-band attenuation;
- a DC gain of 524287/524288.

**This falls well short of the 120 dB stop band and 0.00025 dB ripple in the
target specification.** With a 100 Hz transition band at 2.5 kHz, an FIR
needs roughly 195 taps to reach 120 dB. To get closer, replace `FIR_COEF`
and change `FIR_TAPS` in the package; the tables and the FIR follow
automatically. The CIC's sin(x)/x droop is not compensated either; at
12.5 Hz it is negligible.

The full filter does not overflow for steady signals. A full-scale step from
-1 to +1, however, overshoots by about 10 % of the step on each side and
clips at -524 288 and +524 287. The output saturates rather than wrapping.

## Interface of `decim_filter_top`

| Port        | Dir | Width | Meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1  | 4 MHz crystal clock |
| `rst`       | in  | 1  | asynchronous reset, active high |
| `xin`       | in  | 1  | modulator bit, sampled on `osr_en` |
| `osr_clk`   | out | 1  | 62.5 kHz clock for the modulator |
| `fir2_yout` | out | 20 | filter output, signed, held between updates |
| `fir2_out`  | out | 1  | output indicator: one-cycle pulse when `fir2_yout` changes, every 6400 cycles |
| `cic_yout`  | out | 20 | CIC output as fed to the FIR, held |
| `cic_out`   | out | 1  | one-cycle pulse when `cic_yout` changes, every 1600 cycles |

The first six ports are the filter's specified interface. The `cic_*` pair
is an addition that makes the intermediate 2.5 kHz signal visible.

## Where this RTL makes its own choices

These follow the specified architecture: the rates, the stage counts, R = 25,
M = 1, order 48, decimation by 4, the 20-bit output, DA with split tables and
pipeline registers, the CIC bit growth, and the down-sampler placed between
integrators and combs. The following are this design's own choices:

- one clock with enables instead of derived clocks, and the `xin` sampling
  phase;
- the +1/-1 reading of the modulator bit;
- the FIR input taken as the top 20 of the 29 CIC bits;
- 4 taps per table, 18-bit coefficients, a 45-bit accumulator, LSB-first
  processing with the sign plane subtracted, truncation and saturation at
  the output;
- the working copy of the sample buffer;
- the coefficient values (see above);
- reset polarity, and the one-cycle-pulse form of the output indicator.

Coarse synthesis of the top gives about 2 600 flip-flop bits and
13 x 16 x 22 table bits. This is in the same range as the roughly 3 000
flip-flops reported for an FPGA build of the same architecture.

## Verification

Every testbench checks itself and prints
`TB_RESULT checks=N failures=M`. Each also has a watchdog that fails the run
if it does not finish.

| Testbench | What it checks |
|-----------|----------------|
| `tb_clk_div` | period 64, 50 % duty, `osr_en` once per period just before the falling edge |
| `tb_cic_integrator` | accumulator against a modulo-2^29 model, random enable, wrap-around |
| `tb_cic_comb` | `x[n] - x[n-M]` for M = 1 and 2, valid timing |
| `tb_cic_decimator` | bit-exact against a convolution with the 145-tap CIC impulse response (not a copy of the structure); both full-scale values; 7-cycle latency; 1 output per 25 inputs |
| `tb_da_lut` | every word of the first, a middle and the last (partly filled) table |
| `tb_fir_da` | bit-exact against a direct-form multiply-accumulate model; random and full-scale inputs; positive and negative saturation; 23-cycle latency; 1 output per 4 inputs |
| `tb_decim_filter_top` | full-size sine test: a behavioural third-order single-bit delta-sigma modulator (`tb/sd_modulator3.sv`) turns a 12.5 Hz sine of amplitude 0.5 into `xin`. The CIC and FIR outputs are predicted from the bit stream alone and compared bit-exactly, along with their 1600- and 6400-cycle spacing. The run also checks the sine's amplitude (239 096 measured against 239 317 expected), its zero crossings, and that each mechanism occurred. |
| `tb_decim_step` | full-size step response: settled levels, settling within 16 outputs, clipping instead of wrap-around |

The behavioural modulator is only a stimulus. It is a third-order
error-feedback loop with a Butterworth-pole noise transfer function, and it
does not model the analog front end.

## Simulating

Each testbench is a top module with no ports. Add `decim_pkg.sv` first, then
the modules it uses, then the testbench. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl \
    rtl/decim_pkg.sv rtl/clk_div.sv rtl/cic_integrator.sv rtl/cic_comb.sv \
    rtl/cic_decimator.sv rtl/da_lut.sv rtl/fir_da.sv rtl/decim_filter_top.sv \
    tb/sd_modulator3.sv tb/tb_decim_filter_top.sv --top-module tb_decim_filter_top
./obj_dir/Vtb_decim_filter_top
```

The full-size sine test simulates 0.2 s of signal (about 830 000 clock
cycles) in a few seconds. Every register that is read is reset.
