# FPGA digital IF receiver: LVDS capture and digital down converter

A radar front end delivers a 70 MHz intermediate frequency (IF) carrying a
Doppler-shifted echo. Instead of mixing it down with analog parts, the signal is
sampled directly by a 16-bit ADC at only 60 MSPS. This is deliberate
undersampling (band-pass sampling). The 70 MHz band folds down to 10 MHz, and
everything after the ADC is digital. An FPGA takes the ADC's double-data-rate
LVDS outputs, moves the samples into its own 60 MHz clock domain, and runs a
digital down converter (DDC). The DDC multiplies the samples by a 10 MHz
oscillator, low-pass filters the products and keeps one sample in 60. The
result is complex baseband I/Q at 1 MSPS. A small SPI master programs the ADC's
mode registers.

This repository holds synthesizable SystemVerilog for that FPGA design, with a
self-checking testbench for every block and one for the whole chain.

```
             adc_clkout (60 MHz, both edges)          clk_180                clk_60
 ADC lanes  +---------------------------+      +-----------------+    +-------------------------------+
 adc_d[7:0] |  even FIFO (8b, rising)   |----->|                 |    |  ping-pong FIFOs -> MUX       |
 ---------->|  odd  FIFO (8b, falling)  |----->| interleave 16b  |--->|  Final(15:0) = adc_sample     |
            +---------------------------+      +-----------------+    |        |                      |
               adc_ddr_capture                                        |        v                      |
                                                                      |  NCO --> mixer --> decim. FIR |--> i_out, q_out @ 1 MSPS
                                                                      |  (10 MHz) (x cos, x sin) (/60)|
                                                                      +-------------------------------+
                                                                       adc_spi_master --> ss_n/sclk/mosi/miso
```

## Frequency plan

| quantity | value |
|---|---|
| IF at the ADC input | 70 MHz plus Doppler |
| ADC sample rate fs | 60 MSPS, 16 bits |
| where the IF lands after sampling | 70 - 60 = 10 MHz |
| oscillator (NCO) | 10 MHz, 16-bit sine and cosine |
| mixer products, for a 10.3 MHz input | 300 kHz (kept) and 20.3 MHz (filtered out) |
| filter and decimation | low-pass, decimation 60, output 1 MSPS |

Band-pass sampling works here because the band fits between two multiples of
fs/2. For a band of width BW centred at Fc, the rate fs must satisfy
(2Fc - BW)/M >= fs >= (2Fc + BW)/(M+1) for some integer M. With Fc = 70 MHz,
fs = 60 MHz and M = 2, this allows a band up to 20 MHz wide.

## Getting samples off the ADC: even and odd lanes (`adc_ddr_capture`)

The ADC drives 16 bits on only 8 LVDS pairs plus a clock pair, CLKOUT. Each
pair carries two bits per sample. Lane k carries bit 2k while CLKOUT+ is low
and bit 2k+1 while CLKOUT+ is high:

```
CLKOUT+   ____/‾‾‾‾‾‾‾\_______/‾‾‾‾‾‾‾\____
lane k    [ D2k  (n) ][D2k+1(n)][ D2k (n+1)][D2k+1(n+1)]
                     ^         ^
          even FIFO writes     odd FIFO writes
          (rising edge, end    (falling edge, end
           of the low phase)    of the high phase)
```

The capture block keeps the even bits and the odd bits in two separate 8-bit
dual-clock FIFOs:

- **Even FIFO.** Written on the rising edge of CLKOUT+.
- **Odd FIFO.** Written on the falling edge, from the inverted clock.

This sidesteps DDR input registers and the clock-domain crossing at the same
time. On the other side, both FIFOs are read together with a 180 MHz clock
whenever both hold data. Bit k of the even word and bit k of the odd word go
back to sample bits 2k and 2k+1.

**Keeping the halves paired.** The n-th even word and the n-th odd word must
belong to the same sample. After reset the odd FIFO starts writing only at the
falling edge that follows the first even write (the `evn_live` flag). From
then on, both FIFOs take one word per clock period.

**Which edge latches which half.** The even half is latched at the rising edge
and the odd half at the falling edge. This is this design's reading of "even
bits appear while CLKOUT+ is low". On real hardware the edge has to match the
ADC's output timing mode (its clock phase register). If the ADC's data eye sits
differently, swap the two edges.

## Ping-pong buffering into the 60 MHz domain (`pingpong_fifo`)

The re-assembled samples cross from the 180 MHz domain into the 60 MHz
processing clock through two 16-bit FIFOs, PP1 and PP2, used alternately:

- **Writer.** Puts `BLOCK_LEN` (8) samples into PP1, then 8 into PP2, and so on.
- **Reader.** Drains 8 samples from PP1, then 8 from PP2, and so on. It pops
  whenever the FIFO it is on holds data.
- **Output MUX.** Selects the FIFO that produced the word now on the output.
  The result is `Final(15:0)`, the raw sample stream `adc_sample`.

Sample order is preserved because both sides switch after the same count.

**Rates.** The ADC produces 60 MSPS and the reader can take exactly 60 MSPS.
The path therefore stays balanced only if `clk_60` is at least as fast as the
ADC clock. If the two clocks come from independent oscillators, a 100 ppm
deficit fills the 2 x 16 words of slack after about 0.3 M samples. The sticky
`pp_overflow` flag reports that. The fix is to derive `clk_60` from the ADC
clock, or to make the FIFOs deeper.

All four FIFOs are instances of `async_fifo`. It is a classic Gray-pointer
dual-clock FIFO with two-flop synchronisers and a registered read. It flags
writes dropped while full.

## The down converter (`ddc` = `nco_dds` + `complex_mixer` + `decim_fir`)

The DDC is clocked by `clk_60` and advances once per valid sample. Gaps in the
sample stream therefore do not disturb the oscillator phase.

### Oscillator (`nco_dds`)

The oscillator is a direct digital synthesizer:

- **Phase accumulator.** 32 bits, advanced by `tuning_word` per sample. The
  output frequency is `tuning_word * fs / 2^32`. For 10 MHz at 60 MSPS the
  tuning word is round(2^32/6) = 715827883 (`ddc_pkg::TUNE_10MHZ_AT_60MSPS`).
- **Sine table.** The top 10 phase bits address a 256-entry quarter-wave
  table. Entry i holds `round(32767 * sin(pi/2 * (i + 0.5) / 256))`. The
  half-step offset makes the four quadrants exact mirror images, so
  quadrant 1 and 3 read the table backwards and quadrants 2 and 3 negate.
- **Cosine.** The same lookup with the phase advanced by a quarter turn.
- **Latency.** Two cycles.

The table is in `rtl/nco_sine_qtr.hex`. Regenerate it from the formula above
if you change `LUT_AW`.

### Mixer (`complex_mixer`)

The mixer uses two 16x16 signed multipliers:

- `I = x * cos`
- `Q = x * sin`

Each 32-bit product is rounded, shifted right by 15 and saturated to 16 bits.
With a full-scale oscillator this gives unity gain. The mixer has one register
stage.

With this sign convention, a tone above the oscillator frequency makes the
(I, Q) pair turn clockwise. If you want the usual `x * exp(-jwt)` convention,
negate Q.

### Decimating low-pass filter (`decim_fir`)

This is the block that needs the most care. The filter is an FIR of
L = NMAC x DECIM = 8 x 60 = 480 taps on both I and Q. Only every 60th output is
needed, so computing all of them would waste 59/60 of the work. The block
therefore uses an *accumulate-and-dump polyphase* form. Output m is

    y[m] = sum_{n=0}^{L-1} h[n] * x[60m + 59 - n]

**How the partial sums work:**

1. Each input sample contributes to NMAC = 8 different outputs.
2. Each channel keeps 8 partial sums ("slots"). Slot k belongs to the output
   that completes k blocks of 60 samples from now.
3. A sample at block phase p (0..59) is multiplied by tap
   `h[k*60 + 59 - p]` and added to slot k. This happens for all 8 slots in the
   same cycle, so there are 8 multipliers per channel and the coefficients are
   shared by I and Q.
4. At p = 59, slot 0 is complete. It is scaled (round, shift right by 15,
   saturate to 16 bits) and emitted. Slots 1..7 move down by one, and slot 7
   restarts from zero.

The cost is 16 multipliers and 480 words of coefficient memory, against 480
multipliers for a direct-form filter that throws outputs away. Latency is two
cycles from the strobe of a block's last sample to `out_valid`.

**Default taps.** The taps are a Hamming-windowed sinc with cut-off 450 kHz at
fs = 60 MHz, quantised to signed Q1.15 and scaled to sum to exactly 32768
(unity DC gain):

    h[n] = w[n] * sin(2*pi*fc*t)/(pi*t),  t = n - 239.5,  fc = 0.45/60,
    w[n] = 0.54 - 0.46*cos(2*pi*n/479)

They are stored in `rtl/decim_fir_coef.hex`. Measured response:

| frequency | response |
|---|---|
| 300 kHz | -0.4 dB |
| 500 kHz (output Nyquist frequency) | -11 dB |
| 700 kHz and above | below -57 dB |
| 20.3 MHz (mixing product) | -70 dB |

**Programmable bandwidth.** The cut-off is changed by rewriting taps through
`coef_we / coef_addr / coef_data`. A write takes effect for samples arriving
after it. Outputs that straddle a reload mix old and new taps.

**Real-only mode.** `real_only = 1` outputs just the real (I) channel and holds
Q at zero.

**Changing the decimation.** `DECIM` and `NMAC` are parameters. The
coefficient file must then hold DECIM x NMAC entries.

## Programming the ADC (`adc_spi_master`)

Each transfer is one 16-bit word, sent first bit first while SS is low:

| bits | meaning |
|---|---|
| 1 | R/W (1 = read) |
| 7 | register address A6:A0 |
| 8 | register data D7:D0 |

The ADC latches MOSI on the first 16 rising edges of SCLK. On a read it
leaves the register alone and returns its contents on MISO during the data
bits; the master captures them into `rdata`.

Timing chosen here:

- SCLK = clk_60 / `CLK_DIV` (7.5 MHz) and idles low.
- MOSI changes while SCLK is low.
- MISO is sampled on the rising edges.
- SS leads and trails SCLK by half a period.

A transfer takes 33 x CLK_DIV/2 cycles. Pulse `start` with `rw/addr/wdata`
while `busy` is low, and wait for `done`. The register values an application
needs depend on the ADC and are not built in.

## Top level (`ddc_receiver_top`)

| port | dir | meaning |
|---|---|---|
| `rst`, `locked` | in | reset request; clock-manager lock. Either one resets all domains, each released through its own 2-flop synchroniser (`reset_sync`). |
| `clk_60`, `clk_180` | in | 60 MHz and 180 MHz from the FPGA clock manager |
| `adc_clkout`, `adc_d[7:0]` | in | CLKOUT+ and the 8 data lanes, after the LVDS input buffers |
| `spi_start, spi_rw, spi_addr, spi_wdata` / `spi_busy, spi_done, spi_rdata` | in/out | ADC register command port (clk_60) |
| `adc_ss_n, adc_sclk, adc_mosi` / `adc_miso` | out/in | ADC serial port pins |
| `tuning_word[31:0]` | in | NCO frequency (clk_60) |
| `real_only` | in | output mode (clk_60) |
| `coef_we, coef_addr[8:0], coef_data[15:0]` | in | filter tap write port (clk_60) |
| `adc_sample[15:0], adc_sample_valid` | out | raw 60 MSPS sample stream, Final(15:0) |
| `i_out, q_out, iq_valid` | out | 1 MSPS baseband |
| `capture_overflow`, `pp_overflow` | out | sticky FIFO-overflow flags (adc_clkout and clk_180 domains) |

The clock manager and the differential input buffers are vendor primitives.
Instantiate them around this top on the target FPGA. The original system used
a 27 MHz board clock to make 60 and 180 MHz, but the input frequency does not
matter to this RTL.

Shared types and constants are in `ddc_pkg`: `sample_t`, `iq_t`, `spi_word_t`
and the 10 MHz tuning word.

## Departures and choices to be aware of

The published design used vendor IP cores for the NCO, the filter and the
FIFOs, so their insides here are this design's own:

- **Decimation 60.** The output is stated as 1 MSPS from 60 MSPS, which is a
  factor of 60. One passage says "a factor of 6"; that is not followed.
- **Filter length and taps.** Not published. The 480-tap / 450 kHz choice
  keeps the 300 kHz test tone within 0.4 dB and rejects 20.3 MHz by 70 dB.
- **Sample format.** ADC samples are taken as two's complement (the ADC can be
  set to that through its format register).
- **Unused ADC pins.** The ADC's overflow (OF) LVDS pair is not captured.
- **Open parameters.** FIFO depth (16), ping-pong block length (8), SPI clock
  rate, reset scheme, the I/Q sign convention and the output scaling are not
  given by the source and were chosen here.
- **Not included.** The Ethernet link to the monitoring system is not part of
  this RTL. Neither is any demodulation after the DDC.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Run the
tests from the repository root, because the two tables are read by relative
path (`rtl/...hex`). For example, the full receiver at its default sizes:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ddc_pkg.sv \
    tb/tb_ddc_receiver_top.sv --top-module tb_ddc_receiver_top -y rtl -y tb
./obj_dir/Vtb_ddc_receiver_top +verilator+rand+reset+2
```

| testbench | what it checks |
|---|---|
| `tb_async_fifo` | order across unrelated clocks, full/empty, overflow pulse |
| `tb_adc_ddr_capture` | DDR ADC model with random samples; every sample re-assembled in order, rate in = rate out |
| `tb_pingpong_fifo` | order across PP1/PP2, select toggles every 8 samples, overflow when overdriven |
| `tb_adc_spi_master` | against `adc_spi_model` (ADC register model): write, read-back, 16 SCLK edges, frame contents, transfer length |
| `tb_nco_dds` | every output against `round(32767*sin(2*pi*(p+0.5)/1024))` from an independent phase; latency; 10 MHz frequency |
| `tb_complex_mixer` | bit-exact products, corner values, saturation |
| `tb_decim_fir` | bit-exact against a direct FIR on the full input history, default and random taps, real-only mode, 1 output per 60 |
| `tb_ddc` | 10.3 MHz tone in: 300 kHz complex tone out with the predicted envelope (DTFT of the taps), rotation sense, 15 MHz rejected |
| `tb_ddc_receiver_top` | whole receiver at default sizes (see below) |

`tb_ddc_receiver_top` plays the ADC: a noisy 10.3 MHz tone on the DDR lanes
and the register port. It runs the whole receiver at its default sizes and
checks:

- register programming and read-back;
- the raw sample stream, sample by sample;
- the 300 kHz baseband envelope and frequency;
- real-only mode;
- a full coefficient reload at half scale, which halves the output;
- retuning the NCO onto the input, which moves the output to DC.

It also counts that every mechanism happened: ping-pong switches on both
sides, the MUX on PP2, SPI writes and reads, real-only outputs, tap writes and
the retune. It takes a few seconds.
