# Mains frequency deviation meter: two-point subtraction method in logic

This design measures how far the mains frequency is from 50 Hz. It does not need
a direct connection to the mains. It works from the hum that a signal picks up,
sampled at only 200 Hz by a 12-bit ADC.

At 200 Hz a 50 Hz wave spans exactly four samples. A sample taken one step
before the current one and a sample taken one step after it are then half a
period apart. Their average cancels the mains tone and keeps the DC level.
When the frequency drifts, the cancellation is no longer exact. A short ratio
of four consecutive "hum" samples measures how far off it is. Each new sample
gives a new estimate, 200 per second.

The method and the system structure follow the paper "Mains Frequency Deviation
Measurement by Using Elements of the Subtraction Procedure Based on Xilinx FPGA"
(D. Badarov, G. Mihov). In that paper the arithmetic runs as software on a soft
CPU in a Spartan-3E FPGA. The CPU's program and instruction set are not
published. This RTL therefore does the same arithmetic in dedicated logic. It
is an independent implementation, not the authors' code.

## The estimator

Let X_i be the ADC samples and Phi = 200 Hz the sample rate.

1. **Two-point filter.** Y_i = (X_{i-1} + X_{i+1}) / 2. For a tone of frequency
   f its gain is cos(2*pi*f/Phi): 1 at DC, 0 at 50 Hz, -1 at 100 Hz.
2. **Subtraction.** B_i = X_i - Y_i. The DC level (the ADC input sits at
   mid-scale) cancels. A tone near 50 Hz passes with gain 1 - cos, about 1.
3. **Ratio.** K = (B_i - B_{i-4}) / (2 * (B_{i-1} - B_{i-3})).
   For a pure sinusoid B_k = A*cos(w*k + p) with w = 2*pi*f/Phi:
   - the numerator is -2A * sin(w*(i-2) + p) * sin(2w);
   - the denominator is 2 * (-2A * sin(w*(i-2) + p) * sin(w)).
   Their ratio is sin(2w) / (2 sin w) = cos w. Amplitude and phase cancel, so K
   equals the filter gain at the actual frequency.
4. **Deviation.** Near 50 Hz, cos(pi/2 + 2*pi*df/Phi) = -sin(2*pi*df/Phi), which
   is about -2*pi*df/Phi. Hence df ≈ -K * Phi / (2*pi).

Step 4 is a linearisation. The estimate is really (Phi/2pi)*sin(2*pi*df/Phi). At
df = 0.5 Hz it is 20 µHz short, and at 5 Hz it is 20 mHz short. Inside the
range that mains frequency actually covers, this error is negligible.

### Fixed-point choices (this design's)

- **B with one fractional bit.** The halving in step 1 is never done. The filter
  outputs 2Y = X_{i-1} + X_{i+1} and 2B = 2X_i - X_{i-1} - X_{i+1}, a 14-bit
  signed value in half-LSB units. K does not depend on scale, so this loses
  nothing.
- **One division per estimate.** The gain Phi*1000/(2*pi) = 31831 mHz is folded
  into the numerator:
  `df_mhz = -round(|num| * 31831 / |den|) * sign(num) * sign(den)`.
  Here num = 2B_i - 2B_{i-4} and den = 2*(2B_{i-1} - 2B_{i-3}). The constant is
  computed in `mfd_pkg::df_gain_mhz()` from the sample rate. A restoring divider
  produces one bit per clock (31-bit dividend, 16-bit divisor). The result
  saturates at ±524.287 Hz. An ideal sinusoid never exceeds ±31.831 Hz, because
  |K| ≤ 1.
- **Small denominators are skipped.** The denominator is proportional to the
  sine of the phase between B_{i-3} and B_{i-1}. Every few samples it comes
  close to zero, and the ratio is then mostly quantisation noise. If
  |den| < `MIN_DEN` (256 half-LSB units), the estimate is not computed:
  `df_skipped` pulses and the output keeps its last value. For a hum of
  amplitude A codes, den peaks at about 8A. Below roughly 32 codes of amplitude,
  every estimate is skipped.
- **Index.** The filter needs X_{i+1}, so B_i belongs to the sample before the newest
  one. An estimate uses the 7 newest samples.

How precise it is: with 12-bit quantisation only and a hum of ±1500 codes,
single estimates are within a few tens of mHz. The mean of 30 estimates is
within 20 mHz of the true frequency. The tests check both. The output is not
averaged, so any smoothing is up to the user.

## Hardware structure

```
            +--------------+  tick   +------------------+ sample  +---------------+
 clk ------>| sample_timer |-------->| spi_adc_receiver |-------->| atten_control |--> att_10, att_100
            | 200 Hz       |         | SPI master       |    |    | range select  |--> atten_range, overload
            +--------------+         +------------------+    |    +---------------+
                                       ^  |  |               |           | range_changed (restart)
                           adc_sdata --+  |  +--> adc_sclk   v           v
                                          +-----> adc_cs_n  +-------------------------------------------+
                                                            | freq_dev_core                             |
                                                            |  sample_ram 64x12 (circular)              |
                                                            |    -> two_point_filter (2Y, 2B)           |--> df_mhz, freq_mhz,
                                                            |    -> b_buffer (2B_i .. 2B_{i-4})         |    df_valid, df_skipped,
                                                            |    -> deviation_calc (+ seq_divider)      |    hum_b2, hum_valid, overrun
                                                            +-------------------------------------------+
```

| Module | Role |
|---|---|
| `mains_freq_meter` | Top level. Wires the blocks below and brings out the ADC pins, the relay lines and the results. |
| `mfd_pkg` | Sample, B and result types; the `atten_e` enum; the gain function. |
| `sample_timer` | One-clock tick every CLK_HZ/SAMPLE_HZ clocks (250 000 at 50 MHz). |
| `spi_adc_receiver` | SPI mode 0 master. A 16-bit frame carries four leading zeros, then D11..D0. 825 clocks per frame at SCLK = 1 MHz. |
| `atten_control` | Automatic choice of 1:1, 10:1 or 100:1, and the two relay drive lines. |
| `freq_dev_core` | Per-sample sequencer around the sample RAM, the filter, the B buffer and the calculation. |
| `sample_ram` | 64 x 12 RAM with synchronous read, used as a circular sample buffer. |
| `two_point_filter` | 2Y and 2B from three samples, registered. |
| `b_buffer` | 5-word shift register of 2B values, with a count and a clear input. |
| `deviation_calc` | K and df as one division. Skips small denominators. |
| `seq_divider` | Unsigned restoring divider (helper). |

### Per-sample sequence and timing

Latencies are counted from the clock edge at which the core takes `sample_valid`:

| Clock | Event |
|---|---|
| 0 | The sample is written to RAM; the write pointer advances. The core waits for 3 samples after reset or restart. |
| 1–3 | X_{i-1}, X_i and X_{i+1} are read back. The RAM has synchronous read, so the three reads are pipelined. |
| 4 | `hum_b2`/`b_valid` gives 2B_i. It is pushed into the B buffer. |
| 6 | If the buffer holds 5 values, the calculation starts. |
| 8 | `df_skipped`, when the denominator is too small. |
| 42 | `df_valid` with the new `df_mhz` and `freq_mhz = 50000 + df_mhz`. |

At the top level, `df_valid` comes 43 clocks after the edge that ends the SPI
frame. The first estimate needs 7 samples (35 ms).

The core handles one sample at a time. It has 250 000 clocks per sample and
uses 43 of them. A sample that arrives while it is busy is dropped and sets the
sticky `overrun` flag. This cannot happen at the default rates.

### Input range control

The analog front end has a resistive divider (82 k in series, 100 k to ground).
Two reed relays shunt it with 9.1 k (the "10:1" line) or with 820 Ω (the
"100:1" line). With neither relay closed the input passes 1:1. Then comes an
NE5534 follower with a diode limiter, and an inverting stage that moves the
signal to the middle of the ADC range.

Only the relay lines are in this RTL. The published design says the
attenuation is chosen to keep the signal within range, but not how. This
design chooses it automatically:

- **Overload.** A sample at or below 16, or at or above 4079, raises the
  attenuation one step at once and pulses `overload`. At 100:1 only the pulse
  remains.
- **Underrange.** If the peak-to-peak swing over a window of 64 samples stays
  below 340 codes, the attenuation drops one step. 340 is under a tenth of full
  scale, so after the step the signal is still inside the range.
- **Reset value.** After reset the attenuation is 100:1, the safe setting.
- **Restart.** Every change pulses `range_changed`. The core then discards its
  sample and B history before the next sample, so no estimate mixes two gains.

Only one relay is closed at a time, and an assertion checks this.

## Departures from the published design

- **Dedicated logic instead of the soft CPU.** The program ROM (64 x 12 in the
  block diagram), the control buttons and the LCD driver belong to the CPU and
  are not reproduced. The results come out as ports: `df_mhz`, `freq_mhz`,
  `df_valid`.
- **The 64 x 12 RAM holds the samples, as in the original.** The B values sit in
  a separate 14-bit shift register, because they are a bit wider than 12.
- **Chosen here, because the published design leaves them open:**
  - the 50 MHz clock;
  - the SPI frame format and SCLK rate. The block diagram shows four ADC lines;
    three are used here.
  - the mHz output format;
  - skipping near-zero denominators;
  - the automatic range rule and its thresholds;
  - resetting the history after a range change.
- **No settling delay after a relay switch.** The next sample comes 5 ms later,
  which is longer than reed relays take to settle.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself through a watchdog. Example with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mains_freq_meter \
    -Irtl -y rtl -y tb +libext+.sv rtl/mfd_pkg.sv tb/tb_mains_freq_meter.sv -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_mains_freq_meter` | End to end at the default parameters (50 MHz, 200 Hz, 278 samples, about 46 s of wall time). A behavioural front end divides a tone by the selected ratio; `tb/adc_model.sv` sends it over SPI. The test steps down from 100:1 to 1:1, measures 49.55, 49.85 and 50.12 Hz, then overloads and steps up to 10:1. For every sample it checks the result against a real-valued model (±1 mHz) and the latency (43 or 9 clocks). It also checks the mean against the true deviation (±20 mHz). It counts frames, range steps, overloads, estimates, skips and restarts. |
| `tb_freq_dev_core` | The same per-sample model, at the core level. Covers RAM wrap, restart, low-amplitude skips and overrun. |
| `tb_workload_freq_track` | Long frequency traces at the core level: 75 s wandering around 49.56 Hz, 75 s rising from 49.5 to 49.85 Hz, and 700 s falling slowly to 49.47 Hz then rising to 50.15 Hz (about 170 000 samples, a few seconds of wall time). Tracking error is checked on the mean of each second (±25 mHz); every estimate is also checked against the model. |
| `tb_deviation_calc` | Random and sinusoid-derived B sets, corners (K = 0, K = 1, skip threshold), saturation and latency. |
| `tb_two_point_filter`, `tb_b_buffer`, `tb_sample_ram`, `tb_spi_adc_receiver`, `tb_sample_timer`, `tb_atten_control` | The individual blocks. |

Parameters worth changing:

- `CLK_HZ` and `SAMPLE_HZ` on the top.
- `SCLK_DIV`: the SPI clock is CLK_HZ / (2*SCLK_DIV).
- `MIN_DEN`: the skip threshold.
- `WINDOW`: the underrange window.
- The thresholds of `atten_control`.

The estimator assumes four samples per mains period. If you change
`SAMPLE_HZ`, change `NOMINAL_HZ` with it: SAMPLE_HZ must equal 4 * NOMINAL_HZ,
for example 240 Hz for 60 Hz mains.
