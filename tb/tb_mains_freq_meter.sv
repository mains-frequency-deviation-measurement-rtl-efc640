// tb_mains_freq_meter - end-to-end test of the meter at its default parameters
// (50 MHz clock, 200 Hz sampling, 1 MHz SCLK).
//
// A behavioural front end turns a mains tone of chosen frequency and amplitude
// into ADC codes: the amplitude is divided by the ratio the relay lines select
// (1, 10 or 100), centred at mid-scale and clipped to 0..4095; the ADC model
// returns the code over SPI. For every sample the test checks, against a
// real-valued model of the two-point filter and of K and delta_f, that the meter
// gives exactly one estimate or one skip once 7 samples are in since the last
// range change (none before), that the estimate matches to +-1 mHz, and the
// latency (43 clocks after the frame for an estimate, 9 for a skip) and the
// 200 Hz sample rate (250000 clocks from frame to frame). The mean
// estimate is compared with the true deviation at full amplitude.
//
// Scenario (frequencies are levels seen in the measured traces of the source
// design): start at 100:1 with a weak signal -> two automatic steps down to 1:1;
// 49.55 Hz, 49.85 Hz and 50.12 Hz; then a signal too large for 1:1 -> overload
// and a step up to 10:1, after which the measurement restarts. Counts SPI frames,
// range steps down and up, overloads, estimates, skips, restarts and RAM wraps,
// and fails if any of them never happened.
module tb_mains_freq_meter;
  import mfd_pkg::*;
  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 cs_n, sclk, sdata;
  logic                 att_10, att_100, overload, df_valid, df_skipped, hum_valid, overrun;
  atten_e               atten_range;
  df_t                  df;
  logic signed [DF_W:0] freq;
  bval_t                hum_b2;
  logic [11:0]          value;
  int                   conversions, sclk_rises;
  int                   checks = 0, failures = 0;

  localparam real PI_R = 3.14159265358979323846;

  always #10 clk = ~clk;   // 50 MHz

  mains_freq_meter dut (
    .clk, .rst_n,
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdata(sdata),
    .att_10, .att_100, .atten_range, .overload,
    .df_mhz(df), .freq_mhz(freq), .df_valid, .df_skipped,
    .hum_b2, .hum_valid, .overrun
  );

  adc_model adc (.cs_n, .sclk, .sdata, .value, .conversions, .sclk_rises);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- event capture with latency from the end of the SPI frame ----
  longint cyc = 0, t_frame_end = 0;
  int     n_est = 0, n_skip = 0, n_ovl = 0, n_up = 0, n_down = 0, n_restart = 0;
  int     last_lat = -1;
  int     n_period = 0, n_bad_period = 0;
  logic   cs_q = 1'b1;
  atten_e range_q = ATT_100_1;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n) begin
    if (cs_n && !cs_q) begin               // cyc counts the edge that raised cs_n
      if (t_frame_end != 0) begin
        n_period++;
        if (cyc - t_frame_end != 250_000) begin
          n_bad_period++;
          $display("FAIL: sample period %0d clocks", cyc - t_frame_end);
        end
      end
      t_frame_end = cyc;
    end
    cs_q = cs_n;
    if (df_valid)   begin n_est++;  last_lat = int'(cyc - t_frame_end); end
    if (df_skipped) begin n_skip++; last_lat = int'(cyc - t_frame_end); end
    if (overload)   n_ovl++;
  end

  // ---- front end model and per-sample checks ----
  real phase = 0.0;
  real xs [$];

  function automatic real bval(input int k);
    return xs[k] - (xs[k-1] + xs[k+1]) / 2.0;
  endfunction

  function automatic real ratio(input logic a10, input logic a100);
    return a100 ? 100.0 : (a10 ? 10.0 : 1.0);
  endfunction

  task automatic run(input real f, input real amp, input int count, input int settle,
                     output real mean, output int used);
    real sum;
    sum = 0.0; used = 0;
    for (int k = 0; k < count; k++) begin
      int  code, ev0, ev1, n;
      real x, num, den, exp_df;
      logic a10, a100;
      a10 = att_10; a100 = att_100;
      x = 2048.0 + amp / ratio(a10, a100) * $cos(phase);
      code = int'($floor(x + 0.5));
      if (code < 0) code = 0;
      if (code > 4095) code = 4095;
      value = 12'(code);
      phase += 2.0 * PI_R * f / 200.0;
      ev0 = n_est + n_skip;
      @(posedge cs_n);                       // end of this sample's frame
      xs.push_back(real'(code));
      repeat (200) @(negedge clk);
      ev1 = n_est + n_skip;
      n = xs.size();
      if (n < 7) begin
        check(ev1 == ev0, "no estimate before the seventh sample of a range");
      end else begin
        num = bval(n - 2) - bval(n - 6);
        den = 2.0 * (bval(n - 3) - bval(n - 5));
        check(ev1 == ev0 + 1, $sformatf("one result per sample (%0d)", ev1 - ev0));
        if (2.0 * (den < 0 ? -den : den) < 256.0) begin
          check(last_lat == 9, $sformatf("skip latency %0d", last_lat));
        end else begin
          exp_df = -num / den * 200000.0 / (2.0 * PI_R);
          check(last_lat == 43, $sformatf("estimate latency %0d", last_lat));
          check(real'(df) - exp_df <= 1.0 && exp_df - real'(df) <= 1.0,
                $sformatf("df %0d expected %f", df, exp_df));
          check(int'(freq) == 50000 + int'(df), "freq = 50 Hz + df");
          if (k >= settle) begin sum += real'(df); used++; end
        end
      end
      // a range change empties the history in the meter and here
      if (atten_range != range_q) begin
        if (atten_range > range_q) n_up++; else n_down++;
        n_restart++;
        range_q = atten_range;
        xs.delete();
      end
    end
    mean = (used > 0) ? sum / used : 0.0;
  endtask

  task automatic expect_mean(input real mean, input int used, input real f);
    check(used >= 10, $sformatf("%0d estimates at %f Hz", used, f));
    check(mean - (f - 50.0) * 1000.0 <= 20.0 && (f - 50.0) * 1000.0 - mean <= 20.0,
          $sformatf("mean %f mHz at %f Hz", mean, f));
  endtask

  initial begin
    real mean;
    int  used;
    value = 12'd2048;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(atten_range == ATT_100_1 && att_100 && !att_10, "100:1 after reset");

    run(49.55, 1500.0, 128, 1000, mean, used);         // two windows of 64: 100:1 -> 10:1 -> 1:1
    check(atten_range == ATT_1_1 && !att_10 && !att_100, "stepped down to 1:1");
    run(49.55, 1500.0, 30, 8, mean, used);
    expect_mean(mean, used, 49.55);
    run(49.85, 1500.0, 40, 8, mean, used);
    expect_mean(mean, used, 49.85);
    run(50.12, 1500.0, 40, 8, mean, used);
    expect_mean(mean, used, 50.12);
    run(50.12, 2500.0, 40, 8, mean, used);             // too large for 1:1
    check(atten_range == ATT_10_1 && att_10 && !att_100, "stepped up to 10:1");
    check(used >= 10, "measurement resumed after the step up");

    check(conversions == 278, $sformatf("%0d SPI frames", conversions));
    check(conversions > 64, "the 64-word sample RAM wrapped");
    check(n_down == 2, $sformatf("%0d steps down", n_down));
    check(n_up == 1, $sformatf("%0d steps up", n_up));
    check(n_period == 277 && n_bad_period == 0, "200 Hz sampling: 250000 clocks between frames");
    check(n_ovl > 0, "overload seen");
    check(n_restart == 3, "restarts after every range change");
    check(n_est > 100, $sformatf("%0d estimates", n_est));
    check(n_skip > 0, $sformatf("%0d skips", n_skip));
    check(!overrun, "no overrun at 200 Hz");
    $display("frames=%0d estimates=%0d skips=%0d overloads=%0d up=%0d down=%0d restarts=%0d",
             conversions, n_est, n_skip, n_ovl, n_up, n_down, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (75_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
