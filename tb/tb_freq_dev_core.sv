// tb_freq_dev_core - feeds sampled sinusoids into the measurement core and checks,
// for every sample, the mains component B, the deviation estimate or its skip,
// and their latencies (4, 42 and 8 clocks), all against a real-valued model of
//   Y_i = (X_{i-1}+X_{i+1})/2, B_i = X_i - Y_i,
//   K = (B_i - B_{i-4}) / (2(B_{i-1} - B_{i-3})), delta_f = -K*200/(2*pi).
// Covers the warm-up of 7 samples, more than 64 samples (the sample RAM wraps),
// a restart, skipped estimates at low amplitude, the mean estimate against the
// true frequency, and the overrun flag.
module tb_freq_dev_core;
  import mfd_pkg::*;
  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 restart = 1'b0, sample_valid = 1'b0;
  sample_t              sample;
  bval_t                b2;
  logic                 b_valid, df_valid, df_skipped, overrun;
  df_t                  df;
  logic signed [DF_W:0] freq;
  int                   checks = 0, failures = 0;
  int                   n_df = 0, n_skip = 0, n_restart = 0;
  real                  xs [$];       // samples since the last restart
  real                  phase = 0.0;

  localparam real PI_R = 3.14159265358979323846;

  always #5 clk = ~clk;

  freq_dev_core dut (.clk, .rst_n, .restart, .sample, .sample_valid, .b2, .b_valid,
                     .df_mhz(df), .freq_mhz(freq), .df_valid, .df_skipped, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real bval(input int k);   // B at index k of xs (needs k-1, k+1)
    return xs[k] - (xs[k-1] + xs[k+1]) / 2.0;
  endfunction

  // send one sample and check everything it causes; returns the estimate or
  // 1e9 when none was produced
  task automatic send(input int code, output real est);
    int  t_b, t_df, t_sk, n;
    int  got_b2;
    real exp_b, exp_df, num, den;
    @(negedge clk);
    sample = sample_t'(code);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    xs.push_back(real'(code));
    t_b = -1; t_df = -1; t_sk = -1; got_b2 = 0;
    for (int c = 0; c < 50; c++) begin   // c = clocks after the edge that took the sample
      if (b_valid)    begin t_b = c; got_b2 = int'(b2); end
      if (df_valid)   t_df = c;
      if (df_skipped) t_sk = c;
      if (c < 49) @(negedge clk);
    end
    n = xs.size();
    est = 1e9;
    if (n < 3) begin
      check(t_b < 0 && t_df < 0 && t_sk < 0, "nothing before the third sample");
    end else begin
      exp_b = bval(n - 2);
      check(t_b == 4, $sformatf("b_valid latency %0d", t_b));
      check(real'(got_b2) == 2.0 * exp_b, $sformatf("2B %0d expected %f", got_b2, 2.0 * exp_b));
      if (n < 7) begin
        check(t_df < 0 && t_sk < 0, "no estimate before the seventh sample");
      end else begin
        num = bval(n - 2) - bval(n - 6);
        den = 2.0 * (bval(n - 3) - bval(n - 5));
        if (2.0 * (den < 0 ? -den : den) < 256.0) begin     // in half-LSB units
          n_skip++;
          check(t_sk == 8 && t_df < 0, $sformatf("skip expected at 8, got skip %0d df %0d", t_sk, t_df));
        end else begin
          exp_df = -num / den * 200000.0 / (2.0 * PI_R);
          n_df++;
          check(t_df == 42 && t_sk < 0, $sformatf("df_valid latency %0d", t_df));
          check(real'(df) - exp_df <= 1.0 && exp_df - real'(df) <= 1.0,
                $sformatf("df %0d expected %f", df, exp_df));
          check(int'(freq) == 50000 + int'(df), "freq = 50 Hz + df");
          est = real'(df);
        end
      end
    end
  endtask

  task automatic tone(input real f, input real amp, input int count, output real mean, output int used);
    real est, sum;
    sum = 0.0; used = 0;
    for (int k = 0; k < count; k++) begin
      send(int'($floor(2048.0 + amp * $cos(phase) + 0.5)), est);
      phase += 2.0 * PI_R * f / 200.0;
      if (est < 1e8) begin sum += est; used++; end
    end
    mean = (used > 0) ? sum / used : 0.0;
  endtask

  initial begin
    real mean;
    int  used;
    sample = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(!overrun, "no overrun after reset");

    tone(49.7, 1500.0, 90, mean, used);            // wraps the 64-word RAM
    check(used > 60, $sformatf("%0d estimates at 49.7 Hz", used));
    check(mean + 300.0 <= 15.0 && -300.0 - mean <= 15.0, $sformatf("mean %f mHz, true -300", mean));

    @(negedge clk); restart = 1'b1; @(negedge clk); restart = 1'b0;
    n_restart++;
    xs.delete();
    tone(50.25, 1800.0, 40, mean, used);
    check(mean - 250.0 <= 15.0 && 250.0 - mean <= 15.0, $sformatf("mean %f mHz, true +250", mean));

    tone(50.05, 30.0, 60, mean, used);              // small signal: many skips
    check(n_skip > 0, "estimates skipped at low amplitude");

    // a sample while the core is busy is dropped and flagged
    @(negedge clk); sample = 12'd100; sample_valid = 1'b1;
    @(negedge clk); sample_valid = 1'b0;
    repeat (5) @(negedge clk);
    sample_valid = 1'b1;
    @(negedge clk); sample_valid = 1'b0;
    repeat (60) @(negedge clk);
    check(overrun, "overrun flagged");

    $display("estimates=%0d skips=%0d restarts=%0d", n_df, n_skip, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
