// tb_workload_freq_track - long mains-frequency traces through the measurement
// core, one sample every 52 clocks instead of every 5 ms (the core's result does
// not depend on the gap once it exceeds its 43-clock processing time).
//
// Three traces, 200 samples per simulated second:
//   wander : 75 s wandering by about +-15 mHz around 49.56 Hz
//   rise   : 75 s, 49.50 Hz for 40 s, then a rise to 49.85 Hz over 35 s
//   long   : 700 s, a slow fall from 49.60 to 49.47 Hz over 600 s, then a rise
//            to 50.15 Hz over the last 100 s
// The tone has an amplitude of 1000 codes around mid-scale plus +-1 code of noise.
// Every estimate is checked against a real-valued model of the estimator
// (+-1 mHz), and the mean estimate over each second against the mean true
// deviation of that second (+-25 mHz; single estimates with a small
// denominator carry most of the noise).
module tb_workload_freq_track;
  import mfd_pkg::*;
  logic                 clk = 1'b0, rst_n = 1'b0;
  logic                 sample_valid = 1'b0;
  sample_t              sample;
  bval_t                b2;
  logic                 b_valid, df_valid, df_skipped, overrun;
  df_t                  df;
  logic signed [DF_W:0] freq;
  int                   checks = 0, failures = 0;
  real                  phase = 0.0;
  real                  xs [7];       // newest sample in xs[6]
  int                   nx = 0;
  longint               n_est = 0;

  localparam real PI_R = 3.14159265358979323846;

  always #5 clk = ~clk;

  freq_dev_core dut (.clk, .rst_n, .restart(1'b0), .sample, .sample_valid, .b2, .b_valid,
                     .df_mhz(df), .freq_mhz(freq), .df_valid, .df_skipped, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real bval(input int k);
    return xs[k] - (xs[k-1] + xs[k+1]) / 2.0;
  endfunction

  // one sample at frequency f; returns the estimate (mHz) or 1e9
  task automatic step(input real f, output real est);
    int  code, ev_df, ev_sk;
    real num, den, exp_df;
    code = int'($floor(2048.0 + 1000.0 * $cos(phase) + 0.5)) + $urandom_range(0, 2) - 1;
    phase += 2.0 * PI_R * f / 200.0;
    if (phase > 2.0 * PI_R) phase -= 2.0 * PI_R;
    @(negedge clk);
    sample = sample_t'(code);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    for (int k = 0; k < 6; k++) xs[k] = xs[k+1];
    xs[6] = real'(code);
    if (nx < 7) nx++;
    ev_df = 0; ev_sk = 0;
    repeat (50) begin
      @(negedge clk);
      if (df_valid) ev_df++;
      if (df_skipped) ev_sk++;
    end
    est = 1e9;
    if (nx == 7) begin
      num = bval(5) - bval(1);
      den = 2.0 * (bval(4) - bval(2));
      if (2.0 * (den < 0 ? -den : den) < 256.0) begin
        check(ev_sk == 1 && ev_df == 0, "skip expected");
      end else begin
        exp_df = -num / den * 200000.0 / (2.0 * PI_R);
        check(ev_df == 1 && ev_sk == 0, "estimate expected");
        check(real'(df) - exp_df <= 1.0 && exp_df - real'(df) <= 1.0,
              $sformatf("df %0d expected %f", df, exp_df));
        est = real'(df);
        n_est++;
      end
    end
  endtask

  // run a trace given as a function of time; checks 1 s means
  task automatic trace(input string name, input int kind, input int seconds);
    real f, est, sum_est, sum_true, worst, wander;
    int  used;
    worst = 0.0; wander = 0.0;
    for (int s = 0; s < seconds; s++) begin
      sum_est = 0.0; sum_true = 0.0; used = 0;
      for (int k = 0; k < 200; k++) begin
        real t;
        t = real'(s) + real'(k) / 200.0;
        case (kind)
          0: begin
               wander = 0.995 * wander + 0.0015 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
               f = 49.56 + wander;
             end
          1: f = (t < 40.0) ? 49.50 : 49.50 + 0.35 * (t - 40.0) / 35.0;
          default: f = (t < 600.0) ? 49.60 - 0.13 * t / 600.0 : 49.47 + 0.68 * (t - 600.0) / 100.0;
        endcase
        step(f, est);
        if (est < 1e8) begin
          sum_est  += est;
          sum_true += (f - 50.0) * 1000.0;
          used++;
        end
      end
      if (s > 0) begin
        real e;
        check(used > 100, $sformatf("%s: only %0d estimates in second %0d", name, used, s));
        e = sum_est / used - sum_true / used;
        if (e < 0) e = -e;
        if (e > worst) worst = e;
        check(e <= 25.0, $sformatf("%s: second %0d mean error %f mHz", name, s, e));
      end
    end
    $display("%s: %0d s, worst 1 s mean error %f mHz", name, seconds, worst);
  endtask

  initial begin
    sample = '0;
    foreach (xs[k]) xs[k] = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    trace("wander", 0, 75);
    trace("rise", 1, 75);
    trace("long", 2, 700);
    check(!overrun, "no overrun");
    check(n_est > 100000, $sformatf("%0d estimates", n_est));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
