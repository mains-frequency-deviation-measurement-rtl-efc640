// tb_deviation_calc - checks delta_f = -K*200/(2*pi) with
// K = (B_i - B_{i-4}) / (2*(B_{i-1} - B_{i-3})) against a real-valued reference
// (to +-1 mHz), for random B values and for B taken from sinusoids of known
// frequency (to +-30 mHz of the true deviation within +-1 Hz of 50 Hz). Also
// checks the skip below MIN_DEN, saturation, and the 35-clock / 1-clock latency.
module tb_deviation_calc;
  import mfd_pkg::*;
  logic  clk = 1'b0, rst_n = 1'b0;
  logic  start = 1'b0, busy, done, skipped;
  bval_t bi, bi1, bi3, bi4;
  df_t   df;
  int    checks = 0, failures = 0;
  int    n_skip = 0, n_sat = 0, n_tone = 0;

  localparam real PI_R  = 3.14159265358979323846;
  localparam real GAINR = 200000.0 / (2.0 * PI_R);   // mHz per unit K

  always #5 clk = ~clk;

  deviation_calc dut (.clk, .rst_n, .start, .b_i(bi), .b_i1(bi1), .b_i3(bi3), .b_i4(bi4),
                      .busy, .done, .skipped, .df_mhz(df));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // returns the DUT result; checks it against the reference
  task automatic run(input int v0, input int v1, input int v3, input int v4, output int got);
    int  cyc, num, den;
    real expect_r;
    df_t prev_df;
    prev_df = df;
    @(negedge clk);
    bi = bval_t'(v0); bi1 = bval_t'(v1); bi3 = bval_t'(v3); bi4 = bval_t'(v4);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;   // clocks counted from the edge that took start
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    num = v0 - v4;
    den = 2 * (v1 - v3);
    got = int'(df);
    if ((den < 0 ? -den : den) < 256) begin
      n_skip++;
      check(skipped, $sformatf("den %0d must be skipped", den));
      check(cyc == 1, $sformatf("skip latency %0d", cyc));
      check(df == prev_df, "output holds on a skip");
    end else begin
      expect_r = -real'(num) * GAINR / real'(den);
      check(!skipped, "not skipped");
      check(cyc == 35, $sformatf("latency %0d clocks", cyc));
      if (expect_r > 524287.0 || expect_r < -524287.0) begin
        n_sat++;
        check(got == (expect_r > 0 ? 524287 : -524287), $sformatf("saturation: got %0d", got));
      end else begin
        check(got - expect_r <= 1.0 && expect_r - got <= 1.0,
              $sformatf("num %0d den %0d: got %0d expected %f", num, den, got, expect_r));
      end
    end
  endtask

  initial begin
    int got;
    bi = '0; bi1 = '0; bi3 = '0; bi4 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // corners
    run(8191, 0, 0, -8192, got);        // den 0: skip
    run(8191, 128, 0, -8192, got);      // |den| = 256: saturates
    run(-8192, 127, 0, 8191, got);      // |den| = 254: skip
    run(100, 4000, -4000, 100, got);    // K = 0: exactly 50 Hz
    check(got == 0, "K = 0 gives zero deviation");
    run(8000, 4000, -4000, -8000, got); // K = 1: -31831 mHz
    check(got == -31831, $sformatf("K = 1 gives %0d", got));
    // random operands
    for (int k = 0; k < 400; k++)
      run($urandom_range(0, 16383) - 8192, $urandom_range(0, 16383) - 8192,
          $urandom_range(0, 16383) - 8192, $urandom_range(0, 16383) - 8192, got);
    // sinusoids near 50 Hz sampled at 200 Hz
    for (int k = 0; k < 300; k++) begin
      real f, ph, w, dfe;
      int  b [5];
      f  = 49.0 + 2.0 * real'($urandom_range(0, 10000)) / 10000.0;
      ph = 2.0 * PI_R * real'($urandom_range(0, 9999)) / 10000.0;
      w  = 2.0 * PI_R * f / 200.0;
      for (int j = 0; j < 5; j++) b[j] = int'($floor(6000.0 * $cos(ph - w * j) + 0.5));
      run(b[0], b[1], b[3], b[4], got);
      if (!skipped && (b[1] - b[3] > 2000 || b[3] - b[1] > 2000)) begin
        dfe = (f - 50.0) * 1000.0;
        n_tone++;
        check(got - dfe <= 30.0 && dfe - got <= 30.0,
              $sformatf("f=%f Hz: measured %0d mHz, true %f", f, got, dfe));
      end
    end
    check(n_skip > 0 && n_sat > 0 && n_tone > 50, "skip, saturation and tone cases all seen");
    $display("skips=%0d saturations=%0d tone checks=%0d", n_skip, n_sat, n_tone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
