// tb_atten_control - scripted range-selection scenarios: start at 100:1, step
// down twice on small windows, stay on a window with enough swing, step up on
// clipped samples (both rails), hold at 100:1 while still flagging overload,
// and the relay lines for every setting. Expectations follow from the stated
// rules (window 64, clip at <=16 / >=4079, step down below 340 codes pp).
module tb_atten_control;
  import mfd_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0;
  logic    sample_valid = 1'b0;
  sample_t sample;
  atten_e  range_sel;
  logic    att_10, att_100, range_changed, overload;
  int      checks = 0, failures = 0;
  int      n_up = 0, n_down = 0, n_changed = 0;

  always #5 clk = ~clk;

  atten_control dut (.clk, .rst_n, .sample, .sample_valid, .range_sel, .att_10, .att_100,
                     .range_changed, .overload);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_range(input atten_e r);
    check(range_sel == r, $sformatf("range %s expected %s", range_sel.name(), r.name()));
    check(att_10 == (r == ATT_10_1) && att_100 == (r == ATT_100_1), "relay lines");
  endtask

  // one sample; returns whether range_changed / overload pulsed
  task automatic send(input int code, output bit chg, output bit ovl);
    @(negedge clk);
    sample = sample_t'(code);
    sample_valid = 1'b1;
    @(negedge clk);
    sample_valid = 1'b0;
    chg = range_changed;
    ovl = overload;
    if (chg) n_changed++;
    @(negedge clk);
    check(!range_changed && !overload, "pulses last one clock");
  endtask

  // a window of a square-ish wave with the given peak-to-peak swing
  task automatic window(input int pp, input int n, output int changes);
    bit chg, ovl;
    changes = 0;
    for (int k = 0; k < n; k++) begin
      send(2048 + ((k % 2) ? pp / 2 : -(pp - pp / 2)), chg, ovl);
      check(!ovl, "no overload inside the range");
      if (chg) begin
        changes++;
        check(k == n - 1, $sformatf("change only on the last sample of the window (k=%0d)", k));
      end
    end
  endtask

  initial begin
    int ch;
    bit chg, ovl;
    sample = 12'd2048;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_range(ATT_100_1);

    window(100, 64, ch);                 // small: 100:1 -> 10:1
    check(ch == 1, "step down after one window"); n_down += ch;
    expect_range(ATT_10_1);
    window(339, 64, ch);                 // still below 340: 10:1 -> 1:1
    check(ch == 1, "second step down"); n_down += ch;
    expect_range(ATT_1_1);
    window(100, 64, ch);                 // at 1:1 there is no lower setting
    check(ch == 0, "no step below 1:1");
    expect_range(ATT_1_1);

    // clip high in the middle of a window: 1:1 -> 10:1 at once
    window(2000, 30, ch);
    send(4079, chg, ovl);
    check(chg && ovl, "overload at the top rail steps up"); n_up += chg;
    expect_range(ATT_10_1);
    // the window restarted: 63 small samples do not step down, the 64th does not either
    // because the swing is large enough
    window(340, 64, ch);
    check(ch == 0, "swing of 340 keeps the range");
    expect_range(ATT_10_1);
    send(16, chg, ovl);                  // bottom rail
    check(chg && ovl, "overload at the bottom rail steps up"); n_up += chg;
    expect_range(ATT_100_1);
    send(0, chg, ovl);
    check(!chg && ovl, "at 100:1 overload is flagged without a change");
    expect_range(ATT_100_1);
    send(17, chg, ovl);
    check(!chg && !ovl, "17 is inside the range");
    send(4078, chg, ovl);
    check(!chg && !ovl, "4078 is inside the range");
    // the window restarted at the last change and now holds 0, 17 and 4078:
    // 61 more samples complete it without a step down, the next window steps
    window(100, 61, ch);
    check(ch == 0, "wide swing in the window blocks the step down");
    expect_range(ATT_100_1);
    window(100, 64, ch);
    check(ch == 1, "step down after a quiet window"); n_down += ch;
    expect_range(ATT_10_1);

    check(n_up == 2 && n_down == 3 && n_changed == 5, $sformatf("up %0d down %0d", n_up, n_down));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
