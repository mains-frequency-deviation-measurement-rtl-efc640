// tb_two_point_filter - drives random and corner sample triples and compares 2*Y
// and 2*B with the integer values of Y = (X_{i-1}+X_{i+1})/2 and B = X_i - Y;
// checks the one-clock latency and that a 50 Hz tone sampled at 200 Hz keeps its
// amplitude in B while the DC offset is removed.
module tb_two_point_filter;
  import mfd_pkg::*;
  logic    clk = 1'b0, rst_n = 1'b0;
  logic    in_valid = 1'b0, out_valid;
  sample_t xp, xc, xn;
  logic [12:0] y2;
  bval_t   b2;
  int      checks = 0, failures = 0;

  always #5 clk = ~clk;

  two_point_filter dut (.clk, .rst_n, .in_valid, .x_prev(xp), .x_cur(xc), .x_next(xn),
                        .out_valid, .y2, .b2);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input int p, input int c, input int n);
    int ey2, eb2;
    @(negedge clk);
    xp = sample_t'(p); xc = sample_t'(c); xn = sample_t'(n); in_valid = 1'b1;
    ey2 = p + n;
    eb2 = 2 * c - p - n;
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid, "out_valid one clock after in_valid");
    check(int'(y2) == ey2, $sformatf("y2 %0d expected %0d", y2, ey2));
    check(int'(b2) == eb2, $sformatf("b2 %0d expected %0d", b2, eb2));
    @(negedge clk);
    check(!out_valid, "out_valid lasts one clock");
  endtask

  initial begin
    xp = 0; xc = 0; xn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(0, 4095, 0);
    apply(4095, 0, 4095);
    apply(4095, 4095, 4095);
    apply(0, 0, 0);
    apply(1, 2, 2);
    for (int k = 0; k < 300; k++)
      apply($urandom_range(0, 4095), $urandom_range(0, 4095), $urandom_range(0, 4095));
    // 50 Hz at 200 Hz: samples 2048 + A*{1,0,-1,0}; B keeps A, Y is the DC level
    begin
      int s [4] = '{2048 + 1000, 2048, 2048 - 1000, 2048};
      for (int i = 1; i < 3; i++) begin
        apply(s[i-1], s[i], s[i+1]);
        check(int'(y2) == 2 * 2048 + ((i == 1) ? 0 : 0), "Y at 50 Hz is the DC level");
        check(int'(b2) == 2 * (s[i] - 2048), "B at 50 Hz is the tone itself");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
