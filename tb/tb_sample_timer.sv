// tb_sample_timer - checks the tick period and pulse width of sample_timer, once
// with a small divider (10 clocks) and once at the defaults (50 MHz / 200 Hz =
// 250000 clocks per tick).
module tb_sample_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tick_s, tick_d;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_timer #(.CLK_HZ(2000), .SAMPLE_HZ(200)) dut_s (.clk, .rst_n, .tick(tick_s));
  sample_timer                                    dut_d (.clk, .rst_n, .tick(tick_d));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // cycle counters since reset release
  longint cyc = 0;
  longint last_s = 0, last_d = 0;
  int     n_s = 0, n_d = 0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (tick_s) begin
      check(cyc - last_s == 10, $sformatf("small divider period %0d", cyc - last_s));
      last_s = cyc; n_s++;
    end
    if (tick_d) begin
      check(cyc - last_d == 250000, $sformatf("default period %0d", cyc - last_d));
      last_d = cyc; n_d++;
    end
  end

  // single-cycle pulses
  always @(negedge clk) if (rst_n && tick_s) begin
    @(negedge clk);
    check(!tick_s, "tick lasts one clock");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_d == 3);
    repeat (2) @(posedge clk);
    check(n_s >= 3 * 25000 - 1, "small divider ticked throughout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
