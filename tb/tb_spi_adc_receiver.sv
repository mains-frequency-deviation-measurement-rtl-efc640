// tb_spi_adc_receiver - reads random conversions through the ADC model and checks
// the received value, the 16 SCLK pulses per frame, the frame length of
// (2*16+1)*SCLK_DIV clocks and that a start during a frame is ignored.
module tb_spi_adc_receiver;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0, busy;
  logic        cs_n, sclk, sdata;
  logic [11:0] sample, value;
  logic        sample_valid;
  int          conversions, sclk_rises;
  int          checks = 0, failures = 0;

  always #10 clk = ~clk;

  spi_adc_receiver dut (
    .clk, .rst_n, .start, .busy,
    .adc_cs_n(cs_n), .adc_sclk(sclk), .adc_sdata(sdata),
    .sample, .sample_valid
  );

  adc_model adc (.cs_n, .sclk, .sdata, .value, .conversions, .sclk_rises);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    value = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(cs_n && !sclk, "idle bus after reset");
    for (int n = 0; n < 40; n++) begin
      int cyc;
      logic [11:0] v;
      v = (n == 0) ? 12'hFFF : (n == 1) ? 12'h000 : (n == 2) ? 12'hA5A : 12'($urandom);
      @(negedge clk);
      value = v;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 0;   // clocks counted from the edge that took start
      while (!sample_valid) begin
        if (n == 5 && cyc == 99) begin start = 1'b1; @(negedge clk); start = 1'b0; cyc++; end
        @(negedge clk);
        cyc++;
      end
      check(cyc == 33 * 25, $sformatf("frame length %0d clocks", cyc));
      check(sample == v, $sformatf("sample %h expected %h", sample, v));
      check(sclk_rises == 16, $sformatf("%0d SCLK pulses", sclk_rises));
      check(cs_n, "chip select released with the result");
      @(negedge clk);
      check(!sample_valid && !busy, "one-clock valid, back to idle");
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    check(conversions == 40, $sformatf("%0d frames for 40 starts", conversions));
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
