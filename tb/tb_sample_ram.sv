// tb_sample_ram - random writes and reads against a reference array; checks the
// one-clock read latency and that a read of the address being written returns
// the old word.
module tb_sample_ram;
  logic        clk = 1'b0;
  logic        we;
  logic [5:0]  waddr, raddr;
  logic [11:0] wdata, rdata;
  logic [11:0] ref_mem [64];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  sample_ram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill every word
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = 12'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [11:0] expect_rd;
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 6'($urandom);
      wdata = 12'($urandom);
      raddr = (n % 7 == 0) ? waddr : 6'($urandom);
      expect_rd = ref_mem[raddr];      // old contents, even if written now
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expect_rd) begin
        failures++;
        $display("FAIL: addr %0d read %h expected %h", raddr, rdata, expect_rd);
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
