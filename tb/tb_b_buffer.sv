// tb_b_buffer - pushes random B values and compares the history, count and full
// flag with a reference list; checks clear and that clear wins over push.
module tb_b_buffer;
  import mfd_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       clear = 1'b0, push = 1'b0;
  bval_t      b_in;
  bval_t      b_hist [5];
  logic [2:0] count;
  logic       full;
  int         ref_q [$];
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  b_buffer dut (.clk, .rst_n, .clear, .push, .b_in, .b_hist, .count, .full);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    b_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      int v, r;
      @(negedge clk);
      r = $urandom_range(0, 19);
      v = $urandom_range(0, 16383) - 8192;
      clear = (r == 0);
      push  = (r >= 5) || (r == 0 && n % 2 == 0);
      b_in  = bval_t'(v);
      @(posedge clk);
      if (clear) ref_q.delete();
      else if (push) begin
        ref_q.push_front(v);
        if (ref_q.size() > 5) void'(ref_q.pop_back());
      end
      #1;
      check(int'(count) == ref_q.size(), $sformatf("count %0d expected %0d", count, ref_q.size()));
      check(full == (ref_q.size() == 5), "full flag");
      for (int k = 0; k < ref_q.size(); k++)
        check(int'(b_hist[k]) == ref_q[k], $sformatf("b_hist[%0d] %0d expected %0d", k, b_hist[k], ref_q[k]));
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
