// tb_fir_filter: the impulse response must be the binomial taps
// 1,6,15,20,15,6,1 (input 640 -> output 10x tap), DC gain one, and random
// input must match a reference convolution with rounding.
module tb_fir_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stb = 0;
  logic signed [11:0] din = 0, dout;
  int checks = 0, failures = 0;
  fir_filter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic push(input int x);
    @(negedge clk); din = 12'(x); stb = 1;
    @(negedge clk); stb = 0;
  endtask

  int h [7] = '{1, 6, 15, 20, 15, 6, 1};
  int hist [7];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    push(640);
    check(dout == 10, "tap 0");
    for (int k = 1; k < 7; k++) begin push(0); check(int'(dout) == 10 * h[k], $sformatf("tap %0d", k)); end
    for (int k = 0; k < 7; k++) push(-777);
    check(dout == -777, "DC gain");
    for (int k = 0; k < 7; k++) hist[k] = -777;
    for (int t = 0; t < 200; t++) begin
      int x, acc;
      x = int'($urandom_range(4000)) - 2000;
      acc = 0;
      for (int k = 6; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      for (int k = 0; k < 7; k++) acc += h[k] * hist[k];
      push(x);
      check(int'(dout) == ((acc + 32) >>> 6), $sformatf("random sample %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
