// tb_pulse_shaper: impulse response must be the raised-cosine taps
// 7,24,42,55,55,42,24,7 (input 256 -> output = tap, one strobe late), a step
// must settle to the input (unity DC gain), monotonically, and the filter
// must hold still between strobes.
module tb_pulse_shaper;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stb = 0;
  logic signed [11:0] din = 0, dout;
  int checks = 0, failures = 0;
  pulse_shaper dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic push(input int x);
    @(negedge clk); din = 12'(x); stb = 1;
    @(negedge clk); stb = 0;
    @(negedge clk);
  endtask

  int h [8] = '{7, 24, 42, 55, 55, 42, 24, 7};
  initial begin
    int prev;
    repeat (2) @(negedge clk); rst_n = 1;
    push(256); check(dout == 12'sd7, "tap 0");
    for (int k = 1; k < 8; k++) begin push(0); check(int'(dout) == h[k], $sformatf("tap %0d = %0d", k, dout)); end
    push(0); check(dout == 0, "impulse ends");
    prev = 0;
    for (int k = 0; k < 10; k++) begin
      push(-1000);
      check(int'(dout) <= prev, "step is monotonic");
      prev = int'(dout);
    end
    check(dout == -12'sd1000, $sformatf("step settles to input: %0d", dout));
    repeat (5) @(negedge clk); check(dout == -12'sd1000, "holds between strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
