// tb_hilbert_ssb: the Q output for an impulse must be the Hilbert taps
// (odd n: +-c, even n: 0) around a 15-sample delay, I the delayed impulse;
// with ssb off Q stays zero. A cosine at fs/8 must come out on Q as a sine:
// Q(t) correlates with the delayed sin and not with cos, with nearly equal
// power.
module tb_hilbert_ssb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stb = 0, ssb = 1;
  logic signed [11:0] din = 0, i_out, q_out;
  int checks = 0, failures = 0;
  hilbert_ssb dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic push(input int x);
    @(negedge clk); din = 12'(x); stb = 1;
    @(negedge clk); stb = 0;
  endtask

  int c [8] = '{2585, 802, 415, 235, 130, 67, 32, 15};
  initial begin
    real ss, sc, pq, pi_;
    repeat (2) @(negedge clk); rst_n = 1;
    // impulse of 1024: output k strobes later is h[k-15] * 1024 / 4096
    push(1024);
    for (int k = 1; k <= 33; k++) begin
      int n, want;
      n = k - 17;           // tap index of the impulse seen by this output
      want = 0;
      if (n % 2 != 0)
        want = int'($floor((real'((n > 0 ? 1 : -1) * c[((n > 0 ? n : -n) - 1) / 2] * 1024) + 2048.0) / 4096.0));
      check(int'(q_out) == want, $sformatf("Q tap n=%0d: %0d want %0d", n, q_out, want));
      check(int'(i_out) == ((n == 0) ? 1024 : 0), $sformatf("I delay n=%0d", n));
      push(0);
    end
    // tone at fs/8
    ss = 0; sc = 0; pq = 0; pi_ = 0;
    for (int k = 0; k < 200; k++) begin
      push(int'(1000.0 * $cos(3.14159265 * k / 4.0)));
      if (k >= 50) begin
        real ph;
        ph = 3.14159265 * (k - 16) / 4.0;  // phase of the input now on the outputs
        ss  += real'(q_out) * $sin(ph);
        sc  += real'(q_out) * $cos(ph);
        pq  += real'(q_out) * real'(q_out);
        pi_ += real'(i_out) * real'(i_out);
      end
    end
    check(ss > 0.45 * 150 * 1000 && (sc < 0.05 * 150 * 1000 && sc > -0.05 * 150 * 1000),
          $sformatf("Q is the sine: %f %f", ss, sc));
    check(pq > 0.8 * pi_ && pq < 1.2 * pi_, "Q power equals I power");
    ssb = 0;
    for (int k = 0; k < 20; k++) begin push(500); check(q_out == 0, "Q off without SSB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
