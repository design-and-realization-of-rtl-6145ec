// tb_demodulator: a two-level backscatter square wave (16 samples per
// period) on top of a large carrier DC offset, placed at several I/Q phases.
// After settling the block must pick I or Q (ASK) or the I+Q / I-Q
// diagonal (PSK) as the strongest projection and its sliced output must
// follow the wave (inverted when the projection is negative). With lock high
// the choice must not change when the phase moves.
module tb_demodulator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stb = 0, psk = 0, lock = 0, bit_out;
  logic signed [11:0] i_in = 0, q_in = 0;
  logic [1:0] sel;
  int checks = 0, failures = 0;
  demodulator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // returns the fraction of samples whose slice equals the wave XOR flip
  task automatic drive(input real ph, input int n, input bit flip, output real agree);
    int good = 0;
    bit lvl, prev_lvl;
    prev_lvl = 0;
    for (int t = 0; t < n; t++) begin
      lvl = (t % 16) < 8;
      @(negedge clk);
      i_in = 12'(700 + int'(400.0 * $cos(ph) * (lvl ? 1.0 : -1.0) * 0.5) + int'($urandom_range(20)) - 10);
      q_in = 12'(-900 + int'(400.0 * $sin(ph) * (lvl ? 1.0 : -1.0) * 0.5) + int'($urandom_range(20)) - 10);
      stb = 1;
      @(negedge clk); stb = 0;
      if ((bit_out ^ flip) == lvl) good++;   // bit_out now holds this sample's slice
      prev_lvl = lvl;
    end
    agree = real'(good) / real'(n);
  endtask

  initial begin
    real a;
    repeat (2) @(negedge clk); rst_n = 1;
    psk = 0;
    drive(0.3, 400, 0, a);  drive(0.3, 160, 0, a);
    check(sel == 0, "ASK: I chosen"); check(a > 0.95, $sformatf("ASK I follows %f", a));
    drive(1.8, 400, 0, a);  drive(1.8, 160, 0, a);
    check(sel == 1, "ASK: Q chosen"); check(a > 0.95, $sformatf("ASK Q follows %f", a));
    drive(3.3, 400, 0, a);  drive(3.3, 160, 1, a);
    check(sel == 0, "ASK: I chosen, negative"); check(a > 0.95, $sformatf("ASK -I follows %f", a));
    psk = 1;
    drive(0.785, 400, 0, a); drive(0.785, 160, 0, a);
    check(sel == 2, "PSK: I+Q chosen"); check(a > 0.95, $sformatf("PSK I+Q follows %f", a));
    drive(-0.785, 400, 0, a); drive(-0.785, 160, 0, a);
    check(sel == 3, "PSK: I-Q chosen"); check(a > 0.95, $sformatf("PSK I-Q follows %f", a));
    psk = 0; drive(0.1, 400, 0, a);
    lock = 1;
    drive(1.6, 400, 0, a);
    check(sel == 0, "lock holds the channel");
    lock = 0;
    drive(1.6, 400, 0, a);
    check(sel == 1, "unlocked: channel follows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
