// tb_ask_modulator: checks the amplitude mapping one clock after the
// envelope: DSB/SSB two levels AMP and AMP*(1-depth/256), PR-ASK +AMP/-AMP
// alternating at each low pulse with zero during the pulse, zero with the
// carrier off.
module tb_ask_modulator;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic env = 1, carrier_en = 0;
  mod_mode_e mode = MOD_DSB;
  logic [7:0] depth = 8'd230;
  logic signed [11:0] amp;
  int checks = 0, failures = 0;
  ask_modulator dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int nfall = 0;   // falling edges so far: PR-ASK phase = parity
  task automatic step(input bit e, input int want, input string what);
    @(negedge clk); if (env && !e) nfall++; env = e;
    @(negedge clk); check(int'(amp) == want, $sformatf("%s: amp %0d want %0d", what, amp, want));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    step(1, 0, "carrier off");
    carrier_en = 1;
    for (int d = 0; d < 256; d += 51) begin
      depth = 8'(d);
      step(1, 1800, "DSB high");
      step(0, 1800 - (1800 * d) / 256, "DSB low");
    end
    mode = MOD_SSB; depth = 8'd128;
    step(1, 1800, "SSB high"); step(0, 900, "SSB low");
    mode = MOD_PR; step(1, (nfall % 2) ? -1800 : 1800, "PR start");
    for (int k = 0; k < 6; k++) begin
      step(0, 0, "PR pulse");
      step(1, (nfall % 2) ? -1800 : 1800, "PR after reversal");
      step(1, (nfall % 2) ? -1800 : 1800, "PR holds phase");
    end
    carrier_en = 0; step(1, 0, "carrier off again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
