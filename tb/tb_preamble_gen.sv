// tb_preamble_gen: checks the start-of-frame symbol sequences. A preamble
// must be delimiter, data-0, RTcal, TRcal; a frame-sync the first three. The
// consumer stalls at random; done must coincide with the last acceptance.
module tb_preamble_gen;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, preamble = 0, sym_valid, sym_ready = 0, done;
  sym_e sym_type;
  int checks = 0, failures = 0;
  preamble_gen dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit pre);
    sym_e want [4] = '{SYM_DELIM, SYM_DATA0, SYM_RTCAL, SYM_TRCAL};
    int n = pre ? 4 : 3;
    int got = 0, dones = 0;
    @(negedge clk); start = 1; preamble = pre;
    @(negedge clk); start = 0; preamble = !pre;   // must have been latched
    while (got < n) begin
      sym_ready = ($urandom_range(2) != 0);
      #1;
      if (sym_valid && sym_ready) begin
        check(sym_type == want[got], $sformatf("symbol %0d is %0d", got, sym_type));
        check(done == (got == n - 1), $sformatf("done at symbol %0d", got));
        got++;
      end
      @(negedge clk);
    end
    sym_ready = 1;
    repeat (3) begin #1 check(!sym_valid && !done, "idle after sequence"); @(negedge clk); end
    sym_ready = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(!sym_valid, "idle after reset");
    repeat (5) begin run(1); run(0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
