// tb_rx_control: drives the receive controller's inputs directly. Checks
// that arm latches the configuration and clears the CRC checker, that the
// preamble detector is enabled only while waiting, that sof starts the
// decoder and locks the demodulator, that the timeout ends the wait after
// exactly the configured number of samples, and the status it reports for a
// good frame, a CRC error, a CRC-less frame and a collision.
module tb_rx_control;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stb;
  logic arm = 0, sof = 0, dec_done = 0, violation = 0, crc_ok = 0;
  rx_cfg_t cfg, cfg_q;
  logic det_en, dec_start, demod_lock, crc_clear, busy, done;
  rx_status_t status;
  int checks = 0, failures = 0;
  rx_control dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int stb_div = 0;
  always @(posedge clk) stb_div <= (stb_div + 1) % 4;
  assign stb = (stb_div == 0);

  task automatic do_arm();
    @(negedge clk); arm = 1; #1 check(crc_clear, "arm clears the CRC");
    @(negedge clk); arm = 0;
    check(busy && det_en && !demod_lock, "waiting for the preamble");
  endtask

  task automatic frame(input bit crc_en, input bit crc_good, input bit coll);
    cfg.crc_en = crc_en;
    do_arm();
    cfg.crc_en = !crc_en;                       // later writes must not matter
    repeat (20) @(negedge clk);
    sof = 1; #1 check(dec_start, "sof starts the decoder");
    @(negedge clk); sof = 0;
    check(!det_en && demod_lock, "receiving: detector off, channel locked");
    repeat (30) @(negedge clk);
    violation = coll; crc_ok = crc_good;
    dec_done = 1; @(negedge clk); dec_done = 0;
    check(!done, "CRC result settles first");
    @(negedge clk);
    check(done, "done two clocks after the decoder's last bit");
    check(status.valid == ((crc_good || !crc_en) && !coll) && status.collision == coll &&
          status.crc_ok == (crc_good || !crc_en) && !status.timeout,
          $sformatf("status crc_en=%0d good=%0d coll=%0d", crc_en, crc_good, coll));
    @(negedge clk); check(!busy && !done, "idle after the frame");
    violation = 0;
  endtask

  initial begin
    int n;
    cfg = '0; cfg.timeout = 20'd50; cfg.code = CODE_M4; cfg.nbits = 10'd128;
    repeat (2) @(negedge clk); rst_n = 1;
    check(!busy && !det_en, "idle after reset");
    do_arm();
    check(cfg_q.code == CODE_M4 && cfg_q.nbits == 10'd128, "configuration latched");
    n = 0;
    while (!done && n < 1000) begin @(negedge clk); if (stb) n++; end
    check(done && status.timeout && !status.valid, "timeout reported");
    check(n >= 49 && n <= 51, $sformatf("timeout after %0d samples, 50 configured", n));
    frame(1, 1, 0);
    frame(1, 0, 0);
    frame(0, 0, 0);
    frame(1, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
