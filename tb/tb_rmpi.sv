// tb_rmpi: the receive interface. Checks the reset configuration, RXCFG /
// RXLEN / TIMEOUT fields, the arm pulse (ignored while busy), and the
// serial-to-parallel path: frames of random length are shifted in bit by
// bit and must appear in the buffer MSB first, the last partial byte
// left-aligned, with the bit count, status flags and channel in STATUS.
module tb_rmpi;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_we = 0, arm, rx_start = 0, bit_valid = 0, bit_in = 0, rx_busy = 0, rx_done = 0, done_flag;
  rx_cfg_t cfg;
  rx_status_t result = '0;
  logic [1:0] chan = 0;
  int checks = 0, failures = 0;
  rmpi dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask
  int arms = 0;
  always @(posedge clk) if (arm) arms++;

  task automatic frame(input int n, input rx_status_t res, input logic [1:0] ch);
    bit d[$];
    @(negedge clk); rx_start = 1; @(negedge clk); rx_start = 0;
    check(!done_flag, "arming clears done");
    for (int k = 0; k < n; k++) begin
      d.push_back(1'($urandom()));
      @(negedge clk); bit_valid = 1; bit_in = d[k];
      @(negedge clk); bit_valid = 0;
      repeat ($urandom_range(3)) @(negedge clk);
    end
    result = res; chan = ch;
    @(negedge clk); rx_done = 1; @(negedge clk); rx_done = 0;
    check(done_flag, "done flag");
    bus_addr = 8'h04; #1;
    check(bus_rdata[25:16] == 10'(n) && bus_rdata[7:6] == ch && bus_rdata[1] &&
          bus_rdata[5:2] == {res.timeout, res.collision, res.crc_ok, res.valid},
          $sformatf("STATUS %h for %0d bits", bus_rdata, n));
    for (int b = 0; b < (n + 7) / 8; b++) begin
      logic [7:0] want;
      want = '0;
      for (int j = 0; j < 8; j++) if (8*b + j < n) want[7-j] = d[8*b + j];
      bus_addr = 8'h80 + 8'(b); #1;
      check(bus_rdata[7:0] == want, $sformatf("byte %0d = %h want %h (n=%0d)", b, bus_rdata[7:0], want, n));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; arms = 0;
    check(cfg.chip_len == 8 && cfg.nbits == 16 && cfg.code == CODE_FM0, "reset configuration");
    wr(8'h01, 32'h0000_0A3F);
    check(cfg.code == CODE_M8 && cfg.psk && cfg.crc_en && cfg.err_max == 4'd3 && cfg.chip_len == 8'h0A, "RXCFG fields");
    bus_addr = 8'h01; #1 check(bus_rdata == 32'h0000_0A3F, "RXCFG read-back");
    wr(8'h02, 32'd128);     check(cfg.nbits == 10'd128, "RXLEN");
    wr(8'h03, 32'h000F_FFFF); check(cfg.timeout == 20'hFFFFF, "TIMEOUT");
    wr(8'h00, 32'h1); @(negedge clk); check(arms == 1, $sformatf("arm pulse %0d", arms));
    rx_busy = 1; wr(8'h00, 32'h1); @(negedge clk); check(arms == 1, "arm ignored while busy"); rx_busy = 0;
    frame(16, '{timeout: 0, collision: 0, crc_ok: 1, valid: 1}, 2'd0);
    frame(128, '{timeout: 0, collision: 0, crc_ok: 1, valid: 1}, 2'd1);
    frame(21, '{timeout: 0, collision: 1, crc_ok: 0, valid: 0}, 2'd2);
    for (int t = 0; t < 8; t++) frame(1 + $urandom_range(200), rx_status_t'(4'($urandom())), 2'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
