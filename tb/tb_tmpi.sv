// tb_tmpi: register and buffer access of the transmit interface. Checks the
// reset configuration, field placement of every register on read-back and
// in the cfg struct, bit-serial reads of the buffer (MSB of byte 0 first),
// the one-cycle start pulse (ignored while busy) and the sticky done flag.
module tb_tmpi;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic bus_we = 0, start, bit_val, tx_busy = 0, tx_done = 0, done_flag;
  logic [9:0] bit_idx = 0;
  tx_cfg_t cfg;
  int checks = 0, failures = 0;
  tmpi dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask

  logic [7:0] bytes [64];
  int starts = 0;
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; starts = 0;
    check(cfg.nbits == 0 && cfg.cw_en == 0 && cfg.depth == 230, "reset configuration");
    wr(8'h01, 32'h0000_B3E6);   // depth B3, data1 2T, preamble 1, crc 2, mode 1, tari 2
    check(cfg.tari == TARI_25 && cfg.mode == MOD_SSB && cfg.crc == CRC_16 && cfg.preamble
          && cfg.data1_2t && cfg.depth == 8'hB3, "TXCFG fields");
    bus_addr = 8'h01; #1 check(bus_rdata == 32'h0000_B3E6, "TXCFG read-back");
    wr(8'h02, 32'h1234_0800); check(cfg.trcal_cyc == 16'h0800, "TRCAL");
    wr(8'h03, 32'd22);        check(cfg.nbits == 10'd22, "TXLEN");
    for (int k = 0; k < 64; k++) begin bytes[k] = 8'($urandom()); wr(8'h80 + 8'(k), {24'd0, bytes[k]}); end
    for (int k = 0; k < 64; k++) begin bus_addr = 8'h80 + 8'(k); #1 check(bus_rdata[7:0] == bytes[k], "buffer read-back"); end
    for (int b = 0; b < 512; b += 7) begin
      bit_idx = 10'(b); #1;
      check(bit_val == bytes[b / 8][7 - b % 8], $sformatf("bit %0d", b));
    end
    wr(8'h00, 32'h7); @(negedge clk);
    check(cfg.cw_en && cfg.rx_auto && starts == 1, "CTRL start + carrier + auto");
    @(negedge clk); check(starts == 1, "start is a single pulse");
    tx_busy = 1; wr(8'h00, 32'h3); check(starts == 1, "start ignored while busy");
    @(negedge clk); tx_busy = 0; tx_done = 1; @(negedge clk); tx_done = 0;
    check(done_flag, "done flag set");
    bus_addr = 8'h04; #1 check(bus_rdata[1:0] == 2'b10, "STATUS done, not busy");
    wr(8'h00, 32'h1); @(negedge clk); check(!done_flag && starts == 2, "start clears done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
