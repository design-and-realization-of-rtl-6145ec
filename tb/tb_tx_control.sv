// tb_tx_control: the transmit controller with the preamble generator, CRC
// encoder and PIE encoder it drives. A model buffer holds random command
// bits. The test records every symbol the PIE encoder accepts and checks
// the sequence (start of frame, command bits, CRC), that busy covers the
// whole command and that done pulses once, only after the last low pulse,
// and within a cycle count computed from the symbol lengths.
module tb_tx_control;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  tx_cfg_t cfg;
  logic [9:0] bit_idx;
  logic bit_val;
  logic pre_start, pre_valid, pre_ready, pre_done;
  sym_e pre_type, sym_type;
  logic ci_valid, ci_bit, ci_last, ci_ready, co_valid, co_bit, co_last, co_ready;
  logic sym_valid, sym_ready, pie_busy, env, busy, done;
  int checks = 0, failures = 0;
  bit mem [1024];
  assign bit_val = mem[bit_idx];

  tx_control dut (.clk, .rst_n, .start, .cfg, .bit_idx, .bit_val,
    .pre_start, .pre_valid, .pre_type, .pre_ready, .pre_done,
    .crc_in_valid(ci_valid), .crc_in_bit(ci_bit), .crc_in_last(ci_last), .crc_in_ready(ci_ready),
    .crc_out_valid(co_valid), .crc_out_bit(co_bit), .crc_out_last(co_last), .crc_out_ready(co_ready),
    .sym_valid, .sym_type, .sym_ready, .pie_busy, .busy, .done);
  preamble_gen u_pre (.clk, .rst_n, .start(pre_start), .preamble(cfg.preamble),
    .sym_valid(pre_valid), .sym_type(pre_type), .sym_ready(pre_ready), .done(pre_done));
  crc_encoder u_crc (.clk, .rst_n, .crc_sel(cfg.crc), .in_valid(ci_valid), .in_bit(ci_bit),
    .in_last(ci_last), .in_ready(ci_ready), .out_valid(co_valid), .out_bit(co_bit),
    .out_last(co_last), .out_ready(co_ready));
  pie_encoder u_pie (.clk, .rst_n, .tari_sel(cfg.tari), .data1_2t(cfg.data1_2t),
    .trcal_cyc(cfg.trcal_cyc), .sym_valid, .sym_type, .sym_ready, .env, .busy(pie_busy));

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  sym_e got[$];
  int dones = 0;
  always @(posedge clk) begin
    if (sym_valid && sym_ready) got.push_back(sym_type);
    if (done) begin dones++; check(env && !pie_busy, "done after the last low pulse"); end
  end

  function automatic int ref_crc(input bit b[$], input int sel);
    int r = (sel == 1) ? 'h09 : 'hFFFF;
    int w = (sel == 1) ? 5 : 16;
    int p = (sel == 1) ? 'h09 : 'h1021;
    foreach (b[k]) begin
      int top = (r >> (w - 1)) & 1;
      r = (r << 1) & ((1 << w) - 1);
      if (top != int'(b[k])) r ^= p;
    end
    return (sel == 2) ? (~r & 'hFFFF) : r;
  endfunction

  task automatic run(input int n, input int crc, input bit pre);
    bit data[$];
    sym_e want[$];
    int c, w, cycles, expect_cyc;
    for (int k = 0; k < n; k++) begin mem[k] = 1'($urandom()); data.push_back(mem[k]); end
    want.push_back(SYM_DELIM); want.push_back(SYM_DATA0); want.push_back(SYM_RTCAL);
    if (pre) want.push_back(SYM_TRCAL);
    foreach (data[k]) want.push_back(data[k] ? SYM_DATA1 : SYM_DATA0);
    if (crc != 0) begin
      w = (crc == 1) ? 5 : 16;
      c = ref_crc(data, crc);
      for (int k = w - 1; k >= 0; k--) want.push_back(c[k] ? SYM_DATA1 : SYM_DATA0);
    end
    expect_cyc = 0;
    foreach (want[k])
      expect_cyc += (want[k] == SYM_DELIM) ? 256 : (want[k] == SYM_DATA0) ? 128 :
                    (want[k] == SYM_DATA1) ? 256 : (want[k] == SYM_RTCAL) ? 384 : 300;
    cfg.nbits = 10'(n); cfg.crc = crc_sel_e'(crc); cfg.preamble = pre;
    got.delete(); dones = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; check(busy || done, "busy during command"); end
    @(negedge clk);
    check(!busy, "idle after done");
    check(dones == 1, "one done pulse");
    check(got == want, $sformatf("symbols n=%0d crc=%0d pre=%0d (%0d vs %0d)", n, crc, pre, got.size(), want.size()));
    check(cycles >= expect_cyc && cycles <= expect_cyc + 3, $sformatf("%0d cycles, symbols need %0d", cycles, expect_cyc));
  endtask

  initial begin
    cfg = '0;
    cfg.tari = TARI_6P25; cfg.data1_2t = 1; cfg.trcal_cyc = 16'd300;
    repeat (2) @(negedge clk); rst_n = 1;
    run(22, 1, 1);     // Query-like
    run(18, 0, 0);     // ACK-like
    run(4, 0, 0);      // QueryRep-like
    for (int t = 0; t < 6; t++) run(1 + $urandom_range(60), t % 3, t[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
