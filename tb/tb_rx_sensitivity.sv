// tb_rx_sensitivity: receiver sensitivity of the full baseband at its
// default parameters. The CPU arms the receiver directly (no command), and a
// tag model answers with an RN16+CRC-16 reply (32 bits) buried in Gaussian
// noise on both ADC channels. SNR here is the power of the tag's two-level
// signal (amplitude +-A/2 about its mean, on the stronger channel) over the
// noise power per ADC sample. The target figures are about 11 dB for FM0 and
// 2 dB lower for Miller-subcarrier replies. For each case the test runs a
// number of replies and counts those delivered with a valid CRC and no
// collision; at least 90 % must succeed.
`timescale 1ns/1ps
module tb_rx_sensitivity;
  logic clk = 0, rst_n = 0;
  always #24.4 clk = ~clk;
  logic [8:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0;
  logic        bus_we = 0;
  logic [31:0] bus_rdata;
  logic        irq, dac_stb, tx_env, carrier_on, adc_stb;
  logic signed [11:0] dac_i, dac_q, adc_i, adc_q;
  rfid_baseband dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic wr(input logic [8:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(input logic [8:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; #1 d = bus_rdata;
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1_000_000)) + 1.0) / 1_000_001.0;
    u2 = real'($urandom_range(1_000_000)) / 1_000_000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  function automatic logic [15:0] ref_crc16(input bit b[$]);
    int r = 'hFFFF;
    foreach (b[k]) begin
      int top = (r >> 15) & 1;
      r = (r << 1) & 'hFFFF;
      if (top != int'(b[k])) r = r ^ 'h1021;
    end
    return 16'(~r);
  endfunction

  // tag model
  int   smp[$];
  int   delay = 0;
  bit   go = 0;
  real  sigma = 0.0, amp = 200.0, ph = 0.3;
  always @(posedge clk) begin
    if (adc_stb) begin
      real lv;
      lv = 0.0;
      if (go) begin
        if (delay > 0) delay--;
        else if (smp.size() > 0) lv = real'(smp.pop_front());
      end
      adc_i <= 12'(700 + int'(amp * $cos(ph) * lv + sigma * gauss()));
      adc_q <= 12'(-300 + int'(amp * $sin(ph) * lv + sigma * gauss()));
    end
  end

  function automatic void build(input int m, input bit data[$]);
    bit chips[$];
    bit lvl;
    lvl = 0;
    smp.delete();
    if (m == 0) begin
      int syms[$];
      repeat (12) syms.push_back(0);
      syms.push_back(1); syms.push_back(0); syms.push_back(1); syms.push_back(0);
      syms.push_back(2); syms.push_back(1);
      foreach (data[k]) syms.push_back(int'(data[k]));
      syms.push_back(1);
      foreach (syms[k]) begin
        if (syms[k] != 2) lvl = !lvl;
        chips.push_back(lvl);
        if (syms[k] == 0) lvl = !lvl;
        chips.push_back(lvl);
      end
    end else begin
      bit bits[$];
      bit prev;
      prev = 1;
      repeat (16) bits.push_back(0);
      bits.push_back(0); bits.push_back(1); bits.push_back(0);
      bits.push_back(1); bits.push_back(1); bits.push_back(1);
      foreach (data[k]) bits.push_back(data[k]);
      bits.push_back(1);
      foreach (bits[k]) begin
        if (!bits[k] && !prev) lvl = !lvl;
        for (int j = 0; j < m; j++) chips.push_back(lvl ^ j[0]);
        if (bits[k]) lvl = !lvl;
        for (int j = 0; j < m; j++) chips.push_back(lvl ^ j[0]);
        prev = bits[k];
      end
    end
    foreach (chips[k]) repeat (8) smp.push_back(int'(chips[k]));
  endfunction

  task automatic run_case(input string name, input int code, input real snr_db, input int trials,
                          input int err_max);
    int good = 0;
    logic [31:0] st;
    // signal: +-amp/2 about the mean on the projection; noise sigma per channel
    sigma = (amp / 2.0) / $sqrt($pow(10.0, snr_db / 10.0));
    wr(9'h101, {16'd0, 8'd8, 4'(err_max), 1'b1, 1'b0, 2'(code)});
    wr(9'h102, 32'd32);
    wr(9'h103, 32'd6000);
    for (int t = 0; t < trials; t++) begin
      bit d[$];
      logic [15:0] c;
      int n;
      for (int k = 0; k < 16; k++) d.push_back(1'($urandom()));
      c = ref_crc16(d);
      for (int k = 15; k >= 0; k--) d.push_back(c[k]);
      build((code == 0) ? 0 : (1 << code), d);
      ph = real'($urandom_range(628)) / 100.0;
      wr(9'h100, 32'h1);
      delay = 150; go = 1;
      n = 0;
      do begin rd(9'h104, st); n++; end while (!st[1] && n < 300000);
      go = 0; smp.delete();
      if (st[2]) good++;
      repeat (300) @(posedge clk);
    end
    $display("%s at %0.1f dB: %0d of %0d replies decoded", name, snr_db, good, trials);
    check(good * 10 >= trials * 9, $sformatf("%s: %0d of %0d at %0.1f dB", name, good, trials, snr_db));
  endtask

  initial begin
    adc_i = 0; adc_q = 0;
    repeat (5) @(posedge clk); rst_n = 1;
    repeat (2000) @(posedge clk);
    run_case("FM0", 0, 11.0, 20, 0);
    run_case("Miller-4", 2, 9.0, 10, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
