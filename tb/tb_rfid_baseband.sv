// tb_rfid_baseband: end-to-end test of the interrogator baseband at its
// default parameters. The testbench plays the CPU (register bus) and a tag.
// For each operation it loads a C1G2 command, starts it and decodes the PIE
// envelope itself from the lengths between rising edges (pivot RTcal/2, as a
// tag does), checking delimiter, Tari, RTcal, TRcal, pulse width, the bits
// and their CRC-5/CRC-16 (computed here independently). Then a tag model
// answers on the ADC inputs with FM0 or Miller chips (8 samples per chip,
// 80 kHz link) on a chosen I/Q phase with carrier DC and noise, and the test
// reads back the RMPI status and buffer. Operations:
//   1 Query, preamble, CRC-5, Tari 25 us, DSB-ASK; FM0 RN16 reply on I
//   2 ACK, frame-sync, Tari 12.5 us, SSB-ASK; Miller-4 PC+EPC+CRC-16 reply,
//     inverted, on Q
//   3 QueryRep, Tari 6.25 us, data-1 = 1.5 Tari, PR-ASK; no reply (timeout)
//   4 Req_RN, CRC-16; FM0 reply with a corrupted chip (collision)
//   5 Miller-2 reply on the I+Q diagonal in PSK mode with a wrong CRC
//   6 Miller-8 reply with a good CRC
//   7 the 24-bit Read pattern used in the prototype measurement, Tari 25 us
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_rfid_baseband;
  localparam int CLK_PER = 49;   // ~20.48 MHz (period only sets the time axis)

  logic clk = 0, rst_n = 0;
  always #(CLK_PER/2.0) clk = ~clk;

  logic [8:0]  bus_addr = '0;
  logic [31:0] bus_wdata = '0;
  logic        bus_we = 0;
  logic [31:0] bus_rdata;
  logic        irq, dac_stb, tx_env, carrier_on, adc_stb;
  logic signed [11:0] dac_i, dac_q, adc_i, adc_q;

  rfid_baseband dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------ mechanism counters
  typedef enum int {M_PREAMBLE, M_FRAMESYNC, M_CRC5, M_CRC16, M_CRCNONE, M_TARI625, M_TARI125,
                    M_TARI25, M_D1_15, M_DSB, M_SSB, M_PR, M_FM0, M_M2, M_M4, M_M8, M_ASK, M_PSK,
                    M_CHAN_I, M_CHAN_Q, M_CHAN_DIAG, M_INVERTED, M_TIMEOUT, M_COLLISION,
                    M_CRC_ERR, M_CRC_OK, M_NMECH} mech_e;
  int mech [M_NMECH];

  // ------------------------------------------------ cycle counter
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------ CPU bus
  task automatic wr(input logic [8:0] a, input logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk); bus_we = 0;
  endtask
  task automatic rd(input logic [8:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; #1 d = bus_rdata;
  endtask

  // ------------------------------------------------ reference CRCs
  function automatic logic [4:0] ref_crc5(input bit b[$]);
    int r = 'h09;
    foreach (b[k]) begin
      int top = (r >> 4) & 1;
      r = (r << 1) & 'h1F;
      if (top != int'(b[k])) r = r ^ 'h09;
    end
    return 5'(r);
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
  function automatic void push_bits(ref bit q[$], input logic [63:0] v, input int n);
    for (int k = n - 1; k >= 0; k--) q.push_back(v[k]);
  endfunction

  // ------------------------------------------------ envelope monitor
  longint rises[$], falls[$];
  int     dacq_nz, daci_neg;
  bit     mon_on = 0;
  logic   env_q = 1;
  always @(posedge clk) begin
    env_q <= tx_env;
    if (mon_on) begin
      if (tx_env && !env_q) rises.push_back(cyc);
      if (!tx_env && env_q) falls.push_back(cyc);
      if (dac_stb && dac_q != 0) dacq_nz++;
      if (dac_stb && dac_i < 0) daci_neg++;
    end
  end

  // ------------------------------------------------ tag model
  int   smp[$];            // reply levels, one per ADC sample (0 or 1)
  int   reply_delay = 0;
  bit   reply_go = 0;
  real  tag_amp = 300.0, tag_ph = 0.0;
  localparam int DC_I = 600, DC_Q = -400, CHIP_LEN = 8;
  always @(posedge clk) begin
    if (adc_stb) begin
      int lv; int ni, nq;
      lv = 0;
      if (reply_go) begin
        if (reply_delay > 0) reply_delay--;
        else if (smp.size() > 0) lv = smp.pop_front();
      end
      ni = int'($urandom_range(40)) - 20;
      nq = int'($urandom_range(40)) - 20;
      adc_i <= 12'(DC_I + ni + int'(tag_amp * $cos(tag_ph) * lv));
      adc_q <= 12'(DC_Q + nq + int'(tag_amp * $sin(tag_ph) * lv));
    end
  end

  // chips of a reply: FM0 or Miller-M, pilot, preamble, data, dummy-1
  function automatic void build_reply(input int m, input bit trext, input bit data[$],
                                      input int flip_chip);
    bit chips[$];
    bit lvl = 0;
    smp.delete();
    if (m == 0) begin
      // FM0 symbols: 0/1 data, 2 = data-1 with the boundary violation
      int syms[$];
      if (trext) repeat (12) syms.push_back(0);
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
      bit prev = 1;
      repeat (trext ? 16 : 4) bits.push_back(0);
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
    if (flip_chip >= 0) begin
      int pos = chips.size() - 2 * ((m == 0) ? 1 : 2 * m) * (data.size() - flip_chip) - 1;
      chips[pos] = !chips[pos];
    end
    foreach (chips[k]) repeat (CHIP_LEN) smp.push_back(int'(chips[k]));
  endfunction

  // ------------------------------------------------ one operation
  localparam int TARI_CYC [3] = '{128, 256, 512};
  localparam int TRCAL = 2048;

  task automatic run_op(input string name, input bit cmd[$], input int tari, input int mode,
                        input int crc, input bit pre, input bit d12t,
                        input bit reply, input int code, input bit psk, input bit crc_en,
                        input bit rdata[$], input real ph, input int flip_chip, input bit bad_crc,
                        input bit exp_valid, input bit exp_coll, input bit exp_to, input int exp_chan);
    bit exp_tx[$];
    bit rx_bits[$];
    logic [31:0] d, st;
    int m, tari_c, nsym, base, wait_c;
    longint t0;
    // expected transmission
    exp_tx = cmd;
    if (crc == 1) push_bits(exp_tx, 64'(ref_crc5(cmd)), 5);
    if (crc == 2) push_bits(exp_tx, 64'(ref_crc16(cmd)), 16);
    // load command
    for (int k = 0; k < (cmd.size() + 7) / 8; k++) begin
      logic [7:0] by = '0;
      for (int j = 0; j < 8; j++) if (8*k + j < cmd.size()) by[7-j] = cmd[8*k+j];
      wr(9'h080 + 9'(k), {24'd0, by});
    end
    wr(9'h003, 32'(cmd.size()));
    wr(9'h001, {16'd0, 8'd230, d12t, pre, 2'(crc), 2'(mode), 2'(tari)});
    wr(9'h002, TRCAL);
    m = (code == 0) ? 0 : (1 << code);
    wr(9'h101, {16'd0, 8'(CHIP_LEN), 4'd0, crc_en, psk, 2'(code)});
    rx_bits = rdata;
    if (crc_en) begin
      logic [15:0] c = ref_crc16(rdata);
      if (bad_crc) c[0] = !c[0];
      push_bits(rx_bits, 64'(c), 16);
    end
    wr(9'h102, 32'(rx_bits.size()));
    wr(9'h103, 32'd8000);
    if (reply) build_reply(m, 1'b1, rx_bits, flip_chip); else smp.delete();
    tag_ph = ph;
    repeat (200) @(posedge clk);   // let the DAC filters settle after a mode change
    rises.delete(); falls.delete(); dacq_nz = 0; daci_neg = 0;
    mon_on = 1;
    t0 = cyc;
    wr(9'h000, 32'h7);             // start, carrier on, arm RX at the end
    // wait for the end of the command
    wait_c = 0;
    do begin rd(9'h004, d); wait_c++; end while (!d[1] && wait_c < 200000);
    check(d[1], {name, ": TX done"});
    reply_delay = 120; reply_go = 1;
    mon_on = 0;
    // ---- decode the envelope
    tari_c = TARI_CYC[tari];
    nsym = rises.size() - 1;
    check(falls.size() > 0 && rises.size() > 0 && rises[0] - falls[0] == 256, {name, ": delimiter 12.5 us"});
    check(rises.size() > 1 && rises[1] - rises[0] == tari_c, {name, ": data-0 = Tari"});
    check(rises.size() > 2 && rises[2] - rises[1] == tari_c + (d12t ? 2*tari_c : tari_c + tari_c/2), {name, ": RTcal"});
    check(falls.size() > 1 && rises[1] - falls[1] == tari_c / 2, {name, ": PW = Tari/2"});
    base = 2;
    if (pre) begin
      check(rises.size() > 3 && rises[3] - rises[2] == TRCAL, {name, ": TRcal"});
      base = 3;
    end
    check(nsym - base == exp_tx.size(), $sformatf("%s: %0d symbols sent, %0d expected", name, nsym - base, exp_tx.size()));
    for (int k = 0; k < exp_tx.size() && base + k + 1 < rises.size(); k++) begin
      longint len = rises[base + k + 1] - rises[base + k];
      bit b = (2 * len > (rises[2] - rises[1]));
      int want = exp_tx[k] ? (d12t ? 2*tari_c : tari_c + tari_c/2) : tari_c;
      check(b == exp_tx[k] && len == want, $sformatf("%s: symbol %0d len %0d", name, k, len));
    end
    // modulation checks
    if (mode == 0) begin check(dacq_nz == 0 && daci_neg == 0, {name, ": DSB-ASK real and positive"}); mech[M_DSB]++; end
    if (mode == 1) begin check(dacq_nz > 0, {name, ": SSB-ASK has a Q component"}); mech[M_SSB]++; end
    if (mode == 2) begin check(daci_neg > 0 && dacq_nz == 0, {name, ": PR-ASK reverses phase"}); mech[M_PR]++; end
    mech[pre ? M_PREAMBLE : M_FRAMESYNC]++;
    mech[crc == 0 ? M_CRCNONE : (crc == 1 ? M_CRC5 : M_CRC16)]++;
    mech[tari == 0 ? M_TARI625 : (tari == 1 ? M_TARI125 : M_TARI25)]++;
    if (!d12t) mech[M_D1_15]++;
    // ---- receive
    wait_c = 0;
    do begin rd(9'h104, st); wait_c++; end while (!st[1] && wait_c < 400000);
    reply_go = 0;
    check(st[1], {name, ": RX done"});
    check(st[2] == exp_valid, $sformatf("%s: valid %0d", name, st[2]));
    check(st[4] == exp_coll, $sformatf("%s: collision %0d", name, st[4]));
    check(st[5] == exp_to, $sformatf("%s: timeout %0d", name, st[5]));
    if (exp_to) mech[M_TIMEOUT]++;
    if (reply) begin
      check(st[25:16] == 10'(rx_bits.size()), $sformatf("%s: %0d bits received", name, st[25:16]));
      check(int'(st[7:6]) == exp_chan, $sformatf("%s: channel %0d", name, st[7:6]));
      mech[code == 0 ? M_FM0 : (code == 1 ? M_M2 : (code == 2 ? M_M4 : M_M8))]++;
      mech[psk ? M_PSK : M_ASK]++;
      mech[exp_chan == 0 ? M_CHAN_I : (exp_chan == 1 ? M_CHAN_Q : M_CHAN_DIAG)]++;
      if (dut.u_pdet.inv) mech[M_INVERTED]++;
      if (st[4]) mech[M_COLLISION]++;
      if (crc_en && !st[3]) mech[M_CRC_ERR]++;
      if (crc_en && st[3]) mech[M_CRC_OK]++;
      if (crc_en) check(st[3] == !bad_crc && !exp_coll || exp_coll, {name, ": CRC result"});
      if (!exp_coll) begin
        for (int k = 0; k < (rx_bits.size() + 7) / 8; k++) begin
          logic [7:0] want = '0;
          for (int j = 0; j < 8; j++) if (8*k + j < rx_bits.size()) want[7-j] = rx_bits[8*k+j];
          rd(9'h180 + 9'(k), d);
          check(d[7:0] == want, $sformatf("%s: RX byte %0d = %02x, want %02x", name, k, d[7:0], want));
        end
      end
    end
    check(irq, {name, ": irq"});
    $display("%s: done after %0d cycles", name, cyc - t0);
    repeat (200) @(posedge clk);
  endtask

  // ------------------------------------------------ stimulus
  initial begin
    bit cmd[$], rn[$], epc[$], d[$];
    adc_i = 12'(DC_I); adc_q = 12'(DC_Q);
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    wr(9'h000, 32'h2);              // carrier on (continuous wave)
    repeat (1000) @(posedge clk);

    // 1: Query DR=8 M=FM0 TRext=1 Sel=0 S0 A Q=4; RN16 from the text's capture
    cmd.delete(); push_bits(cmd, 64'b1000_0_00_1_00_00_0_0100, 18);
    rn.delete();  push_bits(rn, 64'b0100010000000101, 16);
    run_op("Query", cmd, 2, 0, 1, 1, 1, 1, 0, 0, 0, rn, 0.35, -1, 0, 1, 0, 0, 0);

    // 2: ACK(RN16) -> PC + 96-bit EPC + CRC-16, Miller-4, inverted on Q
    cmd.delete(); push_bits(cmd, 64'b01, 2); push_bits(cmd, 64'h4405, 16);
    epc.delete(); push_bits(epc, 64'h3000, 16); push_bits(epc, 64'h3014_1234_5678, 48);
    push_bits(epc, 64'h9ABC_DEF0_1122, 48);
    run_op("ACK", cmd, 1, 1, 0, 0, 1, 1, 2, 0, 1, epc, -1.45, -1, 0, 1, 0, 0, 1);

    // 3: QueryRep, nobody answers
    cmd.delete(); push_bits(cmd, 64'b00_00, 4);
    run_op("QueryRep", cmd, 0, 2, 0, 0, 0, 0, 0, 0, 0, rn, 0.0, -1, 0, 0, 0, 1, 0);

    // 4: Req_RN(RN16) -> handle + CRC-16, one chip garbled
    cmd.delete(); push_bits(cmd, 64'hC1, 8); push_bits(cmd, 64'h4405, 16);
    d.delete(); push_bits(d, 64'hBEEF, 16);
    run_op("Req_RN", cmd, 0, 0, 2, 0, 1, 1, 0, 0, 1, d, 0.2, 7, 0, 0, 1, 0, 0);

    // 5: Read reply in Miller-2, PSK on the diagonal, wrong CRC
    cmd.delete(); push_bits(cmd, 64'b11000010_01_00000010_00000010, 26); push_bits(cmd, 64'hBEEF, 16);
    d.delete(); push_bits(d, 64'b0, 1); push_bits(d, 64'hCAFE_F00D, 32); push_bits(d, 64'hBEEF, 16);
    run_op("Read", cmd, 1, 0, 2, 0, 1, 1, 1, 1, 1, d, 0.785, -1, 1, 0, 0, 0, 2);

    // 6: Read reply in Miller-8, good CRC
    run_op("Read-M8", cmd, 2, 1, 2, 0, 1, 1, 3, 0, 1, d, 0.1, -1, 0, 1, 0, 0, 0);

    // 7: the 24-bit Read command pattern of the prototype measurement, sent as
    //    printed at Tari 25 us (data-0 = 512 cycles = 40 kbit/s); FM0 reply
    cmd.delete(); push_bits(cmd, 64'b110000101110011110000001, 24);
    d.delete(); push_bits(d, 64'h0123, 16);
    run_op("Read-24", cmd, 2, 0, 0, 0, 1, 1, 0, 0, 0, d, 0.6, -1, 0, 1, 0, 0, 0);

    for (int k = 0; k < M_NMECH; k++) begin
      check(mech[k] > 0, $sformatf("mechanism %0d never happened", k));
      $display("mechanism %0d x%0d", k, mech[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
