// tb_decoder: random replies of 1..64 bits in FM0 and Miller-2/4/8, either
// polarity, generated from the coding rules and fed chip by chip after a
// start pulse. The decoded bits must equal the data, done must pulse with
// the last bit, and violation must stay low; with one chip flipped inside
// the data (a whole half-bit for Miller, whose majority vote outvotes a
// single chip) a violation must be reported.
module tb_decoder;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, inv = 0, chip_valid = 0, chip = 0;
  rx_code_e code = CODE_FM0;
  logic [9:0] nbits = 0;
  logic bit_valid, bit_out, done, violation, busy;
  int checks = 0, failures = 0;
  decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // Reply chips built from the coding rules: FM0 (m = 0) or Miller-m.
  // FM0 symbols: 0, 1, or 2 = data-1 without its boundary inversion.
  function automatic void gen_chips(ref bit chips[$], input int m, input bit data[$],
                                    input bit with_preamble, input bit start_lvl);
    bit lvl;
    lvl = start_lvl;
    if (m == 0) begin
      int syms[$];
      if (with_preamble) begin
        repeat (4) syms.push_back(0);
        syms.push_back(1); syms.push_back(0); syms.push_back(1); syms.push_back(0);
        syms.push_back(2); syms.push_back(1);
      end
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
      if (with_preamble) begin
        repeat (4) bits.push_back(0);
        bits.push_back(0); bits.push_back(1); bits.push_back(0);
        bits.push_back(1); bits.push_back(1); bits.push_back(1);
      end
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
  endfunction

  bit got[$];
  int dones;
  always @(posedge clk) begin
    if (bit_valid) got.push_back(bit_out);
    if (done) dones++;
  end

  task automatic run(input int m, input int n, input bit pol, input int flip);
    bit chips[$], data[$];
    int cpb;
    bit last_lvl;
    cpb = (m == 0) ? 2 : 2 * m;
    for (int k = 0; k < n; k++) data.push_back(1'($urandom()));
    // after either preamble the line ends high in the detector's polarity
    gen_chips(chips, m, data, 0, (m == 0) ? 1'b1 : 1'b1);
    if (flip >= 0) begin
      // FM0: one chip; Miller: a whole half-bit (a single chip is outvoted)
      data[1] = 1; data[2] = 1;
      chips.delete();
      gen_chips(chips, m, data, 0, 1'b1);
      for (int j = 0; j < ((m == 0) ? 1 : m); j++) chips[flip + j] = !chips[flip + j];
    end
    code = rx_code_e'((m == 0) ? 0 : $clog2(m)); nbits = 10'(n);
    got.delete(); dones = 0;
    @(negedge clk); start = 1; inv = pol; @(negedge clk); start = 0; inv = !pol;
    for (int k = 0; k < n * cpb; k++) begin
      @(negedge clk); chip_valid = 1; chip = chips[k] ^ pol;
      @(negedge clk); chip_valid = 0;
      check(done == (k == n * cpb - 1), "done with the last bit");
      repeat ($urandom_range(2)) @(negedge clk);
    end
    @(negedge clk);
    check(!busy && dones == 1, "one done, then idle");
    if (flip < 0) begin
      check(got == data, $sformatf("m=%0d n=%0d pol=%0d data", m, n, pol));
      check(!violation, $sformatf("m=%0d n=%0d: no violation", m, n));
    end else begin
      check(violation, $sformatf("m=%0d n=%0d flip %0d: violation", m, n, flip));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m <= 8; m = (m == 0) ? 2 : 2 * m) begin
      for (int t = 0; t < 4; t++) run(m, 1 + $urandom_range(63), t[0], -1);
      run(m, 16, 0, (m == 0) ? 9 : 4 * m);     // break a bit boundary
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
