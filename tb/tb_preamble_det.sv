// tb_preamble_det: chip streams built from the coding rules (pilot,
// preamble, data) for FM0 and Miller-2/4/8, in both polarities, preceded by
// random chips. sof must fire exactly once, one cycle after the last
// preamble chip, with inv telling the polarity; with chip errors inside the
// preamble it must fire only when err_max allows them; with en low never.
module tb_preamble_det;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, chip_valid = 0, chip = 0, sof, inv;
  rx_code_e code = CODE_FM0;
  logic [3:0] err_max = 0;
  int checks = 0, failures = 0;
  preamble_det dut (.*);

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

  task automatic run(input int m, input bit pol, input int nerr, input int allow, input bit enable);
    bit chips[$], data[$], pre[$];
    int pre_end, sofs, sof_at, cpb;
    cpb = (m == 0) ? 2 : 2 * m;
    code = rx_code_e'((m == 0) ? 0 : $clog2(m));
    err_max = 4'(allow); en = enable;
    data.delete();
    repeat (8) data.push_back(1'($urandom()));
    chips.delete();
    // random chips before the reply; a quiet alternating line when errors are
    // tolerated (random chips would then match by chance, as they would on air)
    for (int k = 0; k < 40; k++) chips.push_back((allow == 0) ? 1'($urandom()) : k[0]);
    gen_chips(pre, m, data, 1, pol);
    pre_end = chips.size() + 10 * cpb - 1;          // last chip of the preamble
    for (int k = 0; k < nerr; k++) pre[4 * cpb + 1 + 2 * k] = !pre[4 * cpb + 1 + 2 * k];
    foreach (pre[k]) chips.push_back(pre[k]);
    sofs = 0; sof_at = -1;
    foreach (chips[k]) begin
      @(negedge clk); chip_valid = 1; chip = chips[k];
      @(negedge clk); chip_valid = 0;
      if (sof) begin sofs++; if (sof_at < 0) sof_at = k; end
      @(negedge clk);
      check(!sof, "sof is one cycle");
    end
    if (enable && nerr <= allow) begin
      check(sofs >= 1 && sof_at == pre_end, $sformatf("m=%0d pol=%0d: sof at chip %0d, want %0d", m, pol, sof_at, pre_end));
      check(sofs >= 1, "found");
      check(inv == (pol == (m == 0 ? 1'b1 : 1'b0)) || sofs == 0, $sformatf("m=%0d polarity flag %0d", m, inv));
    end else begin
      check(sof_at != pre_end, $sformatf("m=%0d: no sof with %0d errors, %0d allowed, en %0d", m, nerr, allow, enable));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m <= 8; m = (m == 0) ? 2 : 2 * m) begin
      run(m, 0, 0, 0, 1);
      run(m, 1, 0, 0, 1);
      run(m, 0, 2, 2, 1);
      run(m, 1, 2, 1, 1);
      run(m, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
