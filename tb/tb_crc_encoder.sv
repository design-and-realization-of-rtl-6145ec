// tb_crc_encoder: random frames of 1..40 bits through the CRC encoder with
// each CRC choice and random stalls on both sides. The output must be the
// frame followed by the C1G2 CRC-5 or inverted CRC-16 computed here with an
// independent reference, with out_last on the final bit.
module tb_crc_encoder;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  crc_sel_e crc_sel = CRC_NONE;
  logic in_valid = 0, in_bit = 0, in_last = 0, in_ready;
  logic out_valid, out_bit, out_last, out_ready = 0;
  int checks = 0, failures = 0;
  crc_encoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  task automatic frame(input int sel, input int n);
    bit data[$], want[$], got[$];
    int c, w, idx = 0, lasts = 0;
    for (int k = 0; k < n; k++) data.push_back(1'($urandom()));
    want = data;
    if (sel != 0) begin
      w = (sel == 1) ? 5 : 16;
      c = ref_crc(data, sel);
      for (int k = w - 1; k >= 0; k--) want.push_back(c[k]);
    end
    crc_sel = crc_sel_e'(sel);
    while (got.size() < want.size()) begin
      @(negedge clk);
      in_valid  = (idx < n) && ($urandom_range(3) != 0);
      in_bit    = (idx < n) ? data[idx] : 1'b0;
      in_last   = (idx == n - 1);
      out_ready = ($urandom_range(3) != 0);
      #1;
      if (out_valid && out_ready) begin
        got.push_back(out_bit);
        if (out_last) begin
          lasts++;
          check(got.size() == want.size(), $sformatf("out_last at bit %0d of %0d", got.size(), want.size()));
        end
      end
      if (in_valid && in_ready) idx++;
    end
    @(negedge clk); in_valid = 0; out_ready = 0;
    check(lasts == 1, "one out_last per frame");
    check(got == want, $sformatf("frame sel=%0d n=%0d", sel, n));
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) frame(t % 3, 1 + $urandom_range(39));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
