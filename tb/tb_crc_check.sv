// tb_crc_check: random frames followed by their inverted CRC-16 (computed
// here) must leave the C1G2 residue (ok high); a frame with one flipped bit
// or a wrong CRC must not. clear must restart the check.
module tb_crc_check;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear = 0, bit_valid = 0, bit_in = 0, ok;
  int checks = 0, failures = 0;
  crc_check dut (.*);

  task automatic check(input bit okk, input string what);
    checks++; if (!okk) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int ref_crc16(input bit b[$]);
    int r = 'hFFFF;
    foreach (b[k]) begin
      int top = (r >> 15) & 1;
      r = (r << 1) & 'hFFFF;
      if (top != int'(b[k])) r ^= 'h1021;
    end
    return ~r & 'hFFFF;
  endfunction
  task automatic frame(input int n, input int flip);
    bit d[$];
    int c;
    for (int k = 0; k < n; k++) d.push_back(1'($urandom()));
    c = ref_crc16(d);
    for (int k = 15; k >= 0; k--) d.push_back(c[k]);
    if (flip >= 0) d[flip % d.size()] = !d[flip % d.size()];
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    foreach (d[k]) begin
      @(negedge clk); bit_valid = 1; bit_in = d[k];
      if ($urandom_range(1)) begin @(negedge clk); bit_valid = 0; end
    end
    @(negedge clk); bit_valid = 0;
    check(ok == (flip < 0), $sformatf("frame n=%0d flip=%0d ok=%0d", n, flip, ok));
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) frame(1 + $urandom_range(120), (t % 2) ? int'($urandom_range(200)) : -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
