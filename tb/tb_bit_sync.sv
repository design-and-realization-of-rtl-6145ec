// tb_bit_sync: random chips, each held for 7 to 9 samples (a tag clock
// off by up to 12 %) with the sample strobe every 3 clocks; the recovered
// chips must equal the sent ones once the first edge has aligned the
// counter. Runs of two equal chips (the longest FM0 allows) test the
// free-running count between edges.
module tb_bit_sync;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic stb = 0, din = 0, chip_valid, chip;
  logic [7:0] chip_len = 8'd8;
  int checks = 0, failures = 0;
  bit_sync dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit got[$];
  always @(posedge clk) if (chip_valid) got.push_back(chip);

  task automatic sample(input bit v);
    @(negedge clk); din = v; stb = 1;
    @(negedge clk); stb = 0;
    @(negedge clk);
  endtask

  initial begin
    bit sent[$];
    int len, off;
    repeat (2) @(negedge clk); rst_n = 1;
    sent.push_back(1);
    for (int k = 0; k < 300; k++) begin
      int n;
      n = sent.size();
      if (n >= 2 && sent[n-1] == sent[n-2]) sent.push_back(!sent[n-1]);
      else sent.push_back((k % 7 == 0) ? sent[n-1] : 1'($urandom()));
    end
    foreach (sent[k]) begin
      len = 8;
      if (k > 20 && k < 150) len = 9;           // tag slow
      if (k >= 150)          len = 7;           // tag fast
      repeat (len) sample(sent[k]);
    end
    repeat (10) sample(!sent[sent.size()-1]);
    // align: the first chip after the first transition
    off = -1;
    for (int s = 0; s < 8 && off < 0; s++) begin
      bit okk;
      okk = 1;
      for (int k = 0; k < 250; k++) if (s + k >= got.size() || got[s + k] != sent[1 + k]) okk = 0;
      if (okk) off = s;
    end
    check(off >= 0, "recovered chips match the sent ones");
    check(got.size() >= sent.size() - 2 && got.size() <= sent.size() + 2,
          $sformatf("%0d chips for %0d sent", got.size(), sent.size()));
    if (off >= 0)
      for (int k = 0; k < 290; k++) check(got[off + k] == sent[1 + k], $sformatf("chip %0d", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
