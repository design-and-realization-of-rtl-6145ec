// tb_pie_encoder: sends random symbol sequences at each Tari and data-1
// setting and measures the envelope: the time between rising edges is the
// symbol length (Tari, 1.5/2 Tari, RTcal, TRcal), each low pulse lasts
// Tari/2 and the delimiter 12.5 us (256 cycles at 20.48 MHz). Symbols must
// follow back to back. Tari 25 us = 512 cycles gives the 40 kbit/s data-0
// rate quoted for the prototype.
module tb_pie_encoder;
  import rfid_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  tari_e tari_sel = TARI_6P25;
  logic data1_2t = 1, sym_valid = 0, sym_ready, env, busy;
  logic [15:0] trcal_cyc = 16'd700;
  sym_e sym_type = SYM_DATA0;
  int checks = 0, failures = 0;
  pie_encoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  longint rises[$], falls[$];
  logic env_q = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    env_q <= env;
    if (env && !env_q) rises.push_back(cyc);
    if (!env && env_q) falls.push_back(cyc);
  end

  task automatic run(input int ts, input bit d2);
    int tari = 128 << ts;
    int d1 = d2 ? 2 * tari : tari + tari / 2;
    sym_e seq[$];
    int want[$];
    tari_sel = tari_e'(ts); data1_2t = d2;
    seq.push_back(SYM_DELIM); seq.push_back(SYM_DATA0); seq.push_back(SYM_RTCAL); seq.push_back(SYM_TRCAL);
    repeat (10) seq.push_back($urandom_range(1) ? SYM_DATA1 : SYM_DATA0);
    rises.delete(); falls.delete();
    foreach (seq[k]) begin
      @(negedge clk); sym_valid = 1; sym_type = seq[k];
      #1; while (!sym_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk); sym_valid = 0;
    while (busy) @(negedge clk);
    repeat (3) @(negedge clk);
    check(env, "envelope rests high");
    check(rises.size() == seq.size(), $sformatf("%0d rising edges", rises.size()));
    check(rises.size() > 0 && rises[0] - falls[0] == 256, "delimiter 256 cycles");
    for (int k = 1; k < seq.size() && k < rises.size(); k++) begin
      int len = int'(rises[k] - rises[k-1]);
      int w = (seq[k] == SYM_DATA0) ? tari : (seq[k] == SYM_DATA1) ? d1 :
              (seq[k] == SYM_RTCAL) ? tari + d1 : 700;
      check(len == w, $sformatf("symbol %0d length %0d want %0d", k, len, w));
      check(int'(rises[k] - falls[k]) == tari / 2, $sformatf("PW of symbol %0d", k));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int ts = 0; ts < 3; ts++) begin run(ts, 1); run(ts, 0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
