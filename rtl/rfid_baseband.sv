// rfid_baseband: digital baseband (physical layer) of a UHF RFID
// interrogator for EPC Class-1 Generation-2 tags. The MAC layer runs on a
// CPU that talks to this block through a word register bus; the RF front
// end, DACs and ADCs are outside.
//  Transmit: the CPU loads a command into the TMPI buffer and starts it. The
//   transmit control sends a preamble (Query) or frame-sync, then the command
//   bits with CRC-5/CRC-16 appended, as PIE symbols with Tari 6.25, 12.5 or
//   25 us. The envelope is mapped to DSB-, SSB- or PR-ASK, shaped by a
//   raised-cosine FIR and, for SSB, given its Hilbert-transformed Q
//   component. I/Q leave on dac_i/dac_q at clk/DAC_DIV (dac_stb marks each).
//  Receive: armed automatically at the end of a command (or by the CPU), the
//   receiver takes an I/Q sample every ADC_DIV clocks (adc_stb), low-pass
//   filters both channels, removes the carrier DC and picks the stronger
//   channel, recovers the chip timing, finds the FM0/Miller preamble,
//   decodes the reply, checks its CRC-16 and detects collisions as coding
//   violations. Bits go to the RMPI buffer; status goes to RMPI registers.
// Bus: bus_addr[8] = 0 selects the TMPI registers, 1 the RMPI registers
// (maps in tmpi.sv and rmpi.sv). Writes act on the clock edge, reads are
// combinational. irq is high while a TX or RX done flag is set.
// Clock 20.48 MHz by default: Tari 6.25 us = 128 cycles, 1.28 MS/s ADC rate
// = 16 samples per 80 kHz backscatter period, 5.12 MS/s DAC rate. These
// rates are this design's choices; the text does not give them.
module rfid_baseband
  import rfid_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 20_480_000,
  parameter int unsigned TX_BUF_BYTES = 64,
  parameter int unsigned RX_BUF_BYTES = 64,
  parameter int unsigned DAC_DIV      = 4,
  parameter int unsigned ADC_DIV      = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [8:0]         bus_addr,
  input  logic [31:0]        bus_wdata,
  input  logic               bus_we,
  output logic [31:0]        bus_rdata,
  output logic               irq,
  output logic               dac_stb,
  output logic signed [11:0] dac_i,
  output logic signed [11:0] dac_q,
  output logic               tx_env,
  output logic               carrier_on,
  output logic               adc_stb,
  input  logic signed [11:0] adc_i,
  input  logic signed [11:0] adc_q
);
  // ---------------- sample strobes
  logic [$clog2(DAC_DIV)-1:0] dac_cnt;
  logic [$clog2(ADC_DIV)-1:0] adc_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_cnt <= '0;
      adc_cnt <= '0;
    end else begin
      dac_cnt <= (dac_cnt == $bits(dac_cnt)'(DAC_DIV - 1)) ? '0 : dac_cnt + 1'b1;
      adc_cnt <= (adc_cnt == $bits(adc_cnt)'(ADC_DIV - 1)) ? '0 : adc_cnt + 1'b1;
    end
  end
  assign dac_stb = (dac_cnt == '0);
  assign adc_stb = (adc_cnt == '0);

  // ---------------- CPU bus
  logic [31:0] tx_rdata, rx_rdata;
  logic        tx_we, rx_we;
  assign tx_we     = bus_we && !bus_addr[8];
  assign rx_we     = bus_we &&  bus_addr[8];
  assign bus_rdata = bus_addr[8] ? rx_rdata : tx_rdata;

  // ---------------- transmitter
  tx_cfg_t    tx_cfg;
  logic       tx_start, tx_busy, tx_done, tx_done_flag;
  logic [9:0] bit_idx;
  logic       bit_val;
  logic       pre_start, pre_valid, pre_ready, pre_done;
  sym_e       pre_type;
  logic       ci_valid, ci_bit, ci_last, ci_ready;
  logic       co_valid, co_bit, co_last, co_ready;
  logic       sym_valid, sym_ready, pie_busy, env;
  sym_e       sym_type;
  logic signed [11:0] amp, shaped;

  tmpi #(.BUF_BYTES(TX_BUF_BYTES)) u_tmpi (
    .clk, .rst_n, .bus_addr(bus_addr[7:0]), .bus_wdata, .bus_we(tx_we), .bus_rdata(tx_rdata),
    .cfg(tx_cfg), .start(tx_start), .bit_idx, .bit_val, .tx_busy, .tx_done,
    .done_flag(tx_done_flag));

  tx_control u_txc (
    .clk, .rst_n, .start(tx_start), .cfg(tx_cfg), .bit_idx, .bit_val,
    .pre_start, .pre_valid, .pre_type, .pre_ready, .pre_done,
    .crc_in_valid(ci_valid), .crc_in_bit(ci_bit), .crc_in_last(ci_last), .crc_in_ready(ci_ready),
    .crc_out_valid(co_valid), .crc_out_bit(co_bit), .crc_out_last(co_last), .crc_out_ready(co_ready),
    .sym_valid, .sym_type, .sym_ready, .pie_busy, .busy(tx_busy), .done(tx_done));

  preamble_gen u_pre (
    .clk, .rst_n, .start(pre_start), .preamble(tx_cfg.preamble),
    .sym_valid(pre_valid), .sym_type(pre_type), .sym_ready(pre_ready), .done(pre_done));

  crc_encoder u_crce (
    .clk, .rst_n, .crc_sel(tx_cfg.crc),
    .in_valid(ci_valid), .in_bit(ci_bit), .in_last(ci_last), .in_ready(ci_ready),
    .out_valid(co_valid), .out_bit(co_bit), .out_last(co_last), .out_ready(co_ready));

  pie_encoder #(.CLK_HZ(CLK_HZ)) u_pie (
    .clk, .rst_n, .tari_sel(tx_cfg.tari), .data1_2t(tx_cfg.data1_2t), .trcal_cyc(tx_cfg.trcal_cyc),
    .sym_valid, .sym_type, .sym_ready, .env, .busy(pie_busy));

  ask_modulator u_mod (
    .clk, .rst_n, .env, .mode(tx_cfg.mode), .depth(tx_cfg.depth), .carrier_en(tx_cfg.cw_en), .amp);

  pulse_shaper u_shape (.clk, .rst_n, .stb(dac_stb), .din(amp), .dout(shaped));

  hilbert_ssb u_hilb (
    .clk, .rst_n, .stb(dac_stb), .ssb(tx_cfg.mode == MOD_SSB), .din(shaped), .i_out(dac_i), .q_out(dac_q));

  assign tx_env     = env;
  assign carrier_on = tx_cfg.cw_en;

  // ---------------- receiver
  rx_cfg_t     rx_cfg, rx_cfg_q;
  rx_status_t  rx_status;
  logic        cpu_arm, arm, rx_busy, rx_done, rx_done_flag;
  logic signed [11:0] s_i, s_q, f_i, f_q;
  logic        sliced, lock;
  logic [1:0]  chan;
  logic        chip_valid, chip;
  logic        det_en, sof, inv, dec_start, dec_done, violation, dec_busy;
  logic        bit_valid, bit_out, crc_clear, crc_ok;

  assign arm = (cpu_arm || (tx_done && tx_cfg.rx_auto)) && !rx_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_i <= '0;
      s_q <= '0;
    end else if (adc_stb) begin
      s_i <= adc_i;
      s_q <= adc_q;
    end
  end

  fir_filter u_fir_i (.clk, .rst_n, .stb(adc_stb), .din(s_i), .dout(f_i));
  fir_filter u_fir_q (.clk, .rst_n, .stb(adc_stb), .din(s_q), .dout(f_q));

  demodulator u_demod (
    .clk, .rst_n, .stb(adc_stb), .i_in(f_i), .q_in(f_q), .psk(rx_cfg_q.psk), .lock,
    .bit_out(sliced), .sel(chan));

  bit_sync u_bsync (
    .clk, .rst_n, .stb(adc_stb), .din(sliced), .chip_len(rx_cfg_q.chip_len), .chip_valid, .chip);

  preamble_det u_pdet (
    .clk, .rst_n, .en(det_en), .code(rx_cfg_q.code), .err_max(rx_cfg_q.err_max),
    .chip_valid, .chip, .sof, .inv);

  decoder u_dec (
    .clk, .rst_n, .start(dec_start), .inv, .code(rx_cfg_q.code), .nbits(rx_cfg_q.nbits),
    .chip_valid, .chip, .bit_valid, .bit_out, .done(dec_done), .violation, .busy(dec_busy));

  crc_check u_crcc (.clk, .rst_n, .clear(crc_clear), .bit_valid, .bit_in(bit_out), .ok(crc_ok));

  rx_control u_rxc (
    .clk, .rst_n, .arm, .cfg(rx_cfg), .stb(adc_stb), .sof, .dec_done, .violation, .crc_ok,
    .cfg_q(rx_cfg_q), .det_en, .dec_start, .demod_lock(lock), .crc_clear, .busy(rx_busy),
    .done(rx_done), .status(rx_status));

  rmpi #(.BUF_BYTES(RX_BUF_BYTES)) u_rmpi (
    .clk, .rst_n, .bus_addr(bus_addr[7:0]), .bus_wdata, .bus_we(rx_we), .bus_rdata(rx_rdata),
    .cfg(rx_cfg), .arm(cpu_arm), .rx_start(crc_clear), .bit_valid, .bit_in(bit_out),
    .rx_busy, .rx_done, .result(rx_status), .chan, .done_flag(rx_done_flag));

  assign irq = tx_done_flag || rx_done_flag;

  // a decoded bit can only appear while a frame is being received
  assert property (@(posedge clk) disable iff (!rst_n) bit_valid |-> rx_busy);
  // done is reported only once the last symbol has left the PIE encoder
  assert property (@(posedge clk) disable iff (!rst_n) tx_done |-> !pie_busy);
  // the decoder runs only inside a reception
  assert property (@(posedge clk) disable iff (!rst_n) dec_busy |-> rx_busy);
endmodule
