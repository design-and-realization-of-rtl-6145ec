// pie_encoder: Pulse-Interval Encoding of reader-to-tag symbols. Each symbol
// is a stretch of carrier-high followed by a low pulse of width PW; the symbol
// length carries the information: data-0 lasts one Tari, data-1 1.5 or 2 Tari,
// RTcal = data-0 + data-1, TRcal is set by the CPU, and the delimiter is a
// plain 12.5 us low. Tari is 6.25, 12.5 or 25 us as the CPU selects. PW is
// half a Tari (this design's choice inside the C1G2 range).
// Interface: symbols arrive on a valid/ready stream; a new symbol is taken in
// the last cycle of the previous one, so symbols follow back to back with no
// idle cycle. env is 1 for carrier high and rests at 1 between commands.
// busy is high while a symbol is being sent. The cycle counts derive from
// CLK_HZ (20.48 MHz gives 128 cycles for a 6.25 us Tari).
module pie_encoder
  import rfid_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 20_480_000,
  parameter int unsigned TARI0_CYC = int'((64'(CLK_HZ) * 625) / 100_000_000), // 6.25 us
  parameter int unsigned DELIM_CYC = 2 * TARI0_CYC                            // 12.5 us
) (
  input  logic        clk,
  input  logic        rst_n,
  input  tari_e       tari_sel,
  input  logic        data1_2t,
  input  logic [15:0] trcal_cyc,
  input  logic        sym_valid,
  input  sym_e        sym_type,
  output logic        sym_ready,
  output logic        env,
  output logic        busy
);
  logic [15:0] tari_cyc, data1_cyc, pw_cyc;
  logic [15:0] len, pw, cnt;
  logic        active, is_delim, last_cyc;

  always_comb begin
    case (tari_sel)
      TARI_12P5: tari_cyc = 16'(2 * TARI0_CYC);
      TARI_25:   tari_cyc = 16'(4 * TARI0_CYC);
      default:   tari_cyc = 16'(TARI0_CYC);
    endcase
    data1_cyc = data1_2t ? (tari_cyc << 1) : (tari_cyc + (tari_cyc >> 1));
    pw_cyc    = tari_cyc >> 1;
  end

  assign last_cyc  = active && (cnt == len - 16'd1);
  assign sym_ready = !active || last_cyc;
  assign busy      = active;
  assign env       = !active || (!is_delim && (cnt < len - pw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      is_delim <= 1'b0;
      len      <= 16'd1;
      pw       <= '0;
      cnt      <= '0;
    end else if (sym_ready) begin
      if (sym_valid) begin
        active   <= 1'b1;
        cnt      <= '0;
        pw       <= pw_cyc;
        is_delim <= (sym_type == SYM_DELIM);
        case (sym_type)
          SYM_DELIM: len <= 16'(DELIM_CYC);
          SYM_DATA0: len <= tari_cyc;
          SYM_DATA1: len <= data1_cyc;
          SYM_RTCAL: len <= tari_cyc + data1_cyc;
          default:   len <= trcal_cyc;
        endcase
      end else begin
        active <= 1'b0;
      end
    end else begin
      cnt <= cnt + 16'd1;
    end
  end
endmodule
