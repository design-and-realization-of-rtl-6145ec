// preamble_det: frame synchronisation for the tag's reply. The last MAXW
// chips are kept in a shift register and compared with the reply preamble
// of the selected code: for FM0 the 12 chips of "1 0 1 0 v 1" (v = a missing
// bit-boundary transition), for Miller-M the baseband "0 1 0 1 1 1" times M
// subcarrier cycles per bit, 12*M chips. The number of mismatching chips is
// the running-window correlation; the frame starts when it is at most err_max
// for the pattern (inv = 0) or for its complement (inv = 1: the chosen I/Q
// channel carries the reply inverted). sof is registered: it pulses one
// cycle after the chip_valid that completed the preamble, and only while en
// is high. Patterns are those of C1G2; the text gives the FM0 one by example.
module preamble_det
  import rfid_pkg::*;
#(
  parameter int unsigned MAXW = 96
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  rx_code_e   code,
  input  logic [3:0] err_max,
  input  logic       chip_valid,
  input  logic       chip,
  output logic       sof,
  output logic       inv
);
  // Miller baseband half-bit levels of 0 1 0 1 1 1 (after a pilot of zeros)
  localparam logic [11:0] MILLER_HALVES = 12'b1110_0001_1001;  // time order, MSB first
  localparam logic [11:0] FM0_CHIPS     = 12'b1101_0010_0011;

  logic [MAXW-1:0] win, win_next, pat, mask;
  logic [7:0]      plen, mism, mism_c;
  int unsigned     m_log;

  assign win_next = {win[MAXW-2:0], chip};

  // pat[k] is the chip expected k chips before the newest one
  always_comb begin
    pat  = '0;
    mask = '0;
    case (code)
      CODE_M2: m_log = 1;
      CODE_M4: m_log = 2;
      CODE_M8: m_log = 3;
      default: m_log = 0;
    endcase
    plen = (code == CODE_FM0) ? 8'd12 : 8'(12 << m_log);
    for (int t = 0; t < MAXW; t++) begin
      if (t < int'(plen)) begin
        mask[int'(plen) - 1 - t] = 1'b1;
        if (code == CODE_FM0)
          pat[int'(plen) - 1 - t] = FM0_CHIPS[11 - t];
        else
          pat[int'(plen) - 1 - t] = MILLER_HALVES[11 - (t >> m_log)] ^ t[0];
      end
    end
    mism = '0;
    for (int k = 0; k < MAXW; k++) mism += {7'd0, (win_next[k] ^ pat[k]) & mask[k]};
    mism_c = plen - mism;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
      sof <= 1'b0;
      inv <= 1'b0;
    end else begin
      sof <= 1'b0;
      if (chip_valid) begin
        win <= win_next;
        if (en && (mism <= {4'd0, err_max})) begin
          sof <= 1'b1;
          inv <= 1'b0;
        end else if (en && (mism_c <= {4'd0, err_max})) begin
          sof <= 1'b1;
          inv <= 1'b1;
        end
      end
    end
  end
endmodule
