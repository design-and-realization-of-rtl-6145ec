// decoder: FM0 and Miller-M decoder for the tag's reply. After frame start
// it groups the chips from the bit synchroniser into bits (2 chips for FM0,
// 2M for Miller), corrected for the polarity the preamble detector found.
//  FM0: the level inverts at every bit boundary; data-0 also inverts mid-bit.
//       bit = (first chip == second chip). A missing boundary inversion is a
//       coding violation.
//  Miller: each half-bit is M chips of subcarrier; its baseband level is the
//       majority of chips that agree with the subcarrier phase. Data-1 has a
//       mid-bit inversion; a boundary inversion occurs only between two
//       data-0s. Any other boundary behaviour is a coding violation.
// A violation means overlapping replies from several tags or a corrupted
// reply; violation stays set until the next start (collision report).
// bit_valid pulses one cycle after the chip that ended the bit; done pulses
// with the nbits-th bit. The trailing dummy-1 is not examined. The rules are
// those of C1G2; reading violations as collisions is this design's method.
module decoder
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       inv,
  input  rx_code_e   code,
  input  logic [9:0] nbits,
  input  logic       chip_valid,
  input  logic       chip,
  output logic       bit_valid,
  output logic       bit_out,
  output logic       done,
  output logic       violation,
  output logic       busy
);
  logic       active, inv_q;
  rx_code_e   code_q;
  logic [9:0] nb_q, bcnt;
  logic [3:0] ccnt;        // chip index in the half-bit
  logic       half;        // 0 first half, 1 second half
  logic [4:0] match;       // chips agreeing with the subcarrier in the half
  logic       lvl_a;       // level of the first half
  logic       prev_b;      // level at the end of the previous bit
  logic       prev_bit;
  logic       c;
  logic [3:0] m_chips;     // chips per half-bit
  logic       sc;          // subcarrier phase of this chip
  logic [4:0] match_n;
  logic       lvl;         // level of the half-bit just completed
  logic       this_bit;
  logic       bad;

  assign busy = active;
  assign c    = chip ^ inv_q;

  always_comb begin
    case (code_q)
      CODE_M2: m_chips = 4'd2;
      CODE_M4: m_chips = 4'd4;
      CODE_M8: m_chips = 4'd8;
      default: m_chips = 4'd1;
    endcase
    sc      = (code_q == CODE_FM0) ? 1'b1 : !ccnt[0];
    match_n = match + {4'd0, (c == sc)};
    lvl     = ({match_n, 1'b0} >= {2'b0, m_chips});
    this_bit = (code_q == CODE_FM0) ? (lvl_a == lvl) : (lvl_a != lvl);
    if (code_q == CODE_FM0)
      bad = (lvl_a == prev_b);
    else if (!this_bit && !prev_bit)
      bad = (lvl_a == prev_b);
    else
      bad = (lvl_a != prev_b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      inv_q     <= 1'b0;
      code_q    <= CODE_FM0;
      nb_q      <= '0;
      bcnt      <= '0;
      ccnt      <= '0;
      half      <= 1'b0;
      match     <= '0;
      lvl_a     <= 1'b0;
      prev_b    <= 1'b1;
      prev_bit  <= 1'b1;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      done      <= 1'b0;
      violation <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
      done      <= 1'b0;
      if (start) begin
        active    <= (nbits != 10'd0);
        inv_q     <= inv;
        code_q    <= code;
        nb_q      <= nbits;
        bcnt      <= '0;
        ccnt      <= '0;
        half      <= 1'b0;
        match     <= '0;
        prev_b    <= 1'b1;   // both preambles end high, data-1
        prev_bit  <= 1'b1;
        violation <= 1'b0;
      end else if (active && chip_valid) begin
        if (ccnt + 4'd1 == m_chips) begin
          ccnt  <= '0;
          match <= '0;
          if (!half) begin
            lvl_a <= lvl;
            half  <= 1'b1;
          end else begin
            half      <= 1'b0;
            bit_valid <= 1'b1;
            bit_out   <= this_bit;
            if (bad) violation <= 1'b1;
            prev_b    <= lvl;
            prev_bit  <= this_bit;
            bcnt      <= bcnt + 10'd1;
            if (bcnt + 10'd1 == nb_q) begin
              active <= 1'b0;
              done   <= 1'b1;
            end
          end
        end else begin
          ccnt  <= ccnt + 4'd1;
          match <= match_n;
        end
      end
    end
  end
endmodule
