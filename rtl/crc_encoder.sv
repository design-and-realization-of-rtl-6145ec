// crc_encoder: appends the C1G2 CRC to a serial command. Command bits flow
// through unchanged on a valid/ready bit stream (in_* to out_*) while the
// CRC register follows them; after the bit flagged in_last the block emits
// the CRC, MSB first: five bits of CRC-5 (x^5+x^3+1, preset 01001) or the
// ones-complement of CRC-16 (x^16+x^12+x^5+1, preset FFFF), or nothing when
// CRC_NONE is selected. out_last marks the final bit of the whole frame. The
// selection is sampled with the first bit of a frame. Pass-through is
// combinational (zero latency); the CRC bits follow without a gap.
module crc_encoder
  import rfid_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  crc_sel_e crc_sel,
  input  logic     in_valid,
  input  logic     in_bit,
  input  logic     in_last,
  output logic     in_ready,
  output logic     out_valid,
  output logic     out_bit,
  output logic     out_last,
  input  logic     out_ready
);
  logic [15:0] crc;       // CRC-5 lives in crc[4:0]
  logic        in_frame;  // a frame has started
  crc_sel_e    sel_q;
  logic        tail;      // emitting CRC bits
  logic [3:0]  tcnt;      // CRC bits left minus one
  crc_sel_e    sel_now;

  assign sel_now = in_frame ? sel_q : crc_sel;

  always_comb begin
    if (tail) begin
      out_valid = 1'b1;
      out_bit   = (sel_q == CRC_5) ? crc[tcnt] : ~crc[tcnt];
      out_last  = (tcnt == 4'd0);
      in_ready  = 1'b0;
    end else begin
      out_valid = in_valid;
      out_bit   = in_bit;
      out_last  = in_last && (sel_now == CRC_NONE);
      in_ready  = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc      <= CRC16_PRESET;
      in_frame <= 1'b0;
      sel_q    <= CRC_NONE;
      tail     <= 1'b0;
      tcnt     <= '0;
    end else if (tail) begin
      if (out_ready) begin
        if (tcnt == 4'd0) tail <= 1'b0;
        tcnt <= tcnt - 4'd1;
      end
    end else if (in_valid && out_ready) begin
      if (!in_frame) sel_q <= crc_sel;
      if (sel_now == CRC_5) begin
        crc <= {11'd0, crc5_step(in_frame ? crc[4:0] : CRC5_PRESET, in_bit)};
      end else begin
        crc <= crc16_step(in_frame ? crc : CRC16_PRESET, in_bit);
      end
      if (in_last) begin
        in_frame <= 1'b0;
        tail     <= (sel_now != CRC_NONE);
        tcnt     <= (sel_now == CRC_5) ? 4'd4 : 4'd15;
      end else begin
        in_frame <= 1'b1;
      end
    end
  end
endmodule
