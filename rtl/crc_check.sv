// crc_check: CRC-16 check of a tag reply. clear presets the register to
// FFFF; each bit_valid shifts one received bit (data, then the tag's
// ones-complemented CRC-16) through x^16+x^12+x^5+1. When the whole frame
// has passed without error the register holds the C1G2 residue 1D0F, and ok
// is high. ok is registered and valid from the cycle after the last bit.
module crc_check
  import rfid_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic bit_valid,
  input  logic bit_in,
  output logic ok
);
  logic [15:0] crc;

  assign ok = (crc == CRC16_RESIDUE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         crc <= CRC16_PRESET;
    else if (clear)     crc <= CRC16_PRESET;
    else if (bit_valid) crc <= crc16_step(crc, bit_in);
  end
endmodule
