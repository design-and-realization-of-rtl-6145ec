// tx_control: sequences one reader command. On start it runs the
// preamble/frame-sync generator, then reads the command bits from the TX
// buffer by index (MSB of byte 0 first) and streams them through the CRC
// encoder, turning each output bit into a data-0 or data-1 PIE symbol. When
// the last symbol has been taken by the PIE encoder it waits for the encoder
// to finish that symbol's low pulse, then pulses done (one cycle) and drops
// busy. The FSM (IDLE, SOF, DATA, DRAIN) is this design's own; the text only
// says that a transmit control module drives the chain.
module tx_control
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  tx_cfg_t    cfg,
  // TX buffer read
  output logic [9:0] bit_idx,
  input  logic       bit_val,
  // preamble generator
  output logic       pre_start,
  input  logic       pre_valid,
  input  sym_e       pre_type,
  output logic       pre_ready,
  input  logic       pre_done,
  // CRC encoder
  output logic       crc_in_valid,
  output logic       crc_in_bit,
  output logic       crc_in_last,
  input  logic       crc_in_ready,
  input  logic       crc_out_valid,
  input  logic       crc_out_bit,
  input  logic       crc_out_last,
  output logic       crc_out_ready,
  // PIE encoder
  output logic       sym_valid,
  output sym_e       sym_type,
  input  logic       sym_ready,
  input  logic       pie_busy,
  output logic       busy,
  output logic       done
);
  typedef enum logic [1:0] {S_IDLE, S_SOF, S_DATA, S_DRAIN} state_e;
  state_e     state;
  logic [9:0] idx;
  logic [9:0] nbits;

  assign bit_idx       = idx;
  assign pre_start     = (state == S_IDLE) && start;
  assign pre_ready     = (state == S_SOF) && sym_ready;
  assign crc_in_valid  = (state == S_DATA) && (idx < nbits);
  assign crc_in_bit    = bit_val;
  assign crc_in_last   = (idx == nbits - 10'd1);
  assign crc_out_ready = (state == S_DATA) && sym_ready;
  assign busy          = (state != S_IDLE);

  always_comb begin
    sym_valid = 1'b0;
    sym_type  = SYM_DATA0;
    if (state == S_SOF) begin
      sym_valid = pre_valid;
      sym_type  = pre_type;
    end else if (state == S_DATA) begin
      sym_valid = crc_out_valid;
      sym_type  = crc_out_bit ? SYM_DATA1 : SYM_DATA0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      nbits <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          nbits <= cfg.nbits;
          state <= S_SOF;
        end
        S_SOF: if (pre_done) state <= (nbits == 10'd0) ? S_DRAIN : S_DATA;
        S_DATA: begin
          if (crc_in_valid && crc_in_ready) idx <= idx + 10'd1;
          if (crc_out_valid && sym_ready && crc_out_last) state <= S_DRAIN;
        end
        default: if (!pie_busy) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
      endcase
    end
  end
endmodule
