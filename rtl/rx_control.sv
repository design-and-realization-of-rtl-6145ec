// rx_control: receive control block. On arm it latches the receive
// configuration (ASK/PSK, FM0/Miller-M, CRC on/off, reply length, preamble
// tolerance, chip length, timeout) so a CPU write during a reply cannot
// disturb it, presets the CRC checker and enables the preamble detector.
//   WAIT: counts samples; the preamble starts the decoder (and freezes the
//         demodulator's channel choice); reaching the timeout ends the
//         reception with the timeout flag ("no data").
//   RECV: runs until the decoder has delivered all bits.
//   FIN:  one cycle later, with the CRC result settled, reports the status
//         (collision = a coding violation; valid = CRC good or not checked,
//         no collision) and pulses done.
// The states and the status encoding are this design's; the text says only
// that this block drives the mode selects of the other receive blocks.
module rx_control
  import rfid_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       arm,
  input  rx_cfg_t    cfg,
  input  logic       stb,
  input  logic       sof,
  input  logic       dec_done,
  input  logic       violation,
  input  logic       crc_ok,
  output rx_cfg_t    cfg_q,
  output logic       det_en,
  output logic       dec_start,
  output logic       demod_lock,
  output logic       crc_clear,
  output logic       busy,
  output logic       done,
  output rx_status_t status
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_RECV, S_FIN} state_e;
  state_e      state;
  logic [19:0] tcnt;

  assign det_en     = (state == S_WAIT);
  assign dec_start  = (state == S_WAIT) && sof;
  assign demod_lock = (state == S_RECV) || (state == S_FIN);
  assign crc_clear  = (state == S_IDLE) && arm;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      tcnt   <= '0;
      cfg_q  <= '0;
      done   <= 1'b0;
      status <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (arm) begin
          cfg_q <= cfg;
          tcnt  <= '0;
          state <= S_WAIT;
        end
        S_WAIT: begin
          if (sof) begin
            state <= S_RECV;
          end else if (stb) begin
            if (tcnt + 20'd1 >= cfg_q.timeout) begin
              status <= '{timeout: 1'b1, collision: 1'b0, crc_ok: 1'b0, valid: 1'b0};
              done   <= 1'b1;
              state  <= S_IDLE;
            end
            tcnt <= tcnt + 20'd1;
          end
        end
        S_RECV: if (dec_done) state <= S_FIN;
        default: begin
          status.timeout   <= 1'b0;
          status.collision <= violation;
          status.crc_ok    <= crc_ok || !cfg_q.crc_en;
          status.valid     <= (crc_ok || !cfg_q.crc_en) && !violation;
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
