// rfid_pkg: types, register layouts and CRC step functions shared by the
// UHF RFID interrogator baseband. The transmit side speaks EPC Class-1
// Generation-2 (C1G2) reader-to-tag signalling: PIE symbols with one of three
// Tari values, a preamble or frame-sync at the start of each command, CRC-5 or
// CRC-16 protection, and DSB/SSB/PR-ASK modulation. The receive side decodes
// FM0 or Miller (M = 2, 4, 8) backscatter. The CRC polynomials, presets and
// the preamble patterns are those of the C1G2 standard; register field layouts
// are this design's own choice.
package rfid_pkg;

  // PIE symbols understood by the PIE encoder
  typedef enum logic [2:0] {
    SYM_DELIM = 3'd0,
    SYM_DATA0 = 3'd1,
    SYM_DATA1 = 3'd2,
    SYM_RTCAL = 3'd3,
    SYM_TRCAL = 3'd4
  } sym_e;

  typedef enum logic [1:0] {
    TARI_6P25 = 2'd0,
    TARI_12P5 = 2'd1,
    TARI_25   = 2'd2
  } tari_e;

  typedef enum logic [1:0] {
    MOD_DSB = 2'd0,
    MOD_SSB = 2'd1,
    MOD_PR  = 2'd2
  } mod_mode_e;

  typedef enum logic [1:0] {
    CRC_NONE = 2'd0,
    CRC_5    = 2'd1,
    CRC_16   = 2'd2
  } crc_sel_e;

  typedef enum logic [1:0] {
    CODE_FM0 = 2'd0,
    CODE_M2  = 2'd1,
    CODE_M4  = 2'd2,
    CODE_M8  = 2'd3
  } rx_code_e;

  // Transmit configuration, written by the CPU through the TMPI
  typedef struct packed {
    tari_e      tari;
    mod_mode_e  mode;
    crc_sel_e   crc;
    logic       preamble;   // 1: preamble (Query), 0: frame-sync
    logic       data1_2t;   // 1: data-1 = 2 Tari, 0: 1.5 Tari
    logic [7:0] depth;      // ASK modulation depth in 1/256
    logic [15:0] trcal_cyc; // TRcal length in clock cycles
    logic [9:0] nbits;      // command length in bits (without CRC)
    logic       cw_en;      // carrier on
    logic       rx_auto;    // arm the receiver when the command ends
  } tx_cfg_t;

  // Receive configuration, written by the CPU through the RMPI
  typedef struct packed {
    rx_code_e   code;
    logic       psk;        // 1: PSK demodulation, 0: ASK
    logic       crc_en;     // check CRC-16 on the reply
    logic [3:0] err_max;    // preamble mismatches allowed
    logic [7:0] chip_len;   // samples per half subcarrier period (chip)
    logic [9:0] nbits;      // reply length in bits
    logic [19:0] timeout;   // samples to wait for the preamble
  } rx_cfg_t;

  // Receive result, reported by the receive control block
  typedef struct packed {
    logic       timeout;    // no preamble before the timeout
    logic       collision;  // coding rule violated
    logic       crc_ok;     // CRC residue correct (1 when CRC is off)
    logic       valid;      // data good: crc_ok and no collision and no timeout
  } rx_status_t;

  // One CRC-5 step, C1G2: x^5 + x^3 + 1, preset 5'b01001, MSB first
  function automatic logic [4:0] crc5_step(input logic [4:0] c, input logic b);
    logic fb;
    fb = c[4] ^ b;
    return {c[3:0], 1'b0} ^ (fb ? 5'b01001 : 5'b00000);
  endfunction

  // One CRC-16 step, CCITT: x^16 + x^12 + x^5 + 1, preset 16'hFFFF, MSB first
  function automatic logic [15:0] crc16_step(input logic [15:0] c, input logic b);
    logic fb;
    fb = c[15] ^ b;
    return {c[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
  endfunction

  localparam logic [4:0]  CRC5_PRESET  = 5'b01001;
  localparam logic [15:0] CRC16_PRESET = 16'hFFFF;
  localparam logic [15:0] CRC16_RESIDUE = 16'h1D0F;

  // Number of chips (half subcarrier periods) per data bit
  function automatic int unsigned chips_per_bit(input rx_code_e code);
    case (code)
      CODE_FM0: return 2;
      CODE_M2:  return 4;
      CODE_M4:  return 8;
      default:  return 16;
    endcase
  endfunction

endpackage
