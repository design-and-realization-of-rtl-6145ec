// tmpi: Transmitter Message Passing Interface. The CPU (the MAC layer) sets
// the transmit configuration and loads the command bits here, then writes
// the start bit. Word registers (bus_addr, 32-bit data):
//   0x00 CTRL   w: bit0 start (pulse), bit1 carrier on, bit2 arm RX at end
//   0x01 TXCFG  [1:0] Tari, [3:2] modulation, [5:4] CRC, [6] preamble,
//               [7] data-1 = 2 Tari, [15:8] modulation depth /256
//   0x02 TRCAL  [15:0] TRcal in clock cycles
//   0x03 TXLEN  [9:0] command bits (CRC excluded)
//   0x04 STATUS r: bit0 busy, bit1 done (sticky, cleared by start)
//   0x80+n      command buffer byte n (bits sent MSB first from byte 0)
// Writes take effect at the clock edge; reads are combinational. The buffer
// is a plain array read by bit index from the transmit control. The map is
// this design's own; the text names the block and its buffer only.
module tmpi
  import rfid_pkg::*;
#(
  parameter int unsigned BUF_BYTES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  input  logic        bus_we,
  output logic [31:0] bus_rdata,
  output tx_cfg_t     cfg,
  output logic        start,
  input  logic [9:0]  bit_idx,
  output logic        bit_val,
  input  logic        tx_busy,
  input  logic        tx_done,
  output logic        done_flag
);
  localparam int unsigned AW = $clog2(BUF_BYTES);
  logic [7:0] buf_mem [BUF_BYTES];
  logic [AW-1:0] rd_byte;
  logic [7:0] rd_word;

  always_ff @(posedge clk) begin
    if (bus_we && bus_addr[7]) buf_mem[bus_addr[AW-1:0]] <= bus_wdata[7:0];
  end

  assign rd_byte = bit_idx[AW+2:3];
  assign rd_word = buf_mem[rd_byte];
  assign bit_val = rd_word[3'd7 - bit_idx[2:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '{tari: TARI_6P25, mode: MOD_DSB, crc: CRC_NONE, preamble: 1'b0,
                     data1_2t: 1'b1, depth: 8'd230, trcal_cyc: 16'd2048, nbits: 10'd0,
                     cw_en: 1'b0, rx_auto: 1'b1};
      start     <= 1'b0;
      done_flag <= 1'b0;
    end else begin
      start <= 1'b0;
      if (tx_done) done_flag <= 1'b1;
      if (bus_we && !bus_addr[7]) begin
        case (bus_addr[2:0])
          3'd0: begin
            start       <= bus_wdata[0] && !tx_busy;
            cfg.cw_en   <= bus_wdata[1];
            cfg.rx_auto <= bus_wdata[2];
            if (bus_wdata[0]) done_flag <= 1'b0;
          end
          3'd1: begin
            cfg.tari     <= tari_e'(bus_wdata[1:0]);
            cfg.mode     <= mod_mode_e'(bus_wdata[3:2]);
            cfg.crc      <= crc_sel_e'(bus_wdata[5:4]);
            cfg.preamble <= bus_wdata[6];
            cfg.data1_2t <= bus_wdata[7];
            cfg.depth    <= bus_wdata[15:8];
          end
          3'd2: cfg.trcal_cyc <= bus_wdata[15:0];
          3'd3: cfg.nbits     <= bus_wdata[9:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    bus_rdata = '0;
    if (bus_addr[7]) begin
      bus_rdata[7:0] = buf_mem[bus_addr[AW-1:0]];
    end else begin
      case (bus_addr[2:0])
        3'd0: bus_rdata[2:0]  = {cfg.rx_auto, cfg.cw_en, 1'b0};
        3'd1: bus_rdata[15:0] = {cfg.depth, cfg.data1_2t, cfg.preamble, cfg.crc, cfg.mode, cfg.tari};
        3'd2: bus_rdata[15:0] = cfg.trcal_cyc;
        3'd3: bus_rdata[9:0]  = cfg.nbits;
        3'd4: bus_rdata[1:0]  = {done_flag, tx_busy};
        default: ;
      endcase
    end
  end
endmodule
