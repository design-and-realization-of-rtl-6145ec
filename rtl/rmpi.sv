// rmpi: Receiver Message Passing Interface. The CPU sets the receive
// configuration here and reads the reply. Decoded bits arrive serially and
// are packed MSB first into bytes, each written to the RX buffer at the next
// byte address as it completes; the bit count is kept, and when the frame
// ends a partial last byte is written left-aligned. Word registers:
//   0x00 CTRL    w: bit0 arm the receiver (pulse)
//   0x01 RXCFG   [1:0] code (FM0, M2, M4, M8), [2] PSK, [3] CRC check,
//                [7:4] preamble mismatches allowed, [15:8] samples per chip
//   0x02 RXLEN   [9:0] reply bits expected
//   0x03 TIMEOUT [19:0] samples to wait for the preamble
//   0x04 STATUS  r: bit0 busy, bit1 done (sticky, cleared by arm), bit2 valid,
//                bit3 CRC ok, bit4 collision, bit5 timeout, [7:6] channel,
//                [25:16] bits received
//   0x80+n       RX buffer byte n
// The data are always written; valid tells the CPU they passed the CRC with
// no collision. Reads are combinational. The map is this design's own.
module rmpi
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
  output rx_cfg_t     cfg,
  output logic        arm,
  input  logic        rx_start,     // reception armed (from any source)
  input  logic        bit_valid,
  input  logic        bit_in,
  input  logic        rx_busy,
  input  logic        rx_done,
  input  rx_status_t  result,
  input  logic [1:0]  chan,
  output logic        done_flag
);
  localparam int unsigned AW = $clog2(BUF_BYTES);
  logic [7:0]  buf_mem [BUF_BYTES];
  logic [7:0]  sh;
  logic [9:0]  nbit;
  rx_status_t  st;
  logic [1:0]  chan_q;
  logic        wr_en;
  logic [AW-1:0] wr_addr;
  logic [7:0]  wr_data;
  logic [2:0]  rem;

  assign rem = nbit[2:0];

  // serial to parallel: buffer write port
  always_comb begin
    wr_en   = 1'b0;
    wr_addr = nbit[AW+2:3];
    wr_data = {sh[6:0], bit_in};
    if (bit_valid && (rem == 3'd7)) begin
      wr_en = 1'b1;
    end else if (rx_done && (rem != 3'd0)) begin
      wr_en   = 1'b1;
      wr_data = sh << (4'd8 - {1'b0, rem});
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) buf_mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= '{code: CODE_FM0, psk: 1'b0, crc_en: 1'b0, err_max: 4'd0,
                     chip_len: 8'd8, nbits: 10'd16, timeout: 20'd4096};
      arm       <= 1'b0;
      sh        <= '0;
      nbit      <= '0;
      st        <= '0;
      chan_q    <= '0;
      done_flag <= 1'b0;
    end else begin
      arm <= 1'b0;
      if (rx_start) begin
        nbit      <= '0;
        done_flag <= 1'b0;
      end else if (bit_valid) begin
        sh   <= {sh[6:0], bit_in};
        nbit <= nbit + 10'd1;
      end
      if (rx_done) begin
        st        <= result;
        chan_q    <= chan;
        done_flag <= 1'b1;
      end
      if (bus_we && !bus_addr[7]) begin
        case (bus_addr[2:0])
          3'd0: arm <= bus_wdata[0] && !rx_busy;
          3'd1: begin
            cfg.code     <= rx_code_e'(bus_wdata[1:0]);
            cfg.psk      <= bus_wdata[2];
            cfg.crc_en   <= bus_wdata[3];
            cfg.err_max  <= bus_wdata[7:4];
            cfg.chip_len <= bus_wdata[15:8];
          end
          3'd2: cfg.nbits   <= bus_wdata[9:0];
          3'd3: cfg.timeout <= bus_wdata[19:0];
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
        3'd1: bus_rdata[15:0] = {cfg.chip_len, cfg.err_max, cfg.crc_en, cfg.psk, cfg.code};
        3'd2: bus_rdata[9:0]  = cfg.nbits;
        3'd3: bus_rdata[19:0] = cfg.timeout;
        3'd4: bus_rdata = {6'd0, nbit, 8'd0, chan_q, st.timeout, st.collision,
                           st.crc_ok, st.valid, done_flag, rx_busy};
        default: ;
      endcase
    end
  end
endmodule
