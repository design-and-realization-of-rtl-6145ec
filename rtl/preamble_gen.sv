// preamble_gen: start-of-frame symbol source for the PIE transmitter.
// Every reader command starts with a delimiter, a data-0 symbol and RTcal;
// a Query, which opens an inventory round, carries a full preamble that adds
// TRcal, while all other commands carry only that frame-sync. On a start
// pulse the block offers these symbols one by one on a valid/ready stream
// (a symbol moves when sym_valid and sym_ready are both high) and pulses
// done together with the acceptance of the last one. The symbol order is the
// C1G2 one; start is ignored while a sequence is running.
module preamble_gen
  import rfid_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic preamble,     // 1: preamble with TRcal, 0: frame-sync
  output logic sym_valid,
  output sym_e sym_type,
  input  logic sym_ready,
  output logic done
);
  logic [1:0] idx;
  logic       active;
  logic       with_trcal;
  logic       last;

  always_comb begin
    case (idx)
      2'd0:    sym_type = SYM_DELIM;
      2'd1:    sym_type = SYM_DATA0;
      2'd2:    sym_type = SYM_RTCAL;
      default: sym_type = SYM_TRCAL;
    endcase
  end

  assign sym_valid = active;
  assign last      = with_trcal ? (idx == 2'd3) : (idx == 2'd2);
  assign done      = active && sym_ready && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      idx        <= '0;
      with_trcal <= 1'b0;
    end else if (!active) begin
      if (start) begin
        active     <= 1'b1;
        idx        <= '0;
        with_trcal <= preamble;
      end
    end else if (sym_ready) begin
      if (last) active <= 1'b0;
      idx <= idx + 2'd1;
    end
  end
endmodule
