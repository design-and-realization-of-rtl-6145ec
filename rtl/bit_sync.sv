// bit_sync: recovers the chip clock of the tag's reply. A chip is half a
// period of the backscatter link frequency (half an FM0 bit, or half a Miller
// subcarrier cycle) and lasts chip_len samples. A counter runs over each chip
// and the chip value is the majority of its samples, a running-window
// correlation against a threshold of half the window. Every transition of
// the sliced input realigns the counter: a transition past mid-chip closes
// the current chip early, one before mid-chip restarts the count. So the
// timing follows the tag's clock, which C1G2 lets drift by several percent.
// chip_valid pulses for one cycle with chip, one clock after the stb that
// completed the chip. Edge realignment is this design's method; the text
// gives only the running-window correlation.
module bit_sync (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       stb,
  input  logic       din,
  input  logic [7:0] chip_len,
  output logic       chip_valid,
  output logic       chip
);
  logic       prev;
  logic [7:0] cnt;    // samples in the current chip
  logic [7:0] ones;   // of which high
  logic       edge_s;

  assign edge_s = (din != prev);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= 1'b0;
      cnt        <= '0;
      ones       <= '0;
      chip_valid <= 1'b0;
      chip       <= 1'b0;
    end else begin
      chip_valid <= 1'b0;
      if (stb) begin
        prev <= din;
        if (edge_s && (cnt >= (chip_len >> 1)) && (cnt != 8'd0)) begin
          chip_valid <= 1'b1;
          chip       <= ({ones, 1'b0} > {1'b0, cnt});
          cnt        <= 8'd1;
          ones       <= {7'd0, din};
        end else if (edge_s) begin
          cnt  <= 8'd1;
          ones <= {7'd0, din};
        end else if (cnt + 8'd1 >= chip_len) begin
          chip_valid <= 1'b1;
          chip       <= ({ones + {7'd0, din}, 1'b0} > {1'b0, chip_len});
          cnt        <= '0;
          ones       <= '0;
        end else begin
          cnt  <= cnt + 8'd1;
          ones <= ones + {7'd0, din};
        end
      end
    end
  end
endmodule
