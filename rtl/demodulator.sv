// demodulator: turns the zero-IF I/Q samples into one sliced bit per sample.
// The reader's own carrier leaks into the receiver as a large DC level on
// both channels; a first-order average (time constant 2^DC_SHIFT samples)
// tracks and removes it. Depending on the phase between the backscatter and
// the local oscillator, the tag's signal may sit mostly in I or mostly in Q,
// so the block averages the magnitude of four projections (I, Q, I+Q, I-Q)
// and takes the strongest: I or Q for ASK, I+Q or I-Q for PSK. The choice is
// frozen while lock is high (from frame start to frame end) so the polarity
// found by the preamble detector stays valid. bit_out = (chosen >= 0),
// registered on stb; sel reports the projection (0 I, 1 Q, 2 I+Q, 3 I-Q).
// Channel selection by strength follows the text; the averaging, the PSK
// projections and the time constant are this design's choices.
module demodulator #(
  parameter int unsigned DC_SHIFT = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               stb,
  input  logic signed [11:0] i_in,
  input  logic signed [11:0] q_in,
  input  logic               psk,
  input  logic               lock,
  output logic               bit_out,
  output logic [1:0]         sel
);
  localparam int W = 14 + DC_SHIFT;
  logic signed [W-1:0] dc_i_acc, dc_q_acc;
  logic signed [13:0]  xi, xq;
  logic signed [13:0]  proj [4];
  logic        [W-1:0] mag_acc [4];
  logic        [13:0]  absv [4];
  logic        [1:0]   best;

  assign xi = 14'(i_in) - 14'(dc_i_acc >>> DC_SHIFT);
  assign xq = 14'(q_in) - 14'(dc_q_acc >>> DC_SHIFT);

  always_comb begin
    proj[0] = xi;
    proj[1] = xq;
    proj[2] = (xi + xq) >>> 1;
    proj[3] = (xi - xq) >>> 1;
    for (int k = 0; k < 4; k++) absv[k] = proj[k][13] ? 14'(-proj[k]) : 14'(proj[k]);
    if (!psk) best = (mag_acc[1] > mag_acc[0]) ? 2'd1 : 2'd0;
    else      best = (mag_acc[3] > mag_acc[2]) ? 2'd3 : 2'd2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc_i_acc <= '0;
      dc_q_acc <= '0;
      for (int k = 0; k < 4; k++) mag_acc[k] <= '0;
      sel     <= 2'd0;
      bit_out <= 1'b0;
    end else if (stb) begin
      dc_i_acc <= dc_i_acc + W'(xi);
      dc_q_acc <= dc_q_acc + W'(xq);
      for (int k = 0; k < 4; k++)
        mag_acc[k] <= mag_acc[k] + W'(absv[k]) - (mag_acc[k] >> DC_SHIFT);
      if (!lock) sel <= best;
      bit_out <= !proj[lock ? sel : best][13];
    end
  end
endmodule
