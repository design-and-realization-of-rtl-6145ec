// hilbert_ssb: quadrature branch of the single-sideband transmitter. For
// SSB-ASK the Q output is the Hilbert transform of the I input, so the
// quadrature modulator cancels one sideband; I is delayed by the filter's
// group delay (15 samples) to stay aligned. For DSB-ASK and PR-ASK Q is zero
// and I is the same delayed input. The filter is a 31-tap Hilbert FIR,
// h[n] = 2/(pi*n) * (0.54 + 0.46*cos(pi*n/16)) for odd n, 0 for even n,
// scaled by 4096; only the odd taps are stored. Outputs are registered,
// saturated to 12 bits, and update on stb. The text calls this a Hartley
// transform; tap count and window are this design's choices.
module hilbert_ssb (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               stb,
  input  logic               ssb,
  input  logic signed [11:0] din,
  output logic signed [11:0] i_out,
  output logic signed [11:0] q_out
);
  localparam int NTAPS = 31;
  localparam int HALF = NTAPS / 2;             // 15
  // coefficients for n = 1, 3, 5, ..., 15 (h[-n] = -h[n])
  localparam int COEF [8] = '{2585, 802, 415, 235, 130, 67, 32, 15};
  logic signed [11:0] dl [NTAPS];              // dl[0] newest
  logic signed [27:0] acc;
  logic signed [27:0] q_full;

  // y[m] = sum_n h[n] x[m-n]; centred on dl[HALF]: x[m-n] = dl[HALF+n]
  always_comb begin
    acc = '0;
    for (int j = 0; j < (HALF + 1) / 2; j++) begin
      acc += 28'(COEF[j]) * (28'(dl[HALF + (2*j + 1)]) - 28'(dl[HALF - (2*j + 1)]));
    end
    q_full = (acc + 28'sd2048) >>> 12;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS; k++) dl[k] <= '0;
      i_out <= '0;
      q_out <= '0;
    end else if (stb) begin
      dl[0] <= din;
      for (int k = 1; k < NTAPS; k++) dl[k] <= dl[k-1];
      i_out <= dl[HALF];
      if (!ssb)                   q_out <= '0;
      else if (q_full > 28'sd2047)  q_out <= 12'sd2047;
      else if (q_full < -28'sd2048) q_out <= -12'sd2048;
      else                        q_out <= 12'(q_full);
    end
  end
endmodule
