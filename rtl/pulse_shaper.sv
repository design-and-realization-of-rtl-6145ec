// pulse_shaper: raised-cosine FIR that softens the ASK edges before the DAC
// so the RF envelope meets the C1G2 rise/fall limits. Taps follow
// h[n] = 1 - cos(2*pi*(n+1)/9), n = 0..7, scaled to sum 256 (unity DC gain):
// 7, 24, 42, 55, 55, 42, 24, 7. At the DAC rate of 5.12 MS/s an edge takes
// about 1.5 us, a quarter of the shortest Tari. The filter advances on each
// stb; dout is registered and appears one strobe after the sample is taken
// (group delay 3.5 samples). The taps are this design's choice; the text
// only names a raised-cosine pulse shaping filter.
module pulse_shaper (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               stb,
  input  logic signed [11:0] din,
  output logic signed [11:0] dout
);
  localparam int NTAPS = 8;
  localparam int COEF [8] = '{7, 24, 42, 55, 55, 42, 24, 7};
  logic signed [11:0] dl [NTAPS-1];
  logic signed [23:0] acc;

  always_comb begin
    acc = 24'(din) * 24'(COEF[0]);
    for (int k = 1; k < NTAPS; k++) acc += 24'(dl[k-1]) * 24'(COEF[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS - 1; k++) dl[k] <= '0;
      dout <= '0;
    end else if (stb) begin
      dl[0] <= din;
      for (int k = 1; k < NTAPS - 1; k++) dl[k] <= dl[k-1];
      dout <= 12'((acc + 24'sd128) >>> 8);
    end
  end
endmodule
