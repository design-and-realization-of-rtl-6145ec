// fir_filter: receive-side low-pass FIR, one per ADC channel (I and Q). It
// takes out wideband noise before demodulation while leaving the backscatter
// edges sharp: a 7-tap binomial kernel 1, 6, 15, 20, 15, 6, 1 (sum 64, unity
// DC gain), about 0.6 of a chip wide at 8 samples per chip. The filter
// advances on each stb; dout is registered and rounded, one strobe after the
// input sample, with a group delay of 3 samples. The text names the FIR but
// not its taps; the kernel is this design's choice.
module fir_filter (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               stb,
  input  logic signed [11:0] din,
  output logic signed [11:0] dout
);
  localparam int NTAPS = 7;
  localparam int COEF [NTAPS] = '{1, 6, 15, 20, 15, 6, 1};
  logic signed [11:0] dl [NTAPS-1];
  logic signed [19:0] acc;

  always_comb begin
    acc = 20'(din) * 20'(COEF[0]);
    for (int k = 1; k < NTAPS; k++) acc += 20'(dl[k-1]) * 20'(COEF[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS - 1; k++) dl[k] <= '0;
      dout <= '0;
    end else if (stb) begin
      dl[0] <= din;
      for (int k = 1; k < NTAPS - 1; k++) dl[k] <= dl[k-1];
      dout <= 12'((acc + 20'sd32) >>> 6);
    end
  end
endmodule
