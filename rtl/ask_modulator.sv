// ask_modulator: maps the PIE envelope to a signed baseband amplitude for
// the I/Q transmitter. DSB-ASK and SSB-ASK use two levels: AMP when the
// envelope is high and AMP*(1 - depth/256) during a low pulse (SSB gets its
// quadrature component later, in hilbert_ssb). PR-ASK reverses the carrier
// phase at the start of every low pulse and holds the amplitude at zero for
// the pulse, so the RF envelope dips to zero while the phase flips. With the
// carrier off the output is zero. One register stage: amp follows env by one
// clock. Level values and the depth encoding are this design's choices.
module ask_modulator
  import rfid_pkg::*;
#(
  parameter int unsigned AMP = 1800
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               env,
  input  mod_mode_e          mode,
  input  logic [7:0]         depth,
  input  logic               carrier_en,
  output logic signed [11:0] amp
);
  localparam logic signed [11:0] A = 12'(AMP);
  logic        env_q;
  logic        neg;        // PR-ASK phase: 1 = reversed
  logic [19:0] drop;
  logic signed [11:0] low;

  assign drop = 20'(AMP) * 20'(depth);
  assign low  = A - 12'(drop >> 8);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      env_q <= 1'b1;
      neg   <= 1'b0;
      amp   <= '0;
    end else begin
      env_q <= env;
      if (env_q && !env) neg <= !neg;
      if (!carrier_en) begin
        amp <= '0;
      end else if (mode == MOD_PR) begin
        if (!env)     amp <= '0;
        else if (neg) amp <= -A;
        else          amp <= A;
      end else begin
        amp <= env ? A : low;
      end
    end
  end
endmodule
