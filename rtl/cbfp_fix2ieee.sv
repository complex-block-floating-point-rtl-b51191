// cbfp_fix2ieee -- "IEEE-754 converter" of the two-ADC front end: turns one
// signed ADC code into an IEEE-754 single-precision number and removes the
// automatic gain control (AGC) gain on the way.
//
// The ADC code v is read as a two's-complement fraction in [-1, 1) with
// ADC_W-1 fraction bits. The AGC gain is taken to be a power of two,
// g = 2^g_exp, so the division by g is exact and reduces to an exponent
// subtraction:  x = v * 2^-(ADC_W-1) / 2^g_exp.
// The conversion finds the leading one of |v|, forms the biased exponent and
// left-aligns the remaining bits into the 23-bit fraction. With ADC_W <= 24
// it is exact (no rounding). A code of zero, or a result whose exponent
// falls below the normal range, gives +0; a result above the range
// saturates to the largest finite number.
// Timing: one register stage; y and out_valid follow in_valid by one clock.
// The top bit of the normalised magnitude is the hidden IEEE bit and is
// deliberately left unused (lint reports it as an unused signal bit).
// The converter's place in the receiver follows the two-ADC front end; the
// ADC width, the power-of-two gain and the flush/saturate rules are this
// design's own choices.
module cbfp_fix2ieee
  import cbfp_pkg::*;
#(
  parameter int ADC_W = 16,            // ADC code width
  parameter int GW    = 8              // width of the signed AGC gain exponent
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [ADC_W-1:0]    v,          // ADC output code
  input  logic signed [GW-1:0]       g_exp,      // AGC gain g = 2^g_exp
  output logic                       out_valid,
  output logic [IEEE_E+IEEE_F:0]     y           // IEEE-754 single
);

  localparam int EW = IEEE_E + 3;      // signed exponent arithmetic width

  logic [IEEE_E+IEEE_F:0] c_y;

  always_comb begin
    logic [ADC_W-1:0]     mag;
    logic [ADC_W-1:0]     norm;
    logic signed [EW-1:0] e;
    logic                 s;
    int                   lead;

    s    = v[ADC_W-1];
    mag  = s ? ADC_W'(-v) : ADC_W'(v);
    lead = 0;
    for (int b = 0; b < ADC_W; b++)
      if (mag[b]) lead = b;
    norm = mag << (ADC_W - 1 - lead);
    e    = EW'(BIAS) + EW'(lead) - EW'(ADC_W - 1) - EW'(g_exp);

    if (mag == '0 || e <= 0)
      c_y = '0;
    else if (e >= EW'((1 << IEEE_E) - 1))
      c_y = {s, IEEE_E'((1 << IEEE_E) - 2), {IEEE_F{1'b1}}};
    else
      c_y = {s, e[IEEE_E-1:0], IEEE_F'({norm[ADC_W-2:0], {(IEEE_F + 1){1'b0}}} >> ADC_W)};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= c_y;
    end
  end

endmodule
