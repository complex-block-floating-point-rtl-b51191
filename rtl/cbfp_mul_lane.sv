// cbfp_mul_lane -- one output part (real or imaginary) of one sample of the
// complex block multiplier, up to the intermediate sum.
//
// Inputs are the two partial products' factors: C = c1*c2 and D = d1*d2,
// each factor with its sign and box shift bit; D is subtracted when d_sub
// is set (real part: Re1*Re2 - Im1*Im2). The box bits of C's factors are
// counted (A, 0..2), likewise for D (B); K = min(A, B) selects the
// intermediate exponent E1 + E2 - K*BOX, and C and D are shifted right by
// (A-K)*BOX and (B-K)*BOX before the signed addition.
// Outputs: sign and magnitude of the sum, the magnitude left-normalised
// (leading one at the MSB), a non-zero flag and the part's own biased
// exponent (exponent of its leading one). Purely combinational.
module cbfp_mul_lane
  import cbfp_pkg::*;
#(
  parameter int EW = NE + 4,           // signed exponent arithmetic width
  parameter int SW = 2 * NM + 2        // signed sum width
) (
  input  logic [NE-1:0]        e1,
  input  logic [NE-1:0]        e2,
  input  logic                 c1_sign, c1_box,
  input  logic [NM-1:0]        c1_mant,
  input  logic                 c2_sign, c2_box,
  input  logic [NM-1:0]        c2_mant,
  input  logic                 d1_sign, d1_box,
  input  logic [NM-1:0]        d1_mant,
  input  logic                 d2_sign, d2_box,
  input  logic [NM-1:0]        d2_mant,
  input  logic                 d_sub,
  output logic                 neg,
  output logic                 nz,
  output logic [SW-1:0]        norm,
  output logic signed [EW-1:0] e_own
);

  localparam int PW = 2 * NM;

  logic [PW-1:0]        pc, pd;
  logic [1:0]           ca, cb, kk;
  logic                 sc, sd;
  logic signed [SW-1:0] sum;
  logic [SW-1:0]        mag;
  int                   lead;

  always_comb begin
    ca = 2'(c1_box) + 2'(c2_box);
    cb = 2'(d1_box) + 2'(d2_box);
    kk = (ca < cb) ? ca : cb;
    sc = c1_sign ^ c2_sign;
    sd = d1_sign ^ d2_sign ^ d_sub;
    pc = (PW'(c1_mant) * PW'(c2_mant)) >> (BOX * (int'(ca) - int'(kk)));
    pd = (PW'(d1_mant) * PW'(d2_mant)) >> (BOX * (int'(cb) - int'(kk)));
    sum = (sc ? -$signed(SW'(pc)) : $signed(SW'(pc)))
        + (sd ? -$signed(SW'(pd)) : $signed(SW'(pd)));
    neg = sum[SW-1];
    mag = neg ? SW'(-sum) : SW'(sum);
    nz  = (mag != '0);
    lead = 0;
    for (int b = 0; b < SW; b++)
      if (mag[b]) lead = b;
    norm  = mag << (SW - 1 - lead);
    e_own = EW'(e1) + EW'(e2) - EW'(BIAS) - EW'(2 * (NM - 1))
          - EW'(BOX * int'(kk)) + EW'(lead);
  end

endmodule
