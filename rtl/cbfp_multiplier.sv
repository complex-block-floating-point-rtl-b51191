// cbfp_multiplier -- element-wise complex block multiplier for the exponent
// box format: Y[k] = X1[k] * X2[k] for two blocks of NV complex samples.
//
// Real part:      Re{Y} = Re1*Re2 - Im1*Im2
// Imaginary part: Im{Y} = Re1*Im2 + Im1*Re2
// For each output part the two partial products C and D are formed as full
// 2*NM-bit mantissa products with XOR-ed signs. The box shift bits of the
// factors are counted (A for the factors of C, B for those of D, 0..2 each);
// K = min(A, B) fixes the intermediate exponent E1 + E2 - K*BOX of that
// part, and C and D are shifted right by (A-K)*BOX and (B-K)*BOX before the
// signed addition. This follows the published intermediate-exponent tables.
// Post-scale (block wide): the leading one of every part's sum gives that
// part's own exponent; the largest of them becomes the shared exponent of
// the output block (one comparator per part); each part is then normalised
// and re-encoded exactly as the encoder does it: a part more than BOX
// below the shared exponent gets box=1 and a shift reduced by BOX, bits
// shifted out are truncated.
// A shared exponent above 2^NE-1 saturates and raises exp_ovf; one below 0
// is clamped to 0, which flushes the smallest parts towards zero.
// Timing: combinational datapath, one register stage; y_* and out_valid
// follow in_valid by one clock. No back-pressure.
module cbfp_multiplier
  import cbfp_pkg::*;
#(
  parameter int NV = NV_DEFAULT        // complex samples per block
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NE-1:0]    a_exp,
  input  logic             a_sign [NV][2],
  input  logic             a_box  [NV][2],
  input  logic [NM-1:0]    a_mant [NV][2],
  input  logic [NE-1:0]    b_exp,
  input  logic             b_sign [NV][2],
  input  logic             b_box  [NV][2],
  input  logic [NM-1:0]    b_mant [NV][2],
  output logic             out_valid,
  output logic [NE-1:0]    y_exp,
  output logic             y_sign [NV][2],
  output logic             y_box  [NV][2],
  output logic [NM-1:0]    y_mant [NV][2],
  output logic             exp_ovf
);

  localparam int SW = 2 * NM + 2;      // signed sum width
  localparam int EW = NE + 4;          // signed exponent arithmetic width

  // Per part: sign of the aligned sum, its normalised magnitude and its
  // own exponent.
  logic                 neg   [NV][2];
  logic signed [EW-1:0] e_own [NV][2];
  logic                 nz    [NV][2];
  logic [SW-1:0]        norm  [NV][2];

  logic signed [EW-1:0] e_max;
  logic                 any_nz;
  logic [NE-1:0]        c_exp;
  logic                 c_ovf;
  logic                 c_sign [NV][2];
  logic                 c_box  [NV][2];
  logic [NM-1:0]        c_mant [NV][2];

  // Operand selection of the two partial products of each output part.
  //   part RE: C = a.re*b.re, D = a.im*b.im, D subtracted
  //   part IM: C = a.re*b.im, D = a.im*b.re, D added
  for (genvar k = 0; k < NV; k++) begin : g_smp
    for (genvar p = 0; p < 2; p++) begin : g_part
      localparam int BC = (p == RE) ? RE : IM;   // part of b times a.re
      localparam int BD = (p == RE) ? IM : RE;   // part of b times a.im
      cbfp_mul_lane #(.EW(EW), .SW(SW)) u_lane (
        .e1(a_exp), .e2(b_exp),
        .c1_sign(a_sign[k][RE]), .c1_box(a_box[k][RE]), .c1_mant(a_mant[k][RE]),
        .c2_sign(b_sign[k][BC]), .c2_box(b_box[k][BC]), .c2_mant(b_mant[k][BC]),
        .d1_sign(a_sign[k][IM]), .d1_box(a_box[k][IM]), .d1_mant(a_mant[k][IM]),
        .d2_sign(b_sign[k][BD]), .d2_box(b_box[k][BD]), .d2_mant(b_mant[k][BD]),
        .d_sub(p == RE),
        .neg(neg[k][p]), .nz(nz[k][p]), .norm(norm[k][p]), .e_own(e_own[k][p])
      );
    end
  end

  always_comb begin
    logic signed [EW-1:0] d;

    // Shared exponent: the largest exponent of a non-zero part.
    e_max  = '0;
    any_nz = 1'b0;
    for (int k = 0; k < NV; k++)
      for (int p = 0; p < 2; p++) begin
        if (nz[k][p] && (!any_nz || e_own[k][p] > e_max)) e_max = e_own[k][p];
        any_nz = any_nz | nz[k][p];
      end

    c_ovf = any_nz && (e_max > EW'((1 << NE) - 1));
    if (!any_nz || e_max < 0) c_exp = '0;
    else if (c_ovf)           c_exp = '1;
    else                      c_exp = e_max[NE-1:0];

    for (int k = 0; k < NV; k++) begin
      for (int p = 0; p < 2; p++) begin
        d = EW'(c_exp) - e_own[k][p];
        if (d < 0) d = '0;             // only when the exponent saturated
        c_sign[k][p] = neg[k][p];
        c_box[k][p]  = nz[k][p] && (d >= EW'(BOX));
        if (c_box[k][p]) d = d - EW'(BOX);
        c_mant[k][p] = nz[k][p] ? (norm[k][p][SW-1 -: NM] >> d) : '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_exp     <= '0;
      exp_ovf   <= 1'b0;
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          y_sign[k][p] <= 1'b0;
          y_box[k][p]  <= 1'b0;
          y_mant[k][p] <= '0;
        end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_exp   <= c_exp;
        y_sign  <= c_sign;
        y_box   <= c_box;
        y_mant  <= c_mant;
        exp_ovf <= c_ovf;
      end
    end
  end

endmodule
