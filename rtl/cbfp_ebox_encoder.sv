// cbfp_ebox_encoder -- converts NV complex IEEE-754 single-precision samples
// into one complex block in the exponent box format.
//
// Algorithm (per block):
//   1. the shared exponent is the largest exponent field among all 2*NV
//      real and imaginary parts;
//   2. each part's distance dE from the shared exponent is computed; if a
//      right shift by dE would remove every bit of the NM-bit mantissa
//      (dE >= BOX), the part's box shift bit is set and dE is reduced by BOX;
//   3. the leading one is restored and the NM-bit mantissa 1.f is shifted
//      right by dE (bits shifted out are truncated).
// Zero and subnormal inputs (exponent field 0) use a hidden bit of 0 and an
// effective exponent of 1. Infinities and NaNs are not given a meaning by
// the format and are treated as ordinary large numbers.
// Timing: combinational, one register stage; the block and out_valid follow
// in_valid by one clock. No back-pressure.
module cbfp_ebox_encoder
  import cbfp_pkg::*;
#(
  parameter int NV = NV_DEFAULT        // complex samples per block
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [IEEE_E+IEEE_F:0]       x_re   [NV],   // IEEE-754 single, real parts
  input  logic [IEEE_E+IEEE_F:0]       x_im   [NV],   // IEEE-754 single, imaginary parts
  output logic                         out_valid,
  output logic [NE-1:0]                y_exp,
  output logic                         y_sign [NV][2],
  output logic                         y_box  [NV][2],
  output logic [NM-1:0]                y_mant [NV][2]
);

  logic [IEEE_E-1:0] e_eff  [NV][2];
  logic [NM-1:0]     m_full [NV][2];
  logic              s_in   [NV][2];
  logic [NE-1:0]     e_com;
  logic              c_sign [NV][2];
  logic              c_box  [NV][2];
  logic [NM-1:0]     c_mant [NV][2];

  always_comb begin
    logic [IEEE_E+IEEE_F:0] w;
    logic [NE-1:0]          de;

    // Unpack and step 1: common exponent.
    e_com = '0;
    for (int k = 0; k < NV; k++) begin
      for (int p = 0; p < 2; p++) begin
        w = (p == RE) ? x_re[k] : x_im[k];
        s_in[k][p]   = w[IEEE_E+IEEE_F];
        e_eff[k][p]  = (w[IEEE_F +: IEEE_E] == '0) ? IEEE_E'(1) : w[IEEE_F +: IEEE_E];
        m_full[k][p] = {(w[IEEE_F +: IEEE_E] != '0), w[IEEE_F-1:0]};
        if (e_eff[k][p] > e_com) e_com = e_eff[k][p];
      end
    end

    // Steps 2 and 3: box shift decision and mantissa scaling.
    for (int k = 0; k < NV; k++) begin
      for (int p = 0; p < 2; p++) begin
        de = e_com - e_eff[k][p];
        c_box[k][p] = (de >= NE'(BOX)) && (m_full[k][p] != '0);
        if (c_box[k][p]) de = de - NE'(BOX);
        c_mant[k][p] = m_full[k][p] >> de;
        c_sign[k][p] = s_in[k][p];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_exp     <= '0;
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          y_sign[k][p] <= 1'b0;
          y_box[k][p]  <= 1'b0;
          y_mant[k][p] <= '0;
        end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_exp  <= e_com;
        y_sign <= c_sign;
        y_box  <= c_box;
        y_mant <= c_mant;
      end
    end
  end

endmodule
