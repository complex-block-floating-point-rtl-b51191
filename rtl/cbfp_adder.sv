// cbfp_adder -- complex block adder/subtractor for the exponent box format.
//
// Computes, sample by sample, Y[k] = X1[k] + X2[k], or X1[k] - X2[k] where
// sub[k] is set, for two blocks of NV complex samples. Real and imaginary
// parts are handled by identical lanes.
//   Pre-processing: each part's box shift bit selects whether its mantissa
//   is taken as is or shifted right by BOX (undoing the box encoding); the
//   part is placed in a field with BOX extra fraction bits so this shift
//   loses nothing. The block with the smaller shared exponent is shifted
//   right by the exponent difference; the larger exponent is the
//   intermediate exponent. Signs (and sub) select the two's complement.
//   Addition: one signed adder per part.
//   Post-processing (cbfp_postscale): sign/magnitude, block renormalisation
//   when the sum grows beyond MW_OUT mantissa bits (the shared exponent is
//   incremented), truncation logic that re-derives each box shift bit.
// MW_OUT = MW_IN + 1 keeps the one-bit growth of an addition in the
// mantissa instead of in the exponent, as used between FFT stages.
// Timing: combinational datapath, one register stage; y_* and out_valid
// follow in_valid by one clock. No back-pressure.
// The lane structure follows the published block diagram of the adder; the
// extended pre-shift field, the renormalisation on carry-out and the
// registered output are this design's choices.
module cbfp_adder
  import cbfp_pkg::*;
#(
  parameter int NV     = NV_DEFAULT,   // complex samples per block
  parameter int MW_IN  = NM,           // input scaled mantissa width
  parameter int MW_OUT = NM            // output scaled mantissa width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 sub      [NV],
  input  logic [NE-1:0]        a_exp,
  input  logic                 a_sign   [NV][2],
  input  logic                 a_box    [NV][2],
  input  logic [MW_IN-1:0]     a_mant   [NV][2],
  input  logic [NE-1:0]        b_exp,
  input  logic                 b_sign   [NV][2],
  input  logic                 b_box    [NV][2],
  input  logic [MW_IN-1:0]     b_mant   [NV][2],
  output logic                 out_valid,
  output logic [NE-1:0]        y_exp,
  output logic                 y_sign   [NV][2],
  output logic                 y_box    [NV][2],
  output logic [MW_OUT-1:0]    y_mant   [NV][2],
  output logic                 exp_ovf
);

  localparam int XW = BOX + MW_IN;     // unsigned pre-shift field
  localparam int SW = XW + 2;          // signed sum width

  logic [NE-1:0]        e_max;
  logic [NE-1:0]        da, db;
  logic [XW-1:0]        xa, xb;
  logic signed [SW-1:0] sum      [NV][2];

  logic [NE-1:0]        c_exp;
  logic                 c_sign   [NV][2];
  logic                 c_box    [NV][2];
  logic [MW_OUT-1:0]    c_mant   [NV][2];
  logic                 c_ovf;

  always_comb begin
    e_max = (a_exp >= b_exp) ? a_exp : b_exp;
    da    = e_max - a_exp;
    db    = e_max - b_exp;
    for (int k = 0; k < NV; k++) begin
      for (int p = 0; p < 2; p++) begin
        xa = a_box[k][p] ? XW'(a_mant[k][p]) : (XW'(a_mant[k][p]) << BOX);
        xb = b_box[k][p] ? XW'(b_mant[k][p]) : (XW'(b_mant[k][p]) << BOX);
        xa = xa >> da;
        xb = xb >> db;
        sum[k][p] = (a_sign[k][p] ? -$signed(SW'(xa)) : $signed(SW'(xa)))
                  + ((b_sign[k][p] ^ sub[k]) ? -$signed(SW'(xb)) : $signed(SW'(xb)));
      end
    end
  end

  cbfp_postscale #(.NV(NV), .SW(SW), .MW_OUT(MW_OUT)) u_post (
    .s(sum), .e_base(e_max),
    .y_exp(c_exp), .y_sign(c_sign), .y_box(c_box), .y_mant(c_mant), .exp_ovf(c_ovf)
  );

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
