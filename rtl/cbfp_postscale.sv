// cbfp_postscale -- output stage of the complex block adders: turns signed
// fixed-point sums back into an exponent box encoded complex block.
//
// Every input sum s[k][p] is a two's-complement number whose LSB weighs
// 2^(e_base - BIAS - (NM-1) - BOX), i.e. the LSB of a box-shifted mantissa
// of a block with exponent e_base. The stage works in three steps:
//   1. sign/magnitude conversion of every part;
//   2. block renormalisation: if any magnitude needs more than BOX+MW_OUT
//      bits (word growth of the addition), the shared exponent is raised by
//      the number of extra bits and every magnitude is shifted right by the
//      same amount (truncating);
//   3. truncation logic per part: a magnitude with bits at or above weight
//      2^BOX keeps box=0 and its upper MW_OUT bits; a smaller non-zero
//      magnitude is stored with box=1 and its lower bits; all bits below the
//      box LSB are dropped (truncation, no rounding).
// exp_ovf flags a shared exponent that would leave the NE-bit range; the
// exponent then saturates. Purely combinational.
module cbfp_postscale
  import cbfp_pkg::*;
#(
  parameter int NV     = 4,            // complex samples per block
  parameter int SW     = BOX + NM + 3, // width of the signed input sums
  parameter int MW_OUT = NM            // width of the output scaled mantissas
) (
  input  logic signed [SW-1:0]     s        [NV][2],
  input  logic        [NE-1:0]     e_base,
  output logic        [NE-1:0]     y_exp,
  output logic                     y_sign   [NV][2],
  output logic                     y_box    [NV][2],
  output logic        [MW_OUT-1:0] y_mant   [NV][2],
  output logic                     exp_ovf
);

  localparam int TH = BOX + MW_OUT;    // magnitude bits the output can hold

  logic [SW-1:0] mag    [NV][2];
  logic [SW-1:0] mag_sh [NV][2];
  logic [SW-1:0] mag_or;
  int            len;                  // bit length of the largest magnitude
  int            grow;                 // extra bits beyond TH
  logic [NE+1:0] e_new;

  always_comb begin
    mag_or = '0;
    for (int k = 0; k < NV; k++) begin
      for (int p = 0; p < 2; p++) begin
        mag[k][p] = s[k][p][SW-1] ? SW'(-s[k][p]) : SW'(s[k][p]);
        mag_or    = mag_or | mag[k][p];
      end
    end

    len = 0;
    for (int b = 0; b < SW; b++)
      if (mag_or[b]) len = b + 1;
    grow = (len > TH) ? len - TH : 0;

    e_new   = (NE+2)'(e_base) + (NE+2)'(grow);
    exp_ovf = (e_new > (NE+2)'((1 << NE) - 1));
    y_exp   = exp_ovf ? '1 : e_new[NE-1:0];

    for (int k = 0; k < NV; k++) begin
      for (int p = 0; p < 2; p++) begin
        mag_sh[k][p] = mag[k][p] >> grow;
        y_sign[k][p] = s[k][p][SW-1];
        if ((mag_sh[k][p] >> BOX) != '0) begin
          y_box[k][p]  = 1'b0;
          y_mant[k][p] = MW_OUT'(mag_sh[k][p] >> BOX);
        end else begin
          y_box[k][p]  = (mag_sh[k][p] != '0);
          y_mant[k][p] = MW_OUT'(mag_sh[k][p]);
        end
      end
    end
  end

endmodule
