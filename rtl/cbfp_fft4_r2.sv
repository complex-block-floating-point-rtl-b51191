// cbfp_fft4_r2 -- 4-point FFT of one exponent box encoded block of four
// complex samples, built from two radix-2 stages of complex block adders.
//
//   stage 1:  v0 = x0 + x2   v1 = x0 - x2   v2 = x1 + x3   v3 = x1 - x3
//   twiddle:  v3 <- -j * v3  (real and imaginary fields swapped, the new
//             imaginary sign inverted; no multiplier is needed)
//   stage 2:  X0 = v0 + v2   X1 = v1 + v3   X2 = v0 - v2   X3 = v1 - v3
//
// The four inputs share one exponent, so stage 1 needs no exponent
// alignment. Stage 1 keeps its one-bit word growth in an NM+1-bit mantissa
// and leaves the shared exponent unchanged; stage 2 renormalises the block
// back to NM-bit mantissas and adjusts the shared exponent.
// Timing: one register per stage, X follows in_valid by two clocks; a new
// block may enter every clock.
module cbfp_fft4_r2
  import cbfp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NE-1:0]    x_exp,
  input  logic             x_sign [4][2],
  input  logic             x_box  [4][2],
  input  logic [NM-1:0]    x_mant [4][2],
  output logic             out_valid,
  output logic [NE-1:0]    y_exp,
  output logic             y_sign [4][2],
  output logic             y_box  [4][2],
  output logic [NM-1:0]    y_mant [4][2],
  output logic             exp_ovf
);

  localparam int MV = NM + 1;          // intermediate mantissa width

  // Stage 1 operands: lanes (x0+x2, x0-x2, x1+x3, x1-x3).
  localparam int A1 [4] = '{0, 0, 1, 1};
  localparam int B1 [4] = '{2, 2, 3, 3};
  logic          sub1   [4];
  logic          a1_sign[4][2], a1_box[4][2], b1_sign[4][2], b1_box[4][2];
  logic [NM-1:0] a1_mant[4][2], b1_mant[4][2];

  logic          v_valid;
  logic [NE-1:0] v_exp;
  logic          v_sign [4][2], v_box [4][2];
  logic [MV-1:0] v_mant [4][2];
  logic          v_ovf;

  // Stage 2 operands: lanes (v0+v2, v1-j*v3, v0-v2, v1+j*v3).
  localparam int A2 [4] = '{0, 1, 0, 1};
  localparam int B2 [4] = '{2, 3, 2, 3};
  logic          sub2   [4];
  logic          t_sign [4][2], t_box [4][2];   // v after the twiddle
  logic [MV-1:0] t_mant [4][2];
  logic          a2_sign[4][2], a2_box[4][2], b2_sign[4][2], b2_box[4][2];
  logic [MV-1:0] a2_mant[4][2], b2_mant[4][2];
  logic          y_ovf2;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      sub1[k] = (k % 2) == 1;
      for (int p = 0; p < 2; p++) begin
        a1_sign[k][p] = x_sign[A1[k]][p];
        a1_box[k][p]  = x_box [A1[k]][p];
        a1_mant[k][p] = x_mant[A1[k]][p];
        b1_sign[k][p] = x_sign[B1[k]][p];
        b1_box[k][p]  = x_box [B1[k]][p];
        b1_mant[k][p] = x_mant[B1[k]][p];
      end
    end
  end

  cbfp_adder #(.NV(4), .MW_IN(NM), .MW_OUT(MV)) u_stage1 (
    .clk, .rst_n, .in_valid, .sub(sub1),
    .a_exp(x_exp), .a_sign(a1_sign), .a_box(a1_box), .a_mant(a1_mant),
    .b_exp(x_exp), .b_sign(b1_sign), .b_box(b1_box), .b_mant(b1_mant),
    .out_valid(v_valid), .y_exp(v_exp), .y_sign(v_sign), .y_box(v_box), .y_mant(v_mant),
    .exp_ovf(v_ovf)
  );

  always_comb begin
    t_sign = v_sign;
    t_box  = v_box;
    t_mant = v_mant;
    // -j * (re + j im) = im - j re
    t_sign[3][RE] = v_sign[3][IM];
    t_box [3][RE] = v_box [3][IM];
    t_mant[3][RE] = v_mant[3][IM];
    t_sign[3][IM] = ~v_sign[3][RE];
    t_box [3][IM] = v_box [3][RE];
    t_mant[3][IM] = v_mant[3][RE];
    for (int k = 0; k < 4; k++) begin
      sub2[k] = k >= 2;
      for (int p = 0; p < 2; p++) begin
        a2_sign[k][p] = t_sign[A2[k]][p];
        a2_box[k][p]  = t_box [A2[k]][p];
        a2_mant[k][p] = t_mant[A2[k]][p];
        b2_sign[k][p] = t_sign[B2[k]][p];
        b2_box[k][p]  = t_box [B2[k]][p];
        b2_mant[k][p] = t_mant[B2[k]][p];
      end
    end
  end

  cbfp_adder #(.NV(4), .MW_IN(MV), .MW_OUT(NM)) u_stage2 (
    .clk, .rst_n, .in_valid(v_valid), .sub(sub2),
    .a_exp(v_exp), .a_sign(a2_sign), .a_box(a2_box), .a_mant(a2_mant),
    .b_exp(v_exp), .b_sign(b2_sign), .b_box(b2_box), .b_mant(b2_mant),
    .out_valid, .y_exp, .y_sign, .y_box, .y_mant,
    .exp_ovf(y_ovf2)
  );

  // Stage 1 cannot overflow (its growth stays in the mantissa); its flag is
  // still carried along for completeness.
  logic v_ovf_q;
  always_ff @(posedge clk) begin
    if (!rst_n)       v_ovf_q <= 1'b0;
    else if (v_valid) v_ovf_q <= v_ovf;
  end
  assign exp_ovf = y_ovf2 | v_ovf_q;

endmodule
