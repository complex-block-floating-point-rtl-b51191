// cbfp_top -- complex block floating-point datapath with exponent box
// encoding: front-end conversion of an I/Q sample stream into blocks, a SIMD
// complex block ALU and a bank of 4-point FFT engines.
//
// Front end (two-ADC architecture): every clock with adc_valid, one I and
// one Q ADC code arrive with the gain exponents of their AGC loops. Two
// cbfp_fix2ieee converters remove the gain and produce IEEE-754 singles;
// cbfp_block_buffer gathers NV complex samples; cbfp_ebox_encoder turns the
// block into the exponent box format (enc_*).
// Each encoded block is then, in parallel:
//   * the first operand of cbfp_alu, whose second operand is the block on
//     the b_* ports (sampled in the clock enc_valid is high) and whose
//     operation is op (0 add, 1 subtract, 2 element-wise multiply);
//   * split into NV/4 groups of four consecutive samples. The groups share
//     the block's exponent; each is transformed by a radix-2 engine
//     (cbfp_fft4_r2, two stages) and by a radix-4 engine (cbfp_fft4_r4, one
//     stage). Every group result is a block of its own with its own
//     exponent.
// Latency from the adc_valid of the last sample of a block: enc_valid +3,
// alu_valid +4, fft4_valid +4, fft2_valid +5. A new sample may arrive every
// clock, so a block completes every NV clocks.
module cbfp_top
  import cbfp_pkg::*;
#(
  parameter int NV    = NV_DEFAULT,    // complex samples per block (multiple of 4)
  parameter int ADC_W = 16,            // ADC code width
  parameter int GW    = 8              // AGC gain exponent width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ADC/AGC stream
  input  logic                     adc_valid,
  input  logic signed [ADC_W-1:0]  adc_i,
  input  logic signed [ADC_W-1:0]  adc_q,
  input  logic signed [GW-1:0]     agc_gexp_i,
  input  logic signed [GW-1:0]     agc_gexp_q,
  // second ALU operand and operation
  input  logic [1:0]               op,
  input  logic [NE-1:0]            b_exp,
  input  logic                     b_sign [NV][2],
  input  logic                     b_box  [NV][2],
  input  logic [NM-1:0]            b_mant [NV][2],
  // encoded block
  output logic                     enc_valid,
  output logic [NE-1:0]            enc_exp,
  output logic                     enc_sign [NV][2],
  output logic                     enc_box  [NV][2],
  output logic [NM-1:0]            enc_mant [NV][2],
  // ALU result
  output logic                     alu_valid,
  output logic [NE-1:0]            alu_exp,
  output logic                     alu_sign [NV][2],
  output logic                     alu_box  [NV][2],
  output logic [NM-1:0]            alu_mant [NV][2],
  output logic                     alu_ovf,
  // radix-2 FFT results, one 4-sample block per group
  output logic                     fft2_valid,
  output logic [NE-1:0]            fft2_exp  [NV/4],
  output logic                     fft2_sign [NV][2],
  output logic                     fft2_box  [NV][2],
  output logic [NM-1:0]            fft2_mant [NV][2],
  output logic [NV/4-1:0]          fft2_ovf,
  // radix-4 FFT results, one 4-sample block per group
  output logic                     fft4_valid,
  output logic [NE-1:0]            fft4_exp  [NV/4],
  output logic                     fft4_sign [NV][2],
  output logic                     fft4_box  [NV][2],
  output logic [NM-1:0]            fft4_mant [NV][2],
  output logic [NV/4-1:0]          fft4_ovf
);

  localparam int NG = NV / 4;

  logic                   fi_valid, fq_valid;
  logic [IEEE_E+IEEE_F:0] fi, fq;
  logic                   blk_valid;
  logic [IEEE_E+IEEE_F:0] blk_re [NV], blk_im [NV];

  cbfp_fix2ieee #(.ADC_W(ADC_W), .GW(GW)) u_conv_i (
    .clk, .rst_n, .in_valid(adc_valid), .v(adc_i), .g_exp(agc_gexp_i),
    .out_valid(fi_valid), .y(fi)
  );
  cbfp_fix2ieee #(.ADC_W(ADC_W), .GW(GW)) u_conv_q (
    .clk, .rst_n, .in_valid(adc_valid), .v(adc_q), .g_exp(agc_gexp_q),
    .out_valid(fq_valid), .y(fq)
  );

  cbfp_block_buffer #(.NV(NV)) u_buf (
    .clk, .rst_n, .in_valid(fi_valid & fq_valid), .in_re(fi), .in_im(fq),
    .out_valid(blk_valid), .blk_re, .blk_im
  );

  cbfp_ebox_encoder #(.NV(NV)) u_enc (
    .clk, .rst_n, .in_valid(blk_valid), .x_re(blk_re), .x_im(blk_im),
    .out_valid(enc_valid), .y_exp(enc_exp), .y_sign(enc_sign), .y_box(enc_box),
    .y_mant(enc_mant)
  );

  cbfp_alu #(.NV(NV)) u_alu (
    .clk, .rst_n, .in_valid(enc_valid), .op(alu_op_e'(op)),
    .a_exp(enc_exp), .a_sign(enc_sign), .a_box(enc_box), .a_mant(enc_mant),
    .b_exp, .b_sign, .b_box, .b_mant,
    .out_valid(alu_valid), .y_exp(alu_exp), .y_sign(alu_sign), .y_box(alu_box),
    .y_mant(alu_mant), .exp_ovf(alu_ovf)
  );

  logic [NG-1:0] v2, v4;

  for (genvar g = 0; g < NG; g++) begin : g_fft
    logic          gx_sign [4][2], gx_box [4][2];
    logic [NM-1:0] gx_mant [4][2];
    logic          g2_sign [4][2], g2_box [4][2], g4_sign [4][2], g4_box [4][2];
    logic [NM-1:0] g2_mant [4][2], g4_mant [4][2];

    always_comb
      for (int n = 0; n < 4; n++) begin
        gx_sign[n] = enc_sign[4*g + n];
        gx_box[n]  = enc_box [4*g + n];
        gx_mant[n] = enc_mant[4*g + n];
        fft2_sign[4*g + n] = g2_sign[n];
        fft2_box [4*g + n] = g2_box [n];
        fft2_mant[4*g + n] = g2_mant[n];
        fft4_sign[4*g + n] = g4_sign[n];
        fft4_box [4*g + n] = g4_box [n];
        fft4_mant[4*g + n] = g4_mant[n];
      end

    cbfp_fft4_r2 u_r2 (
      .clk, .rst_n, .in_valid(enc_valid), .x_exp(enc_exp),
      .x_sign(gx_sign), .x_box(gx_box), .x_mant(gx_mant),
      .out_valid(v2[g]), .y_exp(fft2_exp[g]), .y_sign(g2_sign), .y_box(g2_box),
      .y_mant(g2_mant), .exp_ovf(fft2_ovf[g])
    );

    cbfp_fft4_r4 u_r4 (
      .clk, .rst_n, .in_valid(enc_valid), .x_exp(enc_exp),
      .x_sign(gx_sign), .x_box(gx_box), .x_mant(gx_mant),
      .out_valid(v4[g]), .y_exp(fft4_exp[g]), .y_sign(g4_sign), .y_box(g4_box),
      .y_mant(g4_mant), .exp_ovf(fft4_ovf[g])
    );
  end

  assign fft2_valid = &v2;   // all engines run in lock step
  assign fft4_valid = &v4;

endmodule
