// cbfp_alu -- single-precision SIMD complex block ALU: two exponent box
// encoded input blocks, one output block in the same format.
//
// op selects Y = X1 + X2, Y = X1 - X2 or Y = X1 .* X2 (element-wise complex
// product). The adder/subtractor (cbfp_adder) and the multiplier
// (cbfp_multiplier) both see the operands; the operation captured with
// in_valid selects which registered result is presented.
// Timing: y_* and out_valid follow in_valid by one clock; a new operation
// may start every clock. exp_ovf reports a shared exponent that saturated.
module cbfp_alu
  import cbfp_pkg::*;
#(
  parameter int NV = NV_DEFAULT        // complex samples per block
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  alu_op_e          op,
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

  logic          sub [NV];
  logic          add_valid, mul_valid;
  logic [NE-1:0] s_exp, m_exp;
  logic          s_sign [NV][2], s_box [NV][2], m_sign [NV][2], m_box [NV][2];
  logic [NM-1:0] s_mant [NV][2], m_mant [NV][2];
  logic          s_ovf, m_ovf;
  logic          is_mul_q;

  always_comb
    for (int k = 0; k < NV; k++) sub[k] = (op == OP_SUB);

  cbfp_adder #(.NV(NV), .MW_IN(NM), .MW_OUT(NM)) u_add (
    .clk, .rst_n, .in_valid(in_valid && op != OP_MUL), .sub,
    .a_exp, .a_sign, .a_box, .a_mant, .b_exp, .b_sign, .b_box, .b_mant,
    .out_valid(add_valid), .y_exp(s_exp), .y_sign(s_sign), .y_box(s_box), .y_mant(s_mant),
    .exp_ovf(s_ovf)
  );

  cbfp_multiplier #(.NV(NV)) u_mul (
    .clk, .rst_n, .in_valid(in_valid && op == OP_MUL),
    .a_exp, .a_sign, .a_box, .a_mant, .b_exp, .b_sign, .b_box, .b_mant,
    .out_valid(mul_valid), .y_exp(m_exp), .y_sign(m_sign), .y_box(m_box), .y_mant(m_mant),
    .exp_ovf(m_ovf)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)        is_mul_q <= 1'b0;
    else if (in_valid) is_mul_q <= (op == OP_MUL);
  end

  assign out_valid = add_valid | mul_valid;
  assign y_exp     = is_mul_q ? m_exp  : s_exp;
  assign y_sign    = is_mul_q ? m_sign : s_sign;
  assign y_box     = is_mul_q ? m_box  : s_box;
  assign y_mant    = is_mul_q ? m_mant : s_mant;
  assign exp_ovf   = is_mul_q ? m_ovf  : s_ovf;

endmodule
