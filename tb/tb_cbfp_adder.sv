// tb_cbfp_adder -- self-checking test of the complex block adder/subtractor.
//
// Operand blocks are built from random reals with the reference encoder, the
// second block's shared exponent offset from the first by 0..30, and random
// per-sample subtract lanes. Every output part is decoded and compared with
// the exact real sum/difference; the allowed error is the truncation bound
// of the format (one output LSB for a normal part, two box LSBs for a box
// part, plus the alignment loss of the operands). Also checked: the
// one-clock latency, the shared exponent (the larger input exponent, or one
// more when a sum carries out), and that carries, box-shifted inputs and
// box-shifted outputs all occurred.
module tb_cbfp_adder;
  import tb_cbfp_pkg::*;

  localparam int NV = 8;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic        sub [NV];
  logic [7:0]  a_exp, b_exp, y_exp;
  logic        a_sign [NV][2], a_box [NV][2], b_sign [NV][2], b_box [NV][2];
  logic [23:0] a_mant [NV][2], b_mant [NV][2];
  logic        out_valid, exp_ovf;
  logic        y_sign [NV][2], y_box [NV][2];
  logic [23:0] y_mant [NV][2];

  int checks = 0, failures = 0, n_carry = 0, n_box_in = 0, n_box_out = 0;

  cbfp_adder #(.NV(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Random block: parts with exponent fields in [e_hi-spread, e_hi], encoded
  // by the reference encoder.
  task automatic make_block(input int e_hi, input int spread, output logic [7:0] e,
                            output logic s [NV][2], output logic x [NV][2],
                            output logic [23:0] m [NV][2]);
    logic [31:0] w [NV][2];
    int ec = 1;
    for (int k = 0; k < NV; k++)
      for (int p = 0; p < 2; p++) begin
        w[k][p] = rand_sp(e_hi, spread);
        if (int'(w[k][p][30:23]) > ec) ec = int'(w[k][p][30:23]);
      end
    e = 8'(ec);
    for (int k = 0; k < NV; k++)
      for (int p = 0; p < 2; p++) begin
        bit bs, bx; longint unsigned bm;
        enc_part(sp_val(w[k][p]), ec, bs, bx, bm);
        s[k][p] = bs; x[k][p] = bx; m[k][p] = 24'(bm);
      end
  endtask

  initial begin
    int spreads [4] = '{0, 10, 30, 50};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int ea, eb, emax, eo;
      ea = 60 + int'($urandom % 120);
      eb = ea + int'($urandom % 31) - 15;
      if (t % 7 == 0) eb = ea;          // equal exponents: carries likely
      make_block(ea, spreads[t % 4], a_exp, a_sign, a_box, a_mant);
      make_block(eb, spreads[(t / 4) % 4], b_exp, b_sign, b_box, b_mant);
      for (int k = 0; k < NV; k++) sub[k] = 1'($urandom);
      emax = (a_exp > b_exp) ? int'(a_exp) : int'(b_exp);
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid == 1'b1, "latency: out_valid one clock after in_valid");
      eo = int'(y_exp);
      check(eo == emax || eo == emax + 1, $sformatf("t%0d shared exponent %0d, inputs max %0d", t, eo, emax));
      if (eo == emax + 1) n_carry++;
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          real va, vb, vt, vy, tol;
          va = part_val(int'(a_exp), a_sign[k][p], a_box[k][p], a_mant[k][p]);
          vb = part_val(int'(b_exp), b_sign[k][p], b_box[k][p], b_mant[k][p]);
          vt = sub[k] ? va - vb : va + vb;
          vy = part_val(eo, y_sign[k][p], y_box[k][p], y_mant[k][p]);
          tol = (y_box[k][p] ? 2.0 * pow2(eo - 174) : pow2(eo - 150)) + 2.0 * pow2(emax - 174);
          check(absr(vy - vt) <= tol,
                $sformatf("t%0d k%0d p%0d got %e expected %e (tol %e)", t, k, p, vy, vt, tol));
          if (y_box[k][p]) check(y_mant[k][p] != 0 && absr(vy) < pow2(eo - 150), "box part is below the normal range");
          if (a_box[k][p] || b_box[k][p]) n_box_in++;
          if (y_box[k][p]) n_box_out++;
        end
    end
    check(n_carry > 0, "carry renormalisation occurred");
    check(n_box_in > 0 && n_box_out > 0, "box-shifted inputs and outputs occurred");
    $display("carries %0d, box inputs %0d, box outputs %0d", n_carry, n_box_in, n_box_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
