// tb_cbfp_multiplier -- self-checking test of the complex block multiplier.
//
// Operand blocks are built from random reals with the reference encoder,
// with exponent spreads that make the box shift bits of the factors take
// all counts A, B = 0..2. Every output part is decoded and compared with
// the exact real complex product (Re = Re1*Re2 - Im1*Im2, Im = Re1*Im2 +
// Im1*Re2); the allowed error is one output LSB (normal or box) plus the
// truncation of the partial products at the intermediate exponent. Also
// checked: the one-clock latency, that the output block is normalised (its
// largest part has the leading mantissa bit set), and that every
// combination of box counts (A, B) was exercised.
module tb_cbfp_multiplier;
  import tb_cbfp_pkg::*;

  localparam int NV = 8;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0]  a_exp, b_exp, y_exp;
  logic        a_sign [NV][2], a_box [NV][2], b_sign [NV][2], b_box [NV][2];
  logic [23:0] a_mant [NV][2], b_mant [NV][2];
  logic        out_valid, exp_ovf;
  logic        y_sign [NV][2], y_box [NV][2];
  logic [23:0] y_mant [NV][2];

  int checks = 0, failures = 0, n_box_out = 0;
  int n_ab [3][3];

  cbfp_multiplier #(.NV(NV)) dut (.*);

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
    bit all_ab;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) n_ab[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int ea, eb, eo;
      bit norm_ok, any_nz;
      ea = 70 + int'($urandom % 110);
      eb = 70 + int'($urandom % 110);
      make_block(ea, spreads[t % 4], a_exp, a_sign, a_box, a_mant);
      make_block(eb, spreads[(t / 4) % 4], b_exp, b_sign, b_box, b_mant);
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid == 1'b1, "latency: out_valid one clock after in_valid");
      eo = int'(y_exp);
      norm_ok = 0;
      any_nz  = 0;
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          real ar, ai, br, bi, vt, vy, tol;
          int bc, bd;
          bc = (p == 0) ? 0 : 1;
          bd = (p == 0) ? 1 : 0;
          ar = part_val(int'(a_exp), a_sign[k][0], a_box[k][0], a_mant[k][0]);
          ai = part_val(int'(a_exp), a_sign[k][1], a_box[k][1], a_mant[k][1]);
          br = part_val(int'(b_exp), b_sign[k][0], b_box[k][0], b_mant[k][0]);
          bi = part_val(int'(b_exp), b_sign[k][1], b_box[k][1], b_mant[k][1]);
          vt = (p == 0) ? ar * br - ai * bi : ar * bi + ai * br;
          vy = part_val(eo, y_sign[k][p], y_box[k][p], y_mant[k][p]);
          tol = (y_box[k][p] ? pow2(eo - 174) : pow2(eo - 150))
              + 4.0 * pow2(int'(a_exp) + int'(b_exp) - 300);
          check(absr(vy - vt) <= tol,
                $sformatf("t%0d k%0d p%0d got %e expected %e (tol %e)", t, k, p, vy, vt, tol));
          if (!y_box[k][p] && y_mant[k][p][23]) norm_ok = 1;
          if (y_mant[k][p] != 0) any_nz = 1;
          if (y_box[k][p]) n_box_out++;
          n_ab[int'(a_box[k][0]) + int'(b_box[k][bc])][int'(a_box[k][1]) + int'(b_box[k][bd])]++;
        end
      check(norm_ok || !any_nz, $sformatf("t%0d output block normalised", t));
    end
    all_ab = 1;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) if (n_ab[i][j] == 0) all_ab = 0;
    check(all_ab, "every box count combination (A, B) occurred");
    check(n_box_out > 0, "box-shifted outputs occurred");
    $display("box outputs %0d, (A,B)=(2,2) %0d, (2,0) %0d", n_box_out, n_ab[2][2], n_ab[2][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
