// tb_cbfp_alu -- self-checking test of the SIMD complex block ALU.
//
// Random operations (add, subtract, element-wise multiply) are issued on
// random exponent box blocks, one operation every other clock. Each result is
// decoded and compared with the real reference of the selected operation,
// within the truncation bounds of the format. Checked as well: the
// one-clock latency and that all three operations were exercised.
module tb_cbfp_alu;
  import cbfp_pkg::alu_op_e;
  import tb_cbfp_pkg::*;

  localparam int NV = 8;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  alu_op_e     op;
  logic [7:0]  a_exp, b_exp, y_exp;
  logic        a_sign [NV][2], a_box [NV][2], b_sign [NV][2], b_box [NV][2];
  logic [23:0] a_mant [NV][2], b_mant [NV][2];
  logic        out_valid, exp_ovf;
  logic        y_sign [NV][2], y_box [NV][2];
  logic [23:0] y_mant [NV][2];

  int checks = 0, failures = 0;
  int n_op [3];

  cbfp_alu #(.NV(NV)) dut (.*);

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
    n_op = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int ea, eb, eo;
      ea = 70 + int'($urandom % 110);
      eb = (t % 3 == 0) ? ea : 70 + int'($urandom % 110);
      @(negedge clk);
      make_block(ea, spreads[t % 4], a_exp, a_sign, a_box, a_mant);
      make_block(eb, spreads[(t / 4) % 4], b_exp, b_sign, b_box, b_mant);
      op = alu_op_e'($urandom % 3);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid == 1'b1, "latency: out_valid one clock after in_valid");
      n_op[int'(op)]++;
      eo = int'(y_exp);
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          real ar, ai, br, bi, vt, vy, tol;
          int emax;
          ar = part_val(int'(a_exp), a_sign[k][0], a_box[k][0], a_mant[k][0]);
          ai = part_val(int'(a_exp), a_sign[k][1], a_box[k][1], a_mant[k][1]);
          br = part_val(int'(b_exp), b_sign[k][0], b_box[k][0], b_mant[k][0]);
          bi = part_val(int'(b_exp), b_sign[k][1], b_box[k][1], b_mant[k][1]);
          emax = (a_exp > b_exp) ? int'(a_exp) : int'(b_exp);
          tol = y_box[k][p] ? 2.0 * pow2(eo - 174) : pow2(eo - 150);
          case (op)
            cbfp_pkg::OP_ADD: begin vt = (p == 0) ? ar + br : ai + bi; tol += 2.0 * pow2(emax - 174); end
            cbfp_pkg::OP_SUB: begin vt = (p == 0) ? ar - br : ai - bi; tol += 2.0 * pow2(emax - 174); end
            default: begin
              vt = (p == 0) ? ar * br - ai * bi : ar * bi + ai * br;
              tol += 4.0 * pow2(int'(a_exp) + int'(b_exp) - 300);
            end
          endcase
          vy = part_val(eo, y_sign[k][p], y_box[k][p], y_mant[k][p]);
          check(absr(vy - vt) <= tol,
                $sformatf("t%0d op%0d k%0d p%0d got %e expected %e (tol %e)", t, op, k, p, vy, vt, tol));
        end
    end
    check(n_op[0] > 0 && n_op[1] > 0 && n_op[2] > 0, "all operations exercised");
    $display("add %0d, sub %0d, mul %0d", n_op[0], n_op[1], n_op[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
