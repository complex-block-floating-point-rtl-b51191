// tb_cbfp_ebox_encoder -- self-checking test of the exponent box encoder.
//
// Random blocks of IEEE-754 singles with a spread of exponents (from
// tightly clustered to spread over 60 binades, plus exact zeros) are
// encoded. The shared exponent must be the largest exponent field, and
// every part must equal the reference encoding computed with reals
// (tb_cbfp_pkg::enc_part). The one-clock latency is checked, and the test
// requires box-shifted parts and parts flushed to zero to have occurred.
module tb_cbfp_ebox_encoder;
  import tb_cbfp_pkg::*;

  localparam int NV = 16;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] x_re [NV], x_im [NV];
  logic        out_valid;
  logic [7:0]  y_exp;
  logic        y_sign [NV][2], y_box [NV][2];
  logic [23:0] y_mant [NV][2];

  int checks = 0, failures = 0, n_box = 0, n_zeroed = 0;

  cbfp_ebox_encoder #(.NV(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int spreads [5] = '{0, 3, 20, 40, 60};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int ec, e_hi, sp;
      e_hi = 70 + int'($urandom % 120);
      sp   = spreads[t % 5];
      for (int k = 0; k < NV; k++) begin
        x_re[k] = rand_sp(e_hi, sp);
        x_im[k] = rand_sp(e_hi, sp);
        if ($urandom % 16 == 0) x_re[k] = 32'h0;
      end
      ec = 1;
      for (int k = 0; k < NV; k++) begin
        if (int'(x_re[k][30:23]) > ec) ec = int'(x_re[k][30:23]);
        if (int'(x_im[k][30:23]) > ec) ec = int'(x_im[k][30:23]);
      end
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid == 1'b1, "latency: out_valid one clock after in_valid");
      check(int'(y_exp) == ec, $sformatf("shared exponent %0d, expected %0d", y_exp, ec));
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          bit s, x; longint unsigned m; real v;
          v = sp_val(p == 0 ? x_re[k] : x_im[k]);
          enc_part(v, ec, s, x, m);
          check(y_sign[k][p] == s && y_box[k][p] == x && longint'(y_mant[k][p]) == m,
                $sformatf("t%0d k%0d p%0d got s%0d x%0d m%h exp s%0d x%0d m%h",
                          t, k, p, y_sign[k][p], y_box[k][p], y_mant[k][p], s, x, m));
          if (x) n_box++;
          if (v != 0.0 && m == 0) n_zeroed++;
        end
      @(negedge clk);
      check(out_valid == 1'b0, "out_valid is a single pulse");
    end
    check(n_box > 0, "box-shifted parts occurred");
    check(n_zeroed > 0, "parts beyond the box occurred");
    $display("box-shifted parts %0d, zeroed parts %0d", n_box, n_zeroed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
