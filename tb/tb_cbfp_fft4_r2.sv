// tb_cbfp_fft4_r2 -- self-checking test of the two-stage radix-2 4-point FFT.
//
// Random 4-sample blocks (built with the reference encoder, exponent spreads
// from 0 to 50 binades so that box-shifted inputs occur) are transformed,
// one block per clock, back to back. Each output part is decoded and
// compared with the exact 4-point DFT X[k] = sum x[n] (-j)^(nk) computed
// with reals; the allowed error is one output LSB plus the truncation of the intermediate block (one input LSB per intermediate part used).
// The latency of 2 clock(s), the growth of the shared exponent and the
// presence of box-shifted outputs are checked as well.
module tb_cbfp_fft4_r2;
  import tb_cbfp_pkg::*;

  localparam int LAT = 2;
  localparam int NT  = 3000;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [7:0]  x_exp, y_exp;
  logic        x_sign [4][2], x_box [4][2];
  logic [23:0] x_mant [4][2];
  logic        out_valid, exp_ovf;
  logic        y_sign [4][2], y_box [4][2];
  logic [23:0] y_mant [4][2];

  // Stimulus history, indexed by block number.
  real xv   [NT][4][2];
  int  xe   [NT];
  int checks = 0, failures = 0, n_grow = 0, n_box_in = 0, n_box_out = 0;
  int n_out = 0, n_cap = 0, cyc = 0;
  int tin [NT];

  cbfp_fft4_r2 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NT + 1000) @(posedge clk);
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

  // Driver: one new block every clock.
  initial begin
    int spreads [4] = '{0, 10, 30, 50};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      logic [31:0] w [4][2];
      int ec;
      @(negedge clk);
      ec = 1;
      for (int n = 0; n < 4; n++)
        for (int p = 0; p < 2; p++) begin
          w[n][p] = rand_sp(60 + int'($urandom % 120), spreads[t % 4]);
          if (t % 9 == 0) w[n][p] = {1'($urandom), w[0][0][30:0]};   // equal magnitudes: growth
          if (int'(w[n][p][30:23]) > ec) ec = int'(w[n][p][30:23]);
        end
      x_exp = 8'(ec);
      xe[t] = ec;
      for (int n = 0; n < 4; n++)
        for (int p = 0; p < 2; p++) begin
          bit bs, bx; longint unsigned bm;
          enc_part(sp_val(w[n][p]), ec, bs, bx, bm);
          x_sign[n][p] = bs; x_box[n][p] = bx; x_mant[n][p] = 24'(bm);
          xv[t][n][p] = part_val(ec, bs, bx, bm);
          if (bx) n_box_in++;
        end
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Checker: compares every output block with the DFT of its input.
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      tin[n_cap] = cyc;
      n_cap++;
    end
    if (rst_n && out_valid) begin
      int t, eo;
      t  = n_out;
      eo = int'(y_exp);
      check(cyc - tin[t] == LAT, $sformatf("latency %0d, expected %0d", cyc - tin[t], LAT));
      check(eo >= xe[t] && eo <= xe[t] + 2, $sformatf("block %0d exponent %0d from %0d", t, eo, xe[t]));
      if (eo > xe[t]) n_grow++;
      for (int k = 0; k < 4; k++)
        for (int p = 0; p < 2; p++) begin
          real vt, vy, tol;
          vt = 0.0;
          for (int n = 0; n < 4; n++) begin
            case ((n * k) % 4)
              0: vt += (p == 0) ?  xv[t][n][0] :  xv[t][n][1];
              1: vt += (p == 0) ?  xv[t][n][1] : -xv[t][n][0];
              2: vt += (p == 0) ? -xv[t][n][0] : -xv[t][n][1];
              default: vt += (p == 0) ? -xv[t][n][1] : xv[t][n][0];
            endcase
          end
          vy  = part_val(eo, y_sign[k][p], y_box[k][p], y_mant[k][p]);
          tol = (y_box[k][p] ? pow2(eo - 174) : pow2(eo - 150)) + 3.0 * pow2(xe[t] - 150);
          check(absr(vy - vt) <= tol,
                $sformatf("block %0d X%0d p%0d got %e expected %e (tol %e)", t, k, p, vy, vt, tol));
          if (y_box[k][p]) n_box_out++;
        end
      n_out++;
      if (n_out == NT) begin
        check(n_grow > 0, "shared exponent growth occurred");
        check(n_box_in > 0 && n_box_out > 0, "box-shifted inputs and outputs occurred");
        $display("blocks %0d, exponent growth %0d, box in %0d, box out %0d", n_out, n_grow, n_box_in, n_box_out);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
