// tb_cbfp_top -- end-to-end test of the complex block datapath at its
// default size (64 complex samples per block).
//
// An I/Q stream of random 16-bit ADC codes with random AGC gain exponents is
// fed at one sample per clock, without gaps, for NB blocks. For every block
// the testbench computes, with reals and independently of the RTL:
//   * the exact converted samples code * 2^-15 / 2^g and their exponent box
//     encoding, which the encoded block must match bit for bit;
//   * the ALU result for the operation of that block (add, subtract and
//     multiply in turn) with a random second operand block, compared within
//     the format's truncation bounds;
//   * the 4-point DFT of every group of four samples, against which the
//     radix-2 and the radix-4 FFT results are compared.
// Latencies from the last sample of a block are checked (encoder 3, ALU 4,
// radix-4 FFT 4, radix-2 FFT 5 clocks). Every mechanism must have happened
// at least once: box-shifted parts, parts flushed beyond the box, each ALU
// operation, a carry that raises the adder's exponent, and exponent growth
// in both FFT engines.
module tb_cbfp_top;
  import tb_cbfp_pkg::*;

  localparam int NV = 64;              // default block size of cbfp_top
  localparam int NG = NV / 4;
  localparam int NB = 24;              // blocks simulated

  logic               clk = 0, rst_n = 0;
  logic               adc_valid = 0;
  logic signed [15:0] adc_i, adc_q;
  logic signed [7:0]  agc_gexp_i, agc_gexp_q;
  logic [1:0]         op;
  logic [7:0]         b_exp;
  logic               b_sign [NV][2], b_box [NV][2];
  logic [23:0]        b_mant [NV][2];
  logic               enc_valid, alu_valid, fft2_valid, fft4_valid, alu_ovf;
  logic [7:0]         enc_exp, alu_exp;
  logic               enc_sign [NV][2], enc_box [NV][2], alu_sign [NV][2], alu_box [NV][2];
  logic [23:0]        enc_mant [NV][2], alu_mant [NV][2];
  logic [7:0]         fft2_exp [NG], fft4_exp [NG];
  logic               fft2_sign [NV][2], fft2_box [NV][2], fft4_sign [NV][2], fft4_box [NV][2];
  logic [23:0]        fft2_mant [NV][2], fft4_mant [NV][2];
  logic [NG-1:0]      fft2_ovf, fft4_ovf;

  cbfp_top dut (.*);

  // Per-block reference data.
  real xv  [NB][NV][2];                // exact converted samples
  real bv  [NB][NV][2];                // second ALU operand
  int  bex [NB];
  int  opb [NB];
  int  tlast [NB];                     // clock of the last sample

  int checks = 0, failures = 0, cyc = 0;
  int n_enc = 0, n_alu = 0, n_f2 = 0, n_f4 = 0;
  int n_box = 0, n_zeroed = 0, n_carry = 0, n_grow2 = 0, n_grow4 = 0;
  int n_op [3];

  always #5 clk = ~clk;

  initial begin
    repeat (NB * NV + 500) @(posedge clk);
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

  // Random second operand, encoded with the reference encoder.
  task automatic make_b(int blk);
    logic [31:0] w [NV][2];
    int ec = 1, e_hi = 100 + int'($urandom % 40);
    for (int k = 0; k < NV; k++)
      for (int p = 0; p < 2; p++) begin
        w[k][p] = rand_sp(e_hi, (blk % 2) ? 30 : 3);
        if (int'(w[k][p][30:23]) > ec) ec = int'(w[k][p][30:23]);
      end
    b_exp = 8'(ec);
    bex[blk] = ec;
    for (int k = 0; k < NV; k++)
      for (int p = 0; p < 2; p++) begin
        bit s, x; longint unsigned m;
        enc_part(sp_val(w[k][p]), ec, s, x, m);
        b_sign[k][p] = s; b_box[k][p] = x; b_mant[k][p] = 24'(m);
        bv[blk][k][p] = part_val(ec, s, x, m);
      end
  endtask

  // Stimulus: NB blocks, one sample per clock.
  initial begin
    n_op = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int k = 0; k < NV; k++) begin
        int gr;
        @(negedge clk);
        gr = (b % 4 == 3) ? 20 : 8;     // every fourth block: wide dynamic range
        adc_i = 16'($urandom) >>> ($urandom % 16);
        adc_q = 16'($urandom) >>> ($urandom % 16);
        if (b % 5 == 2) adc_q = adc_i;  // equal parts: carries in the adder
        agc_gexp_i = 8'(int'($urandom % (2 * gr + 1)) - gr);
        agc_gexp_q = (b % 5 == 2) ? agc_gexp_i : 8'(int'($urandom % (2 * gr + 1)) - gr);
        if (b % 5 == 2 && k < 4) begin  // a group of equal large samples: FFT growth
          adc_i = 16'sh7000; adc_q = 16'sh7000;
          agc_gexp_i = -8'sd8; agc_gexp_q = -8'sd8;
        end
        xv[b][k][0] = real'(adc_i) * pow2(-15 - int'(agc_gexp_i));
        xv[b][k][1] = real'(adc_q) * pow2(-15 - int'(agc_gexp_q));
        adc_valid = 1;
        if (k == NV / 2) begin          // operand and op of this block
          make_b(b);
          opb[b] = b % 3;
          op = 2'(b % 3);
        end
        if (k == NV - 1) tlast[b] = cyc + 1;
      end
    @(negedge clk);
    adc_valid = 0;
  end


  // Encoded block of the reference: recomputed from xv when needed.
  function automatic int ref_ec(int b);
    int ec = 1;
    for (int k = 0; k < NV; k++)
      for (int p = 0; p < 2; p++)
        if (sp_exp_of(xv[b][k][p]) > ec) ec = sp_exp_of(xv[b][k][p]);
    return ec;
  endfunction

  function automatic real enc_val(int b, int k, int p);
    bit s, x; longint unsigned m;
    enc_part(xv[b][k][p], ref_ec(b), s, x, m);
    return part_val(ref_ec(b), s, x, m);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (rst_n && enc_valid) begin
      int b, ec;
      b  = n_enc;
      ec = ref_ec(b);
      check(cyc - tlast[b] == 3, $sformatf("encoder latency %0d", cyc - tlast[b]));
      check(int'(enc_exp) == ec, $sformatf("block %0d exponent %0d expected %0d", b, enc_exp, ec));
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          bit s, x; longint unsigned m;
          enc_part(xv[b][k][p], ec, s, x, m);
          check(enc_sign[k][p] == s && enc_box[k][p] == x && longint'(enc_mant[k][p]) == m,
                $sformatf("block %0d sample %0d part %0d encoding", b, k, p));
          if (x) n_box++;
          if (xv[b][k][p] != 0.0 && m == 0) n_zeroed++;
        end
      n_enc++;
    end
    if (rst_n && alu_valid) begin
      int b, ea, eo;
      b  = n_alu;
      ea = ref_ec(b);
      eo = int'(alu_exp);
      check(cyc - tlast[b] == 4, $sformatf("ALU latency %0d", cyc - tlast[b]));
      n_op[opb[b]]++;
      if (opb[b] != 2 && eo == ((ea > bex[b]) ? ea : bex[b]) + 1) n_carry++;
      for (int k = 0; k < NV; k++)
        for (int p = 0; p < 2; p++) begin
          real ar, ai, br, bi, vt, vy, tol;
          automatic int emax = (ea > bex[b]) ? ea : bex[b];
          ar = enc_val(b, k, 0); ai = enc_val(b, k, 1);
          br = bv[b][k][0];      bi = bv[b][k][1];
          tol = alu_box[k][p] ? 2.0 * pow2(eo - 174) : pow2(eo - 150);
          case (opb[b])
            0: begin vt = (p == 0) ? ar + br : ai + bi; tol += 2.0 * pow2(emax - 174); end
            1: begin vt = (p == 0) ? ar - br : ai - bi; tol += 2.0 * pow2(emax - 174); end
            default: begin
              vt = (p == 0) ? ar * br - ai * bi : ar * bi + ai * br;
              tol += 4.0 * pow2(ea + bex[b] - 300);
            end
          endcase
          vy = part_val(eo, alu_sign[k][p], alu_box[k][p], alu_mant[k][p]);
          check(absr(vy - vt) <= tol, $sformatf("block %0d op %0d ALU sample %0d part %0d: %e vs %e", b, opb[b], k, p, vy, vt));
        end
      n_alu++;
    end
    if (rst_n && fft4_valid) begin
      int b, ec;
      b  = n_f4;
      ec = ref_ec(b);
      check(cyc - tlast[b] == 4, $sformatf("radix-4 FFT latency %0d", cyc - tlast[b]));
      for (int g = 0; g < NG; g++) begin
        automatic int eo = int'(fft4_exp[g]);
        if (eo > ec) n_grow4++;
        for (int k = 0; k < 4; k++)
          for (int p = 0; p < 2; p++) begin
            real vy, tol, vt;
            vt  = 0.0;
            for (int n = 0; n < 4; n++) begin
              automatic real xr = enc_val(b, 4*g+n, 0);
              automatic real xi = enc_val(b, 4*g+n, 1);
              case ((n * k) % 4)
                0: vt += (p == 0) ?  xr :  xi;
                1: vt += (p == 0) ?  xi : -xr;
                2: vt += (p == 0) ? -xr : -xi;
                default: vt += (p == 0) ? -xi : xr;
              endcase
            end
            vy  = part_val(eo, fft4_sign[4*g+k][p], fft4_box[4*g+k][p], fft4_mant[4*g+k][p]);
            tol = (fft4_box[4*g+k][p] ? pow2(eo - 174) : pow2(eo - 150)) + pow2(ec - 174);
            check(absr(vy - vt) <= tol, $sformatf("block %0d group %0d radix-4 X%0d part %0d", b, g, k, p));
          end
      end
      n_f4++;
    end
    if (rst_n && fft2_valid) begin
      int b, ec;
      b  = n_f2;
      ec = ref_ec(b);
      check(cyc - tlast[b] == 5, $sformatf("radix-2 FFT latency %0d", cyc - tlast[b]));
      for (int g = 0; g < NG; g++) begin
        automatic int eo = int'(fft2_exp[g]);
        if (eo > ec) n_grow2++;
        for (int k = 0; k < 4; k++)
          for (int p = 0; p < 2; p++) begin
            real vy, tol, vt;
            vt  = 0.0;
            for (int n = 0; n < 4; n++) begin
              automatic real xr = enc_val(b, 4*g+n, 0);
              automatic real xi = enc_val(b, 4*g+n, 1);
              case ((n * k) % 4)
                0: vt += (p == 0) ?  xr :  xi;
                1: vt += (p == 0) ?  xi : -xr;
                2: vt += (p == 0) ? -xr : -xi;
                default: vt += (p == 0) ? -xi : xr;
              endcase
            end
            vy  = part_val(eo, fft2_sign[4*g+k][p], fft2_box[4*g+k][p], fft2_mant[4*g+k][p]);
            tol = (fft2_box[4*g+k][p] ? pow2(eo - 174) : pow2(eo - 150)) + 3.0 * pow2(ec - 150);
            check(absr(vy - vt) <= tol, $sformatf("block %0d group %0d radix-2 X%0d part %0d", b, g, k, p));
          end
      end
      n_f2++;
      if (n_f2 == NB) begin
        check(n_enc == NB && n_alu == NB && n_f4 == NB, "every block produced every result");
        check(n_box > 0,    "mechanism: box-shifted parts");
        check(n_zeroed > 0, "mechanism: parts beyond the box flushed to zero");
        check(n_op[0] > 0 && n_op[1] > 0 && n_op[2] > 0, "mechanism: add, subtract, multiply");
        check(n_carry > 0,  "mechanism: adder carry raises the shared exponent");
        check(n_grow2 > 0 && n_grow4 > 0, "mechanism: FFT exponent growth (radix-2 and radix-4)");
        $display("blocks %0d; box parts %0d, zeroed %0d; add %0d sub %0d mul %0d; carries %0d; FFT growth r2 %0d r4 %0d",
                 NB, n_box, n_zeroed, n_op[0], n_op[1], n_op[2], n_carry, n_grow2, n_grow4);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
