// tb_cbfp_fix2ieee -- self-checking test of the ADC-code to IEEE-754
// converter with AGC gain removal.
//
// Random 16-bit codes (with random magnitudes down to a single bit) and gain
// exponents in [-20, 20] are converted; the result must equal, exactly, the
// real value code * 2^-15 / 2^g_exp. Zero codes must give +0, results below
// the normal range must flush to +0, results above it must saturate to the
// largest finite single. The one-clock latency is checked.
module tb_cbfp_fix2ieee;
  import tb_cbfp_pkg::*;

  logic               clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] v;
  logic signed [7:0]  g_exp;
  logic               out_valid;
  logic [31:0]        y;

  int checks = 0, failures = 0;

  cbfp_fix2ieee dut (.*);

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

  task automatic apply(logic signed [15:0] code, logic signed [7:0] g, output logic [31:0] res);
    @(negedge clk);
    v = code; g_exp = g; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check(out_valid == 1'b1, "latency: out_valid one clock after in_valid");
    res = y;
  endtask

  initial begin
    logic [31:0] r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      logic signed [15:0] code;
      logic signed [7:0]  g;
      real exp_v;
      code = 16'($urandom) >>> ($urandom % 16);
      g    = 8'(int'($urandom % 41) - 20);
      apply(code, g, r);
      exp_v = real'(code) * pow2(-15) * pow2(-int'(g));
      check(sp_val(r) == exp_v, $sformatf("code %0d g %0d: got %h (%e) expected %e", code, g, r, sp_val(r), exp_v));
    end
    apply(16'sd0, 8'sd3, r);
    check(r == 32'h0, "zero code gives +0");
    apply(16'sd1, 8'sd120, r);         // 2^-15 / 2^120 is below the normal range
    check(r == 32'h0, "underflow flushes to +0");
    apply(-16'sd32768, -8'sd128, r);   // 2^128 is above the range
    check(r == 32'hff7fffff, $sformatf("overflow saturates, got %h", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
