// tb_cbfp_block_buffer -- self-checking test of the serial-to-parallel block
// buffer.
//
// Six blocks of NV = 8 complex samples are written with random idle clocks
// between samples. out_valid must pulse exactly once per block, one clock
// after its last sample, and the block must hold the samples in arrival
// order.
module tb_cbfp_block_buffer;

  localparam int NV = 8;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] in_re, in_im;
  logic        out_valid;
  logic [31:0] blk_re [NV], blk_im [NV];

  logic [31:0] ref_re [6][NV], ref_im [6][NV];
  int checks = 0, failures = 0, n_blk = 0, last_wr = -10, cyc = 0;

  cbfp_block_buffer #(.NV(NV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      check(n_blk < 6, "no extra blocks");
      check(cyc - last_wr == 1, $sformatf("out_valid %0d clocks after the last write", cyc - last_wr));
      for (int k = 0; k < NV; k++)
        check(blk_re[k] == ref_re[n_blk][k] && blk_im[k] == ref_im[n_blk][k],
              $sformatf("block %0d sample %0d", n_blk, k));
      n_blk++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 6; b++)
      for (int k = 0; k < NV; k++) begin
        ref_re[b][k] = $urandom;
        ref_im[b][k] = $urandom;
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom % 3) @(negedge clk);
        in_re = ref_re[b][k];
        in_im = ref_im[b][k];
        in_valid = 1;
        if (k == NV - 1) last_wr = cyc + 1;
      end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    check(n_blk == 6, $sformatf("%0d blocks delivered", n_blk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
