// cbfp_block_buffer -- collects a stream of complex IEEE-754 samples into
// blocks of NV samples for the block converter (serial to parallel).
//
// One complex sample (real and imaginary word) is written per clock in which
// in_valid is high, at the next free position of the block. When the NV-th
// sample of a block has been written, out_valid is high for one clock and
// blk_re/blk_im hold the complete block, sample 0 first. Collection of the
// next block starts with the next written sample, which overwrites position
// 0: a consumer must take the block in the clock out_valid is high.
// Timing: out_valid is registered, one clock after the last write.
module cbfp_block_buffer
  import cbfp_pkg::*;
#(
  parameter int NV = NV_DEFAULT        // complex samples per block
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [IEEE_E+IEEE_F:0]   in_re,
  input  logic [IEEE_E+IEEE_F:0]   in_im,
  output logic                     out_valid,
  output logic [IEEE_E+IEEE_F:0]   blk_re [NV],
  output logic [IEEE_E+IEEE_F:0]   blk_im [NV]
);

  localparam int IW = (NV > 1) ? $clog2(NV) : 1;

  logic [IW-1:0] wr_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_idx    <= '0;
      out_valid <= 1'b0;
      for (int k = 0; k < NV; k++) begin
        blk_re[k] <= '0;
        blk_im[k] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        blk_re[wr_idx] <= in_re;
        blk_im[wr_idx] <= in_im;
        if (wr_idx == IW'(NV - 1)) begin
          wr_idx    <= '0;
          out_valid <= 1'b1;
        end else begin
          wr_idx <= wr_idx + 1'b1;
        end
      end
    end
  end

endmodule
