// cbfp_fft4_r4 -- 4-point FFT of one exponent box encoded block of four
// complex samples in a single radix-4 stage.
//
//   X[k] = sum_{n=0..3} W4^(n*k) * x[n],   W4 = -j
//
// All twiddle factors are 1, -j, -1 or +j, so every term is an operand with
// its real and imaginary fields possibly swapped and negated; no multiplier
// is used. Each part of each input is expanded to a signed fixed-point value
// (box shift undone into BOX extra fraction bits); the four terms of every
// output part are summed; cbfp_postscale then renormalises the block (up to
// two bits of word growth raise the shared exponent) and re-derives the box
// shift bits with truncation. The four inputs share one exponent, so no
// exponent alignment is needed.
// Timing: one register stage; X follows in_valid by one clock.
module cbfp_fft4_r4
  import cbfp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NE-1:0]    x_exp,
  input  logic             x_sign [4][2],
  input  logic             x_box  [4][2],
  input  logic [NM-1:0]    x_mant [4][2],
  output logic             out_valid,
  output logic [NE-1:0]    y_exp,
  output logic             y_sign [4][2],
  output logic             y_box  [4][2],
  output logic [NM-1:0]    y_mant [4][2],
  output logic             exp_ovf
);

  localparam int XW = BOX + NM;        // unsigned expanded part
  localparam int SW = XW + 3;          // signed sum of four terms

  logic signed [SW-1:0] xv  [4][2];    // expanded signed inputs
  logic signed [SW-1:0] sum [4][2];

  logic [NE-1:0] c_exp;
  logic          c_sign [4][2], c_box [4][2];
  logic [NM-1:0] c_mant [4][2];
  logic          c_ovf;

  always_comb begin
    logic [XW-1:0] m;
    for (int n = 0; n < 4; n++)
      for (int p = 0; p < 2; p++) begin
        m = x_box[n][p] ? XW'(x_mant[n][p]) : (XW'(x_mant[n][p]) << BOX);
        xv[n][p] = x_sign[n][p] ? -$signed(SW'(m)) : $signed(SW'(m));
      end

    for (int k = 0; k < 4; k++) begin
      sum[k][RE] = '0;
      sum[k][IM] = '0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: begin sum[k][RE] += xv[n][RE]; sum[k][IM] += xv[n][IM]; end  //  1
          1: begin sum[k][RE] += xv[n][IM]; sum[k][IM] -= xv[n][RE]; end  // -j
          2: begin sum[k][RE] -= xv[n][RE]; sum[k][IM] -= xv[n][IM]; end  // -1
          default: begin sum[k][RE] -= xv[n][IM]; sum[k][IM] += xv[n][RE]; end  // +j
        endcase
      end
    end
  end

  cbfp_postscale #(.NV(4), .SW(SW), .MW_OUT(NM)) u_post (
    .s(sum), .e_base(x_exp),
    .y_exp(c_exp), .y_sign(c_sign), .y_box(c_box), .y_mant(c_mant), .exp_ovf(c_ovf)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_exp     <= '0;
      exp_ovf   <= 1'b0;
      for (int k = 0; k < 4; k++)
        for (int p = 0; p < 2; p++) begin
          y_sign[k][p] <= 1'b0;
          y_box[k][p]  <= 1'b0;
          y_mant[k][p] <= '0;
        end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_exp   <= c_exp;
        y_sign  <= c_sign;
        y_box   <= c_box;
        y_mant  <= c_mant;
        exp_ovf <= c_ovf;
      end
    end
  end

endmodule
