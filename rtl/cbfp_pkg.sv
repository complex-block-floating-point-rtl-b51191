// cbfp_pkg -- constants and types shared by the complex block floating-point
// (CBFP) datapath with exponent box encoding.
//
// A complex block holds NV complex samples. All of them share one exponent,
// the largest exponent in the block. Each real and each imaginary part keeps
// its own sign bit, a one-bit "box shift" flag and an NM-bit scaled mantissa
// whose leading bit is stored explicitly. The value of one part is
//
//     (-1)^sign * mant * 2^(exp - BIAS - (NM-1) - BOX*box)
//
// so a part whose exponent lies more than BOX below the shared exponent is
// pulled back into range by one box shift instead of being flushed to zero.
// The single-precision widths (8-bit exponent, 24-bit scaled mantissa, one
// box bit and one sign bit per part) follow the format definition. The box
// shift amount equal to the scaled mantissa width is this design's reading
// of the format (see the README).
package cbfp_pkg;

  // IEEE-754 single precision, the source format of the encoder.
  localparam int IEEE_E = 8;           // exponent field width
  localparam int IEEE_F = 23;          // fraction field width
  localparam int BIAS   = 127;         // exponent bias

  // Exponent box format, single precision.
  localparam int NE  = IEEE_E;         // shared exponent width
  localparam int NM  = IEEE_F + 1;     // scaled mantissa width (leading bit stored)
  localparam int BOX = NM;             // right shift applied by one box shift

  // Default block size: 64 complex samples per block.
  localparam int NV_DEFAULT = 64;

  // Operations of the SIMD complex block ALU.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,                      // Y = X1 + X2
    OP_SUB = 2'd1,                      // Y = X1 - X2
    OP_MUL = 2'd2                       // Y = X1 .* X2 (element-wise)
  } alu_op_e;

  // Radix of the 4-point FFT engines.
  typedef enum logic {
    FFT_R2 = 1'b0,                      // two radix-2 stages
    FFT_R4 = 1'b1                       // one radix-4 stage
  } fft_radix_e;

  // Index of the real and the imaginary part in the [NV][2] vectors.
  localparam int RE = 0;
  localparam int IM = 1;

endpackage
