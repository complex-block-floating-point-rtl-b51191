// tb_cbfp_pkg -- reference arithmetic shared by the testbenches of the
// complex block floating-point datapath.
//
// Everything here works on SystemVerilog reals (IEEE double), independently
// of the RTL: a part of a block is decoded as
//     (-1)^sign * mant * 2^(exp - 127 - 23 - 24*box)
// and the reference encoder states the box rule as a magnitude test: a
// non-zero part smaller than one LSB of the shared exponent's mantissa
// (2^(exp-150)) is stored box-shifted, with an LSB of 2^(exp-174).
package tb_cbfp_pkg;

  localparam int NM  = 24;
  localparam int BOX = 24;

  function automatic real pow2(int n);
    real r = 1.0;
    if (n >= 0) for (int i = 0; i < n; i++) r = r * 2.0;
    else        for (int i = 0; i < -n; i++) r = r / 2.0;
    return r;
  endfunction

  // Value of one part of a block.
  function automatic real part_val(int e, bit s, bit x, longint unsigned m);
    real v = real'(m) * pow2(e - 150 - BOX * int'(x));
    return s ? -v : v;
  endfunction

  // Value of an IEEE-754 single given as bits (normal and subnormal).
  function automatic real sp_val(logic [31:0] w);
    real v;
    if (w[30:23] == 8'd0) v = real'(w[22:0]) * pow2(-149);
    else                  v = (1.0 + real'(w[22:0]) * pow2(-23)) * pow2(int'(w[30:23]) - 127);
    return w[31] ? -v : v;
  endfunction

  // Reference encoding of one part against the shared exponent ec.
  function automatic void enc_part(input real v, input int ec,
                                   output bit s, output bit x, output longint unsigned m);
    real a   = (v < 0.0) ? -v : v;
    real lsb = pow2(ec - 150);
    s = (v < 0.0);
    x = (a != 0.0) && (a < lsb);
    m = longint'($floor(a / (x ? lsb * pow2(-BOX) : lsb)));
  endfunction

  // Random single-precision value with exponent field in [e_hi-spread, e_hi].
  function automatic logic [31:0] rand_sp(int e_hi, int spread);
    logic [31:0] w;
    int          e = e_hi - int'($urandom % (spread + 1));
    if (e < 1) e = 1;
    w = {1'($urandom), 8'(e), 23'($urandom)};
    return w;
  endfunction

  // Exponent field a real value would have as a normal single (0 for zero).
  function automatic int sp_exp_of(real v);
    real a = (v < 0.0) ? -v : v;
    int  e = 127;
    if (a == 0.0) return 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    return e;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
