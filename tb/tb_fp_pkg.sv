// tb_fp_pkg: reference FP32 arithmetic for the testbenches.
//
// Converts between FP32 bit patterns and the simulator's double-precision
// reals. A product of two FP32 numbers is exact in double precision, and so
// is a sum whose operands' exponents differ by less than 29, so rounding the
// double result once to FP32 (nearest, ties to even, subnormals flushed to
// zero) gives the correctly rounded FP32 result the hardware must produce.
package tb_fp_pkg;

  function automatic real fp2real(input logic [31:0] f);
    real m;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    for (int e = int'(f[30:23]); e > 127; e--) m = m * 2.0;
    for (int e = int'(f[30:23]); e < 127; e++) m = m / 2.0;
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] real2fp(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic        g, st;
    if (r == 0.0) return 32'd0;
    d  = $realtobits(r);
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[23]) begin
      e = e + 1;
      m = '0;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return real2fp(fp2real(a) * fp2real(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return real2fp(fp2real(a) + fp2real(b));
  endfunction

  // A random normal FP32 number with magnitude in [2^elo, 2^ehi).
  function automatic logic [31:0] rand_fp(input int elo, input int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo - 1, 0));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
