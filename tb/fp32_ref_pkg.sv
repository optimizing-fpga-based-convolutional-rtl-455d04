// fp32_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Works through the simulator's double-precision 'real': an fp32 value is
// widened exactly to real, the operation is done in real, and the result
// is rounded to fp32 (nearest, ties to even) by bit manipulation of the
// 64-bit pattern. A product of two fp32 values is exact in double, so
// fmul is correctly rounded; a sum is exact whenever the operands'
// exponents differ by less than about 29, which the testbenches' data keep.
// Subnormals are flushed to zero, matching the design's arithmetic units.
package fp32_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(32'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [23:0] m;
    d  = $realtobits(r);
    s  = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    if (a[30:23] == 8'd0 && b[30:23] == 8'd0) return {a[31] & b[31], 31'd0};
    return r2f(f2r(a) + f2r(b));
  endfunction

  // Random fp32 value with exponent in [emin, emax] and random sign.
  function automatic logic [31:0] frand(input int emin, input int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // Quantised value q/8 with q uniform in [-lim, lim]: products and short
  // sums of such values are exact in single precision.
  function automatic logic [31:0] qrand(input int lim);
    int q;
    q = int'($urandom % 32'(2 * lim + 1)) - lim;
    return r2f(real'(q) / 8.0);
  endfunction

endpackage
