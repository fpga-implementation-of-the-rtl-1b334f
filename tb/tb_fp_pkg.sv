// tb_fp_pkg: reference conversions between IEEE-754 single-precision bit patterns
// and the simulator's double-precision real, used by the testbenches to compute
// expected results independently of the RTL. r2f rounds a real to the nearest
// single (ties to even) and, like the RTL, flushes subnormal results to zero.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    if (f[30:23] == 8'hff) d = {f[31], 11'h7ff, 52'd0};
    else d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] m;
    logic [24:0] m24;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    m24 = {1'b0, m[52:29]};
    g = m[28];
    st = |m[27:0];
    if (g && (st || m24[0])) m24 = m24 + 25'd1;
    if (m24[24]) begin m24 = m24 >> 1; e = e + 1; end
    if (e <= 0) return {s, 31'd0};
    if (e >= 255) return {s, 8'hff, 23'd0};
    return {s, 8'(e), m24[22:0]};
  endfunction

  // random normal float with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_f(input int span);
    int e;
    e = 127 - span + int'($urandom_range(2 * span, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // single-precision operations, each rounded once
  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction
  function automatic logic [31:0] fdiv(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) / f2r(b));
  endfunction

  // close enough: relative tolerance rel, absolute floor abs_tol
  function automatic logic near(input logic [31:0] a, input logic [31:0] b, input real rel, input real abs_tol);
    return rabs(f2r(a) - f2r(b)) <= rel * rabs(f2r(b)) + abs_tol;
  endfunction

endpackage
