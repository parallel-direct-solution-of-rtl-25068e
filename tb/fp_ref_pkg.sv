// fp_ref_pkg: reference single-precision arithmetic for the FPU testbenches.
//
// Operands are widened to double precision, the operation is done in
// double with the simulator's real arithmetic, and the result is rounded
// back to single precision, to nearest even. Because double carries more
// than twice the single-precision significand plus two bits, this gives the
// correctly rounded single result for add, subtract, multiply and divide.
// Like the FPU, it reads subnormal operands as zero and flushes results
// below the smallest normal to zero. Special values are not handled here:
// the testbenches check them with directed cases.
package fp_ref_pkg;

  function automatic real s2r(input logic [31:0] a);
    logic [63:0] d;
    if (a[30:23] == 8'd0) return a[31] ? -0.0 : 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2s(input real r);
    logic [63:0] d;
    logic [24:0] m;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) + s2r(b));
  endfunction
  function automatic logic [31:0] ref_sub(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) - s2r(b));
  endfunction
  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction
  function automatic logic [31:0] ref_div(input logic [31:0] a, input logic [31:0] b);
    return r2s(s2r(a) / s2r(b));
  endfunction

  // random normal number with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_fp(input int span);
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(127 - span + int'($urandom_range(2 * span)));
    return v;
  endfunction

endpackage
