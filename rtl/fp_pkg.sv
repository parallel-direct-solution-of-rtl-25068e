// fp_pkg: IEEE 754 single-precision helpers shared by the FPU units.
//
// Number handling, common to the adder, multiplier and divider:
//   * rounding is round-to-nearest, ties to even;
//   * subnormal inputs are read as zero and results below the smallest
//     normal number are flushed to a signed zero;
//   * an overflow gives infinity, every invalid operation gives the quiet
//     NaN 0x7FC00000, and a NaN input gives that NaN as well.
// Operands are rounded from a 27-bit significand: bit 26 is the hidden one,
// bits 25:3 the fraction, bit 2 the guard bit, bit 1 the round bit and bit 0
// the sticky bit (OR of everything below).
package fp_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] frac;
  } fp32_t;

  function automatic logic is_nan(input fp32_t a);
    return (a.exp == 8'hFF) && (a.frac != '0);
  endfunction

  function automatic logic is_inf(input fp32_t a);
    return (a.exp == 8'hFF) && (a.frac == '0);
  endfunction

  // zero, or a subnormal read as zero
  function automatic logic is_zero(input fp32_t a);
    return a.exp == 8'h00;
  endfunction

  function automatic logic [31:0] inf_of(input logic s);
    return {s, 8'hFF, 23'd0};
  endfunction

  function automatic logic [31:0] zero_of(input logic s);
    return {s, 31'd0};
  endfunction

  // Round a normalised 27-bit significand m (m[26] = 1) with biased exponent
  // e (signed, value = 1.f * 2^(e-127)) and pack the result.
  function automatic logic [31:0] round_pack(input logic s, input int e, input logic [26:0] m);
    logic        rup;
    logic [24:0] r;
    int          ee;
    rup = m[2] & (m[1] | m[0] | m[3]);
    r   = {1'b0, m[26:3]} + 25'(rup);
    ee  = e;
    if (r[24]) begin
      r  = r >> 1;
      ee = ee + 1;
    end
    if (ee >= 255) return inf_of(s);
    if (ee <= 0)   return zero_of(s);
    return {s, 8'(ee), r[22:0]};
  endfunction

  // Number of leading zeros of a 27-bit value (27 when it is zero).
  function automatic int lzc27(input logic [26:0] v);
    int n;
    n = 27;
    for (int i = 0; i < 27; i++)
      if (v[i]) n = 26 - i;
    return n;
  endfunction

  // ---- adder pipeline stages (fp_addsub) ---------------------------------
  // stage A: special cases, operand swap (|a| >= |b|), exponent difference
  typedef struct packed {
    logic        special;   // result already known
    logic [31:0] sres;
    logic        sign;      // sign of the larger operand = sign of the result
    logic        eff_sub;   // signs differ: subtract magnitudes
    logic [7:0]  exp;       // exponent of the larger operand
    logic [26:0] xa;        // larger significand with 3 guard bits
    logic [26:0] xb;        // smaller significand with 3 guard bits
    logic [4:0]  d;         // exponent difference, saturated at 31
  } add_a_t;

  // stage B: alignment; stage C: sum (28 bits)
  typedef struct packed {
    logic        special;
    logic [31:0] sres;
    logic        sign;
    logic        eff_sub;
    logic [7:0]  exp;
    logic [27:0] sum;
  } add_c_t;

  // stage D: normalised significand and exponent
  typedef struct packed {
    logic        special;
    logic [31:0] sres;
    logic        sign;
    logic [9:0]  exp;       // signed
    logic [26:0] m;
  } fp_norm_t;

  function automatic add_a_t add_stage_a(input fp32_t a_in, input fp32_t b_in);
    add_a_t r;
    fp32_t  a, b;
    int     d;
    r = '0;
    if (is_nan(a_in) || is_nan(b_in)) begin
      r.special = 1'b1; r.sres = QNAN;
    end else if (is_inf(a_in) && is_inf(b_in)) begin
      r.special = 1'b1; r.sres = (a_in.sign == b_in.sign) ? inf_of(a_in.sign) : QNAN;
    end else if (is_inf(a_in)) begin
      r.special = 1'b1; r.sres = a_in;
    end else if (is_inf(b_in)) begin
      r.special = 1'b1; r.sres = b_in;
    end else if (is_zero(a_in) && is_zero(b_in)) begin
      r.special = 1'b1; r.sres = zero_of(a_in.sign & b_in.sign);
    end else if (is_zero(a_in)) begin
      r.special = 1'b1; r.sres = b_in;
    end else if (is_zero(b_in)) begin
      r.special = 1'b1; r.sres = a_in;
    end
    if (b_in[30:0] > a_in[30:0]) begin
      a = b_in; b = a_in;
    end else begin
      a = a_in; b = b_in;
    end
    r.sign    = a.sign;
    r.eff_sub = a.sign ^ b.sign;
    r.exp     = a.exp;
    r.xa      = {1'b1, a.frac, 3'b000};
    r.xb      = {1'b1, b.frac, 3'b000};
    d         = int'(a.exp) - int'(b.exp);
    r.d       = (d > 31) ? 5'd31 : 5'(d);
    return r;
  endfunction

  // alignment of the smaller significand, keeping a sticky bit
  function automatic add_a_t add_stage_b(input add_a_t x);
    add_a_t r;
    r = x;
    if (x.d >= 5'd27) r.xb = 27'd1;
    else begin
      r.xb = x.xb >> x.d;
      if ((x.xb & ((27'd1 << x.d) - 27'd1)) != '0) r.xb[0] = 1'b1;
    end
    return r;
  endfunction

  function automatic add_c_t add_stage_c(input add_a_t x);
    add_c_t r;
    r.special = x.special;
    r.sres    = x.sres;
    r.sign    = x.sign;
    r.eff_sub = x.eff_sub;
    r.exp     = x.exp;
    r.sum     = x.eff_sub ? {1'b0, x.xa} - {1'b0, x.xb} : {1'b0, x.xa} + {1'b0, x.xb};
    return r;
  endfunction

  function automatic fp_norm_t add_stage_d(input add_c_t x);
    fp_norm_t r;
    int       lz;
    r.special = x.special;
    r.sres    = x.sres;
    r.sign    = x.sign;
    if (x.sum[27]) begin
      r.m   = x.sum[27:1];
      r.m[0] = r.m[0] | x.sum[0];
      r.exp = 10'(int'(x.exp) + 1);
    end else begin
      lz    = lzc27(x.sum[26:0]);
      r.m   = x.sum[26:0] << lz;
      r.exp = 10'(int'(x.exp) - lz);
      if (x.sum == '0 && !x.special) begin   // exact cancellation gives +0
        r.special = 1'b1;
        r.sres    = zero_of(1'b0);
      end
    end
    return r;
  endfunction

  function automatic logic [31:0] norm_round(input fp_norm_t x);
    if (x.special) return x.sres;
    return round_pack(x.sign, int'($signed(x.exp)), x.m);
  endfunction

  // ---- multiplier pipeline stages (fp_mul) -------------------------------
  typedef struct packed {
    logic        special;
    logic [31:0] sres;
    logic        sign;
    logic [9:0]  exp;       // signed: ea + eb - 127
    logic [47:0] p;         // significand product
  } mul_a_t;

  function automatic mul_a_t mul_stage_a(input fp32_t a, input fp32_t b);
    mul_a_t r;
    r      = '0;
    r.sign = a.sign ^ b.sign;
    if (is_nan(a) || is_nan(b)) begin
      r.special = 1'b1; r.sres = QNAN;
    end else if ((is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
      r.special = 1'b1; r.sres = QNAN;
    end else if (is_inf(a) || is_inf(b)) begin
      r.special = 1'b1; r.sres = inf_of(r.sign);
    end else if (is_zero(a) || is_zero(b)) begin
      r.special = 1'b1; r.sres = zero_of(r.sign);
    end
    r.exp = 10'(int'(a.exp) + int'(b.exp) - 127);
    r.p   = {1'b1, a.frac} * {1'b1, b.frac};
    return r;
  endfunction

  function automatic fp_norm_t mul_stage_b(input mul_a_t x);
    fp_norm_t r;
    r.special = x.special;
    r.sres    = x.sres;
    r.sign    = x.sign;
    if (x.p[47]) begin
      r.m   = {x.p[47:22], |x.p[21:0]};
      r.exp = x.exp + 10'd1;
    end else begin
      r.m   = {x.p[46:21], |x.p[20:0]};
      r.exp = x.exp;
    end
    return r;
  endfunction

  // Special cases of a / b; valid = 1 when the result needs no division.
  function automatic logic [32:0] fp_div_special(input fp32_t a, input fp32_t b);
    logic s;
    s = a.sign ^ b.sign;
    if (is_nan(a) || is_nan(b))                       return {1'b1, QNAN};
    if ((is_inf(a) && is_inf(b)) || (is_zero(a) && is_zero(b))) return {1'b1, QNAN};
    if (is_inf(a) || is_zero(b))                      return {1'b1, inf_of(s)};
    if (is_zero(a) || is_inf(b))                      return {1'b1, zero_of(s)};
    return {1'b0, 32'd0};
  endfunction

endpackage
