// fp64_pkg: IEEE-754 binary64 arithmetic used by every datapath of the solver.
//
// The solver works in double precision throughout. This package holds the
// combinational add and multiply functions that the pipelined operators
// (fp_add, fp_mul, the SpMV multipliers and adder tree, the dot_axpy lanes)
// share, so that all units round identically.
//
// Both functions round to nearest, ties to even. Subnormal inputs are read as
// zero and subnormal results are flushed to a signed zero; this is a choice of
// this implementation, made to keep the operators small. Infinities and NaNs
// propagate (any NaN input or an invalid operation gives the quiet NaN
// 0x7FF8_0000_0000_0000).
//
// Lint notes: the classification functions (fp_is_nan, fp_is_inf,
// fp_is_zero) take a whole double but look only at the exponent and fraction
// fields, so a linter reports the sign bit (and, for fp_is_zero, the
// fraction) as unused. This is intended and creates no logic.
package fp64_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam fp64_t FP_ZERO = 64'h0;
  localparam fp64_t FP_ONE  = 64'h3FF0_0000_0000_0000;

  function automatic logic fp_is_nan(fp64_t a);
    return (a[62:52] == 11'h7FF) && (a[51:0] != '0);
  endfunction

  function automatic logic fp_is_inf(fp64_t a);
    return (a[62:52] == 11'h7FF) && (a[51:0] == '0);
  endfunction

  // Zero or subnormal (subnormals are treated as zero).
  function automatic logic fp_is_zero(fp64_t a);
    return a[62:52] == 11'h000;
  endfunction

  function automatic fp64_t fp_neg(fp64_t a);
    return {~a[63], a[62:0]};
  endfunction

  // Pack sign, biased exponent (may be out of range) and a 56-bit mantissa
  // {hidden bit, 52 fraction bits, guard, round, sticky} with round to nearest
  // even, overflow to infinity and underflow to zero.
  function automatic fp64_t fp_round_pack(logic s, logic signed [13:0] e, logic [55:0] m);
    logic [53:0] r;
    logic signed [13:0] ee;
    logic up;
    up = m[2] && (m[1] || m[0] || m[3]);
    r  = {1'b0, m[55:3]} + 54'(up);
    ee = e;
    if (r[53]) begin
      r  = r >> 1;
      ee = ee + 14'sd1;
    end
    if (ee >= 14'sd2047) return {s, 11'h7FF, 52'h0};
    if (ee <= 14'sd0) return {s, 63'h0};
    return {s, ee[10:0], r[51:0]};
  endfunction

  function automatic fp64_t fp_mul_f(fp64_t a, fp64_t b);
    logic s;
    logic [105:0] p;
    logic [55:0] m;
    logic signed [13:0] e;
    s = a[63] ^ b[63];
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) || fp_is_inf(b)) begin
      if (fp_is_zero(a) || fp_is_zero(b)) return FP_QNAN;
      return {s, 11'h7FF, 52'h0};
    end
    if (fp_is_zero(a) || fp_is_zero(b)) return {s, 63'h0};
    p = {1'b1, a[51:0]} * {1'b1, b[51:0]};
    e = 14'(signed'({3'b0, a[62:52]})) + 14'(signed'({3'b0, b[62:52]})) - 14'sd1023;
    if (p[105]) begin
      m = {p[105:51], |p[50:0]};
      e = e + 14'sd1;
    end else begin
      m = {p[104:50], |p[49:0]};
    end
    return fp_round_pack(s, e, m);
  endfunction

  function automatic fp64_t fp_add_f(fp64_t a, fp64_t b);
    fp64_t x, y;
    logic [55:0] mx, my, sh;
    logic [56:0] sum;
    logic [10:0] d;
    logic signed [13:0] e;
    logic [5:0] lz;
    if (fp_is_nan(a) || fp_is_nan(b)) return FP_QNAN;
    if (fp_is_inf(a) && fp_is_inf(b)) return (a[63] == b[63]) ? a : FP_QNAN;
    if (fp_is_inf(a)) return a;
    if (fp_is_inf(b)) return b;
    if (fp_is_zero(a) && fp_is_zero(b)) return {a[63] & b[63], 63'h0};
    if (fp_is_zero(a)) return b;
    if (fp_is_zero(b)) return a;
    // x has the larger magnitude
    if (a[62:0] >= b[62:0]) begin x = a; y = b; end
    else begin x = b; y = a; end
    d  = x[62:52] - y[62:52];
    mx = {1'b1, x[51:0], 3'b000};
    my = {1'b1, y[51:0], 3'b000};
    if (d >= 11'd56) sh = 56'd1;
    else begin
      sh = my >> d;
      if ((my & ((56'd1 << d) - 56'd1)) != '0) sh[0] = 1'b1;
    end
    e = 14'(signed'({3'b0, x[62:52]}));
    if (x[63] == y[63]) begin
      sum = {1'b0, mx} + {1'b0, sh};
      if (sum[56]) begin
        sum = {1'b0, sum[56:1]} | 57'(sum[0]);
        e = e + 14'sd1;
      end
      return fp_round_pack(x[63], e, sum[55:0]);
    end
    sum = {1'b0, mx} - {1'b0, sh};
    if (sum == '0) return FP_ZERO;
    // leading-zero count: the highest set bit wins (last assignment)
    lz = 6'd0;
    for (int i = 0; i < 56; i++)
      if (sum[i]) lz = 6'(55 - i);
    sum = sum << lz;
    e = e - 14'(lz);
    return fp_round_pack(x[63], e, sum[55:0]);
  endfunction

endpackage
