// tb_ref_pkg: reference arithmetic for the testbenches.
//
// BF16 values are converted to double precision reals, the operation is done exactly in
// double precision (operands are kept in an exponent range where that holds), and the result
// is converted back by truncating the fraction (round toward zero), flushing subnormals to
// zero and saturating to infinity. This is independent of the bit-level RTL functions.
//
// The rounding it models (toward zero) is this design's choice; the source only fixes BF16.
package tb_ref_pkg;

  function automatic real bf2r(logic [15:0] a);
    real m;
    int  e;
    if (a[14:7] == 8'd0) return 0.0;
    m = 1.0 + real'(a[6:0]) / 128.0;
    e = int'(a[14:7]) - 127;
    m = m * (2.0 ** e);
    return a[15] ? -m : m;
  endfunction

  function automatic logic [15:0] r2bf(real r);
    logic [63:0] b;
    int          e;
    b = $realtobits(r);
    if (b[62:0] == 63'd0) return {b[63], 15'd0};
    e = int'(b[62:52]) - 1023 + 127;
    if (e <= 0) return {b[63], 15'd0};
    if (e >= 255) return {b[63], 8'hFF, 7'd0};
    return {b[63], e[7:0], b[51:45]};
  endfunction

  // random normal BF16 with exponent in [127+lo, 127+hi]
  function automatic logic [15:0] rand_bf(int lo, int hi);
    int e;
    e = 127 + lo + int'($urandom_range(0, hi - lo));
    return {1'($urandom), 8'(e), 7'($urandom)};
  endfunction

  function automatic logic [15:0] ref_add(logic [15:0] a, logic [15:0] b);
    real r;
    r = bf2r(a) + bf2r(b);
    if (r == 0.0) return (a[15] && b[15] && a[14:7] == 0 && b[14:7] == 0) ? 16'h8000 : 16'h0000;
    return r2bf(r);
  endfunction

  function automatic logic [15:0] ref_mul(logic [15:0] a, logic [15:0] b);
    real r;
    r = bf2r(a) * bf2r(b);
    if (r == 0.0) return {a[15] ^ b[15], 15'd0};
    return r2bf(r);
  endfunction

  function automatic logic [15:0] ref_int4(logic [3:0] n);
    return r2bf(real'($signed(n)));
  endfunction

  function automatic logic [15:0] ref_int8(logic [7:0] n);
    return r2bf(real'($signed(n)));
  endfunction

endpackage
