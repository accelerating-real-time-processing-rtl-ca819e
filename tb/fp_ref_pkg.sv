// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Products and sums are formed in double precision (exact for a product of
// two singles, and close enough that rounding the double once more to single
// gives the correctly rounded single result for a sum). to_f32 rounds a
// double's bit pattern to single, nearest-even, flushing results below the
// normal range to zero, as the hardware does. The code works on the double's
// bits only and shares nothing with the RTL.
package fp_ref_pkg;
  function automatic logic [31:0] to_f32(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, s;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic real to_real(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return to_f32(to_real(a) * to_real(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return to_f32(to_real(a) + to_real(b));
  endfunction

  // Equal, counting +0 and -0 as the same value.
  function automatic bit same(logic [31:0] a, logic [31:0] b);
    if (a[30:0] == 31'd0 && b[30:0] == 31'd0) return 1'b1;
    return a == b;
  endfunction

  // A random normal single with exponent in [127-span, 127+span].
  function automatic logic [31:0] rand_f32(int span);
    int e;
    e = 127 - span + int'($urandom_range(2 * span, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction
endpackage
