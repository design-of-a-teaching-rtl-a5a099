// tb_fp_ref_pkg: reference single-precision addition for the testbenches.
//
// Converts both operands to double precision, adds them with the
// simulator's real arithmetic (exact enough that one further rounding
// gives the correctly rounded single result), then rounds the double
// to single precision, nearest-even. Subnormals count as zero, as in
// the adder under test; operands must be finite.
package tb_fp_ref_pkg;

  function automatic real to_real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'd0) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_single(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        guard, rest;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e     = int'(d[62:52]) - 1023 + 127;
    m     = {2'b01, d[51:29]};
    guard = d[28];
    rest  = |d[27:0];
    if (guard && (rest || m[0])) m = m + 1'b1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fp_add_ref(logic [31:0] a, logic [31:0] b);
    real s;
    s = to_real(a) + to_real(b);
    if (s == 0.0) return 32'd0;
    return to_single(s);
  endfunction

  // A random finite, normal single with exponent in [lo, hi].
  function automatic logic [31:0] rand_fp(int lo, int hi);
    logic [31:0] x;
    x        = $urandom;
    x[30:23] = 8'(lo + ($urandom % (hi - lo + 1)));
    return x;
  endfunction

endpackage
