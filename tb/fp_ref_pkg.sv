// fp_ref_pkg: independent single-precision reference for the testbenches.
// Values are computed in double precision (exact for the products and for the
// sums of operands whose exponents differ by less than 29) and then rounded
// to single precision, round-to-nearest-even, subnormals flushed to zero.
package fp_ref_pkg;
  function automatic real s2r(logic [31:0] s);
    logic [63:0] d;
    if (s[30:23] == 0) return 0.0;
    d = {s[31], 11'(int'(s[30:23]) - 127 + 1023), s[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2s(real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        up;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    up = d[28] & ((d[27:0] != 0) | d[29]);
    m = {1'b0, d[51:29]} + 24'(up);
    if (m[23]) begin m = 0; e++; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] radd(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) + s2r(b));
  endfunction
  function automatic logic [31:0] rsub(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) - s2r(b));
  endfunction
  function automatic logic [31:0] rmul(logic [31:0] a, logic [31:0] b);
    return r2s(s2r(a) * s2r(b));
  endfunction
  function automatic logic [31:0] rscale(logic [31:0] a, real k);
    return r2s(s2r(a) * k);
  endfunction

  // random float with biased exponent in [emin, emax]
  function automatic logic [31:0] rnd_fp(int emin, int emax, bit allow_neg = 1);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(emax - emin)));
    return {allow_neg ? 1'($urandom) : 1'b0, e, 23'($urandom)};
  endfunction
endpackage
