// fp_pkg: IEEE 754 single-precision arithmetic used by every processing element.
//
// The arithmetic units of the processing elements work on 32-bit IEEE 754
// numbers. This package holds the bit-level reference of the add and multiply
// operations, written as functions so that the pipelined units (fp_add,
// fp_mul) and the exponent-shift unit (fp_pow2) share one definition.
// Rounding is round-to-nearest-even. Subnormal inputs are read as zero and
// results that would be subnormal are flushed to a signed zero; overflow gives
// infinity; any NaN operand (or inf - inf, 0 * inf) gives the quiet NaN
// 32'h7FC00000. These edge-case rules are this design's own choice: the
// source design used vendor floating-point cores whose settings are not known.
package fp_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_QNAN = 32'h7FC0_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_TWO  = 32'h4000_0000;
  localparam fp32_t FP_THREE = 32'h4040_0000;

  function automatic fp32_t fp_neg(fp32_t a);
    return {~a[31], a[30:0]};
  endfunction

  // Round a normalised magnitude and pack it. man is 1.xxx with 23 fraction
  // bits followed by guard, round and sticky bits (27 bits in all).
  function automatic fp32_t fp_round_pack(logic s, int e, logic [26:0] man);
    logic [24:0] r;
    logic        up;
    up = man[2] & (man[1] | man[0] | man[3]);
    r  = {1'b0, man[26:3]} + 25'(up);
    if (r[24]) begin
      r = r >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], r[22:0]};
  endfunction

  function automatic fp32_t fp_add_f(fp32_t a, fp32_t b);
    logic        sa, sb, sr;
    logic [7:0]  ea, eb;
    logic [26:0] ma, mb, st;
    logic [27:0] sum;
    int          d, e, lz;
    sa = a[31]; sb = b[31];
    ea = a[30:23]; eb = b[30:23];
    if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0)) return FP_QNAN;
    if (ea == 8'hFF && eb == 8'hFF) return (sa == sb) ? a : FP_QNAN;
    if (ea == 8'hFF) return a;
    if (eb == 8'hFF) return b;
    if (ea == 0 && eb == 0) return {sa & sb, 31'd0};
    if (ea == 0) return b;
    if (eb == 0) return a;
    // order so that |a| >= |b|
    if ({eb, b[22:0]} > {ea, a[22:0]}) begin
      {sa, ea, ma} = {sb, eb, 1'b1, b[22:0], 3'b000};
      {sb, eb, mb} = {a[31], a[30:23], 1'b1, a[22:0], 3'b000};
    end else begin
      ma = {1'b1, a[22:0], 3'b000};
      mb = {1'b1, b[22:0], 3'b000};
    end
    d = int'(ea) - int'(eb);
    if (d > 26) begin
      mb = 27'd1;                      // only the sticky bit survives
    end else if (d > 0) begin
      st = mb & ((27'd1 << d) - 27'd1);
      mb = (mb >> d) | 27'(st != 0);
    end
    e  = int'(ea);
    sr = sa;
    if (sa == sb) begin
      sum = {1'b0, ma} + {1'b0, mb};
      if (sum[27]) begin
        sum = {1'b0, sum[27:1]} | 28'(sum[0]);
        e = e + 1;
      end
    end else begin
      sum = {1'b0, ma} - {1'b0, mb};
      if (sum == 0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (sum[i]) break;
        lz++;
      end
      sum = sum << lz;
      e = e - lz;
    end
    return fp_round_pack(sr, e, sum[26:0]);
  endfunction

  function automatic fp32_t fp_mul_f(fp32_t a, fp32_t b);
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [26:0] m;
    int          e;
    s  = a[31] ^ b[31];
    ea = a[30:23]; eb = b[30:23];
    if ((ea == 8'hFF && a[22:0] != 0) || (eb == 8'hFF && b[22:0] != 0)) return FP_QNAN;
    if (ea == 8'hFF || eb == 8'hFF) begin
      if (ea == 0 || eb == 0) return FP_QNAN;
      return {s, 8'hFF, 23'd0};
    end
    if (ea == 0 || eb == 0) return {s, 31'd0};
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = int'(ea) + int'(eb) - 127;
    if (p[47]) begin
      m = {p[47:22], |p[21:0]};
      e = e + 1;
    end else begin
      m = {p[46:21], |p[20:0]};
    end
    return fp_round_pack(s, e, m);
  endfunction

  // a * 2^k: only the exponent changes (the "bit-shift operator").
  function automatic fp32_t fp_pow2_f(fp32_t a, int k);
    int e;
    if (a[30:23] == 8'hFF || a[30:23] == 0) return a[30:23] == 0 ? {a[31], 31'd0} : a;
    e = int'(a[30:23]) + k;
    if (e >= 255) return {a[31], 8'hFF, 23'd0};
    if (e <= 0)   return {a[31], 31'd0};
    return {a[31], e[7:0], a[22:0]};
  endfunction

endpackage
