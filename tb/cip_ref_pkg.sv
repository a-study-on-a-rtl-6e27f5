// cip_ref_pkg: step-by-step single-precision reference of the CIP processing
// element, rounding after every operation in the same order as the hardware.
package cip_ref_pkg;
  import fp_ref_pkg::*;
  localparam logic [31:0] THREE = 32'h4040_0000;
  function automatic void block1(input logic [31:0] fim1, fi, gi, gim1, output logic [31:0] a, b);
    a = radd(radd(gi, gim1), rscale(rsub(fim1, fi), 2.0));
    b = radd(rmul(rsub(fim1, fi), THREE), radd(rscale(gi, 2.0), gim1));
  endfunction
  function automatic void block3(input logic [31:0] a, b, u1, u2, u3, f, g, output logic [31:0] fn, gn);
    fn = radd(rsub(rmul(b, u2), rmul(a, u3)), rsub(f, rmul(g, u1)));
    gn = radd(rmul(rmul(a, u2), THREE), rsub(g, rscale(rmul(b, u1), 2.0)));
  endfunction
  function automatic logic [31:0] block4(logic [31:0] him1, hi, u);
    return rsub(hi, rmul(rsub(hi, him1), u));
  endfunction
  // full PE: f, g along the sweep, one cross derivative h
  function automatic void pe(input logic [31:0] fim1, fi, gi, gim1, u, him1, hi,
                             output logic [31:0] fn, gn, hn);
    logic [31:0] a, b;
    block1(fim1, fi, gi, gim1, a, b);
    block3(a, b, u, rmul(u, u), rmul(rmul(u, u), u), fi, gi, fn, gn);
    hn = block4(him1, hi, u);
  endfunction
endpackage
