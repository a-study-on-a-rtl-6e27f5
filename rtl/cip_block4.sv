// cip_block4: first-order upwind advection of a cross derivative (the
// derivative along an axis other than the sweep axis), used by the
// type-M (direction-split) CIP method:
//
//   h_new = h_i - u (h_i - h_iup)
//
// One subtractor (13 stages), one multiplier (8) and one more subtractor (13)
// give the result at stage 34; a 35-stage delay then aligns it with the
// stage-69 outputs of the rest of the processing element. The minus sign
// (interpolating at the departure point x_i - u) is the usual upwind form and
// is this design's reading of the update rule.
module cip_block4
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t h_im1,  // cross derivative at the upwind neighbour
  input  fp32_t h_i,    // cross derivative at the grid point
  input  fp32_t u,
  output fp32_t h_new   // 69 cycles later
);
  fp32_t d_13, u_13, m_21, hi_21, r_34;
  fp_add #(.LAT(13)) u_d (.clk, .a(h_i), .b(h_im1), .sub(1'b1), .y(d_13));
  delay_line #(.W(32), .DEPTH(13)) u_du (.clk, .d(u), .q(u_13));
  fp_mul #(.LAT(8))  u_m (.clk, .a(d_13), .b(u_13), .y(m_21));
  delay_line #(.W(32), .DEPTH(21)) u_dh (.clk, .d(h_i), .q(hi_21));
  fp_add #(.LAT(13)) u_s (.clk, .a(hi_21), .b(m_21), .sub(1'b1), .y(r_34));
  delay_line #(.W(32), .DEPTH(35)) u_do (.clk, .d(r_34), .q(h_new));
endmodule
