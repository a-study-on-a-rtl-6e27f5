// cip_block1: first stage of the CIP processing element, the cubic
// coefficients a and b (upwind neighbour iup = i - 1, grid spacing and time
// step normalised to 1, cell-relative coordinate D = -1):
//
//   a = (g_i + g_iup) + 2 (f_iup - f_i)
//   b = 3 (f_iup - f_i) + 2 g_i + g_iup
//
// Structure (six adders/subtractors, one multiplier, two x2 shifters):
//   a path: add g_i+g_iup (13), sub f_iup-f_i (13) -> x2 (14), add (27),
//           then a 7-stage delay so a leaves at stage 34 together with b.
//   b path: x2 of g_i (1) + g_iup (14); sub f_iup-f_i (13) -> x3 multiply
//           (21); final add (34).
// Both outputs appear 34 clock cycles after the inputs; one grid point can
// enter every cycle. The stage counts follow the source design; the sign of
// the g_iup term in a (plus) and the operand doubled in b (g_i) follow the
// derivation of the CIP coefficients rather than the abbreviated forms.
module cip_block1
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t f_im1,   // f at the upwind neighbour
  input  fp32_t f_i,     // f at the grid point
  input  fp32_t g_i,     // derivative along the sweep axis at the point
  input  fp32_t g_im1,   // the same at the upwind neighbour
  output fp32_t a,       // stage 34
  output fp32_t b        // stage 34
);
  fp32_t ga_13, ga_14, fd_13, fd2_14, a_27;
  fp32_t g2_1, gm1_1, gb_14, gb_21, fdb_13, f3_21;

  // a path
  fp_add  #(.LAT(13)) u_add_ga (.clk, .a(g_i),   .b(g_im1), .sub(1'b0), .y(ga_13));
  fp_add  #(.LAT(13)) u_sub_fa (.clk, .a(f_im1), .b(f_i),   .sub(1'b1), .y(fd_13));
  fp_pow2 #(.K(1))    u_x2_fa  (.clk, .a(fd_13), .y(fd2_14));
  delay_line #(.W(32), .DEPTH(1)) u_d_ga (.clk, .d(ga_13), .q(ga_14));
  fp_add  #(.LAT(13)) u_add_a  (.clk, .a(ga_14), .b(fd2_14), .sub(1'b0), .y(a_27));
  delay_line #(.W(32), .DEPTH(7)) u_d_a (.clk, .d(a_27), .q(a));

  // b path
  fp_pow2 #(.K(1))    u_x2_g   (.clk, .a(g_i), .y(g2_1));
  delay_line #(.W(32), .DEPTH(1)) u_d_gm1 (.clk, .d(g_im1), .q(gm1_1));
  fp_add  #(.LAT(13)) u_add_gb (.clk, .a(g2_1), .b(gm1_1), .sub(1'b0), .y(gb_14));
  delay_line #(.W(32), .DEPTH(7)) u_d_gb (.clk, .d(gb_14), .q(gb_21));
  fp_add  #(.LAT(13)) u_sub_fb (.clk, .a(f_im1), .b(f_i), .sub(1'b1), .y(fdb_13));
  fp_mul  #(.LAT(8))  u_mul3   (.clk, .a(fdb_13), .b(FP_THREE), .y(f3_21));
  fp_add  #(.LAT(13)) u_add_b  (.clk, .a(f3_21), .b(gb_21), .sub(1'b0), .y(b));
endmodule
