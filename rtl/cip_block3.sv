// cip_block3: evaluates the shifted cubic profile of the CIP method
// (departure point X = -u, time step normalised to 1):
//
//   f_new = -a u^3 + b u^2 - g u + f
//   g_new =  3 a u^2 - 2 b u + g
//
// Six multipliers (a u^3, b u^2, g u, a u^2, b u, and x3), five
// adders/subtractors and one x2 shifter, as counted for the source design.
// Internal schedule, relative to the block inputs:
//   products at 8; (b u^2 - a u^3) and (f - g u) at 21; f_new at 34, held one
//   more stage; 3 a u^2 at 16; 2 b u at 9; (g - 2 b u) at 22; g_new at 35.
// Both results leave 35 cycles after the inputs, which in the processing
// element is stage 69. How the operations are grouped is this design's own
// choice, made so that the 35-stage length of the source design is met.
module cip_block3
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  input  fp32_t u1,
  input  fp32_t u2,
  input  fp32_t u3,
  input  fp32_t f,      // f at the grid point
  input  fp32_t g,      // derivative along the sweep axis at the grid point
  output fp32_t f_new,  // 35 cycles later
  output fp32_t g_new   // 35 cycles later
);
  fp32_t au3, bu2, gu, au2, bu, f_8, s1, s2, fn_34;
  fp32_t au2x3, au2x3_22, bu2x, g_9, s3;

  fp_mul #(.LAT(8)) u_m_au3 (.clk, .a(a), .b(u3), .y(au3));
  fp_mul #(.LAT(8)) u_m_bu2 (.clk, .a(b), .b(u2), .y(bu2));
  fp_mul #(.LAT(8)) u_m_gu  (.clk, .a(g), .b(u1), .y(gu));
  fp_mul #(.LAT(8)) u_m_au2 (.clk, .a(a), .b(u2), .y(au2));
  fp_mul #(.LAT(8)) u_m_bu  (.clk, .a(b), .b(u1), .y(bu));

  // f_new
  delay_line #(.W(32), .DEPTH(8)) u_d_f (.clk, .d(f), .q(f_8));
  fp_add #(.LAT(13)) u_s1 (.clk, .a(bu2), .b(au3), .sub(1'b1), .y(s1));
  fp_add #(.LAT(13)) u_s2 (.clk, .a(f_8), .b(gu),  .sub(1'b1), .y(s2));
  fp_add #(.LAT(13)) u_fn (.clk, .a(s1),  .b(s2),  .sub(1'b0), .y(fn_34));
  delay_line #(.W(32), .DEPTH(1)) u_d_fn (.clk, .d(fn_34), .q(f_new));

  // g_new
  fp_mul  #(.LAT(8)) u_m_x3 (.clk, .a(au2), .b(FP_THREE), .y(au2x3));
  delay_line #(.W(32), .DEPTH(6)) u_d_x3 (.clk, .d(au2x3), .q(au2x3_22));
  fp_pow2 #(.K(1))   u_x2   (.clk, .a(bu), .y(bu2x));
  delay_line #(.W(32), .DEPTH(9)) u_d_g (.clk, .d(g), .q(g_9));
  fp_add #(.LAT(13)) u_s3 (.clk, .a(g_9), .b(bu2x), .sub(1'b1), .y(s3));
  fp_add #(.LAT(13)) u_gn (.clk, .a(au2x3_22), .b(s3), .sub(1'b0), .y(g_new));
endmodule
