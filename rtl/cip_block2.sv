// cip_block2: powers of the velocity for the CIP processing element.
//
// Two multipliers form u^2 (stage 8) and u^3 = u^2 * u (stage 16); delay
// registers then align u, u^2 and u^3 so that all three leave at stage 34,
// the same stage as the coefficients of cip_block1, which runs in parallel.
module cip_block2
  import fp_pkg::*;
(
  input  logic  clk,
  input  fp32_t u,
  output fp32_t u1,   // u   at stage 34
  output fp32_t u2,   // u^2 at stage 34
  output fp32_t u3    // u^3 at stage 34
);
  fp32_t u_8, sq_8, cu_16;
  fp_mul #(.LAT(8)) u_sq (.clk, .a(u), .b(u), .y(sq_8));
  delay_line #(.W(32), .DEPTH(8)) u_d_u8 (.clk, .d(u), .q(u_8));
  fp_mul #(.LAT(8)) u_cu (.clk, .a(sq_8), .b(u_8), .y(cu_16));
  delay_line #(.W(32), .DEPTH(18)) u_d3 (.clk, .d(cu_16), .q(u3));
  delay_line #(.W(32), .DEPTH(26)) u_d2 (.clk, .d(sq_8),  .q(u2));
  delay_line #(.W(32), .DEPTH(34)) u_d1 (.clk, .d(u),     .q(u1));
endmodule
