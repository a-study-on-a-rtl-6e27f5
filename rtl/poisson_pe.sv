// poisson_pe: processing element of the 3D Poisson (Jacobi) solver.
//
// One grid point per cycle, result 41 cycles later:
//
//   phi_new = (W + E + S + N + D + U + 2 phi_c + rhs) / 8
//
// where W..U are the six neighbours of the previous iterate, phi_c the point
// itself and rhs = -6 h^2 rho is supplied per point (the host stores it
// pre-scaled; this design's choice). This is the source design's rewritten
// Jacobi update with the small correction term dropped. x2 and /8 are
// exponent shifts (one stage each); the eight terms are summed by a tree of
// seven 13-stage adders (three levels): 1 + 39 + 1 = 41 stages. The neighbour
// inputs are delayed one stage to meet the doubled centre value.
module poisson_pe
  import fp_pkg::*;
(
  input  logic  clk,
  input  logic  in_valid,
  input  fp32_t nb [6],     // six neighbours: x-, x+, y-, y+, z-, z+
  input  fp32_t center,
  input  fp32_t rhs,        // -6 h^2 rho
  output logic  out_valid,
  output fp32_t phi_new
);
  localparam int LATENCY = 41;
  fp32_t t [8];
  fp32_t l1 [4];
  fp32_t l2 [2];
  fp32_t sum;

  for (genvar k = 0; k < 6; k++) begin : g_nb
    delay_line #(.W(32), .DEPTH(1)) u_d (.clk, .d(nb[k]), .q(t[k]));
  end
  fp_pow2 #(.K(1)) u_x2 (.clk, .a(center), .y(t[6]));
  delay_line #(.W(32), .DEPTH(1)) u_dr (.clk, .d(rhs), .q(t[7]));

  for (genvar k = 0; k < 4; k++) begin : g_l1
    fp_add #(.LAT(13)) u_a (.clk, .a(t[2*k]), .b(t[2*k+1]), .sub(1'b0), .y(l1[k]));
  end
  for (genvar k = 0; k < 2; k++) begin : g_l2
    fp_add #(.LAT(13)) u_a (.clk, .a(l1[2*k]), .b(l1[2*k+1]), .sub(1'b0), .y(l2[k]));
  end
  fp_add #(.LAT(13)) u_l3 (.clk, .a(l2[0]), .b(l2[1]), .sub(1'b0), .y(sum));
  fp_pow2 #(.K(-3)) u_div8 (.clk, .a(sum), .y(phi_new));

  delay_line #(.W(1), .DEPTH(LATENCY)) u_dv (.clk, .d(in_valid), .q(out_valid));
endmodule
