// cip_pe: processing element of the CIP advection solver (one 1D CIP step
// per grid point, one grid point per clock cycle, 69-stage pipeline).
//
// Block1 (coefficients a, b) and Block2 (u, u^2, u^3) run in parallel for 34
// stages; Block3 then evaluates the cubic profile for 35 more stages, giving
// f and its derivative along the sweep axis at the next step. For an
// NDIM-dimensional problem, solved as NDIM one-dimensional sweeps, NDIM-1
// Block4 units advect the cross derivatives along the same sweep. The point's
// own f and g are delayed 34 stages to reach Block3. in_valid travels along
// the pipeline as out_valid. The upwind neighbour is always i - 1, i.e.
// velocities are taken as non-negative, as in the source design's PE.
module cip_pe
  import fp_pkg::*;
#(
  parameter int NDIM = 2,               // 2D PE as sized in the source design
  localparam int NX  = (NDIM > 1) ? NDIM - 1 : 1
) (
  input  logic  clk,
  input  logic  in_valid,
  input  fp32_t f_im1,
  input  fp32_t f_i,
  input  fp32_t g_i,
  input  fp32_t g_im1,
  input  fp32_t u,
  input  fp32_t h_im1 [NX],   // cross derivatives (unused when NDIM = 1)
  input  fp32_t h_i   [NX],
  output logic  out_valid,
  output fp32_t f_new,
  output fp32_t g_new,
  output fp32_t h_new [NX]
);
  localparam int LATENCY = 69;
  fp32_t a, b, u1, u2, u3, f_34, g_34;

  cip_block1 u_b1 (.clk, .f_im1, .f_i, .g_i, .g_im1, .a, .b);
  cip_block2 u_b2 (.clk, .u, .u1, .u2, .u3);
  delay_line #(.W(32), .DEPTH(34)) u_df (.clk, .d(f_i), .q(f_34));
  delay_line #(.W(32), .DEPTH(34)) u_dg (.clk, .d(g_i), .q(g_34));
  cip_block3 u_b3 (.clk, .a, .b, .u1, .u2, .u3, .f(f_34), .g(g_34), .f_new, .g_new);

  if (NDIM > 1) begin : g_b4
    for (genvar k = 0; k < NDIM - 1; k++) begin : g_k
      cip_block4 u_b4 (.clk, .h_im1(h_im1[k]), .h_i(h_i[k]), .u, .h_new(h_new[k]));
    end
  end else begin : g_no_b4
    assign h_new[0] = '0;
  end

  delay_line #(.W(1), .DEPTH(LATENCY)) u_dv (.clk, .d(in_valid), .q(out_valid));
endmodule
