// fp_mul: pipelined IEEE 754 single-precision multiplier.
//
// y = a * b, LAT clock cycles after the operands are presented, one new
// operation per cycle. The default of 8 stages is the multiplier latency of
// the processing elements. As in fp_add the product is formed in the first
// stage and the remaining stages only carry it, so that the latency matches;
// rounding and special cases are described in fp_pkg.
module fp_mul
  import fp_pkg::*;
#(
  parameter int LAT = 8
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);
  fp32_t r0;
  always_ff @(posedge clk) r0 <= fp_mul_f(a, b);
  delay_line #(.W(32), .DEPTH(LAT - 1)) u_dly (.clk(clk), .d(r0), .q(y));
endmodule
