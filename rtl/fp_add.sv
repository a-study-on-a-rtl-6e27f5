// fp_add: pipelined IEEE 754 single-precision adder / subtractor.
//
// y = a + b (sub = 0) or y = a - b (sub = 1), LAT clock cycles after the
// operands are presented; a new operation can start every cycle. The default
// latency of 13 stages is the adder latency of the processing elements. The
// result is computed in the first stage (fp_pkg::fp_add_f) and carried through
// the remaining stages; how the source design's adder core split its work
// among its stages is not known, only its latency, so only the latency is
// reproduced. Rounding and special cases are described in fp_pkg.
module fp_add
  import fp_pkg::*;
#(
  parameter int LAT = 13
) (
  input  logic  clk,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output fp32_t y
);
  fp32_t r0;
  always_ff @(posedge clk) r0 <= fp_add_f(a, sub ? fp_neg(b) : b);
  delay_line #(.W(32), .DEPTH(LAT - 1)) u_dly (.clk(clk), .d(r0), .q(y));
endmodule
