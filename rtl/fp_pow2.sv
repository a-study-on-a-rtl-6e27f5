// fp_pow2: the "bit-shift operator" of the processing elements.
//
// y = a * 2^K one clock cycle after a is presented. Multiplying or dividing a
// float by a power of two only moves its exponent, so the processing elements
// use this instead of a multiplier for x2 (K = 1) and /8 (K = -3). Zero and
// subnormal inputs give zero, infinities and NaNs pass through, and exponent
// overflow or underflow saturates to infinity or zero.
module fp_pow2
  import fp_pkg::*;
#(
  parameter int K = 1
) (
  input  logic  clk,
  input  fp32_t a,
  output fp32_t y
);
  always_ff @(posedge clk) y <= fp_pow2_f(a, K);
endmodule
