// tb_fp_pow2: x2 and /8 exponent shifts against the reference, one cycle of
// latency, including zero and saturation to infinity.
module tb_fp_pow2;
  import fp_ref_pkg::*;
  localparam int N = 200;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] a, y2, y8;
  logic [31:0] va [N];
  int checks = 0, failures = 0;
  fp_pow2 #(.K(1))  dut2 (.clk, .a, .y(y2));
  fp_pow2 #(.K(-3)) dut8 (.clk, .a, .y(y8));

  initial begin
    for (int i = 0; i < N; i++) begin
      va[i] = rnd_fp(10, 240);
      if (i % 20 == 1) va[i] = 32'd0;
      if (i % 20 == 2) va[i] = {1'b0, 8'hFE, 23'($urandom)};   // x2 overflows
    end
    for (int t = 0; t < N; t++) begin
      a = va[t];
      @(posedge clk); #1;
      checks += 2;
      if (y2 != rscale(va[t], 2.0)) begin
        failures++;
        if (failures < 10) $display("x2 mismatch %h -> %h exp %h", va[t], y2, rscale(va[t], 2.0));
      end
      if (y8 != rscale(va[t], 0.125)) begin
        failures++;
        if (failures < 10) $display("/8 mismatch %h -> %h exp %h", va[t], y8, rscale(va[t], 0.125));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
