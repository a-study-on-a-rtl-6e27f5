// tb_fp_mul: random products against the reference, result checked exactly
// 8 cycles after the operands; includes zero, overflow and underflow cases.
module tb_fp_mul;
  import fp_ref_pkg::*;
  localparam int N = 400, LAT = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  logic [31:0] va [N], vb [N], ex [N];
  int checks = 0, failures = 0;
  fp_mul #(.LAT(LAT)) dut (.clk, .a, .b, .y);

  initial begin
    for (int i = 0; i < N; i++) begin
      va[i] = rnd_fp(100, 150);
      vb[i] = rnd_fp(100, 150);
      if (i % 40 == 5) vb[i] = 32'd0;
      if (i % 40 == 6) begin va[i] = rnd_fp(230, 250); vb[i] = rnd_fp(230, 250); end // overflow
      if (i % 40 == 7) begin va[i] = rnd_fp(5, 20);    vb[i] = rnd_fp(5, 20);    end // underflow
      ex[i] = rmul(va[i], vb[i]);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin a = va[t]; b = vb[t]; end
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks++;
        if (y != ex[k]) begin
          failures++;
          if (failures < 10) $display("fp_mul mismatch %0d: %h * %h -> %h expected %h", k, va[k], vb[k], y, ex[k]);
        end
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
