// tb_fp_add: random operands, one per cycle, against the double-precision
// reference; checks the result and that it appears exactly 13 cycles later.
// Also checks exact cancellation, zero operands and infinity.
module tb_fp_add;
  import fp_ref_pkg::*;
  localparam int N = 400, LAT = 13;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y;
  logic sub;
  logic [31:0] va [N], vb [N], ex [N];
  logic        vs [N];
  int checks = 0, failures = 0;
  fp_add #(.LAT(LAT)) dut (.clk, .a, .b, .sub, .y);

  initial begin
    for (int i = 0; i < N; i++) begin
      va[i] = rnd_fp(110, 140);
      vb[i] = rnd_fp(110, 140);
      vs[i] = 1'($urandom);
      if (i % 50 == 3) vb[i] = va[i];               // exact cancellation
      if (i % 50 == 7) vb[i] = 32'd0;                // zero operand
      if (i % 50 == 9) va[i] = {va[i][31], 31'd0};   // zero operand
      if (i % 50 == 11) vb[i] = 32'h7F80_0000;       // +inf
      ex[i] = vs[i] ? rsub(va[i], vb[i]) : radd(va[i], vb[i]);
      if (i % 50 == 11) ex[i] = vs[i] ? 32'hFF80_0000 : 32'h7F80_0000;
      if (i % 50 == 3 && !vs[i]) ex[i] = radd(va[i], vb[i]);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin a = va[t]; b = vb[t]; sub = vs[t]; end
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks++;
        // the reference gives -0 or +0 for cancellations; compare magnitude for zero
        if (!(y == ex[k] || (y[30:0] == 0 && ex[k][30:0] == 0))) begin
          failures++;
          if (failures < 10) $display("fp_add mismatch %0d: %h %s %h -> %h expected %h", k, va[k], vs[k] ? "-" : "+", vb[k], y, ex[k]);
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
