// tb_cip_block1: streams random operands, one set per cycle, and compares every
// output with the step-by-step reference exactly 34 cycles later (which also
// checks the pipeline length).
module tb_cip_block1;
  import fp_ref_pkg::*;
  import cip_ref_pkg::*;
  localparam int N = 300, LAT = 34;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] f_im1, f_i, g_i, g_im1, a, b;
  logic [31:0] vf1 [N], vf [N], vg [N], vg1 [N], ea [N], eb [N];
  cip_block1 dut (.clk, .f_im1, .f_i, .g_i, .g_im1, .a, .b);
  initial begin
    for (int i = 0; i < N; i++) begin
      vf1[i] = rnd_fp(120, 130); vf[i] = rnd_fp(120, 130); vg[i] = rnd_fp(118, 128); vg1[i] = rnd_fp(118, 128);
      block1(vf1[i], vf[i], vg[i], vg1[i], ea[i], eb[i]);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        f_im1 = vf1[t]; f_i = vf[t]; g_i = vg[t]; g_im1 = vg1[t];
      end
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks++; if (a !== ea[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d a=%h exp %h", k, a, ea[k]); end
        checks++; if (b !== eb[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d b=%h exp %h", k, b, eb[k]); end
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
