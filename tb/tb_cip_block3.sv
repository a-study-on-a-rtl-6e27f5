// tb_cip_block3: streams random operands, one set per cycle, and compares every
// output with the step-by-step reference exactly 35 cycles later (which also
// checks the pipeline length).
module tb_cip_block3;
  import fp_ref_pkg::*;
  import cip_ref_pkg::*;
  localparam int N = 300, LAT = 35;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] a, b, u1, u2, u3, f, g, f_new, g_new;
  logic [31:0] va [N], vb [N], vu [N], vf [N], vg [N], ef [N], eg [N];
  cip_block3 dut (.clk, .a, .b, .u1, .u2, .u3, .f, .g, .f_new, .g_new);
  initial begin
    for (int i = 0; i < N; i++) begin
      va[i] = rnd_fp(118, 130); vb[i] = rnd_fp(118, 130); vu[i] = rnd_fp(115, 126, 0);
      vf[i] = rnd_fp(120, 130); vg[i] = rnd_fp(118, 128);
      block3(va[i], vb[i], vu[i], rmul(vu[i], vu[i]), rmul(rmul(vu[i], vu[i]), vu[i]), vf[i], vg[i], ef[i], eg[i]);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        a = va[t]; b = vb[t]; u1 = vu[t]; u2 = rmul(vu[t], vu[t]); u3 = rmul(u2, vu[t]); f = vf[t]; g = vg[t];
      end
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks++; if (f_new !== ef[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d f_new=%h exp %h", k, f_new, ef[k]); end
        checks++; if (g_new !== eg[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d g_new=%h exp %h", k, g_new, eg[k]); end
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
