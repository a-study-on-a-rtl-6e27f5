// tb_cip_pe: streams random operands, one set per cycle, and compares every
// output with the step-by-step reference exactly 69 cycles later (which also
// checks the pipeline length).
module tb_cip_pe;
  import fp_ref_pkg::*;
  import cip_ref_pkg::*;
  localparam int N = 300, LAT = 69;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] f_im1, f_i, g_i, g_im1, u, f_new, g_new;
  logic [31:0] h_im1 [1], h_i [1], h_new [1];
  logic in_valid, out_valid;
  logic [31:0] vf1 [N], vf [N], vg [N], vg1 [N], vu [N], vh1 [N], vh [N], ef [N], eg [N], eh [N];
  logic vv [N];
  cip_pe #(.NDIM(2)) dut (.clk, .in_valid, .f_im1, .f_i, .g_i, .g_im1, .u, .h_im1, .h_i, .out_valid, .f_new, .g_new, .h_new);
  initial begin
    for (int i = 0; i < N; i++) begin
      vf1[i] = rnd_fp(120, 130); vf[i] = rnd_fp(120, 130); vg[i] = rnd_fp(118, 128); vg1[i] = rnd_fp(118, 128);
      vu[i] = rnd_fp(115, 126, 0); vh1[i] = rnd_fp(118, 128); vh[i] = rnd_fp(118, 128); vv[i] = 1'($urandom);
      pe(vf1[i], vf[i], vg[i], vg1[i], vu[i], vh1[i], vh[i], ef[i], eg[i], eh[i]);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        f_im1 = vf1[t]; f_i = vf[t]; g_i = vg[t]; g_im1 = vg1[t]; u = vu[t]; h_im1[0] = vh1[t]; h_i[0] = vh[t]; in_valid = vv[t];
      end else begin
        in_valid = 0;
      end
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks++; if (f_new !== ef[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d f_new=%h exp %h", k, f_new, ef[k]); end
        checks++; if (g_new !== eg[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d g_new=%h exp %h", k, g_new, eg[k]); end
        checks++; if (h_new[0] !== eh[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d h_new[0]=%h exp %h", k, h_new[0], eh[k]); end
        checks++; if (out_valid !== vv[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d out_valid=%h exp %h", k, out_valid, vv[k]); end
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
