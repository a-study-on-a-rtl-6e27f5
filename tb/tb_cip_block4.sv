// tb_cip_block4: streams random operands, one set per cycle, and compares every
// output with the step-by-step reference exactly 69 cycles later (which also
// checks the pipeline length).
module tb_cip_block4;
  import fp_ref_pkg::*;
  import cip_ref_pkg::*;
  localparam int N = 300, LAT = 69;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] h_im1, h_i, u, h_new;
  logic [31:0] vh1 [N], vh [N], vu [N];
  cip_block4 dut (.clk, .h_im1, .h_i, .u, .h_new);
  initial begin
    for (int i = 0; i < N; i++) begin
      vh1[i] = rnd_fp(118, 128); vh[i] = rnd_fp(118, 128); vu[i] = rnd_fp(115, 126, 0);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        h_im1 = vh1[t]; h_i = vh[t]; u = vu[t];
      end
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks++; if (h_new !== block4(vh1[k], vh[k], vu[k])) begin failures++; if (failures < 10) $display("mismatch k=%0d h_new=%h exp %h", k, h_new, block4(vh1[k], vh[k], vu[k])); end
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
