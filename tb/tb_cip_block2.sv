// tb_cip_block2: streams random operands, one set per cycle, and compares every
// output with the step-by-step reference exactly 34 cycles later (which also
// checks the pipeline length).
module tb_cip_block2;
  import fp_ref_pkg::*;
  import cip_ref_pkg::*;
  localparam int N = 300, LAT = 34;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] u, u1, u2, u3;
  logic [31:0] vu [N];
  cip_block2 dut (.clk, .u, .u1, .u2, .u3);
  initial begin
    for (int i = 0; i < N; i++) begin
      vu[i] = rnd_fp(115, 126, 0);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        u = vu[t];
      end
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks++; if (u1 !== vu[k]) begin failures++; if (failures < 10) $display("mismatch k=%0d u1=%h exp %h", k, u1, vu[k]); end
        checks++; if (u2 !== rmul(vu[k], vu[k])) begin failures++; if (failures < 10) $display("mismatch k=%0d u2=%h exp %h", k, u2, rmul(vu[k], vu[k])); end
        checks++; if (u3 !== rmul(rmul(vu[k], vu[k]), vu[k])) begin failures++; if (failures < 10) $display("mismatch k=%0d u3=%h exp %h", k, u3, rmul(rmul(vu[k], vu[k]), vu[k])); end
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
