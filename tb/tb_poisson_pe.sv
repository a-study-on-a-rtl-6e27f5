// tb_poisson_pe: random neighbourhoods, one per cycle; each result is compared
// with the reference Jacobi update (same summation order, rounding after
// every operation) exactly 41 cycles later, together with out_valid.
module tb_poisson_pe;
  import fp_ref_pkg::*;
  localparam int N = 300, LAT = 41;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] nb [6];
  logic [31:0] center, rhs, phi_new;
  logic in_valid, out_valid;
  logic [31:0] vn [N][6];
  logic [31:0] vc [N], vr [N], ex [N];
  logic vv [N];
  poisson_pe dut (.clk, .in_valid, .nb, .center, .rhs, .out_valid, .phi_new);

  function automatic logic [31:0] ref_update(int i);
    logic [31:0] s0, s1, s2, s3;
    s0 = radd(vn[i][0], vn[i][1]);
    s1 = radd(vn[i][2], vn[i][3]);
    s2 = radd(vn[i][4], vn[i][5]);
    s3 = radd(rscale(vc[i], 2.0), vr[i]);
    return rscale(radd(radd(s0, s1), radd(s2, s3)), 0.125);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      for (int k = 0; k < 6; k++) vn[i][k] = rnd_fp(120, 130);
      vc[i] = rnd_fp(120, 130);
      vr[i] = rnd_fp(110, 125);
      vv[i] = 1'($urandom);
      ex[i] = ref_update(i);
    end
    for (int t = 0; t < N + LAT; t++) begin
      if (t < N) begin
        nb = vn[t]; center = vc[t]; rhs = vr[t]; in_valid = vv[t];
      end else in_valid = 0;
      @(posedge clk); #1;
      if (t + 1 >= LAT && t + 1 - LAT < N) begin
        automatic int k = t + 1 - LAT;
        checks += 2;
        if (phi_new !== ex[k]) begin
          failures++;
          if (failures < 10) $display("mismatch %0d: %h exp %h", k, phi_new, ex[k]);
        end
        if (out_valid !== vv[k]) failures++;
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
