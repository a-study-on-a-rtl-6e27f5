// tb_poisson_hwnet: a stand-alone hwNet (no neighbours) with reduced planes.
// The host loads phi (ghost layer = fixed boundary values) and rhs through
// the FIB port, starts ITER Jacobi iterations, and reads the whole block
// back; every word is compared with a reference model in the testbench that
// applies the same update with the same summation order. Also checks the
// status words and that one iteration's compute phase takes
// NX*NY + 1 + 41 (+ control) cycles.
module tb_poisson_hwnet;
  import fp_ref_pkg::*;
  import fib_pkg::*;
  localparam int NX = 5, NY = 4, NPE = 3, ITER = 3;
  localparam int SX = NX + 2, SY = NY + 2, SZ = NPE + 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  fib_m2s_t fib_i;
  fib_s2m_t fib_o;
  logic [31:0] ctrl [4];
  logic [31:0] stts [4];
  logic [5:0] tx_valid, tx_ready, rx_valid, rx_ready, o_end;
  logic [31:0] tx_data [6], rx_data [6];

  poisson_hwnet #(.NX(NX), .NY(NY), .NPE(NPE)) dut (
    .clk, .rst_n, .fib_i, .fib_o, .ctrl, .stts, .link_present(6'b0),
    .tx_valid, .tx_data, .tx_ready(6'h3F), .rx_valid(6'b0), .rx_data, .rx_ready,
    .o_end, .i_end(6'b0));

  logic [31:0] mdl [SZ][SY][SX];
  logic [31:0] nxt [SZ][SY][SX];
  logic [31:0] rh [NPE][NY][NX];

  task automatic fib_xfer(input logic we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] r);
    fib_i = '{sel: 1, mrdy: 1, we: we, a: a, dw: d, be: 4'hF};
    do @(posedge clk); while (!fib_o.srdy);
    r = fib_o.dr;
    #1 fib_i = FIB_M2S_IDLE;
    @(posedge clk); #1;
  endtask

  logic [31:0] r;
  int t0, t1;
  initial begin
    fib_i = FIB_M2S_IDLE;
    for (int k = 0; k < 4; k++) ctrl[k] = 0;
    for (int d = 0; d < 6; d++) rx_data[d] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int z = 0; z < SZ; z++) for (int y = 0; y < SY; y++) for (int x = 0; x < SX; x++) begin
      mdl[z][y][x] = rnd_fp(124, 130);
      fib_xfer(1, (z * SY + y) * SX + x, mdl[z][y][x], r);
    end
    for (int z = 0; z < NPE; z++) for (int y = 0; y < NY; y++) for (int x = 0; x < NX; x++) begin
      rh[z][y][x] = rnd_fp(115, 125);
      fib_xfer(1, 32'h1_0000 | ((z * NY + y) * NX + x), rh[z][y][x], r);
    end
    // reference iterations
    for (int it = 0; it < ITER; it++) begin
      nxt = mdl;
      for (int z = 1; z <= NPE; z++) for (int y = 1; y <= NY; y++) for (int x = 1; x <= NX; x++)
        nxt[z][y][x] = rscale(radd(radd(radd(mdl[z][y][x-1], mdl[z][y][x+1]), radd(mdl[z][y-1][x], mdl[z][y+1][x])),
                                   radd(radd(mdl[z-1][y][x], mdl[z+1][y][x]), radd(rscale(mdl[z][y][x], 2.0), rh[z-1][y-1][x-1]))), 0.125);
      mdl = nxt;
    end
    ctrl[1] = ITER;
    ctrl[0] = 1;
    t0 = $time;
    @(posedge clk); #1;
    checks++;
    if (stts[0][0] !== 1'b1) begin failures++; $display("busy not set"); end
    while (!stts[0][1]) @(posedge clk);
    t1 = $time;
    ctrl[0] = 0;
    checks++;
    if (stts[1] != ITER) begin failures++; $display("iterations %0d", stts[1]); end
    // compute cycles: ITER * (NX*NY feed + 1 read + 41 PE + 2 control)
    checks++;
    if (stts[3] < ITER * (NX * NY + 42) || stts[3] > ITER * (NX * NY + 46)) begin
      failures++; $display("compute cycles %0d", stts[3]);
    end
    for (int z = 0; z < SZ; z++) for (int y = 0; y < SY; y++) for (int x = 0; x < SX; x++) begin
      fib_xfer(0, (z * SY + y) * SX + x, 0, r);
      checks++;
      if (r !== mdl[z][y][x]) begin
        failures++;
        if (failures < 10) $display("phi[%0d][%0d][%0d] = %h expected %h", z, y, x, r, mdl[z][y][x]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
