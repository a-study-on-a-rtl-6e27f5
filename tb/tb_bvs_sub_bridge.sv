// tb_bvs_sub_bridge: the Sub Board bridge of Bridge VS 0 between the host
// controller (front), a VC Bus slave standing for the PE side (SIMDATA,
// PVS IDs of BVS 0) and a slave standing for the next Bridge VS (BACK, IDs
// of BVS 1); a SelectMAP device model sits on its PE configuration port.
// Checks: WRITE/READ bursts reach the side given by the BVS field of the
// target ID; configuration stage BVS-PE reaches the own PE FPGA, stage
// BVS-Sub goes to BACK, stages PVS-Sub/PVS-PE to SIMDATA (BVS 0) or BACK
// (BVS 1); the bridge itself acknowledges configuration requests; a request
// from BACK comes out at the front.
module tb_bvs_sub_bridge;
  import vc_pkg::*;
  import fib_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `include "host_rig.svh"
  localparam int NB = 16;
  localparam vc_id_t SIM_ID = {2'd0, 2'd2, 4'd3}, BACK_ID = {2'd1, 2'd0, 4'd0};

  vc_sig_t front_o, back_i, back_o, sim_i, sim_o, cfg_i, cfg_o, sb_o, bk_o;
  vc_sig_t up;                     // behavioural request from BACK
  fib_m2s_t fm [2];
  fib_s2m_t fs [2];
  logic [31:0] ctrl [2][4], stts [2][4];
  logic [31:0] sum;
  int cnt, progs, errs, sim_progs = 0, back_progs = 0;
  logic sp = 1, bp = 1;

  // the arbiter behind the bridge grants data requests at once
  always_comb begin
    hbus_i = front_o;
    if (!hbus_o.busmode) hbus_i.ack = hbus_o.req;
  end
  bvs_sub_bridge dut (.clk, .rst_n, .my_bvs(2'd0), .front_i(hbus_o), .front_o,
    .back_i, .back_o, .sim_i, .sim_o, .cfg_i, .cfg_o);
  vc_slave u_sim (.clk, .rst_n, .my_id(SIM_ID), .bus_i(sim_o), .bus_o(sb_o),
    .fib_o(fm[0]), .fib_i(fs[0]), .ctrl(ctrl[0]), .stts(stts[0]));
  vc_slave u_back (.clk, .rst_n, .my_id(BACK_ID), .bus_i(back_o), .bus_o(bk_o),
    .fib_o(fm[1]), .fib_i(fs[1]), .ctrl(ctrl[1]), .stts(stts[1]));
  assign sim_i = sb_o;
  always_comb begin
    back_i = bk_o;
    back_i.req = up.req; back_i.frame = up.frame; back_i.ad_m = up.ad_m;
  end
  fib_mem_model u_m0 (.clk, .m(fm[0]), .s(fs[0]));
  fib_mem_model u_m1 (.clk, .m(fm[1]), .s(fs[1]));
  smap_dev_model #(.NB(NB)) u_dev (.clk, .pins_o(cfg_o), .pins_i(cfg_i), .sum, .cnt, .progs, .errs);
  always @(posedge clk) begin
    if (!sim_o.prog_b && sp) sim_progs++;
    if (!back_o.prog_b && bp) back_progs++;
    sp <= sim_o.prog_b; bp <= back_o.prog_b;
  end

  logic [31:0] ref_mem [2][256];
  logic [31:0] s;
  initial begin
    up = VC_IDLE;
    for (int i = 0; i < 2; i++) for (int k = 0; k < 4; k++) stts[i][k] = 0;
    for (int i = 0; i < 2; i++) for (int k = 0; k < 256; k++) ref_mem[i][k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 20; t++) begin
      int f, a, len;
      f = $urandom_range(1, 0); a = $urandom_range(200, 0); len = $urandom_range(30, 1);
      for (int k = 0; k < len; k++) begin wq.push_back($urandom); ref_mem[f][a + k] = wq[$]; end
      host_cmd(VC_WRITE, f ? BACK_ID : SIM_ID, a, len);
    end
    for (int f = 0; f < 2; f++) begin
      rq.delete();
      host_cmd(VC_READ, f ? BACK_ID : SIM_ID, 0, 256);
      for (int k = 0; k < 256; k++) begin
        checks++;
        if (rq.size() != 256 || rq[k] !== ref_mem[f][k]) begin
          failures++; if (failures < 8) $display("side %0d word %0d = %h expected %h", f, k, rq[k], ref_mem[f][k]);
        end
      end
    end
    configure(8'h00, CFG_BVS_PE, 8'h00, NB, 1, s);
    checks++;
    if (sum !== s || progs != 1 || sim_progs != 0 || back_progs != 0 || cfg_error) begin
      failures++; $display("stage BVS-PE: dev %0d sim %0d back %0d", progs, sim_progs, back_progs);
    end
    configure(8'h00, CFG_BVS_SUB, 8'h00, NB, 2, s);
    checks++;
    if (progs != 1 || sim_progs != 0 || back_progs != 1) begin failures++; $display("stage BVS-Sub routed wrong"); end
    configure(8'h00, CFG_PVS_PE, 8'h00, NB, 3, s);
    checks++;
    if (progs != 1 || sim_progs != 1 || back_progs != 1) begin failures++; $display("stage PVS-PE (BVS 0) routed wrong"); end
    configure(8'h40, CFG_PVS_SUB, 8'h00, NB, 4, s);
    checks++;
    if (progs != 1 || sim_progs != 1 || back_progs != 2) begin failures++; $display("stage PVS-Sub (BVS 1) routed wrong"); end
    checks++;
    if (errs != 0) begin failures++; $display("SelectMAP protocol errors"); end
    up.req = 1; up.frame = 1; up.ad_m = 32'hFF40_0101;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (front_o.ad_m != 32'hFF40_0101) begin failures++; $display("BACK address not at front"); end
    checks++;
    if (!front_o.req) begin failures++; $display("BACK request not at front"); end
    up = VC_IDLE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
