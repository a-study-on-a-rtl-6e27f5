// tb_pvs_sub_selector: a row of three PVS Sub Boards (positions 0..2 of row
// 1), each with a VC Bus slave and FIB memory on its PE data port and a
// SelectMAP device model on its configuration port, driven by the host
// controller. Checks: random WRITE bursts reach only the addressed board
// (READ back of all three memories); a transaction for another row is not
// taken by any board; configuration stage PVS-PE with one target reaches
// only that device, with a don't-care mask reaches all three in parallel;
// stage PVS-Sub goes to the back end of the row and to no PE device; a
// transaction started by a PE board comes out at the front.
module tb_pvs_sub_selector;
  import vc_pkg::*;
  import fib_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `include "host_rig.svh"
  localparam int NB = 24;

  vc_sig_t f_i [3], f_o [3], b_i [3], b_o [3], p_i [3], p_o [3], c_i [3], c_o [3];
  vc_sig_t pe_init;          // behavioural initiator on board 2's PE port
  fib_m2s_t fm [3];
  fib_s2m_t fs [3];
  logic [31:0] ctrl [3][4], stts [3][4];
  logic [31:0] sum [3];
  int cnt [3], progs [3], errs [3];
  int back_progs = 0;
  logic back_prog_q = 1;

  assign f_i[0] = hbus_o;
  always_comb begin            // the arbiter of the Bridge VS grants at once
    hbus_i = f_o[0];
    hbus_i.ack = hbus_o.req;
  end
  for (genvar i = 0; i < 3; i++) begin : g_b
    if (i > 0) begin : g_c
      assign f_i[i] = b_o[i-1];
      assign b_i[i-1] = f_o[i];
    end
    pvs_sub_selector u_sel (.clk, .rst_n, .my_id({2'd0, 2'd1, 4'(i)}),
      .front_i(f_i[i]), .front_o(f_o[i]), .back_i(b_i[i]), .back_o(b_o[i]),
      .pe_i(p_i[i]), .pe_o(p_o[i]), .cfg_i(c_i[i]), .cfg_o(c_o[i]));
    vc_sig_t so;
    vc_slave u_slv (.clk, .rst_n, .my_id({2'd0, 2'd1, 4'(i)}), .bus_i(p_o[i]), .bus_o(so),
      .fib_o(fm[i]), .fib_i(fs[i]), .ctrl(ctrl[i]), .stts(stts[i]));
    if (i == 2) begin : g_init
      always_comb begin
        p_i[i] = so;
        p_i[i].req = pe_init.req; p_i[i].frame = pe_init.frame; p_i[i].ad_m = pe_init.ad_m;
      end
    end else begin : g_noinit
      assign p_i[i] = so;
    end
    fib_mem_model #(.AW(8)) u_mem (.clk, .m(fm[i]), .s(fs[i]));
    smap_dev_model #(.NB(NB)) u_dev (.clk, .pins_o(c_o[i]), .pins_i(c_i[i]),
      .sum(sum[i]), .cnt(cnt[i]), .progs(progs[i]), .errs(errs[i]));
  end
  assign b_i[2] = VC_IDLE;
  always @(posedge clk) begin
    if (!b_o[2].prog_b && back_prog_q) back_progs++;
    back_prog_q <= b_o[2].prog_b;
  end

  logic [31:0] ref_mem [3][256];
  logic [31:0] s;
  initial begin
    pe_init = VC_IDLE;
    for (int i = 0; i < 3; i++) for (int k = 0; k < 4; k++) stts[i][k] = 0;
    for (int i = 0; i < 3; i++) for (int k = 0; k < 256; k++) ref_mem[i][k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int t = 0; t < 24; t++) begin
      int f, a, len;
      f = $urandom_range(2, 0); a = $urandom_range(200, 0); len = $urandom_range(30, 1);
      for (int k = 0; k < len; k++) begin
        wq.push_back($urandom); ref_mem[f][a + k] = wq[$];
      end
      host_cmd(VC_WRITE, {2'd0, 2'd1, 4'(f)}, a, len);
    end
    // another row: nobody answers, the command must time out (counted back)
    $display("expected timeout follows");
    wq.push_back(32'h1234_5678);
    host_cmd(VC_WRITE, {2'd0, 2'd2, 4'd0}, 0, 1, 200);
    failures--;
    for (int f = 0; f < 3; f++) begin
      rq.delete();
      host_cmd(VC_READ, {2'd0, 2'd1, 4'(f)}, 0, 256);
      for (int k = 0; k < 256; k++) begin
        checks++;
        if (rq.size() != 256 || rq[k] !== ref_mem[f][k]) begin
          failures++; if (failures < 8) $display("board %0d word %0d = %h expected %h", f, k, rq[k], ref_mem[f][k]);
        end
      end
    end
    // configuration: one device, then all three
    configure({2'd0, 2'd1, 4'd1}, CFG_PVS_PE, 8'h00, NB, 1, s);
    checks++;
    if (sum[1] !== s || cnt[1] < NB || progs[0] != 0 || progs[2] != 0 || cfg_error) begin
      failures++; $display("single-target configuration wrong");
    end
    configure({2'd0, 2'd1, 4'd0}, CFG_PVS_PE, 8'h0F, NB, 2, s);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (sum[i] !== s || progs[i] != ((i == 1) ? 2 : 1)) begin failures++; $display("broadcast configuration, device %0d", i); end
    end
    configure({2'd0, 2'd1, 4'd0}, CFG_PVS_SUB, 8'h00, NB, 3, s);
    checks++;
    if (back_progs != 3 || progs[0] != 1 || progs[2] != 1) begin failures++; $display("stage PVS-Sub routed wrong %0d %0d %0d %0d", back_progs, progs[0], progs[1], progs[2]); end
    checks++;
    if (errs[0] + errs[1] + errs[2] != 0) begin failures++; $display("SelectMAP protocol errors"); end
    // a PE board as initiator: its request and address appear at the front
    pe_init.req = 1; pe_init.frame = 1; pe_init.ad_m = 32'hFF21_0101;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (!f_o[0].req || f_o[0].ad_m != 32'hFF21_0101) begin failures++; $display("PE request not at front"); end
    pe_init = VC_IDLE;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
