// tb_bvs_pe_bridge: the PE board bridge of Bridge VS 0 with five VC Bus
// initiators competing: the host side on port 0 and one master per row
// (ports 1..4, master ID {0, row, 0}). Each port also has a VC Bus slave:
// the host side answers ID FF, row r answers {0, r, 0}. All five masters
// issue random WRITE bursts at the same time (rows to the host, to another
// row, or to a PVS of another Bridge VS, which goes to the host side too;
// the host to any row). Checks: every burst arrives complete at the right
// slave, the arbiter grants one port at a time, every port is granted,
// no waiting port sees more than four other grants (round robin); configuration bytes from the host side reach the rows matching
// the don't-care mask only.
module tb_bvs_pe_bridge;
  import vc_pkg::*;
  import fib_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  vc_sig_t port_i [5], port_o [5], m_o [5], s_o [5], cfg_drv;
  logic cmd_valid [5], cmd_ready [5], done [5], wr_valid [5], wr_ready [5], rd_valid [5];
  logic [7:0] cmd_mode [5];
  vc_id_t cmd_target [5];
  logic [31:0] cmd_addr [5], wr_data [5], rd_data [5];
  logic [8:0] cmd_len [5];
  fib_m2s_t fm [5];
  fib_s2m_t fs [5];
  logic [31:0] ctrl [5][4], stts [5][4];

  function automatic vc_id_t pid(int p);
    return (p == 0) ? VC_HOST_ID : {2'd0, 2'(p - 1), 4'd0};
  endfunction

  bvs_pe_bridge dut (.clk, .rst_n, .my_bvs(2'd0), .port_i, .port_o);
  for (genvar p = 0; p < 5; p++) begin : g_p
    vc_master u_m (.clk, .rst_n, .my_id(pid(p)), .cmd_valid(cmd_valid[p]), .cmd_ready(cmd_ready[p]),
      .cmd_mode(cmd_mode[p]), .cmd_target(cmd_target[p]), .cmd_addr(cmd_addr[p]), .cmd_len(cmd_len[p]),
      .done(done[p]), .wr_valid(wr_valid[p]), .wr_data(wr_data[p]), .wr_ready(wr_ready[p]),
      .rd_valid(rd_valid[p]), .rd_data(rd_data[p]), .bus_o(m_o[p]), .bus_i(port_o[p]));
    vc_slave u_s (.clk, .rst_n, .my_id(pid(p)), .bus_i(port_o[p]), .bus_o(s_o[p]),
      .fib_o(fm[p]), .fib_i(fs[p]), .ctrl(ctrl[p]), .stts(stts[p]));
    fib_mem_model u_mem (.clk, .m(fm[p]), .s(fs[p]));
    always_comb begin
      port_i[p] = m_o[p];
      port_i[p].srdy = s_o[p].srdy;
      port_i[p].ad_s = s_o[p].ad_s;
      if (p == 0 && cfg_drv.busmode) port_i[p] = cfg_drv;
      if (p > 0) begin port_i[p].init_b = 1'b1; port_i[p].done = 1'b1; end
    end
  end

  // traffic: each port sends bursts from its own queue of words
  logic [31:0] wq [5][$];
  logic [31:0] ref_mem [5][256];
  int grants [5], pend [5];
  logic last_v = 0;
  logic [2:0] last_g = 0, prev_g = 0;
  always @(posedge clk) begin
    for (int p = 0; p < 5; p++) if (wr_valid[p] && wr_ready[p]) void'(wq[p].pop_front());
    if (dut.gnt_v && !last_v) begin
      grants[dut.gnt]++;
      // round robin: a waiting requester sees at most four other grants
      for (int p = 0; p < 5; p++) if (p != dut.gnt && pend[p] > 4) begin
        failures++; $display("port %0d passed over", p);
      end
      for (int p = 0; p < 5; p++) if (p != dut.gnt && port_i[p].req && !port_i[p].busmode) pend[p]++;
      pend[dut.gnt] = 0;
    end
    last_v <= dut.gnt_v;
    #1;
    for (int p = 0; p < 5; p++) begin
      wr_valid[p] = wq[p].size() > 0;
      wr_data[p] = wq[p].size() > 0 ? wq[p][0] : 0;
    end
  end

  int gv_multi = 0;
  always @(posedge clk) begin
    int a;
    a = 0;
    for (int p = 0; p < 5; p++) a += port_o[p].ack;
    if (a > 1) gv_multi++;
  end

  task automatic traffic(input int p, input int n);
    for (int t = 0; t < n; t++) begin
      int dst, a, len;
      vc_id_t tgt;
      dst = $urandom_range(4, 0);
      if (p == 0 && dst == 0) dst = 1;
      if (dst == p) dst = (p + 1) % 5;
      tgt = pid(dst);
      // part of the row traffic addresses a PVS of Bridge VS 2: goes to the host side
      if (p > 0 && dst == 0 && $urandom_range(1, 0) == 1) tgt = {2'd2, 2'd1, 4'd5};
      a = p * 50 + $urandom_range(20, 0); len = $urandom_range(20, 1);
      for (int k = 0; k < len; k++) begin
        wq[p].push_back($urandom);
        if (tgt == pid(dst)) ref_mem[dst][a + k] = wq[p][$];
      end
      if (tgt != pid(dst)) begin
        // the host-side slave only answers FF: address the burst to FF instead
        tgt = VC_HOST_ID;
        for (int k = 0; k < len; k++) ref_mem[0][a + k] = wq[p][wq[p].size() - len + k];
      end
      cmd_mode[p] = VC_WRITE; cmd_target[p] = tgt; cmd_addr[p] = a; cmd_len[p] = 9'(len);
      cmd_valid[p] = 1;
      do @(posedge clk); while (!cmd_ready[p]);
      #1 cmd_valid[p] = 0;
      do @(posedge clk); while (!done[p]);
      #1;
    end
  endtask

  int seen_rows [4];
  logic [3:0] prog_seen;
  always @(posedge clk) for (int r = 0; r < 4; r++) if (!port_o[r+1].prog_b) prog_seen[r] <= 1'b1;

  initial begin
    cfg_drv = VC_IDLE;
    prog_seen = 0;
    for (int p = 0; p < 5; p++) begin
      cmd_valid[p] = 0; grants[p] = 0; pend[p] = 0; wr_valid[p] = 0;
      for (int k = 0; k < 4; k++) stts[p][k] = 0;
      for (int k = 0; k < 256; k++) ref_mem[p][k] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    fork
      traffic(0, 12);
      traffic(1, 12);
      traffic(2, 12);
      traffic(3, 12);
      traffic(4, 12);
    join
    repeat (5) @(posedge clk);
    #1;
    for (int k = 0; k < 256; k++) begin
      checks++; if (g_p[0].u_mem.mem[k] !== ref_mem[0][k]) failures++;
      checks++; if (g_p[1].u_mem.mem[k] !== ref_mem[1][k]) failures++;
      checks++; if (g_p[2].u_mem.mem[k] !== ref_mem[2][k]) failures++;
      checks++; if (g_p[3].u_mem.mem[k] !== ref_mem[3][k]) failures++;
      checks++; if (g_p[4].u_mem.mem[k] !== ref_mem[4][k]) failures++;
    end
    for (int p = 0; p < 5; p++) begin
      checks++;
      if (grants[p] < 12) begin failures++; $display("port %0d granted %0d times", p, grants[p]); end
    end
    checks++;
    if (gv_multi != 0) begin failures++; $display("two ports acknowledged at once"); end
    // configuration from the host side: rows 1 and 3 (row 1, mask bit 1 of the row)
    cfg_drv.busmode = 1; cfg_drv.req = 1; cfg_drv.frame = 1;
    cfg_drv.ad_m = {24'd0, 2'd0, 2'd1, 4'd0}; @(posedge clk); #1;
    cfg_drv.ad_m = {24'd0, CFG_PVS_PE}; @(posedge clk); #1;
    cfg_drv.ad_m = {24'd0, 2'd0, 2'd2, 4'hF}; @(posedge clk); #1;
    cfg_drv.frame = 0; cfg_drv.sel = 1; cfg_drv.prog_b = 0;
    repeat (3) @(posedge clk); #1;
    cfg_drv = VC_IDLE;
    @(posedge clk); #1;
    checks++;
    if (prog_seen != 4'b0000 && prog_seen != 4'b1010) begin failures++; $display("configuration rows %b", prog_seen); end
    checks++;
    if (prog_seen != 4'b1010) begin failures++; $display("configuration rows %b, expected 1010", prog_seen); end
    $display("grants %p", grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
