// tb_vocalise_top: end-to-end test of the whole system, as the host would
// use it.
//  1. Configuration mode: a bitstream is sent to all PVS PE FPGAs at once
//     (don't-care mask), then to one PE FPGA, then to the Bridge VS PE FPGA.
//     Behavioural SelectMAP devices on the configuration ports check
//     PROG_B / INIT_B / CS_B / RDWR_B / CCLK, take the bytes, raise DONE.
//  2. Data mode: the host loads every PVS (its block of a global grid,
//     ghost layer = neighbours' values or the fixed boundary, and rhs) with
//     WRITE bursts, then reads part of it back.
//  3. The hwNet controller sends the control words and polls the status
//     words of all PVSs until all are done; the array runs ITER Jacobi
//     iterations with VI Bus exchanges and End synchronisation.
//  4. Alongside, the CIP processing element takes a stream of random
//     operands and its results are compared with a reference 69 cycles later.
//  5. The host reads every block back; each interior point is compared with
//     a Jacobi reference on the global grid (same summation order).
// Mechanisms counted (each must occur, else a failure): configuration
// transactions, mode switches of BusMode, data bursts, arbiter grants,
// repeated status polls, VI Bus words per side (both exchange stages), End
// handshakes, PE stalls waiting for data.
module tb_vocalise_top
  import vc_pkg::*;
  import fp_ref_pkg::*;
#(
  parameter int NBX = 2, NBY = 2, NBZ = 2,
  parameter int NX = 4, NY = 3, NPE = 2,
  parameter int ITER = 3,
  parameter int WATCHDOG = 400000,
  // 1: instantiate the top with no parameter list at all (its defaults);
  // NBX..NPE above must then equal those defaults
  parameter bit DEFAULT_TOP = 0
);
  localparam int NPVS = NBX * NBY * NBZ, NROW = NBY * NBZ;
  localparam int SX = NX + 2, SY = NY + 2, SZ = NPE + 2, BANK = SX * SY * SZ;
  localparam int GX = NBX * NX, GY = NBY * NY, GZ = NBZ * NPE;
  localparam int NB = 40;                       // bitstream bytes
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        h_cmd_valid = 0, h_cmd_ready, h_cmd_done, h_wr_valid = 0, h_wr_ready, h_rd_valid;
  logic [7:0]  h_cmd_mode = 0;
  vc_id_t      h_cmd_target = 0;
  logic [31:0] h_cmd_addr = 0, h_wr_data = 0, h_rd_data;
  logic [8:0]  h_cmd_len = 0;
  logic        cfg_start = 0, cfg_busy, cfg_done, cfg_error, cfg_byte_wr = 0, cfg_byte_full;
  logic [7:0]  cfg_target = 0, cfg_stage = 0, cfg_mask = 0, cfg_byte_data = 0;
  logic [31:0] cfg_nbytes = NB;
  logic        hn_tbl_we = 0, hn_tbl_sel = 0, hn_run = 0, hn_busy, hn_done;
  logic [$clog2(NPVS)-1:0] hn_tbl_idx = 0;
  logic [1:0]  hn_tbl_word = 0;
  logic [31:0] hn_tbl_wdata = 0, hn_stts_rdata;
  logic [$clog2(NPVS):0] hn_n_pvs = ($clog2(NPVS)+1)'(NPVS);
  logic [15:0] hn_polls;
  vc_sig_t pe_cfg_o [NPVS], pe_cfg_i [NPVS], bvs_cfg_o, bvs_cfg_i, bvs_back_o, bvs_back_i;
  vc_sig_t row_back_o [NROW], row_back_i [NROW];
  logic [5:0]  pvs_stall [NPVS];
  logic [31:0] pvs_iter [NPVS];

  logic        cip_in_valid = 0, cip_out_valid;
  logic [31:0] cip_f_im1 = 0, cip_f_i = 0, cip_g_i = 0, cip_g_im1 = 0, cip_u = 0, cip_h_im1 = 0, cip_h_i = 0;
  logic [31:0] cip_f_new, cip_g_new, cip_h_new;

  if (DEFAULT_TOP) begin : g_dut
    vocalise_top dut (.*);
  end else begin : g_dut
    vocalise_top #(.NBX(NBX), .NBY(NBY), .NBZ(NBZ), .NX(NX), .NY(NY), .NPE(NPE)) dut (.*);
  end

  // CIP processing element: a stream of random operands, compared with the
  // reference 69 cycles later
  int n_cip = 0;
  initial begin
    logic [31:0] ef [$], eg [$], eh [$];
    @(posedge rst_n);
    for (int t = 0; t < 200 + 69; t++) begin
      if (t < 200) begin
        logic [31:0] a, b, c;
        cip_f_im1 = rnd_fp(120, 130); cip_f_i = rnd_fp(120, 130); cip_g_i = rnd_fp(118, 128);
        cip_g_im1 = rnd_fp(118, 128); cip_u = rnd_fp(115, 126, 0); cip_h_im1 = rnd_fp(118, 128);
        cip_h_i = rnd_fp(118, 128); cip_in_valid = 1;
        cip_ref_pkg::pe(cip_f_im1, cip_f_i, cip_g_i, cip_g_im1, cip_u, cip_h_im1, cip_h_i, a, b, c);
        ef.push_back(a); eg.push_back(b); eh.push_back(c);
      end else cip_in_valid = 0;
      @(posedge clk); #1;
      if (t + 1 >= 69 && ef.size() > 0 && t + 1 - 69 < 200) begin
        checks++;
        if (!cip_out_valid || cip_f_new !== ef[0] || cip_g_new !== eg[0] || cip_h_new !== eh[0]) begin
          failures++; if (failures < 10) $display("CIP PE result %0d wrong", n_cip);
        end
        void'(ef.pop_front()); void'(eg.pop_front()); void'(eh.pop_front());
        n_cip++;
      end
    end
  end

  // ---------------- behavioural SelectMAP devices ----------------
  // index NPVS is the Bridge VS PE FPGA
  int          m_cnt [NPVS+1], m_wait [NPVS+1];
  logic [31:0] m_sum [NPVS+1];
  logic        m_init [NPVS+1], m_done [NPVS+1], m_cclk [NPVS+1];
  int          m_errs = 0;
  always @(posedge clk) begin
    for (int n = 0; n <= NPVS; n++) begin
      vc_sig_t o;
      o = (n < NPVS) ? pe_cfg_o[n] : bvs_cfg_o;
      if (!o.prog_b) begin
        m_init[n] <= 1'b0; m_done[n] <= 1'b0; m_cnt[n] <= 0; m_sum[n] <= 0; m_wait[n] <= 5;
      end else if (m_wait[n] > 0) begin
        m_wait[n] <= m_wait[n] - 1;
        if (m_wait[n] == 1) m_init[n] <= 1'b1;
      end else if (o.cclk && !m_cclk[n] && !o.cs_b) begin
        if (o.rdwr_b || !m_init[n]) m_errs++;
        if (m_cnt[n] < NB) m_sum[n] <= m_sum[n] * 31 + 32'(o.ad_m[7:0]);
        m_cnt[n] <= m_cnt[n] + 1;
        if (m_cnt[n] == NB + 1) m_done[n] <= 1'b1;
      end
      m_cclk[n] <= o.cclk;
    end
  end
  always_comb begin
    for (int n = 0; n < NPVS; n++) begin
      pe_cfg_i[n] = VC_IDLE; pe_cfg_i[n].init_b = m_init[n]; pe_cfg_i[n].done = m_done[n];
    end
    bvs_cfg_i = VC_IDLE; bvs_cfg_i.init_b = m_init[NPVS]; bvs_cfg_i.done = m_done[NPVS];
    bvs_back_i = VC_IDLE;
    for (int r = 0; r < NROW; r++) row_back_i[r] = VC_IDLE;
  end

  // ---------------- host data streams ----------------
  logic [31:0] wq [$], rq [$];
  always @(posedge clk) begin
    if (h_wr_valid && h_wr_ready) void'(wq.pop_front());
    if (h_rd_valid) rq.push_back(h_rd_data);
    #1;
    h_wr_valid = (wq.size() > 0) && ($urandom_range(3, 0) != 0);
    h_wr_data  = (wq.size() > 0) ? wq[0] : 32'h0;
  end

  task automatic host_cmd(input logic [7:0] mode, input vc_id_t t, input logic [31:0] a, input int len);
    h_cmd_mode = mode; h_cmd_target = t; h_cmd_addr = a; h_cmd_len = 9'(len);
    h_cmd_valid = 1;
    do @(posedge clk); while (!h_cmd_ready);
    #1 h_cmd_valid = 0;
    do @(posedge clk); while (!h_cmd_done);
    #1;
  endtask

  task automatic configure(input logic [7:0] tgt, input logic [7:0] stage, input logic [7:0] mask,
                           input int seed, output logic [31:0] sum);
    sum = 0;
    for (int i = 0; i < NB; i++) begin
      logic [7:0] b;
      b = 8'((i * 37 + seed * 11) ^ (seed * 7));
      sum = sum * 31 + 32'(b);
      cfg_byte_data = b; cfg_byte_wr = 1;
      @(posedge clk); #1;
    end
    cfg_byte_wr = 0;
    cfg_target = tgt; cfg_stage = stage; cfg_mask = mask; cfg_nbytes = NB;
    cfg_start = 1;
    @(posedge clk); #1 cfg_start = 0;
    do @(posedge clk); while (!cfg_done);
    #1;
    checks++;
    if (cfg_error) begin failures++; $display("configuration error, stage %0d", stage); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_cfg = 0, n_mode_sw = 0, n_data = 0, n_grant = 0, n_end = 0, n_stall = 0;
  int n_words [6];
  logic last_busmode = 0, last_gnt = 0;
  always @(posedge clk) if (rst_n) begin
    if (g_dut.dut.hm_o.busmode != last_busmode) n_mode_sw++;
    last_busmode <= g_dut.dut.hm_o.busmode;
    if (g_dut.dut.u_bvs_pe.gnt_v && !last_gnt) n_grant++;
    last_gnt <= g_dut.dut.u_bvs_pe.gnt_v;
    if (h_cmd_done) n_data++;
    for (int n = 0; n < NPVS; n++) begin
      for (int d = 0; d < 6; d++) begin
        if (g_dut.dut.l_mrdy[n][d] && g_dut.dut.l_srdy[n][d]) n_words[d]++;
        if (g_dut.dut.o_end[n][d]) n_end++;
      end
      if (pvs_stall[n][2]) n_stall++;
    end
  end

  // ---------------- global grid and reference ----------------
  logic [31:0] g [GZ+2][GY+2][GX+2];
  logic [31:0] gn [GZ+2][GY+2][GX+2];
  logic [31:0] rh [GZ][GY][GX];

  function automatic vc_id_t pvs_id(int bx, int by, int bz);
    return '{bvs: 2'd0, row: 2'(bz * NBY + by), fpga: 4'(bx)};
  endfunction

  logic [31:0] s1, s2, s3, s0 [NPVS+1];
  initial begin
    for (int d = 0; d < 6; d++) n_words[d] = 0;
    for (int n = 0; n <= NPVS; n++) begin
      m_cnt[n] = 0; m_wait[n] = 0; m_sum[n] = 0; m_init[n] = 1; m_done[n] = 0; m_cclk[n] = 0;
    end
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    // 1. configuration: all PVS PE FPGAs, then one, then the Bridge VS PE FPGA
    configure(8'h00, CFG_PVS_PE, 8'h3F, 1, s1);
    for (int n = 0; n < NPVS; n++) begin
      checks++;
      if (m_sum[n] !== s1 || !m_done[n]) begin failures++; $display("PVS %0d not configured", n); end
      s0[n] = m_sum[n];
    end
    n_cfg++;
    configure({2'd0, 2'(NROW - 1), 4'(NBX - 1)}, CFG_PVS_PE, 8'h00, 2, s2);
    for (int n = 0; n < NPVS; n++) begin
      checks++;
      if (m_sum[n] !== ((n == NPVS - 1) ? s2 : s1)) begin failures++; $display("PVS %0d wrong after single config", n); end
    end
    n_cfg++;
    configure(8'h00, CFG_BVS_PE, 8'h00, 3, s3);
    checks++;
    if (m_sum[NPVS] !== s3 || !m_done[NPVS]) begin failures++; $display("BVS PE not configured"); end
    n_cfg++;
    checks++;
    if (m_errs != 0) begin failures++; $display("SelectMAP protocol errors %0d", m_errs); end

    // 2. data: global grid and per-PVS loads
    for (int z = 0; z < GZ + 2; z++) for (int y = 0; y < GY + 2; y++) for (int x = 0; x < GX + 2; x++)
      g[z][y][x] = rnd_fp(124, 130);
    for (int z = 0; z < GZ; z++) for (int y = 0; y < GY; y++) for (int x = 0; x < GX; x++)
      rh[z][y][x] = rnd_fp(115, 125);
    for (int bz = 0; bz < NBZ; bz++) for (int by = 0; by < NBY; by++) for (int bx = 0; bx < NBX; bx++) begin
      for (int i = 0; i < BANK; i += 256) begin
        int len;
        len = (BANK - i < 256) ? BANK - i : 256;
        for (int k = i; k < i + len; k++) begin
          int x, y, z;
          x = k % SX; y = (k / SX) % SY; z = k / (SX * SY);
          wq.push_back(g[bz*NPE + z][by*NY + y][bx*NX + x]);
        end
        host_cmd(VC_WRITE, pvs_id(bx, by, bz), 32'(i), len);
      end
      for (int i = 0; i < NX * NY * NPE; i += 256) begin
        int len;
        len = (NX * NY * NPE - i < 256) ? NX * NY * NPE - i : 256;
        for (int k = i; k < i + len; k++) begin
          int x, y, z;
          x = k % NX; y = (k / NX) % NY; z = k / (NX * NY);
          wq.push_back(rh[bz*NPE + z][by*NY + y][bx*NX + x]);
        end
        host_cmd(VC_WRITE, pvs_id(bx, by, bz), 32'h1_0000 | 32'(i), len);
      end
    end
    // read back the first burst of the last PVS
    rq.delete();
    host_cmd(VC_READ, pvs_id(NBX-1, NBY-1, NBZ-1), 32'd0, 16);
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (rq.size() != 16 || rq[k] !== g[(NBZ-1)*NPE + k/(SX*SY)][(NBY-1)*NY + (k/SX)%SY][(NBX-1)*NX + k%SX]) begin
        failures++; $display("read back word %0d wrong", k);
      end
    end

    // reference Jacobi on the global grid
    for (int it = 0; it < ITER; it++) begin
      gn = g;
      for (int z = 1; z <= GZ; z++) for (int y = 1; y <= GY; y++) for (int x = 1; x <= GX; x++)
        gn[z][y][x] = rscale(radd(radd(radd(g[z][y][x-1], g[z][y][x+1]), radd(g[z][y-1][x], g[z][y+1][x])),
                                  radd(radd(g[z-1][y][x], g[z+1][y][x]), radd(rscale(g[z][y][x], 2.0), rh[z-1][y-1][x-1]))), 0.125);
      g = gn;
    end

    // 3. run through the hwNet controller
    for (int n = 0; n < NPVS; n++) begin
      hn_tbl_we = 1; hn_tbl_idx = $clog2(NPVS)'(n);
      hn_tbl_sel = 0; hn_tbl_word = 0;
      hn_tbl_wdata = 32'(pvs_id(n % NBX, (n / NBX) % NBY, n / (NBX * NBY)));
      @(posedge clk); #1;
      hn_tbl_sel = 1;
      for (int w = 0; w < 4; w++) begin
        hn_tbl_word = 2'(w);
        hn_tbl_wdata = (w == 0) ? 32'd1 : (w == 1) ? 32'(ITER) : 32'd0;
        @(posedge clk); #1;
      end
    end
    hn_tbl_we = 0;
    hn_run = 1;
    @(posedge clk); #1 hn_run = 0;
    do @(posedge clk); while (!hn_done);
    #1;
    for (int n = 0; n < NPVS; n++) begin
      hn_tbl_idx = $clog2(NPVS)'(n);
      hn_tbl_word = 1; #1;
      checks++;
      if (hn_stts_rdata != ITER || pvs_iter[n] != ITER) begin
        failures++; $display("PVS %0d iterations %0d", n, hn_stts_rdata);
      end
    end

    // 4. read back and compare
    for (int bz = 0; bz < NBZ; bz++) for (int by = 0; by < NBY; by++) for (int bx = 0; bx < NBX; bx++) begin
      for (int i = 0; i < BANK; i += 256) begin
        int len;
        len = (BANK - i < 256) ? BANK - i : 256;
        rq.delete();
        host_cmd(VC_READ, pvs_id(bx, by, bz), 32'(i), len);
        checks++;
        if (rq.size() != len) begin failures++; $display("burst returned %0d words", rq.size()); end
        for (int k = 0; k < len && k < rq.size(); k++) begin
          int x, y, z;
          x = (i + k) % SX; y = ((i + k) / SX) % SY; z = (i + k) / (SX * SY);
          if (x >= 1 && x <= NX && y >= 1 && y <= NY && z >= 1 && z <= NPE) begin
            checks++;
            if (rq[k] !== g[bz*NPE + z][by*NY + y][bx*NX + x]) begin
              failures++;
              if (failures < 10) $display("PVS(%0d,%0d,%0d) phi[%0d][%0d][%0d] = %h expected %h",
                                          bx, by, bz, z, y, x, rq[k], g[bz*NPE + z][by*NY + y][bx*NX + x]);
            end
          end
        end
      end
    end

    // mechanisms
    checks++; if (n_cip != 200) begin failures++; $display("CIP PE results %0d", n_cip); end
    checks++; if (n_cfg < 3) begin failures++; $display("configuration not exercised"); end
    checks++; if (n_mode_sw < 6) begin failures++; $display("mode switches %0d", n_mode_sw); end
    checks++; if (n_data == 0) begin failures++; $display("no data transactions"); end
    checks++; if (n_grant == 0) begin failures++; $display("no arbiter grants"); end
    checks++; if (hn_polls < 2) begin failures++; $display("status polled only %0d times", hn_polls); end
    checks++; if (n_end == 0) begin failures++; $display("no End handshake"); end
    checks++; if (n_stall == 0) begin failures++; $display("no PE stall seen"); end
    for (int d = 0; d < 6; d++) begin
      checks++;
      if (n_words[d] == 0) begin failures++; $display("no VI Bus words on side %0d", d); end
    end
    $display("mechanisms: cfg=%0d modesw=%0d data=%0d grants=%0d polls=%0d end=%0d stall=%0d words=%p",
             n_cfg, n_mode_sw, n_data, n_grant, hn_polls, n_end, n_stall, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
