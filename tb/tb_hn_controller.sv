// tb_hn_controller: the hwNet controller with a behavioural data master and
// three behavioural PVSs that report done after a random number of status
// reads. Checks: the parameter phase sends each PVS its four control words
// with bit 0 of word 0 cleared; the start phase sends each PVS word 0 as
// given, after all parameter bursts; polling reads four status words per
// PVS and repeats until every PVS reports done; the status table holds the
// last words read; the poll count and the done pulse.
module tb_hn_controller;
  import vc_pkg::*;
  localparam int NPVS = 4, N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tbl_we = 0, tbl_sel = 0, run = 0, busy, done;
  logic [1:0] tbl_idx = 0, tbl_word = 0;
  logic [31:0] tbl_wdata = 0, stts_rdata;
  logic [2:0] n_pvs = N;
  logic [15:0] polls;
  logic m_cmd_valid, m_cmd_ready = 0, m_done = 0, m_wr_valid, m_wr_ready = 0, m_rd_valid = 0;
  logic [7:0] m_cmd_mode;
  vc_id_t m_cmd_target;
  logic [31:0] m_cmd_addr, m_wr_data, m_rd_data = 0;
  logic [8:0] m_cmd_len;
  hn_controller #(.NPVS(NPVS)) dut (.*);

  vc_id_t ids [N];
  logic [31:0] cw [N][4];
  int need [N], reads [N];
  typedef struct { logic [7:0] mode; vc_id_t tgt; logic [31:0] words [$]; } rec_t;
  rec_t log_q [$];

  function automatic int idx_of(vc_id_t t);
    for (int i = 0; i < N; i++) if (ids[i] == t) return i;
    return -1;
  endfunction

  // behavioural master: executes each command, logs it
  initial begin
    forever begin
      rec_t r;
      int p, len;
      @(posedge clk); #1;
      m_cmd_ready = 1;
      do @(posedge clk); while (!m_cmd_valid);
      r.mode = m_cmd_mode; r.tgt = m_cmd_target; r.words = {}; len = int'(m_cmd_len);
      #1 m_cmd_ready = 0;
      p = idx_of(r.tgt);
      for (int k = 0; k < len; k++) begin
        if (r.mode == VC_CMD) begin
          m_wr_ready = 1;
          do @(posedge clk); while (!m_wr_valid);
          r.words.push_back(m_wr_data);
          #1 m_wr_ready = 0;
        end else begin
          m_rd_valid = 1;
          m_rd_data = (k == 0) ? {30'd0, (p >= 0 && reads[p] >= need[p]), 1'b1} : 32'(p * 16 + k);
          @(posedge clk); #1 m_rd_valid = 0;
        end
      end
      if (r.mode == VC_STTS && p >= 0) reads[p]++;
      repeat ($urandom_range(3, 1)) @(posedge clk);
      #1 m_done = 1; @(posedge clk); #1 m_done = 0;
      log_q.push_back(r);
    end
  end

  initial begin
    int maxneed;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    maxneed = 0;
    for (int i = 0; i < N; i++) begin
      ids[i] = 8'($urandom_range(200, 1) + i);
      need[i] = $urandom_range(4, 1); reads[i] = 0;
      if (need[i] > maxneed) maxneed = need[i];
      tbl_we = 1; tbl_idx = 2'(i); tbl_sel = 0; tbl_word = 0; tbl_wdata = 32'(ids[i]);
      @(posedge clk); #1;
      tbl_sel = 1;
      for (int w = 0; w < 4; w++) begin
        cw[i][w] = $urandom | (w == 0 ? 32'd1 : 32'd0);
        tbl_word = 2'(w); tbl_wdata = cw[i][w];
        @(posedge clk); #1;
      end
    end
    tbl_we = 0;
    run = 1; @(posedge clk); #1 run = 0;
    do @(posedge clk); while (!done);
    #1;
    // expected sequence
    checks++;
    if (log_q.size() != 2 * N + N * (maxneed + 1)) begin
      failures++; $display("%0d commands, expected %0d", log_q.size(), 2 * N + N * (maxneed + 1));
    end
    for (int i = 0; i < N && i < log_q.size(); i++) begin
      checks++;
      if (log_q[i].mode != VC_CMD || log_q[i].tgt != ids[i] || log_q[i].words.size() != 4 ||
          log_q[i].words[0] != (cw[i][0] & ~32'd1) || log_q[i].words[1] != cw[i][1] ||
          log_q[i].words[3] != cw[i][3]) begin failures++; $display("parameter burst %0d wrong", i); end
    end
    for (int i = 0; i < N && N + i < log_q.size(); i++) begin
      checks++;
      if (log_q[N+i].mode != VC_CMD || log_q[N+i].tgt != ids[i] || log_q[N+i].words.size() != 1 ||
          log_q[N+i].words[0] != cw[i][0]) begin failures++; $display("start write %0d wrong", i); end
    end
    for (int k = 2 * N; k < log_q.size(); k++) begin
      checks++;
      if (log_q[k].mode != VC_STTS || log_q[k].tgt != ids[(k - 2 * N) % N]) begin failures++; $display("poll %0d wrong", k); end
    end
    checks++;
    if (polls != maxneed + 1) begin failures++; $display("polls %0d expected %0d", polls, maxneed + 1); end
    for (int i = 0; i < N; i++) for (int w = 0; w < 4; w++) begin
      tbl_idx = 2'(i); tbl_word = 2'(w); #1;
      checks++;
      if (stts_rdata != ((w == 0) ? 32'd3 : 32'(i * 16 + w))) begin failures++; $display("stts[%0d][%0d] = %h", i, w, stts_rdata); end
    end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
