// host_rig.svh: host side shared by the VC Bus testbenches. Included inside
// a testbench module that declares clk, rst_n, checks and failures; it
// instantiates an hwmodule_ctrl (VC Bus port hbus_o / hbus_i) and provides
// host_cmd (one data-mode burst; write data from wq, read data into rq) and
// configure (one configuration run of NBYTES bytes, returns the bytes' hash).
  localparam int HNPVS = 4;
  logic        h_cmd_valid = 0, h_cmd_ready, h_cmd_done, h_wr_valid = 0, h_wr_ready, h_rd_valid;
  logic [7:0]  h_cmd_mode = 0;
  vc_id_t      h_cmd_target = 0;
  logic [31:0] h_cmd_addr = 0, h_wr_data = 0, h_rd_data;
  logic [8:0]  h_cmd_len = 0;
  logic        cfg_start = 0, cfg_busy, cfg_done, cfg_error, cfg_byte_wr = 0, cfg_byte_full;
  logic [7:0]  cfg_target = 0, cfg_stage = 0, cfg_mask = 0, cfg_byte_data = 0;
  logic [31:0] cfg_nbytes = 0;
  logic        hn_tbl_we = 0, hn_tbl_sel = 0, hn_run = 0, hn_busy, hn_done;
  logic [1:0]  hn_tbl_idx = 0, hn_tbl_word = 0;
  logic [31:0] hn_tbl_wdata = 0, hn_stts_rdata;
  logic [2:0]  hn_n_pvs = 0;
  logic [15:0] hn_polls;
  vc_sig_t     hbus_o, hbus_i;

  hwmodule_ctrl #(.NPVS(HNPVS)) u_host (
    .clk, .rst_n,
    .h_cmd_valid, .h_cmd_ready, .h_cmd_mode, .h_cmd_target, .h_cmd_addr, .h_cmd_len,
    .h_cmd_done, .h_wr_valid, .h_wr_data, .h_wr_ready, .h_rd_valid, .h_rd_data,
    .cfg_start, .cfg_target, .cfg_stage, .cfg_mask, .cfg_nbytes, .cfg_busy, .cfg_done,
    .cfg_error, .cfg_byte_wr, .cfg_byte_data, .cfg_byte_full,
    .hn_tbl_we, .hn_tbl_sel, .hn_tbl_idx, .hn_tbl_word, .hn_tbl_wdata, .hn_stts_rdata,
    .hn_n_pvs, .hn_run, .hn_busy, .hn_done, .hn_polls,
    .bus_o(hbus_o), .bus_i(hbus_i));

  logic [31:0] wq [$], rq [$];
  always @(posedge clk) begin
    if (h_wr_valid && h_wr_ready) void'(wq.pop_front());
    if (h_rd_valid) rq.push_back(h_rd_data);
    #1;
    h_wr_valid = (wq.size() > 0) && ($urandom_range(3, 0) != 0);
    h_wr_data  = (wq.size() > 0) ? wq[0] : 32'h0;
  end

  // one burst; gives up (and counts a failure) after tmo cycles
  task automatic host_cmd(input logic [7:0] mode, input vc_id_t t, input logic [31:0] a,
                          input int len, input int tmo = 5000);
    int n;
    h_cmd_mode = mode; h_cmd_target = t; h_cmd_addr = a; h_cmd_len = 9'(len);
    h_cmd_valid = 1;
    do @(posedge clk); while (!h_cmd_ready);
    #1 h_cmd_valid = 0;
    n = 0;
    do @(posedge clk); while (!h_cmd_done && n++ < tmo);
    #1;
    if (n >= tmo) begin
      failures++; $display("host command %0d to %h timed out", mode, t);
      rst_n = 0; #20 rst_n = 1; wq.delete();
    end
  endtask

  task automatic configure(input logic [7:0] tgt, input logic [7:0] stage, input logic [7:0] mask,
                           input int nbytes, input int seed, output logic [31:0] sum);
    sum = 0;
    for (int i = 0; i < nbytes; i++) begin
      logic [7:0] b;
      b = 8'((i * 37 + seed * 11) ^ (seed * 7));
      sum = sum * 31 + 32'(b);
      cfg_byte_data = b; cfg_byte_wr = 1;
      @(posedge clk); #1;
    end
    cfg_byte_wr = 0;
    cfg_target = tgt; cfg_stage = stage; cfg_mask = mask; cfg_nbytes = nbytes;
    cfg_start = 1;
    @(posedge clk); #1 cfg_start = 0;
    do @(posedge clk); while (!cfg_done);
    #1;
  endtask
