// tb_hwmodule_ctrl: the hwModule controller on a VC Bus with one PVS stand-
// in (a VC Bus slave with FIB memory, whose status word 0 reports done some
// time after its start bit rises) and a SelectMAP device model; a
// behavioural arbiter acknowledges every request. Checks: host WRITE /
// READ bursts; a configuration run (busmode high only then, bytes reach the
// device); a hwNet-controller run (control words arrive, start bit last,
// polling until done); host commands are held off while the hwNet
// controller owns the bus; data traffic never shows busmode.
module tb_hwmodule_ctrl;
  import vc_pkg::*;
  import fib_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  `include "host_rig.svh"
  localparam vc_id_t PVS = 8'h13;
  localparam int NB = 20;
  vc_sig_t s_o, d_o;
  fib_m2s_t fm;
  fib_s2m_t fs;
  logic [31:0] ctrl [4], stts [4];
  logic [31:0] sum;
  int cnt, progs, errs;
  vc_slave u_slv (.clk, .rst_n, .my_id(PVS), .bus_i(hbus_o), .bus_o(s_o), .fib_o(fm), .fib_i(fs), .ctrl, .stts);
  fib_mem_model u_mem (.clk, .m(fm), .s(fs));
  smap_dev_model #(.NB(NB)) u_dev (.clk, .pins_o(hbus_o), .pins_i(d_o), .sum, .cnt, .progs, .errs);
  always_comb begin
    hbus_i = s_o;
    hbus_i.ack = hbus_o.req;
    hbus_i.init_b = d_o.init_b;
    hbus_i.done = d_o.done;
  end

  // PVS stand-in: done 200 cycles after the start bit rises
  int run_t = -1, n_start = 0, bm_data = 0, held_off = 0;
  logic prev_start = 0;
  always @(posedge clk) begin
    if (rst_n && ctrl[0][0] && !prev_start) begin run_t = 200; n_start++; end
    prev_start <= ctrl[0][0];
    if (run_t > 0) run_t--;
    stts[0] <= (run_t == 0) ? 32'h2 : (run_t > 0 ? 32'h1 : 32'h0);
    stts[1] <= ctrl[1]; stts[2] <= 32'hABCD; stts[3] <= 0;
    if (hbus_o.busmode && !cfg_busy) bm_data++;
    if (hn_busy && h_cmd_valid && h_cmd_ready) held_off++;
  end

  logic [31:0] s;
  logic [31:0] ref_w [$];
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // data mode
    for (int k = 0; k < 50; k++) begin wq.push_back($urandom); ref_w.push_back(wq[$]); end
    host_cmd(VC_WRITE, PVS, 32'd10, 50);
    rq.delete();
    host_cmd(VC_READ, PVS, 32'd10, 50);
    checks++;
    if (rq != ref_w) begin failures++; $display("read back wrong (%0d words)", rq.size()); end
    // configuration mode
    configure(8'h13, CFG_PVS_PE, 8'h00, NB, 1, s);
    checks++;
    if (sum !== s || progs != 1 || errs != 0 || cfg_error) begin failures++; $display("configuration failed"); end
    // hwNet controller run
    hn_n_pvs = 1;
    hn_tbl_we = 1; hn_tbl_idx = 0; hn_tbl_sel = 0; hn_tbl_word = 0; hn_tbl_wdata = 32'(PVS);
    @(posedge clk); #1 hn_tbl_sel = 1;
    for (int w = 0; w < 4; w++) begin
      hn_tbl_word = 2'(w); hn_tbl_wdata = (w == 0) ? 32'd1 : 32'(100 + w);
      @(posedge clk); #1;
    end
    hn_tbl_we = 0;
    hn_run = 1; @(posedge clk); #1 hn_run = 0;
    // try a host command meanwhile: it must wait for the controller
    h_cmd_mode = VC_READ; h_cmd_target = PVS; h_cmd_addr = 10; h_cmd_len = 1; h_cmd_valid = 1;
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (!hn_busy) begin failures++; $display("hwNet controller not busy"); end
    do @(posedge clk); while (!h_cmd_ready);
    #1 h_cmd_valid = 0;
    checks++;
    if (hn_busy) begin failures++; $display("host command accepted during hwNet run"); end
    do @(posedge clk); while (!h_cmd_done);
    #1;
    checks++;
    if (ctrl[1] != 101 || ctrl[2] != 102 || ctrl[3] != 103 || n_start != 1) begin
      failures++; $display("control words %0d %0d %0d, starts %0d", ctrl[1], ctrl[2], ctrl[3], n_start);
    end
    checks++;
    if (hn_polls < 2) begin failures++; $display("polled %0d times", hn_polls); end
    hn_tbl_idx = 0; hn_tbl_word = 2; #1;
    checks++;
    if (hn_stts_rdata != 32'hABCD) begin failures++; $display("status table %h", hn_stts_rdata); end
    checks++;
    if (bm_data != 0 || held_off != 0) begin failures++; $display("bus mode mixed up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
