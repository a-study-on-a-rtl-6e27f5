// tb_vc_master: the master against a behavioural arbiter (ack after a random
// delay) and a behavioural target with random srdy. Random WRITE and READ
// bursts (1..256 words, with write-data gaps); checks the header (target,
// initiator, mode, burst length, second word), that sel follows ack, that
// nothing moves before ack, every data word, and the done pulse.
module tb_vc_master;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam vc_id_t ME = 8'hFF;
  logic cmd_valid = 0, cmd_ready, done, wr_valid = 0, wr_ready, rd_valid;
  logic [7:0] cmd_mode = 0;
  vc_id_t cmd_target = 0;
  logic [31:0] cmd_addr = 0, wr_data = 0, rd_data;
  logic [8:0] cmd_len = 0;
  vc_sig_t bus_o, bus_i;
  vc_master dut (.clk, .rst_n, .my_id(ME), .*);

  // behavioural arbiter + target
  int ack_dly, nword;
  logic [31:0] got [$], hdr [$];
  logic [31:0] src [$];
  always @(posedge clk) begin
    if (bus_o.req && bus_o.mrdy && bus_i.srdy && bus_o.sel) begin
      if (nword < 2) hdr.push_back(bus_o.ad_m); else got.push_back(bus_o.ad_m);
      if (nword >= 2 && src.size() > 0 && bus_i.ad_s == src[0]) void'(src.pop_front());
      nword++;
    end
    if (bus_o.req && !bus_i.ack && bus_o.sel) begin failures++; $display("sel before ack"); end
    #1;
    if (!bus_o.req) begin bus_i.ack = 0; ack_dly = $urandom_range(6, 1); nword = 0; end
    else if (ack_dly > 0) ack_dly--;
    else bus_i.ack = 1;
    bus_i.srdy = bus_o.req && bus_i.ack && ($urandom_range(3, 0) != 0);
    bus_i.ad_s = (src.size() > 0) ? src[0] : 32'h0;
  end
  logic [31:0] rdq [$];
  always @(posedge clk) if (rd_valid) rdq.push_back(rd_data);

  logic [31:0] wq [$];
  always @(posedge clk) begin
    if (wr_valid && wr_ready) void'(wq.pop_front());
    #1;
    wr_valid = wq.size() > 0 && $urandom_range(2, 0) != 0;
    wr_data = wq.size() > 0 ? wq[0] : 0;
  end

  initial begin
    bus_i = VC_IDLE; bus_i.srdy = 0; ack_dly = 3; nword = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      int len;
      logic [31:0] exp [$];
      logic wr;
      wr = t % 2 == 0;
      len = (t == 4) ? 256 : $urandom_range(30, 1);
      exp.delete(); got.delete(); hdr.delete(); rdq.delete();
      for (int k = 0; k < len; k++) exp.push_back($urandom);
      if (wr) wq = exp; else src = exp;
      cmd_mode = wr ? VC_WRITE : VC_READ;
      cmd_target = 8'($urandom); cmd_addr = $urandom; cmd_len = 9'(len);
      cmd_valid = 1;
      do @(posedge clk); while (!cmd_ready);
      #1 cmd_valid = 0;
      do @(posedge clk); while (!done);
      #1;
      checks++;
      if (hdr.size() != 2 || hdr[0] != {cmd_target, ME, cmd_mode, 8'(len)} || hdr[1] != cmd_addr) begin
        failures++; $display("header wrong %p", hdr);
      end
      checks++;
      if (wr && got != exp) begin failures++; $display("write data wrong (%0d of %0d words)", got.size(), len); end
      if (!wr && rdq != exp) begin failures++; $display("read data wrong (%0d of %0d words)", rdq.size(), len); end
      repeat ($urandom_range(3, 0)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
