// tb_vc_slave: a behavioural VC Bus initiator (random mrdy gaps) and a FIB
// memory with random response delay around the slave. Random WRITE bursts
// followed by READ bursts of the same range, CMD writes to the control
// words and STTS reads of the status words; a transaction to another ID
// must be ignored. Checks memory contents, read data and control words.
module tb_vc_slave;
  import vc_pkg::*;
  import fib_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam vc_id_t ME = 8'h25;
  vc_sig_t bus_i, bus_o;
  fib_m2s_t fib_o;
  fib_s2m_t fib_i;
  logic [31:0] ctrl [4], stts [4];
  vc_slave dut (.clk, .rst_n, .my_id(ME), .bus_i, .bus_o, .fib_o, .fib_i, .ctrl, .stts);

  // FIB memory, srdy after a random delay, one cycle long
  logic [31:0] mem [256];
  int dly = -1;
  always @(posedge clk) begin
    fib_i.srdy <= 1'b0;
    if (fib_o.sel && fib_o.mrdy && !fib_i.srdy) begin
      if (dly < 0) dly = $urandom_range(3, 0);
      else if (dly == 0) begin
        fib_i.srdy <= 1'b1;
        if (fib_o.we) mem[fib_o.a[7:0]] <= fib_o.dw;
        fib_i.dr <= mem[fib_o.a[7:0]];
        dly = -1;
      end else dly--;
    end
  end

  // behavioural master
  logic [31:0] rd [$];
  task automatic xact(input vc_id_t t, input logic [7:0] mode, input logic [31:0] a,
                      input int len, input logic [31:0] wd [$]);
    int n;
    bus_i = VC_IDLE;
    bus_i.req = 1; bus_i.sel = 1; bus_i.frame = 1; bus_i.mrdy = 1;
    bus_i.ad_m = {t, VC_HOST_ID, mode, 8'(len)};
    n = 0;
    // header words
    for (int h = 0; h < 2; h++) begin
      do @(posedge clk); while (!bus_o.srdy && n++ < 20);
      if (n >= 20) begin #1 bus_i = VC_IDLE; @(posedge clk); #1; return; end
      #1 bus_i.frame = 0; bus_i.ad_m = a;
    end
    for (int k = 0; k < len; k++) begin
      bus_i.mrdy = 0;
      while ($urandom_range(2, 0) == 0) @(posedge clk);
      #1 bus_i.mrdy = 1;
      bus_i.ad_m = (mode == VC_WRITE || mode == VC_CMD) ? wd[k] : 32'h0;
      do @(posedge clk); while (!bus_o.srdy);
      if (mode == VC_READ || mode == VC_STTS) rd.push_back(bus_o.ad_s);
      #1;
    end
    bus_i = VC_IDLE;
    @(posedge clk); #1;
  endtask

  logic [31:0] ref_mem [256];
  initial begin
    logic [31:0] wd [$];
    bus_i = VC_IDLE; fib_i = FIB_S2M_IDLE;
    for (int i = 0; i < 4; i++) stts[i] = $urandom;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 256; i++) begin mem[i] = 0; ref_mem[i] = 0; end
    for (int t = 0; t < 30; t++) begin
      int a, len;
      a = $urandom_range(200, 0); len = $urandom_range(40, 1);
      wd.delete();
      for (int k = 0; k < len; k++) begin wd.push_back($urandom); ref_mem[a + k] = wd[k]; end
      xact(ME, VC_WRITE, a, len, wd);
      rd.delete();
      xact(ME, VC_READ, a, len, wd);
      for (int k = 0; k < len; k++) begin
        checks++;
        if (rd[k] !== ref_mem[a + k]) begin failures++; $display("read %0d: %h expected %h", a + k, rd[k], ref_mem[a + k]); end
      end
    end
    // another ID: must not answer, memory unchanged
    wd = '{32'hDEAD_BEEF};
    xact(8'h26, VC_WRITE, 0, 1, wd);
    checks++;
    if (mem[0] !== ref_mem[0]) begin failures++; $display("wrote for another ID"); end
    // control words and status words
    wd = '{32'h11, 32'h22, 32'h33};
    xact(ME, VC_CMD, 1, 3, wd);
    checks++;
    if (ctrl[1] !== 32'h11 || ctrl[2] !== 32'h22 || ctrl[3] !== 32'h33 || ctrl[0] !== 0) begin
      failures++; $display("ctrl words wrong");
    end
    rd.delete();
    xact(ME, VC_STTS, 0, 4, wd);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (rd[k] !== stts[k]) begin failures++; $display("stts %0d = %h expected %h", k, rd[k], stts[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
