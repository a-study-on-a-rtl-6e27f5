// tb_selectmap_config: the configuration engine with a SelectMAP device
// model and a behavioural arbiter that acknowledges after a random delay.
// Checks: busmode and req during the run; the three address bytes, one per
// clock with frame, in order; no PROG_B before ack; PROG_B low for exactly
// PROG_LEN clocks; CCLK period of 2*CCLK_DIV clocks; the device receives
// every byte (hash) and raises DONE, done pulses without error; bytes
// written while the engine waits are taken in order (FIFO); a device that
// never raises DONE ends the run with error after DONE_WAIT periods.
module tb_selectmap_config;
  import vc_pkg::*;
  localparam int CCLK_DIV = 3, PROG_LEN = 4, DONE_WAIT = 16, NB = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, done, error, byte_wr = 0, byte_full;
  logic [7:0] cfg_target = 0, cfg_stage = 0, cfg_mask = 0, byte_data = 0;
  logic [31:0] nbytes = 0;
  vc_sig_t bus_o, bus_i, dev_i;
  logic [31:0] sum;
  int cnt, progs, errs;
  selectmap_config #(.CCLK_DIV(CCLK_DIV), .PROG_LEN(PROG_LEN), .DONE_WAIT(DONE_WAIT), .FIFO_AW(6)) dut (.*);
  smap_dev_model #(.NB(NB)) u_dev (.clk, .pins_o(bus_o), .pins_i(dev_i), .sum, .cnt, .progs, .errs);
  logic give_ack = 0, done_mask = 1;
  always_comb begin
    bus_i = dev_i;
    bus_i.ack = give_ack && bus_o.req;
    bus_i.done = dev_i.done && done_mask;
  end

  logic [7:0] abytes [$];
  int prog_len = 0, prog_before_ack = 0, cclk_hi = 0, cclk_per [$], tcnt = 0, last_rise = -1;
  logic pc = 0;
  always @(posedge clk) begin
    tcnt++;
    if (bus_o.frame) abytes.push_back(bus_o.ad_m[7:0]);
    if (!bus_o.prog_b) prog_len++;
    if (!bus_o.prog_b && !give_ack) prog_before_ack++;
    if (bus_o.cclk && !pc) begin
      if (last_rise >= 0) cclk_per.push_back(tcnt - last_rise);
      last_rise = tcnt;
    end
    pc <= bus_o.cclk;
  end

  task automatic run(input int n, input int seed, output logic [31:0] s);
    s = 0;
    for (int i = 0; i < n; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      s = s * 31 + 32'(b);
      byte_data = b; byte_wr = 1;
      @(posedge clk); #1;
    end
    byte_wr = 0;
    nbytes = n; cfg_target = 8'(seed); cfg_stage = 8'd4; cfg_mask = 8'h0F;
    abytes.delete(); prog_len = 0; prog_before_ack = 0; cclk_per.delete(); last_rise = -1;
    give_ack = 0;
    start = 1; @(posedge clk); #1 start = 0;
    repeat ($urandom_range(8, 3)) @(posedge clk);
    #1 give_ack = 1;
    do @(posedge clk); while (!done);
    #1;
  endtask

  logic [31:0] s;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run(NB, 5, s);
    checks++; if (abytes.size() != 3 || abytes[0] != 8'd5 || abytes[1] != 8'd4 || abytes[2] != 8'h0F) begin
      failures++; $display("address bytes %p", abytes); end
    checks++; if (prog_before_ack != 0) begin failures++; $display("PROG_B before ack"); end
    checks++; if (prog_len != PROG_LEN) begin failures++; $display("PROG_B low %0d clocks", prog_len); end
    checks++; if (sum !== s || cnt < NB || errs != 0) begin failures++; $display("device got %0d bytes, hash %h / %h", cnt, sum, s); end
    checks++; if (error) begin failures++; $display("error flagged"); end
    foreach (cclk_per[i]) begin
      checks++;
      if (cclk_per[i] != 2 * CCLK_DIV) begin failures++; $display("CCLK period %0d", cclk_per[i]); end
    end
    // second run, DONE held low: must end with error
    done_mask = 0;
    run(NB, 7, s);
    checks++; if (!error) begin failures++; $display("missing DONE not flagged"); end
    checks++; if (sum !== s) begin failures++; $display("second bitstream wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
