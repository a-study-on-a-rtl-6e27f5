// tb_vibus_controller: the controller of one PVS with four connected sides,
// surrounded by a behavioural neighbourhood: a PE stand-in that reports
// compute_done after a fixed time, transfer stand-ins that report done a
// random time after each start, and neighbours whose End pulses arrive late
// and briefly. Checks the stage order (stage-1 sides and stage-2 sides),
// that unconnected sides are never started, that no iteration starts before
// every connected iEnd was seen, and the iteration count.
module tb_vibus_controller;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam logic [5:0] PRESENT = 6'b011011;
  logic start, compute_start, compute_done, busy, done, stalled;
  logic [5:0] tx_start, rx_start, tx_done, rx_done, o_end, i_end;
  logic [31:0] iter;
  vibus_controller #(.ITW(32)) dut (.clk, .rst_n, .start, .n_iter(32'd4), .link_present(PRESENT),
    .compute_start, .compute_done, .tx_start, .rx_start, .tx_done, .rx_done,
    .o_end, .i_end, .busy, .done, .iter, .stalled);

  int comp_timer = -1;
  int txt [6], rxt [6];
  int end_timer = -1, end_pulse = 0, n_comp = 0;
  logic [5:0] seen_end;
  always @(posedge clk) begin
    #1;
    compute_done = 0; tx_done = 0; rx_done = 0; i_end = 0;
    if (compute_start) begin
      comp_timer = 20; n_comp++;
      checks++;
      if (n_comp > 1 && seen_end != PRESENT) begin failures++; $display("started before all iEnd"); end
      seen_end = 0;
    end
    if (comp_timer > 0) comp_timer--;
    else if (comp_timer == 0) begin compute_done = 1; comp_timer = -1; end
    for (int d = 0; d < 6; d++) begin
      if (tx_start[d]) begin
        txt[d] = $urandom_range(30, 5); checks++;
        if (!PRESENT[d]) failures++;
        if (dut.st == dut.S_COMP && !(d % 2 == 0)) failures++;   // stage 1 sends + sides
      end
      if (rx_start[d]) begin rxt[d] = $urandom_range(30, 5); checks++; if (!PRESENT[d]) failures++; end
      if (txt[d] > 0) begin txt[d]--; if (txt[d] == 0) tx_done[d] = 1; end
      if (rxt[d] > 0) begin rxt[d]--; if (rxt[d] == 0) rx_done[d] = 1; end
    end
    if (o_end != 0 && end_timer < 0 && end_pulse == 0) end_timer = 40;
    if (end_timer > 0) end_timer--;
    else if (end_timer == 0) begin end_timer = -1; end_pulse = 6; end
    if (end_pulse > 0) begin
      // neighbours raise End one side at a time, each for a single cycle
      end_pulse--;
      i_end = (6'b1 << end_pulse) & PRESENT;
      seen_end |= i_end;
      if (end_pulse == 0) end_timer = -2;   // wait for o_end to drop
    end
    if (end_timer == -2 && o_end == 0) end_timer = -1;
  end

  initial begin
    for (int d = 0; d < 6; d++) begin txt[d] = 0; rxt[d] = 0; end
    start = 0; compute_done = 0; tx_done = 0; rx_done = 0; i_end = 0; seen_end = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1 start = 1;
    @(posedge clk); #1 start = 0;
    wait (done);
    checks += 2;
    if (iter != 4) begin failures++; $display("iter %0d", iter); end
    if (n_comp != 4) begin failures++; $display("compute phases %0d", n_comp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
