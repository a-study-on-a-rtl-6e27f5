// tb_vibus_port: two VI Bus ports wired back to back (A's outgoing link to
// B's incoming link and the reverse), on three unrelated clocks (A local,
// B local, link). Bursts are sent in both directions at once with random
// back-pressure at the receiving hwNet; checks data and order, and that a
// burst streams at one word per link cycle when the receiver keeps up.
module tb_vibus_port;
  localparam int N = 300;
  logic clka = 0, clkb = 0, lclk = 0, rst_n = 0;
  always #5 clka = ~clka;
  always #6 clkb = ~clkb;
  always #8 lclk = ~lclk;   // slower than the senders, so bursts queue up
  int checks = 0, failures = 0;

  logic a_txv, a_txr, a_rxv, a_rxr, b_txv, b_txr, b_rxv, b_rxr;
  logic [31:0] a_txd, a_rxd, b_txd, b_rxd;
  logic ab_clk, ab_mrdy, ab_srdy, ba_clk, ba_mrdy, ba_srdy;
  logic [31:0] ab_d, ba_d;

  vibus_port u_a (.rst_n, .clk(clka), .link_clk(lclk),
    .tx_valid(a_txv), .tx_data(a_txd), .tx_ready(a_txr),
    .rx_valid(a_rxv), .rx_data(a_rxd), .rx_ready(a_rxr),
    .o_clk(ab_clk), .o_mrdy(ab_mrdy), .o_data(ab_d), .o_srdy(ab_srdy),
    .i_clk(ba_clk), .i_mrdy(ba_mrdy), .i_data(ba_d), .i_srdy(ba_srdy));
  vibus_port u_b (.rst_n, .clk(clkb), .link_clk(lclk),
    .tx_valid(b_txv), .tx_data(b_txd), .tx_ready(b_txr),
    .rx_valid(b_rxv), .rx_data(b_rxd), .rx_ready(b_rxr),
    .o_clk(ba_clk), .o_mrdy(ba_mrdy), .o_data(ba_d), .o_srdy(ba_srdy),
    .i_clk(ab_clk), .i_mrdy(ab_mrdy), .i_data(ab_d), .i_srdy(ab_srdy));

  int sa = 0, sb = 0, ra = 0, rb = 0, streak = 0, best = 0;
  always @(posedge clka) if (rst_n) begin
    if (a_txv && a_txr) sa <= sa + 1;
    if (a_rxv && a_rxr) begin
      checks++;
      if (a_rxd !== 32'hB000_0000 + ra) failures++;
      ra <= ra + 1;
    end
    #1;
    a_txv = sa < N; a_txd = 32'hA000_0000 + sa;
    a_rxr = $urandom_range(2) != 0;
  end
  always @(posedge clkb) if (rst_n) begin
    if (b_txv && b_txr) sb <= sb + 1;
    if (b_rxv && b_rxr) begin
      checks++;
      if (b_rxd !== 32'hA000_0000 + rb) failures++;
      rb <= rb + 1;
    end
    #1;
    b_txv = sb < N; b_txd = 32'hB000_0000 + sb;
    b_rxr = 1;
  end
  // longest run of consecutive link transfers A -> B
  always @(posedge lclk) begin
    if (ab_mrdy && ab_srdy) streak <= streak + 1; else streak <= 0;
    if (streak > best) best <= streak;
  end

  initial begin
    a_txv = 0; a_rxr = 0; b_txv = 0; b_rxr = 0; a_txd = 0; b_txd = 0;
    #30 rst_n = 1;
    wait (ra == N && rb == N);
    checks++;
    if (best < 4) begin failures++; $display("no burst streaming seen, best run %0d", best); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
