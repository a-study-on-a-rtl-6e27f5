// tb_async_fifo: writer and reader on unrelated clocks with random stalls;
// checks that every word arrives once, in order, that nothing is written
// while full is reported, and that full and empty are both reached.
module tb_async_fifo;
  localparam int N = 500;
  logic wclk = 0, rclk = 0, rst_n = 0;
  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;
  int checks = 0, failures = 0;
  logic winc, rinc, wfull, rempty;
  logic [31:0] wdata, rdata;
  int nw = 0, nr = 0, saw_full = 0, saw_empty = 0;
  bit slow_reader = 1;
  async_fifo #(.W(32), .AW(3)) dut (.rst_n, .wclk, .winc, .wdata, .wfull, .rclk, .rinc, .rdata, .rempty);

  always @(posedge wclk) if (rst_n) begin
    if (winc && !wfull) nw <= nw + 1;
    if (wfull) saw_full++;
    #1;
    winc  = (nw < N) && ($urandom_range(3) != 0);
    wdata = 32'hA500_0000 + nw;
  end
  always @(posedge rclk) if (rst_n) begin
    if (rinc && !rempty) begin
      checks++;
      if (rdata !== 32'hA500_0000 + nr) begin
        failures++;
        if (failures < 10) $display("got %h expected %h", rdata, 32'hA500_0000 + nr);
      end
      nr <= nr + 1;
    end
    if (rempty) saw_empty++;
    #1;
    if (nr > N / 2) slow_reader = 0;
    rinc = slow_reader ? ($urandom_range(7) == 0) : ($urandom_range(3) != 0);
  end

  initial begin
    winc = 0; rinc = 0; wdata = 0;
    #20 rst_n = 1;
    wait (nr == N);
    checks += 2;
    if (saw_full == 0) begin failures++; $display("never full"); end
    if (saw_empty == 0) begin failures++; $display("never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
