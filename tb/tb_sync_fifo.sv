// tb_sync_fifo: random pushes and pops (including writes when full and reads
// when empty) against a queue model; checks data order, empty/full and count.
module tb_sync_fifo;
  localparam int W = 8, AW = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic winc = 0, rinc = 0, full, empty;
  logic [W-1:0] wdata = 0, rdata;
  logic [AW:0] count;
  sync_fifo #(.W(W), .AW(AW)) dut (.*);
  logic [W-1:0] q [$];
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int phase;
      phase = (i / 300) % 3;    // fill-biased, drain-biased, balanced
      winc = $urandom_range(9, 0) < (phase == 0 ? 8 : phase == 1 ? 2 : 5);
      rinc = $urandom_range(9, 0) < (phase == 0 ? 2 : phase == 1 ? 8 : 5);
      wdata = W'($urandom);
      #1;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 2**AW) || count != q.size()) begin
        failures++; $display("flags: empty %b full %b count %0d model %0d", empty, full, count, q.size());
      end
      if (!empty) begin
        checks++;
        if (rdata !== q[0]) begin failures++; $display("data %h expected %h", rdata, q[0]); end
      end
      @(posedge clk);
      if (rinc && q.size() > 0) void'(q.pop_front());
      if (winc && q.size() < 2**AW + (rinc && q.size() > 0 ? 0 : 0) && !full) q.push_back(wdata);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
