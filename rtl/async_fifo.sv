// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// The VI Bus and VC Bus modules move words between clock domains (the link
// clock of the sending FPGA and the local clock of the receiver). Pointers
// are counted in binary, passed across in Gray code through two-flop
// synchronisers, and compared in Gray code. rdata shows the oldest word
// whenever rempty is low (first-word fall-through); rinc pops it. wfull and
// rempty are conservative (they may stay asserted a few cycles after the
// other side has moved). DEPTH = 2**AW words. rst_n is asynchronous and must
// be applied to both sides together.
module async_fifo #(
  parameter int W  = 32,
  parameter int AW = 4
) (
  input  logic         rst_n,
  input  logic         wclk,
  input  logic         winc,
  input  logic [W-1:0] wdata,
  output logic         wfull,
  input  logic         rclk,
  input  logic         rinc,
  output logic [W-1:0] rdata,
  output logic         rempty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] b2g(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_n = wbin + (AW+1)'(winc && !wfull);
  assign rbin_n = rbin + (AW+1)'(rinc && !rempty);

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      wbin <= wbin_n;
      wgray <= b2g(wbin_n);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end
  always_ff @(posedge wclk) if (winc && !wfull) mem[wbin[AW-1:0]] <= wdata;
  assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      rbin <= rbin_n;
      rgray <= b2g(rbin_n);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end
  assign rempty = (rgray == wgray_r2);
  assign rdata  = mem[rbin[AW-1:0]];
endmodule
