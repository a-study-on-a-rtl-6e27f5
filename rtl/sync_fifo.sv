// sync_fifo: single-clock FIFO, 2**AW entries of W bits, first-word
// fall-through (rdata shows the oldest entry whenever empty is low). Used as
// the byte buffer between the host and the SelectMAP configuration engine.
// A write when full and a read when empty are ignored. count gives the fill
// level.
module sync_fifo #(
  parameter int W  = 8,
  parameter int AW = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          winc,
  input  logic [W-1:0]  wdata,
  output logic          full,
  input  logic          rinc,
  output logic [W-1:0]  rdata,
  output logic          empty,
  output logic [AW:0]   count
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wp, rp;

  assign count = wp - rp;
  assign full  = (count == (AW+1)'(2**AW));
  assign empty = (count == '0);
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk) if (winc && !full) mem[wp[AW-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0;
    end else begin
      if (winc && !full) wp <= wp + 1'b1;
      if (rinc && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
