// vibus_port: one point-to-point VI Bus module, linking this FPGA to the
// adjacent FPGA on one of its six connectors.
//
// Transmit element: words from the local stream (tx_valid/tx_data/tx_ready,
// local clock clk) enter an asynchronous FIFO and leave on the link in the
// link clock domain (link_clk). The link is source-synchronous and simplex:
// the sender drives CLK (o_clk), MRDY and 32-bit DATA, the receiver answers
// with SRDY, and one word passes on every rising CLK edge at which MRDY and
// SRDY are both high (so a burst streams one word per cycle).
// Receive element: the incoming CLK/MRDY/DATA write a second asynchronous
// FIFO clocked by the incoming CLK; SRDY is "FIFO not full" in that same
// clock; the local side reads rx_valid/rx_data/rx_ready on clk.
// The two directions use separate wires here; in the exchange scheme only one
// of them carries data at a time, as on a half-duplex connector. FIFO depth
// (2**AW words) is this design's choice.
module vibus_port #(
  parameter int AW = 4
) (
  input  logic        rst_n,
  input  logic        clk,        // local (hwNet) clock
  input  logic        link_clk,   // VI Bus transmit clock
  // local transmit stream
  input  logic        tx_valid,
  input  logic [31:0] tx_data,
  output logic        tx_ready,
  // local receive stream
  output logic        rx_valid,
  output logic [31:0] rx_data,
  input  logic        rx_ready,
  // outgoing link
  output logic        o_clk,
  output logic        o_mrdy,
  output logic [31:0] o_data,
  input  logic        o_srdy,
  // incoming link
  input  logic        i_clk,
  input  logic        i_mrdy,
  input  logic [31:0] i_data,
  output logic        i_srdy
);
  logic tx_full, tx_empty, rx_full, rx_empty;

  async_fifo #(.W(32), .AW(AW)) u_txf (
    .rst_n, .wclk(clk), .winc(tx_valid), .wdata(tx_data), .wfull(tx_full),
    .rclk(link_clk), .rinc(o_srdy), .rdata(o_data), .rempty(tx_empty));
  assign tx_ready = !tx_full;
  assign o_mrdy   = !tx_empty;
  assign o_clk    = link_clk;

  async_fifo #(.W(32), .AW(AW)) u_rxf (
    .rst_n, .wclk(i_clk), .winc(i_mrdy), .wdata(i_data), .wfull(rx_full),
    .rclk(clk), .rinc(rx_ready), .rdata(rx_data), .rempty(rx_empty));
  assign i_srdy   = !rx_full;
  assign rx_valid = !rx_empty;
endmodule
