// selectmap_config: configuration engine of the hwModule board
// (FIFOforSelectMap plus the SelectMAP sequencer). It loads a bitstream,
// supplied by the host as a byte stream, into every FPGA selected by a
// configuration address, through the VC Bus in configuration mode.
//
// Sequence: busmode = 1 and req; three address bytes with frame (target ID,
// stage, don't-care mask), one per clock; wait for ack; sel; PROG_B low for
// PROG_LEN clocks; wait until INIT_B (wired-AND of the selected FPGAs) is
// high again; then CS_B and RDWR_B low and one byte per CCLK period, CCLK
// being clk divided by 2*CCLK_DIV (the byte is stable across the rising
// edge); after the last byte CCLK keeps running until DONE (wired-AND) rises,
// or error is set after DONE_WAIT periods. Then req drops and done pulses.
// INIT_B low during the data phase (a CRC error in a real device) also ends
// the run with error. The bytes come from a FIFO of 2**FIFO_AW entries
// written by the host (byte_wr/byte_data/byte_full).
// The order of the SelectMAP signals follows the source design's
// configuration timing; PROG_LEN, CCLK_DIV, the FIFO depth and the error
// handling are this design's choices.
module selectmap_config
  import vc_pkg::*;
#(
  parameter int CCLK_DIV  = 2,
  parameter int PROG_LEN  = 4,
  parameter int DONE_WAIT = 64,
  parameter int FIFO_AW   = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        start,
  input  logic [7:0]  cfg_target,
  input  logic [7:0]  cfg_stage,
  input  logic [7:0]  cfg_mask,
  input  logic [31:0] nbytes,
  output logic        busy,
  output logic        done,
  output logic        error,
  // bitstream bytes from the host
  input  logic        byte_wr,
  input  logic [7:0]  byte_data,
  output logic        byte_full,
  // VC Bus
  output vc_sig_t     bus_o,
  input  vc_sig_t     bus_i
);
  typedef enum logic [3:0] {
    C_IDLE, C_ADDR, C_WACK, C_PROG, C_WINIT, C_DATA, C_WDONE, C_END
  } state_t;
  state_t st;
  logic [1:0]  abyte;
  logic [7:0]  addr [3];
  logic [31:0] left, tmr;
  logic        cclk, have;
  logic [7:0]  dbyte;
  logic        f_empty, f_rinc;
  logic [7:0]  f_rdata;
  logic [FIFO_AW:0] f_count;   // fill level, not needed by the sequencer

  sync_fifo #(.W(8), .AW(FIFO_AW)) u_fifo (
    .clk, .rst_n, .winc(byte_wr), .wdata(byte_data), .full(byte_full),
    .rinc(f_rinc), .rdata(f_rdata), .empty(f_empty), .count(f_count));

  // CCLK phase: tmr counts clocks within a half period
  logic half_end;
  assign half_end = (tmr == 32'(CCLK_DIV - 1));
  // a byte is taken from the FIFO while CCLK is low; it is sampled on the rise
  logic next_ok;
  assign next_ok = half_end && cclk && left > 32'd1 && !f_empty;
  assign f_rinc  = (st == C_DATA) && (!have ? !f_empty : next_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; abyte <= '0; left <= '0; tmr <= '0; cclk <= 1'b0; dbyte <= '0; have <= 1'b0;
      busy <= 1'b0; done <= 1'b0; error <= 1'b0;
      for (int i = 0; i < 3; i++) addr[i] <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        C_IDLE: if (start) begin
          addr[0] <= cfg_target; addr[1] <= cfg_stage; addr[2] <= cfg_mask;
          left <= nbytes; abyte <= '0; busy <= 1'b1; error <= 1'b0; st <= C_ADDR;
        end
        C_ADDR: begin
          abyte <= abyte + 1'b1;
          if (abyte == 2'd2) st <= C_WACK;
        end
        C_WACK: if (bus_i.ack) begin st <= C_PROG; tmr <= '0; end
        C_PROG: begin
          tmr <= tmr + 1;
          if (tmr == 32'(PROG_LEN - 1)) begin st <= C_WINIT; tmr <= '0; end
        end
        C_WINIT: begin
          tmr <= tmr + 1;
          if (tmr >= 32'd2 && bus_i.init_b) begin
            st <= C_DATA; tmr <= '0; cclk <= 1'b0; have <= 1'b0;
          end
        end
        C_DATA: begin
          if (!have) begin
            if (!f_empty) begin dbyte <= f_rdata; have <= 1'b1; tmr <= '0; cclk <= 1'b0; end
          end else begin
            tmr <= half_end ? '0 : tmr + 1;
            if (half_end) begin
              cclk <= !cclk;
              if (cclk) begin                      // falling CCLK: byte consumed
                have <= next_ok;                   // next byte, if ready, at once
                if (next_ok) dbyte <= f_rdata;
                left <= left - 1;
                if (left == 32'd1) begin st <= C_WDONE; have <= 1'b1; end
              end
            end
          end
          if (!bus_i.init_b) begin error <= 1'b1; st <= C_END; end
        end
        C_WDONE: begin                             // extra CCLK periods until DONE
          tmr <= half_end ? '0 : tmr + 1;
          if (half_end) begin
            cclk <= !cclk;
            if (cclk) left <= left + 1;
          end
          if (bus_i.done) st <= C_END;
          else if (left == 32'(DONE_WAIT)) begin error <= 1'b1; st <= C_END; end
        end
        C_END: begin
          busy <= 1'b0; done <= 1'b1; cclk <= 1'b0; st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    bus_o = VC_IDLE;
    bus_o.busmode = (st != C_IDLE) && (st != C_END);
    bus_o.req     = bus_o.busmode;
    bus_o.frame   = (st == C_ADDR);
    bus_o.sel     = (st == C_PROG || st == C_WINIT || st == C_DATA || st == C_WDONE);
    bus_o.prog_b  = (st != C_PROG);
    bus_o.cs_b    = !(st == C_DATA || st == C_WDONE);
    bus_o.rdwr_b  = bus_o.cs_b;
    bus_o.cclk    = cclk;
    bus_o.mrdy    = (st == C_DATA);
    bus_o.ad_m    = (st == C_ADDR) ? {24'd0, addr[abyte]} : {24'd0, dbyte};
  end
endmodule
