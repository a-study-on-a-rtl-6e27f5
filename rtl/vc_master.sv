// vc_master: VC Bus initiator (data mode) of the host's hwModule board. It
// executes one command at a time from the host side: a burst WRITE, READ,
// CMD (control words) or STTS (status words) to one target FPGA.
//
// Bus sequence: raise req together with frame and the address word (target,
// own ID as initiator, mode code, burst length); raise sel once the arbiter
// answers with ack; the address word moves on the first edge with mrdy, sel
// and srdy high, then the second word (word address inside the target), then
// the burst words. Writes take data from the wr_* stream (mrdy follows
// wr_valid), reads deliver each word on rd_valid/rd_data (the master always
// accepts). After the last word req and sel drop for one cycle and done
// pulses. cmd_len is 1..256 (256 is sent as 0).
// The REQ/ACK/SEL/FRAME/MRDY/SRDY handshake follows the source design; the
// two-word header and the host-side command interface are this design's.
module vc_master
  import vc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  vc_id_t      my_id,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [7:0]  cmd_mode,
  input  vc_id_t      cmd_target,
  input  logic [31:0] cmd_addr,
  input  logic [8:0]  cmd_len,
  output logic        done,
  // write data stream
  input  logic        wr_valid,
  input  logic [31:0] wr_data,
  output logic        wr_ready,
  // read data stream
  output logic        rd_valid,
  output logic [31:0] rd_data,
  // VC Bus
  output vc_sig_t     bus_o,
  input  vc_sig_t     bus_i
);
  typedef enum logic [2:0] {M_IDLE, M_ADDR, M_FADDR, M_WR, M_RD, M_END} state_t;
  state_t st;
  logic        sel_q;
  logic [7:0]  mode;
  vc_id_t      target;
  logic [31:0] faddr;
  logic [8:0]  len, cnt;
  logic        xfer, mrdy;

  assign cmd_ready = (st == M_IDLE);
  assign xfer = sel_q && mrdy && bus_i.srdy;

  always_comb begin
    mrdy = 1'b0;
    case (st)
      M_ADDR, M_FADDR, M_RD: mrdy = 1'b1;
      M_WR: mrdy = wr_valid;
      default: mrdy = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; sel_q <= 1'b0; mode <= '0; target <= '0; faddr <= '0;
      len <= '0; cnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      case (st)
        M_IDLE: if (cmd_valid) begin
          mode <= cmd_mode; target <= cmd_target; faddr <= cmd_addr;
          len <= cmd_len; cnt <= cmd_len; st <= M_ADDR;
        end
        M_ADDR: begin
          if (bus_i.ack) sel_q <= 1'b1;
          if (xfer) st <= M_FADDR;
        end
        M_FADDR: if (xfer) st <= (mode == VC_READ || mode == VC_STTS) ? M_RD : M_WR;
        M_WR, M_RD: if (xfer) begin
          cnt <= cnt - 1'b1;
          if (cnt == 9'd1) st <= M_END;
        end
        M_END: begin
          sel_q <= 1'b0; done <= 1'b1; st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end

  always_comb begin
    vc_addr_t aw;
    aw = '{target: target, initiator: my_id, mode: mode, user: len[7:0]};
    bus_o = VC_IDLE;
    bus_o.req  = (st == M_ADDR || st == M_FADDR || st == M_WR || st == M_RD);
    bus_o.sel  = sel_q && bus_o.req;
    bus_o.frame = (st == M_ADDR);
    bus_o.mrdy = mrdy;
    case (st)
      M_ADDR:  bus_o.ad_m = aw;
      M_FADDR: bus_o.ad_m = faddr;
      M_WR:    bus_o.ad_m = wr_data;
      default: bus_o.ad_m = '0;
    endcase
  end

  assign wr_ready = (st == M_WR) && xfer;
  assign rd_valid = (st == M_RD) && xfer;
  assign rd_data  = bus_i.ad_s;
endmodule
