// vc_slave: VC Bus slave on the PE board of a Processing VS. It turns VC Bus
// transactions addressed to this FPGA into FIB accesses to the hwNet and
// into writes of the control words / reads of the status words.
//
// A transaction: the initiator raises req and sel and presents the address
// word with frame = 1 (target ID, initiator ID, mode code, burst length in
// the user byte, 0 meaning 256 words); the slave accepts it only when the
// target ID equals my_id. The second word is the start word address inside
// the FPGA. Then the burst: WRITE - each word from the initiator is written
// over the FIB (address incremented per word); READ - each word is read over
// the FIB and returned on ad_s; CMD - words go to the control registers
// ctrl[start..]; STTS - the status inputs stts[start..] are returned. A word
// moves on every clock edge at which mrdy and srdy are both high; srdy is a
// registered output. After the last word the slave is idle again (a new
// transaction is recognised only by its framed address word).
// The FIB has one access in flight, so a WRITE/READ word costs the FIB
// latency plus two cycles; CMD/STTS words move one per cycle.
// The mode names WRITE/READ/CMD/STTS and the address word fields follow the
// source design; the codes, the burst length field and the second address
// word are this design's own.
module vc_slave
  import vc_pkg::*;
  import fib_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  vc_id_t      my_id,
  input  vc_sig_t     bus_i,
  output vc_sig_t     bus_o,
  output fib_m2s_t    fib_o,
  input  fib_s2m_t    fib_i,
  output logic [31:0] ctrl [4],
  input  logic [31:0] stts [4]
);
  typedef enum logic [3:0] {
    S_IDLE, S_ADDR, S_FADDR, S_WDATA, S_WFIB, S_CDATA, S_RFIB, S_RDATA, S_RSTTS, S_DONE
  } state_t;
  state_t st;
  logic        srdy;
  logic [31:0] ad_s;
  logic [7:0]  mode;
  logic [8:0]  cnt;
  logic [31:0] faddr, wdata;
  logic        xfer;
  vc_addr_t    aw;

  assign aw   = vc_addr_t'(bus_i.ad_m);
  assign xfer = bus_i.sel && bus_i.mrdy && srdy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; srdy <= 1'b0; ad_s <= '0; mode <= '0; cnt <= '0;
      faddr <= '0; wdata <= '0;
      for (int i = 0; i < 4; i++) ctrl[i] <= '0;
    end else begin
      case (st)
        S_IDLE: if (bus_i.req && bus_i.sel && bus_i.frame && bus_i.mrdy && !bus_i.busmode &&
                    aw.target == my_id) begin
          st <= S_ADDR; srdy <= 1'b1;
        end
        S_ADDR: if (xfer) begin
          mode <= aw.mode;
          cnt  <= (aw.user == 0) ? 9'd256 : {1'b0, aw.user};
          st   <= S_FADDR;
        end else if (!bus_i.req) begin
          st <= S_IDLE; srdy <= 1'b0;
        end
        S_FADDR: if (xfer) begin
          faddr <= bus_i.ad_m;
          case (mode)
            VC_WRITE: st <= S_WDATA;
            VC_CMD:   st <= S_CDATA;
            VC_READ:  begin st <= S_RFIB; srdy <= 1'b0; end
            VC_STTS:  begin st <= S_RSTTS; ad_s <= stts[bus_i.ad_m[1:0]]; end
            default:  begin st <= S_DONE; srdy <= 1'b0; end
          endcase
        end
        S_WDATA: if (xfer) begin
          wdata <= bus_i.ad_m; srdy <= 1'b0; st <= S_WFIB;
        end
        S_WFIB: if (fib_i.srdy) begin
          faddr <= faddr + 1;
          cnt   <= cnt - 1'b1;
          if (cnt == 9'd1) st <= S_DONE;
          else begin st <= S_WDATA; srdy <= 1'b1; end
        end
        S_CDATA: if (xfer) begin
          ctrl[faddr[1:0]] <= bus_i.ad_m;
          faddr <= faddr + 1;
          cnt   <= cnt - 1'b1;
          if (cnt == 9'd1) begin st <= S_DONE; srdy <= 1'b0; end
        end
        S_RFIB: if (fib_i.srdy) begin
          ad_s <= fib_i.dr; srdy <= 1'b1; st <= S_RDATA;
        end
        S_RDATA: if (xfer) begin
          srdy  <= 1'b0; ad_s <= '0;
          faddr <= faddr + 1;
          cnt   <= cnt - 1'b1;
          st    <= (cnt == 9'd1) ? S_DONE : S_RFIB;
        end
        S_RSTTS: if (xfer) begin
          faddr <= faddr + 1;
          ad_s  <= stts[2'(faddr[1:0] + 2'd1)];
          cnt   <= cnt - 1'b1;
          if (cnt == 9'd1) begin st <= S_DONE; srdy <= 1'b0; ad_s <= '0; end
        end
        S_DONE: st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    fib_o = FIB_M2S_IDLE;
    fib_o.a  = faddr;
    fib_o.dw = wdata;
    fib_o.be = 4'hF;
    if (st == S_WFIB) begin fib_o.sel = 1'b1; fib_o.mrdy = 1'b1; fib_o.we = 1'b1; end
    if (st == S_RFIB) begin fib_o.sel = 1'b1; fib_o.mrdy = 1'b1; end
  end

  always_comb begin
    bus_o = VC_IDLE;
    bus_o.srdy = srdy;
    bus_o.ad_s = ad_s;
  end
endmodule
