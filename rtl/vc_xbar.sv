// vc_xbar: the switch fabric shared by the VC Bus bridges.
//
// Connects one initiator port to a set of target ports (dmask). Initiator
// signals of in[init] are copied to out[p] of every target p; target signals
// come back to out[init]: srdy, init_b and done are ANDed over the targets
// (the SelectMAP INIT_B and DONE lines are wired-AND), ad_s is ORed (idle
// targets drive zero). ack is left to the bridge (arbitration). Ports that
// are neither initiator nor target see VC_IDLE. Purely combinational.
//
// Lint note: a circular-logic warning (UNOPTFLAT) is reported on the bus
// structs here. It is not a real loop. One vc_sig_t value carries both
// directions, master fields one way and target fields back, so the
// forward fields and the return fields of the same struct look like one
// signal that feeds itself. No bit depends on itself through logic.
module vc_xbar
  import vc_pkg::*;
#(
  parameter int NP = 3
) (
  input  vc_sig_t          in  [NP],
  input  logic             active,
  input  logic [$clog2(NP)-1:0] init,
  input  logic [NP-1:0]    dmask,
  output vc_sig_t          out [NP]
);
  always_comb begin
    vc_sig_t back;
    back = VC_IDLE;
    back.srdy = 1'b1;
    for (int p = 0; p < NP; p++) begin
      out[p] = VC_IDLE;
      if (active && dmask[p]) begin
        out[p].busmode = in[init].busmode;
        out[p].req     = in[init].req;
        out[p].sel     = in[init].sel;
        out[p].frame   = in[init].frame;
        out[p].mrdy    = in[init].mrdy;
        out[p].ad_m    = in[init].ad_m;
        out[p].cclk    = in[init].cclk;
        out[p].prog_b  = in[init].prog_b;
        out[p].cs_b    = in[init].cs_b;
        out[p].rdwr_b  = in[init].rdwr_b;
        back.srdy   &= in[p].srdy;
        back.init_b &= in[p].init_b;
        back.done   &= in[p].done;
        back.ad_s   |= in[p].ad_s;
        back.ack    |= in[p].ack;
      end
    end
    if (active && dmask != 0) begin
      out[init].srdy   = back.srdy;
      out[init].init_b = back.init_b;
      out[init].done   = back.done;
      out[init].ad_s   = back.ad_s;
      out[init].ack    = back.ack;
    end
  end
endmodule
