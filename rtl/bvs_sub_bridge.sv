// bvs_sub_bridge: bridge circuit on the Sub Board of a Bridge VS
// (SubConfigBridge and SubDATABridge). Bridge VS Sub Boards are chained
// from the host's board; each connects to its own PE board.
//
// Ports: 0 FRONT (toward the host), 1 BACK (next Bridge VS Sub Board),
// 2 SIMDATA (the bridge circuit of the own PE board), 3 PE configuration
// (the SelectMAP pins of the own PE FPGA).
// Data mode: a transaction from FRONT goes to SIMDATA when the BVS field of
// the target ID equals my_bvs, otherwise to BACK; the route is latched at the
// address word and held until REQ drops. Transactions from SIMDATA or BACK
// go to FRONT.
// Configuration mode: the three address bytes are broadcast to BACK and
// SIMDATA and captured. Stage BVS-Sub: always to BACK (configures the next
// Sub Board in the chain). Stage BVS-PE: to the own PE FPGA when the BVS
// matches, else BACK. Stages PVS-Sub and PVS-PE: to SIMDATA when the BVS
// matches, else BACK. In configuration mode this board also answers REQ with
// ACK itself, since during configuration no other initiator is active and
// the arbiter behind it may not be configured yet (this design's choice).
//
// Lint note: a circular-logic warning (UNOPTFLAT) is reported on the bus
// structs here. It is not a real loop. One vc_sig_t value carries both
// directions, master fields one way and target fields back, so the
// forward fields and the return fields of the same struct look like one
// signal that feeds itself. No bit depends on itself through logic.
module bvs_sub_bridge
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] my_bvs,
  input  vc_sig_t    front_i,
  output vc_sig_t    front_o,
  input  vc_sig_t    back_i,
  output vc_sig_t    back_o,
  input  vc_sig_t    sim_i,
  output vc_sig_t    sim_o,
  input  vc_sig_t    cfg_i,
  output vc_sig_t    cfg_o
);
  localparam logic [1:0] FRONT = 2'd0, BACK = 2'd1, SIM = 2'd2, CFG = 2'd3;
  vc_sig_t xin [4], xout [4];
  logic busy;
  logic [1:0] init_q, init_c;
  logic [3:0] dmask_q, dmask_c;
  logic latch;
  logic [7:0] cfg_addr [3];
  logic [1:0] cfg_cnt;
  vc_addr_t aw;
  vc_id_t   cfg_tgt, cfg_mask;
  logic     hit;

  assign xin[FRONT] = front_i;
  assign xin[BACK]  = back_i;
  assign xin[SIM]   = sim_i;
  assign xin[CFG]   = cfg_i;
  assign aw = vc_addr_t'(front_i.ad_m);
  assign cfg_tgt  = vc_id_t'(cfg_addr[0]);
  assign cfg_mask = vc_id_t'(cfg_addr[2]);
  assign hit = ((cfg_tgt.bvs ^ my_bvs) & ~cfg_mask.bvs) == 2'b00;

  always_comb begin
    init_c = init_q; dmask_c = dmask_q; latch = 1'b0;
    if (!busy) begin
      init_c = FRONT; dmask_c = '0;
      if (front_i.req) begin
        if (front_i.busmode) begin
          if (front_i.frame) dmask_c = 4'b0110;
          else if (cfg_cnt == 2'd3) begin
            latch = 1'b1;
            case (cfg_addr[1])
              CFG_BVS_PE:               dmask_c = hit ? 4'b1000 : 4'b0010;
              CFG_PVS_SUB, CFG_PVS_PE:  dmask_c = hit ? 4'b0100 : 4'b0010;
              default:                  dmask_c = 4'b0010;
            endcase
          end
        end else if (front_i.frame) begin
          dmask_c = (aw.target.bvs == my_bvs) ? 4'b0100 : 4'b0010;
          latch = front_i.mrdy && (dmask_c[SIM] ? sim_i.srdy : back_i.srdy);
        end
      end else if (sim_i.req) begin
        init_c = SIM; dmask_c = 4'b0001; latch = 1'b1;
      end else if (back_i.req) begin
        init_c = BACK; dmask_c = 4'b0001; latch = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; init_q <= '0; dmask_q <= '0; cfg_cnt <= '0;
      for (int i = 0; i < 3; i++) cfg_addr[i] <= '0;
    end else begin
      if (!busy && front_i.req && front_i.busmode && front_i.frame && cfg_cnt != 2'd3) begin
        cfg_addr[cfg_cnt] <= front_i.ad_m[7:0];
        cfg_cnt <= cfg_cnt + 1'b1;
      end
      if (latch) begin
        busy <= 1'b1; init_q <= init_c; dmask_q <= dmask_c;
      end else if (busy && !xin[init_q].req) begin
        busy <= 1'b0; cfg_cnt <= '0;
      end
    end
  end

  vc_xbar #(.NP(4)) u_xbar (.in(xin), .active(1'b1), .init(init_c), .dmask(dmask_c), .out(xout));

  always_comb begin
    front_o = xout[FRONT];
    if (front_i.req && front_i.busmode && init_c == FRONT) front_o.ack = 1'b1;
  end
  assign back_o = xout[BACK];
  assign sim_o  = xout[SIM];
  assign cfg_o  = xout[CFG];
endmodule
