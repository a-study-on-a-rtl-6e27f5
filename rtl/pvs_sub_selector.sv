// pvs_sub_selector: the selector circuit on the Sub Board of a Processing VS
// (SwitchVC and ConfigurationSwitch). Sub Boards of one row are chained
// front to back; each also connects to its own PE board.
//
// Ports: 0 FRONT (toward the host), 1 BACK (next Sub Board in the row),
// 2 PE data (the VC Bus slave of the own PE board), 3 PE configuration (the
// SelectMAP pins of the own PE FPGA).
// Data mode: a transaction started from FRONT is steered by the target ID of
// its address word: to the own PE board when row and position match my_id,
// otherwise on to BACK. The route is latched when the address word is
// accepted and held until the initiator drops REQ. Transactions started by
// the own PE board or by a board further back go to FRONT.
// Configuration mode: the three address bytes (target ID, stage, don't-care
// mask) are broadcast to BACK and captured. Stage PVS-Sub passes the
// bitstream on to BACK (the next, unconfigured Sub Board); stage PVS-PE
// passes it to BACK and, when the ID matches under the mask, also to the own
// PE FPGA, so any set of PE boards can be configured in parallel. The FRONT
// / BACK / PE switching follows the source design; the address byte layout,
// the mask and the latching rules are this design's own.
//
// Lint note: a circular-logic warning (UNOPTFLAT) is reported on the bus
// structs here. It is not a real loop. One vc_sig_t value carries both
// directions, master fields one way and target fields back, so the
// forward fields and the return fields of the same struct look like one
// signal that feeds itself. No bit depends on itself through logic.
module pvs_sub_selector
  import vc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  vc_id_t  my_id,
  input  vc_sig_t front_i,
  output vc_sig_t front_o,
  input  vc_sig_t back_i,
  output vc_sig_t back_o,
  input  vc_sig_t pe_i,
  output vc_sig_t pe_o,
  input  vc_sig_t cfg_i,
  output vc_sig_t cfg_o
);
  localparam logic [1:0] FRONT = 2'd0, BACK = 2'd1, PE = 2'd2, CFG = 2'd3;
  vc_sig_t xin [4], xout [4];
  logic busy;
  logic [1:0] init_q, init_c;
  logic [3:0] dmask_q, dmask_c;
  logic latch;
  logic [7:0] cfg_addr [3];
  logic [1:0] cfg_cnt;
  vc_addr_t aw;
  vc_id_t   cfg_mask, cfg_tgt;
  logic     cfg_hit;

  assign xin[FRONT] = front_i;
  assign xin[BACK]  = back_i;
  assign xin[PE]    = pe_i;
  assign xin[CFG]   = cfg_i;
  assign aw = vc_addr_t'(front_i.ad_m);
  assign cfg_tgt  = vc_id_t'(cfg_addr[0]);
  assign cfg_mask = vc_id_t'(cfg_addr[2]) | 8'hC0;        // BVS bits decided upstream
  assign cfg_hit  = id_match(my_id, cfg_tgt, cfg_mask);

  always_comb begin
    init_c = init_q; dmask_c = dmask_q; latch = 1'b0;
    if (!busy) begin
      init_c = FRONT; dmask_c = '0;
      if (front_i.req) begin
        if (front_i.busmode) begin
          if (front_i.frame) dmask_c = 4'b0010;
          else if (cfg_cnt == 2'd3) begin
            latch = 1'b1;
            dmask_c = (cfg_addr[1] == CFG_PVS_PE) ? {cfg_hit, 1'b0, 1'b1, 1'b0} : 4'b0010;
          end
        end else if (front_i.frame) begin
          dmask_c = id_match(my_id, aw.target, 8'hC0) ? 4'b0100 : 4'b0010;
          latch = front_i.mrdy && (dmask_c[PE] ? pe_i.srdy : back_i.srdy);
        end
      end else if (pe_i.req) begin
        init_c = PE; dmask_c = 4'b0001; latch = 1'b1;
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
  assign front_o = xout[FRONT];
  assign back_o  = xout[BACK];
  assign pe_o    = xout[PE];
  assign cfg_o   = xout[CFG];
endmodule
