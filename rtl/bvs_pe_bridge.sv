// bvs_pe_bridge: bridge circuit on the PE board of a Bridge VS
// (PEConfigBridge and PEDATABridge), the hub between the host side and up to
// four rows of Processing VSs.
//
// Ports: 0 SIMDATA (own Sub Board, toward the host), 1..4 the rows reached
// through the Up, Down, Right and Left connectors (row ID 0..3).
// Data mode: a 5-way round-robin arbiter grants the VC Bus to one requester
// (host side or a row) and answers it with ACK for as long as it holds REQ.
// The granted initiator's address word selects the target port: from the
// host side, the row given by the target ID; from a row, the target's row if
// the target is a PVS behind this Bridge VS, otherwise the host side. The
// route is latched at the address word and released with REQ.
// Configuration mode (only from the host side, while no data transaction
// holds the bus): the address bytes are broadcast to every row and
// captured; for stages PVS-Sub and PVS-PE the bitstream then goes to every
// row whose row ID matches under the don't-care mask, so rows are configured
// in parallel. The 5-way arbiter and the routing by address follow the
// source design; round-robin order and the mask are this design's choices.
//
// Lint note: a circular-logic warning (UNOPTFLAT) is reported on the bus
// structs here. It is not a real loop. One vc_sig_t value carries both
// directions, master fields one way and target fields back, so the
// forward fields and the return fields of the same struct look like one
// signal that feeds itself. No bit depends on itself through logic.
module bvs_pe_bridge
  import vc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] my_bvs,
  input  vc_sig_t    port_i [5],
  output vc_sig_t    port_o [5]
);
  vc_sig_t xout [5];
  logic [2:0] gnt, last, init_c;
  logic       gnt_v;
  logic       busy;
  logic [4:0] dmask_q, dmask_c;
  logic       latch;
  logic [7:0] cfg_addr [3];
  logic [1:0] cfg_cnt;
  logic       cfg_busy;
  vc_addr_t   aw;
  vc_id_t     cfg_tgt, cfg_mask;

  assign cfg_tgt  = vc_id_t'(cfg_addr[0]);
  assign cfg_mask = vc_id_t'(cfg_addr[2]);

  // round-robin pick among the requesters, starting after the last grant
  function automatic logic [2:0] rr_pick(logic [4:0] r, logic [2:0] after);
    for (int k = 1; k <= 5; k++) begin
      automatic int c = (int'(after) + k) % 5;
      if (r[c]) return 3'(c);
    end
    return 3'd0;
  endfunction

  logic [4:0] reqs;
  always_comb for (int p = 0; p < 5; p++) reqs[p] = port_i[p].req && !port_i[p].busmode;

  always_comb begin
    aw = vc_addr_t'(port_i[gnt].ad_m);
    init_c = gnt; dmask_c = dmask_q; latch = 1'b0;
    if (cfg_busy || (!gnt_v && port_i[0].req && port_i[0].busmode)) begin
      init_c = 3'd0;
      if (!cfg_busy) begin
        dmask_c = '0;
        if (port_i[0].frame) dmask_c = 5'b11110;
        else if (cfg_cnt == 2'd3) begin
          latch = 1'b1;
          for (int r = 0; r < 4; r++)
            dmask_c[r+1] = (cfg_addr[1] == CFG_PVS_SUB || cfg_addr[1] == CFG_PVS_PE) &&
                           (((2'(r) ^ cfg_tgt.row) & ~cfg_mask.row) == 2'b00);
        end
      end
    end else if (gnt_v && !busy) begin
      dmask_c = '0;
      if (port_i[gnt].frame) begin
        if (gnt == 3'd0)
          dmask_c[int'(aw.target.row) + 1] = 1'b1;
        else if (aw.target == VC_HOST_ID || aw.target.bvs != my_bvs)
          dmask_c[0] = 1'b1;
        else
          dmask_c[int'(aw.target.row) + 1] = 1'b1;
        for (int p = 0; p < 5; p++)
          if (dmask_c[p] && port_i[gnt].mrdy && port_i[p].srdy) latch = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt <= '0; gnt_v <= 1'b0; last <= 3'd4; busy <= 1'b0; dmask_q <= '0;
      cfg_busy <= 1'b0; cfg_cnt <= '0;
      for (int i = 0; i < 3; i++) cfg_addr[i] <= '0;
    end else begin
      // configuration traffic
      if (!cfg_busy && !gnt_v && port_i[0].req && port_i[0].busmode && port_i[0].frame && cfg_cnt != 2'd3) begin
        cfg_addr[cfg_cnt] <= port_i[0].ad_m[7:0];
        cfg_cnt <= cfg_cnt + 1'b1;
      end
      if (!cfg_busy && !gnt_v && latch) begin
        cfg_busy <= 1'b1; dmask_q <= dmask_c;
      end else if (cfg_busy && !port_i[0].req) begin
        cfg_busy <= 1'b0; cfg_cnt <= '0; dmask_q <= '0;
      end
      // data traffic: arbitration and routing
      if (!gnt_v) begin
        if (reqs != 0 && !cfg_busy && !(port_i[0].req && port_i[0].busmode)) begin
          gnt <= rr_pick(reqs, last); gnt_v <= 1'b1;
        end
      end else begin
        if (!busy && latch) begin
          busy <= 1'b1; dmask_q <= dmask_c;
        end
        if (!port_i[gnt].req) begin
          gnt_v <= 1'b0; busy <= 1'b0; last <= gnt; dmask_q <= '0;
        end
      end
    end
  end

  vc_xbar #(.NP(5)) u_xbar (.in(port_i), .active(gnt_v || cfg_busy || port_i[0].busmode),
                            .init(init_c), .dmask(dmask_c), .out(xout));
  always_comb begin
    for (int p = 0; p < 5; p++) begin
      port_o[p] = xout[p];
      port_o[p].ack = gnt_v && (gnt == 3'(p));
    end
  end
endmodule
