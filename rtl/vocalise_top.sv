// vocalise_top: a Vocalise system with one Bridge VS and an NBX x NBY x NBZ
// array of Processing VSs running the 3D Poisson solver, plus the host's
// hwModule board.
//
// VC Bus tree: hwModule controller -> Bridge VS Sub Board (bvs_sub_bridge)
// -> Bridge VS PE board (bvs_pe_bridge, 5-way arbiter) -> up to four rows of
// PVS Sub Boards (pvs_sub_selector, chained) -> each PVS PE board. PVS
// (x, y, z) has VC Bus ID {bvs 0, row z*NBY + y, fpga x}. A PVS PE board is
// a vc_slave (host access to the cache, CTRL / STTS words) and a
// poisson_hwnet with NPE processing elements, plus its six VI Bus ports.
// VI Bus: FRONT/BACK link x neighbours, RIGHT/LEFT y neighbours, UP/DOWN z
// neighbours; each link is a pair of simplex channels (vibus_port to
// vibus_port) and a pair of End lines. Sides at the edge of the array have
// no link (link_present = 0); their ghost values are the boundary values
// loaded by the host.
// Configuration: the SelectMAP pins of every FPGA that the VC Bus reaches
// leave the design as ports: pe_cfg_* (the PVS PE FPGAs, stage PVS-PE),
// bvs_cfg_* (the Bridge VS PE FPGA, stage BVS-PE), row_back_* (the back end
// of each row, where stage PVS-Sub bitstreams go) and bvs_back_* (the next
// Bridge VS Sub Board, stage BVS-Sub). The devices' configuration logic is
// outside this design.
// Beside it stands a 2D CIP processing element (the advection application),
// its 69-stage operand/result streams on the cip_* ports.
// One clock drives the whole system here (the VI Bus link clock is tied to
// it); the ports and FIFOs work with separate clocks as well.
// The bus topology, the IDs and the Poisson mapping follow the source
// design; single-BVS scope and array shape are this design's choices.
//
// Lint note: a circular-logic warning (UNOPTFLAT) is reported on the bus
// structs here. It is not a real loop. One vc_sig_t value carries both
// directions, master fields one way and target fields back, so the
// forward fields and the return fields of the same struct look like one
// signal that feeds itself. No bit depends on itself through logic.
module vocalise_top
  import vc_pkg::*;
#(
  parameter int NBX = 2,
  parameter int NBY = 2,
  parameter int NBZ = 2,
  parameter int NX  = 10,
  parameter int NY  = 10,
  parameter int NPE = 6,
  parameter int CCLK_DIV = 2,
  localparam int NPVS = NBX * NBY * NBZ,
  localparam int NROW = NBY * NBZ
) (
  input  logic        clk,
  input  logic        rst_n,
  // host: direct data-mode commands
  input  logic        h_cmd_valid,
  output logic        h_cmd_ready,
  input  logic [7:0]  h_cmd_mode,
  input  vc_id_t      h_cmd_target,
  input  logic [31:0] h_cmd_addr,
  input  logic [8:0]  h_cmd_len,
  output logic        h_cmd_done,
  input  logic        h_wr_valid,
  input  logic [31:0] h_wr_data,
  output logic        h_wr_ready,
  output logic        h_rd_valid,
  output logic [31:0] h_rd_data,
  // host: configuration
  input  logic        cfg_start,
  input  logic [7:0]  cfg_target,
  input  logic [7:0]  cfg_stage,
  input  logic [7:0]  cfg_mask,
  input  logic [31:0] cfg_nbytes,
  output logic        cfg_busy,
  output logic        cfg_done,
  output logic        cfg_error,
  input  logic        cfg_byte_wr,
  input  logic [7:0]  cfg_byte_data,
  output logic        cfg_byte_full,
  // host: hwNet controller
  input  logic        hn_tbl_we,
  input  logic        hn_tbl_sel,
  input  logic [$clog2(NPVS)-1:0] hn_tbl_idx,
  input  logic [1:0]  hn_tbl_word,
  input  logic [31:0] hn_tbl_wdata,
  output logic [31:0] hn_stts_rdata,
  input  logic [$clog2(NPVS):0] hn_n_pvs,
  input  logic        hn_run,
  output logic        hn_busy,
  output logic        hn_done,
  output logic [15:0] hn_polls,
  // SelectMAP / VC Bus ends toward devices outside this design
  output vc_sig_t     pe_cfg_o   [NPVS],
  input  vc_sig_t     pe_cfg_i   [NPVS],
  output vc_sig_t     bvs_cfg_o,
  input  vc_sig_t     bvs_cfg_i,
  output vc_sig_t     bvs_back_o,
  input  vc_sig_t     bvs_back_i,
  output vc_sig_t     row_back_o [NROW],
  input  vc_sig_t     row_back_i [NROW],
  // per-PVS observation
  output logic [5:0]  pvs_stall  [NPVS],   // {.., stalled, done, busy}
  output logic [31:0] pvs_iter   [NPVS],
  // CIP processing element (the advection application), streamed directly
  input  logic        cip_in_valid,
  input  logic [31:0] cip_f_im1,
  input  logic [31:0] cip_f_i,
  input  logic [31:0] cip_g_i,
  input  logic [31:0] cip_g_im1,
  input  logic [31:0] cip_u,
  input  logic [31:0] cip_h_im1,
  input  logic [31:0] cip_h_i,
  output logic        cip_out_valid,
  output logic [31:0] cip_f_new,
  output logic [31:0] cip_g_new,
  output logic [31:0] cip_h_new
);
  // ---------------- CIP processing element ----------------
  // The CIP advection hwNet is a separate application of the same machine;
  // its 2D processing element stands beside the Poisson system with its
  // operand and result streams brought out.
  logic [31:0] cip_h_new_a [1];
  cip_pe #(.NDIM(2)) u_cip (
    .clk, .in_valid(cip_in_valid), .f_im1(cip_f_im1), .f_i(cip_f_i), .g_i(cip_g_i),
    .g_im1(cip_g_im1), .u(cip_u), .h_im1('{cip_h_im1}), .h_i('{cip_h_i}),
    .out_valid(cip_out_valid), .f_new(cip_f_new), .g_new(cip_g_new), .h_new(cip_h_new_a));
  assign cip_h_new = cip_h_new_a[0];

  // ---------------- host board and Bridge VS ----------------
  vc_sig_t hm_o, hm_i;
  vc_sig_t sim_d, sim_u;           // Sub Board <-> PE board of the Bridge VS
  vc_sig_t pe_i [5], pe_o [5];

  hwmodule_ctrl #(.NPVS(NPVS), .CCLK_DIV(CCLK_DIV)) u_hm (
    .clk, .rst_n,
    .h_cmd_valid, .h_cmd_ready, .h_cmd_mode, .h_cmd_target, .h_cmd_addr, .h_cmd_len,
    .h_cmd_done, .h_wr_valid, .h_wr_data, .h_wr_ready, .h_rd_valid, .h_rd_data,
    .cfg_start, .cfg_target, .cfg_stage, .cfg_mask, .cfg_nbytes, .cfg_busy, .cfg_done,
    .cfg_error, .cfg_byte_wr, .cfg_byte_data, .cfg_byte_full,
    .hn_tbl_we, .hn_tbl_sel, .hn_tbl_idx, .hn_tbl_word, .hn_tbl_wdata, .hn_stts_rdata,
    .hn_n_pvs, .hn_run, .hn_busy, .hn_done, .hn_polls,
    .bus_o(hm_o), .bus_i(hm_i));

  bvs_sub_bridge u_bvs_sub (
    .clk, .rst_n, .my_bvs(2'd0),
    .front_i(hm_o), .front_o(hm_i),
    .back_i(bvs_back_i), .back_o(bvs_back_o),
    .sim_i(sim_u), .sim_o(sim_d),
    .cfg_i(bvs_cfg_i), .cfg_o(bvs_cfg_o));

  assign pe_i[0] = sim_d;
  assign sim_u   = pe_o[0];
  bvs_pe_bridge u_bvs_pe (.clk, .rst_n, .my_bvs(2'd0), .port_i(pe_i), .port_o(pe_o));

  // ---------------- rows of PVS Sub Boards ----------------
  vc_sig_t sub_front_i [NPVS], sub_front_o [NPVS];
  vc_sig_t sub_back_i  [NPVS], sub_back_o  [NPVS];
  vc_sig_t slv_i [NPVS], slv_o [NPVS];

  for (genvar r = 0; r < 4; r++) begin : g_rowport
    if (r < NROW) begin : g_used
      assign sub_front_i[r*NBX] = pe_o[r+1];
      assign pe_i[r+1]          = sub_front_o[r*NBX];
      assign row_back_o[r]      = sub_back_o[r*NBX + NBX - 1];
      assign sub_back_i[r*NBX + NBX - 1] = row_back_i[r];
    end else begin : g_unused
      always_comb begin
        pe_i[r+1] = VC_IDLE;
      end
    end
  end

  // ---------------- PVS array ----------------
  // VI Bus wires, indexed [pvs][side]
  logic        l_clk  [NPVS][6], l_mrdy [NPVS][6], l_srdy [NPVS][6];
  logic [31:0] l_data [NPVS][6];
  logic        i_clk  [NPVS][6], i_mrdy [NPVS][6], i_srdy [NPVS][6];
  logic [31:0] i_data [NPVS][6];
  logic [5:0]  o_end [NPVS], i_end [NPVS];
  logic [5:0]  present [NPVS];

  for (genvar z = 0; z < NBZ; z++) begin : g_z
    for (genvar y = 0; y < NBY; y++) begin : g_y
      for (genvar x = 0; x < NBX; x++) begin : g_x
        localparam int N = (z*NBY + y)*NBX + x;
        localparam int ROW = z*NBY + y;
        // neighbour index per side (-1: none)
        localparam int NB [6] = '{
          (x < NBX-1) ? N + 1       : -1,
          (x > 0)     ? N - 1       : -1,
          (y < NBY-1) ? N + NBX     : -1,
          (y > 0)     ? N - NBX     : -1,
          (z < NBZ-1) ? N + NBX*NBY : -1,
          (z > 0)     ? N - NBX*NBY : -1};
        vc_id_t id;
        assign id = '{bvs: 2'd0, row: 2'(ROW), fpga: 4'(x)};

        if (x > 0) begin : g_chain
          assign sub_front_i[N]  = sub_back_o[N-1];
          assign sub_back_i[N-1] = sub_front_o[N];
        end

        pvs_sub_selector u_sel (
          .clk, .rst_n, .my_id(id),
          .front_i(sub_front_i[N]), .front_o(sub_front_o[N]),
          .back_i(sub_back_i[N]), .back_o(sub_back_o[N]),
          .pe_i(slv_o[N]), .pe_o(slv_i[N]),
          .cfg_i(pe_cfg_i[N]), .cfg_o(pe_cfg_o[N]));

        fib_pkg::fib_m2s_t fm;
        fib_pkg::fib_s2m_t fs;
        logic [31:0] ctrl [4], stts [4];
        logic [5:0]  tx_valid, tx_ready, rx_valid, rx_ready;
        logic [31:0] tx_data [6], rx_data [6];

        vc_slave u_slv (
          .clk, .rst_n, .my_id(id), .bus_i(slv_i[N]), .bus_o(slv_o[N]),
          .fib_o(fm), .fib_i(fs), .ctrl, .stts);

        poisson_hwnet #(.NX(NX), .NY(NY), .NPE(NPE)) u_hn (
          .clk, .rst_n, .fib_i(fm), .fib_o(fs), .ctrl, .stts,
          .link_present(present[N]),
          .tx_valid, .tx_data, .tx_ready, .rx_valid, .rx_data, .rx_ready,
          .o_end(o_end[N]), .i_end(i_end[N]));

        assign pvs_stall[N] = {3'b000, stts[0][2:0]};
        assign pvs_iter[N]  = stts[1];

        for (genvar d = 0; d < 6; d++) begin : g_side
          localparam int M = NB[d];
          assign present[N][d] = (M >= 0);
          vibus_port u_port (
            .rst_n, .clk, .link_clk(clk),
            .tx_valid(tx_valid[d]), .tx_data(tx_data[d]), .tx_ready(tx_ready[d]),
            .rx_valid(rx_valid[d]), .rx_data(rx_data[d]), .rx_ready(rx_ready[d]),
            .o_clk(l_clk[N][d]), .o_mrdy(l_mrdy[N][d]), .o_data(l_data[N][d]),
            .o_srdy(l_srdy[N][d]),
            .i_clk(i_clk[N][d]), .i_mrdy(i_mrdy[N][d]), .i_data(i_data[N][d]),
            .i_srdy(i_srdy[N][d]));
          if (M >= 0) begin : g_link
            // my side d faces the neighbour's opposite side d^1
            assign i_clk[N][d]  = l_clk[M][d^1];
            assign i_mrdy[N][d] = l_mrdy[M][d^1];
            assign i_data[N][d] = l_data[M][d^1];
            assign l_srdy[N][d] = i_srdy[M][d^1];
            assign i_end[N][d]  = o_end[M][d^1];
          end else begin : g_open
            assign i_clk[N][d]  = 1'b0;
            assign i_mrdy[N][d] = 1'b0;
            assign i_data[N][d] = '0;
            assign l_srdy[N][d] = 1'b0;
            assign i_end[N][d]  = 1'b0;
          end
        end
      end
    end
  end
endmodule
