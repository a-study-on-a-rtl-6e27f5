// hwmodule_ctrl: the controller FPGA of the host's hwModule board. It puts
// the three VC Bus initiators of the board on the one VC Bus port:
// the SelectMAP configuration engine (configuration mode), and the data-mode
// master shared by direct host commands and the hwNet controller.
//
// The BusMode multiplexer gives the bus to the configuration engine while it
// is busy, otherwise to the data master. The data master takes commands from
// the hwNet controller while that one runs, otherwise from the host command
// port (h_cmd_*; a host command is accepted only when h_cmd_ready is high).
// Read data of host commands appears on h_rd_*, write data is taken from
// h_wr_*. The board's own VC Bus ID is VC_HOST_ID.
// The split into configuration, data and hwNet-control engines behind one
// BusMode switch follows the source design; the host-side ports stand in for
// the PCI / local-bus side of the board and are this design's own.
module hwmodule_ctrl
  import vc_pkg::*;
#(
  parameter int NPVS     = 8,
  parameter int CCLK_DIV = 2
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
  // VC Bus
  output vc_sig_t     bus_o,
  input  vc_sig_t     bus_i
);
  vc_sig_t m_bus_o, c_bus_o;
  logic        m_cmd_valid, m_cmd_ready, m_done, m_wr_valid, m_wr_ready, m_rd_valid;
  logic [7:0]  m_cmd_mode;
  vc_id_t      m_cmd_target;
  logic [31:0] m_cmd_addr, m_wr_data, m_rd_data;
  logic [8:0]  m_cmd_len;
  logic        n_cmd_valid, n_wr_valid;
  logic [7:0]  n_cmd_mode;
  vc_id_t      n_cmd_target;
  logic [31:0] n_cmd_addr, n_wr_data;
  logic [8:0]  n_cmd_len;
  logic        host_owns;   // data master serves the host command port

  // the host owns the master from an accepted command until its done
  logic host_cmd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_cmd <= 1'b0;
    else if (h_cmd_valid && h_cmd_ready) host_cmd <= 1'b1;
    else if (m_done) host_cmd <= 1'b0;
  end
  assign host_owns   = host_cmd || !hn_busy;
  assign h_cmd_ready = m_cmd_ready && !hn_busy && !host_cmd && !cfg_busy;

  always_comb begin
    if (host_owns) begin
      m_cmd_valid = h_cmd_valid && h_cmd_ready; m_cmd_mode = h_cmd_mode;
      m_cmd_target = h_cmd_target; m_cmd_addr = h_cmd_addr; m_cmd_len = h_cmd_len;
      m_wr_valid = h_wr_valid; m_wr_data = h_wr_data;
    end else begin
      m_cmd_valid = n_cmd_valid && !cfg_busy; m_cmd_mode = n_cmd_mode;
      m_cmd_target = n_cmd_target; m_cmd_addr = n_cmd_addr; m_cmd_len = n_cmd_len;
      m_wr_valid = n_wr_valid; m_wr_data = n_wr_data;
    end
  end
  assign h_wr_ready = host_owns && m_wr_ready;
  assign h_rd_valid = host_cmd && m_rd_valid;
  assign h_rd_data  = m_rd_data;
  assign h_cmd_done = host_cmd && m_done;

  vc_master u_master (
    .clk, .rst_n, .my_id(VC_HOST_ID),
    .cmd_valid(m_cmd_valid), .cmd_ready(m_cmd_ready), .cmd_mode(m_cmd_mode),
    .cmd_target(m_cmd_target), .cmd_addr(m_cmd_addr), .cmd_len(m_cmd_len), .done(m_done),
    .wr_valid(m_wr_valid), .wr_data(m_wr_data), .wr_ready(m_wr_ready),
    .rd_valid(m_rd_valid), .rd_data(m_rd_data),
    .bus_o(m_bus_o), .bus_i(bus_i));

  hn_controller #(.NPVS(NPVS)) u_hn (
    .clk, .rst_n,
    .tbl_we(hn_tbl_we), .tbl_sel(hn_tbl_sel), .tbl_idx(hn_tbl_idx), .tbl_word(hn_tbl_word),
    .tbl_wdata(hn_tbl_wdata), .stts_rdata(hn_stts_rdata), .n_pvs(hn_n_pvs),
    .run(hn_run && !host_cmd), .busy(hn_busy), .done(hn_done), .polls(hn_polls),
    .m_cmd_valid(n_cmd_valid), .m_cmd_ready(m_cmd_ready && !host_owns), .m_cmd_mode(n_cmd_mode),
    .m_cmd_target(n_cmd_target), .m_cmd_addr(n_cmd_addr), .m_cmd_len(n_cmd_len),
    .m_done(m_done && !host_owns),
    .m_wr_valid(n_wr_valid), .m_wr_data(n_wr_data), .m_wr_ready(m_wr_ready && !host_owns),
    .m_rd_valid(m_rd_valid && !host_owns), .m_rd_data(m_rd_data));

  selectmap_config #(.CCLK_DIV(CCLK_DIV)) u_cfg (
    .clk, .rst_n, .start(cfg_start && !host_cmd && !hn_busy && m_cmd_ready),
    .cfg_target, .cfg_stage, .cfg_mask,
    .nbytes(cfg_nbytes), .busy(cfg_busy), .done(cfg_done), .error(cfg_error),
    .byte_wr(cfg_byte_wr), .byte_data(cfg_byte_data), .byte_full(cfg_byte_full),
    .bus_o(c_bus_o), .bus_i(bus_i));

  // BusMode multiplexer
  assign bus_o = cfg_busy ? c_bus_o : m_bus_o;
endmodule
