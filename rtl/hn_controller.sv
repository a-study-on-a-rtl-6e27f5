// hn_controller: hwNet controller of the hwModule board. It holds, per
// Processing VS, a table of four control words (CTRL) and four status words
// (STTS), and runs one computation on up to NPVS PVSs over the VC Bus
// through a vc_master:
//   1. for each PVS: CMD burst of its four CTRL words with bit 0 of word 0
//      cleared (parameters in place, start line low);
//   2. for each PVS: CMD of word 0 as given (bit 0 set: the start edge), so
//      all PVSs start within a few bus transactions of each other;
//   3. poll: STTS burst of four words from each PVS into the STTS table,
//      repeated until bit 1 (done) of status word 0 is set for every PVS.
// done pulses and polls counts the poll rounds. The host fills the ID and
// CTRL tables and reads the STTS table through the tbl_* ports (tbl_sel 0 =
// target ID, 1 = CTRL word).
// Keeping CTRL/STTS tables per PVS in on-chip memory follows the source
// design; the start protocol and polling are this design's own.
module hn_controller
  import vc_pkg::*;
#(
  parameter int NPVS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // host side
  input  logic        tbl_we,
  input  logic        tbl_sel,
  input  logic [$clog2(NPVS)-1:0] tbl_idx,
  input  logic [1:0]  tbl_word,
  input  logic [31:0] tbl_wdata,
  output logic [31:0] stts_rdata,
  input  logic [$clog2(NPVS):0] n_pvs,
  input  logic        run,
  output logic        busy,
  output logic        done,
  output logic [15:0] polls,
  // vc_master command side
  output logic        m_cmd_valid,
  input  logic        m_cmd_ready,
  output logic [7:0]  m_cmd_mode,
  output vc_id_t      m_cmd_target,
  output logic [31:0] m_cmd_addr,
  output logic [8:0]  m_cmd_len,
  input  logic        m_done,
  output logic        m_wr_valid,
  output logic [31:0] m_wr_data,
  input  logic        m_wr_ready,
  input  logic        m_rd_valid,
  input  logic [31:0] m_rd_data
);
  localparam int IW = $clog2(NPVS);
  typedef enum logic [2:0] {H_IDLE, H_PARAM, H_START, H_POLL, H_WAIT, H_END} state_t;
  state_t st;
  vc_id_t      ids  [NPVS];
  logic [31:0] ctrl [NPVS*4];
  logic [31:0] stts [NPVS*4];
  logic [IW:0] idx;
  logic [1:0]  w;
  logic        issued, all_done;

  assign stts_rdata = stts[{tbl_idx, tbl_word}];

  always_ff @(posedge clk) begin
    if (tbl_we && !tbl_sel && tbl_word == 2'd0) ids[tbl_idx] <= vc_id_t'(tbl_wdata[7:0]);
    if (tbl_we && tbl_sel) ctrl[{tbl_idx, tbl_word}] <= tbl_wdata;
  end

  logic [IW-1:0] ix;
  assign ix = idx[IW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_IDLE; idx <= '0; w <= '0; issued <= 1'b0; all_done <= 1'b0;
      busy <= 1'b0; done <= 1'b0; polls <= '0;
      for (int i = 0; i < NPVS*4; i++) stts[i] <= '0;
    end else begin
      done <= 1'b0;
      if (m_cmd_valid && m_cmd_ready) issued <= 1'b1;
      if (m_rd_valid && st == H_POLL) begin
        stts[{ix, w}] <= m_rd_data;
        if (w == 2'd0 && !m_rd_data[1]) all_done <= 1'b0;
        w <= w + 1'b1;
      end
      if (m_wr_valid && m_wr_ready) w <= w + 1'b1;
      case (st)
        H_IDLE: if (run && n_pvs != 0) begin
          st <= H_PARAM; idx <= '0; w <= '0; issued <= 1'b0; busy <= 1'b1; polls <= '0;
        end
        H_PARAM, H_START, H_POLL: if (m_done) begin
          issued <= 1'b0; w <= '0;
          if (idx == n_pvs - 1'b1) begin
            idx <= '0;
            case (st)
              H_PARAM: st <= H_START;
              H_START: begin st <= H_POLL; all_done <= 1'b1; end
              default: begin
                polls <= polls + 1'b1;
                st <= all_done ? H_END : H_WAIT;
              end
            endcase
          end else idx <= idx + 1'b1;
        end
        H_WAIT: begin st <= H_POLL; all_done <= 1'b1; end
        H_END: begin busy <= 1'b0; done <= 1'b1; st <= H_IDLE; end
        default: st <= H_IDLE;
      endcase
    end
  end

  always_comb begin
    m_cmd_valid  = (st == H_PARAM || st == H_START || st == H_POLL) && !issued;
    m_cmd_target = ids[ix];
    m_cmd_addr   = '0;
    m_cmd_mode   = (st == H_POLL) ? VC_STTS : VC_CMD;
    m_cmd_len    = (st == H_START) ? 9'd1 : 9'd4;
    m_wr_valid   = (st == H_PARAM || st == H_START);
    m_wr_data    = ctrl[{ix, w}];
    if (st == H_PARAM && w == 2'd0) m_wr_data[0] = 1'b0;
  end
endmodule
