// vc_pkg: types of the VC Bus (Vocalise connection bus), the network
// that links the host's PCI board to every FPGA for configuration, data
// transfer and control.
//
// One VC Bus hop is carried by a vc_sig_t in each direction. A bridge
// forwards the initiator's signals (req, busmode, sel, frame, mrdy, ad_m and
// the SelectMAP controls) toward the target, and the target's signals (ack,
// srdy, ad_s, init_b, done) back toward the initiator. The shared A/D line of
// the cable is kept as two fields: ad_m, driven by the initiator (address,
// write data, configuration bytes in ad_m[7:0]) and ad_s, driven by the
// target (read data). Data mode (busmode = 0): a word moves on each clock
// edge at which mrdy and srdy are both high; frame = 1 marks the 32-bit
// target address word. Configuration mode (busmode = 1): while frame = 1
// the initiator broadcasts three address bytes, one per clock; then bytes of
// bitstream are clocked to the selected FPGAs with cclk.
package vc_pkg;

  typedef struct packed {
    logic [1:0] bvs;    // Bridge VS
    logic [1:0] row;    // row behind the Bridge VS
    logic [3:0] fpga;   // position in the row
  } vc_id_t;

  // 32-bit address word: target, initiator, mode code, user bits
  typedef struct packed {
    vc_id_t     target;
    vc_id_t     initiator;
    logic [7:0] mode;
    logic [7:0] user;     // this design: burst length in words (0 = 256)
  } vc_addr_t;

  // mode codes (values are this design's own)
  localparam logic [7:0] VC_WRITE = 8'h01;   // write data to the PVS memory map
  localparam logic [7:0] VC_READ  = 8'h02;   // read data
  localparam logic [7:0] VC_CMD   = 8'h03;   // write control words (CTRL)
  localparam logic [7:0] VC_STTS  = 8'h04;   // read status words (STTS)

  localparam vc_id_t VC_HOST_ID = 8'hFF;     // reserved ID of the host side

  // configuration stages (second configuration address byte)
  localparam logic [7:0] CFG_BVS_SUB = 8'd1;
  localparam logic [7:0] CFG_BVS_PE  = 8'd2;
  localparam logic [7:0] CFG_PVS_SUB = 8'd3;
  localparam logic [7:0] CFG_PVS_PE  = 8'd4;

  typedef struct packed {
    // initiator -> target
    logic        busmode;
    logic        req;
    logic        sel;
    logic        frame;
    logic        mrdy;
    logic [31:0] ad_m;
    logic        cclk;
    logic        prog_b;
    logic        cs_b;
    logic        rdwr_b;
    // target -> initiator
    logic        ack;
    logic        srdy;
    logic [31:0] ad_s;
    logic        init_b;
    logic        done;
  } vc_sig_t;

  localparam vc_sig_t VC_IDLE = '{busmode: 1'b0, req: 1'b0, sel: 1'b0, frame: 1'b0, mrdy: 1'b0,
                                  ad_m: '0, cclk: 1'b0, prog_b: 1'b1, cs_b: 1'b1, rdwr_b: 1'b1,
                                  ack: 1'b0, srdy: 1'b0, ad_s: '0, init_b: 1'b1, done: 1'b1};

  // true when id matches target on every bit not set in the don't-care mask
  function automatic logic id_match(vc_id_t id, vc_id_t target, vc_id_t mask);
    return ((id ^ target) & ~mask) == '0;
  endfunction
endpackage
