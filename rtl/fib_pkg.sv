// fib_pkg: signal bundles of the FPGA Internal Bus (FIB), the on-chip
// master/slave bus that connects bus bridges, memories and application
// circuits (hwNets) inside each FPGA.
//
// A transaction: the master drives sel, mrdy, we, a (32-bit word address),
// dw and be; the slave answers with srdy, and dr for a read. A word is
// transferred on the clock edge at which mrdy and srdy are both high. A slave
// in this design raises srdy for exactly one cycle per word, so a master
// presents the next word (or drops mrdy) after each srdy. Byte enables are
// four bits, one per byte of the 32-bit word (this design's reading).
package fib_pkg;
  typedef struct packed {
    logic        sel;
    logic        mrdy;
    logic        we;
    logic [31:0] a;
    logic [31:0] dw;
    logic [3:0]  be;
  } fib_m2s_t;

  typedef struct packed {
    logic        srdy;
    logic [31:0] dr;
  } fib_s2m_t;

  localparam fib_m2s_t FIB_M2S_IDLE = '{default: '0};
  localparam fib_s2m_t FIB_S2M_IDLE = '{default: '0};
endpackage
