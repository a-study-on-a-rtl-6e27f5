// smap_dev_model: behavioural model of the SelectMAP configuration port of
// one FPGA, for the testbenches. PROG_B low clears the device (INIT_B and
// DONE low); INIT_B rises 5 clocks after PROG_B is released; then every
// rising CCLK with CS_B low takes the byte on ad_m[7:0] (RDWR_B must be low
// and INIT_B high, else a protocol error is counted); DONE rises two CCLK
// periods after the NB-th byte. sum is a running hash of the bytes taken.
module smap_dev_model
  import vc_pkg::*;
#(
  parameter int NB = 40
) (
  input  logic        clk,
  input  vc_sig_t     pins_o,     // from the design: PROG_B, CCLK, CS_B, RDWR_B, data
  output vc_sig_t     pins_i,     // to the design: INIT_B, DONE
  output logic [31:0] sum,
  output int          cnt,
  output int          progs,
  output int          errs
);
  int   wt = 0;
  logic init_b = 1'b1, done = 1'b0, pcclk = 1'b0, pprog = 1'b1;
  initial begin sum = 0; cnt = 0; progs = 0; errs = 0; end
  always @(posedge clk) begin
    if (!pins_o.prog_b) begin
      init_b <= 1'b0; done <= 1'b0; cnt <= 0; sum <= 0; wt <= 5;
      if (pprog) progs <= progs + 1;
    end else if (wt > 0) begin
      wt <= wt - 1;
      if (wt == 1) init_b <= 1'b1;
    end else if (pins_o.cclk && !pcclk && !pins_o.cs_b) begin
      if (pins_o.rdwr_b || !init_b) errs <= errs + 1;
      if (cnt < NB) sum <= sum * 31 + 32'(pins_o.ad_m[7:0]);
      cnt <= cnt + 1;
      if (cnt == NB + 1) done <= 1'b1;
    end
    pcclk <= pins_o.cclk;
    pprog <= pins_o.prog_b;
  end
  always_comb begin
    pins_i = VC_IDLE;
    pins_i.init_b = init_b;
    pins_i.done = done;
  end
endmodule
