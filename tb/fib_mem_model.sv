// fib_mem_model: behavioural FIB slave memory for the testbenches, 2**AW
// words; srdy is raised for one cycle a random 1..4 cycles after a request.
module fib_mem_model
  import fib_pkg::*;
#(
  parameter int AW = 8
) (
  input  logic     clk,
  input  fib_m2s_t m,
  output fib_s2m_t s
);
  logic [31:0] mem [2**AW];
  int dly = -1;
  initial begin
    s = FIB_S2M_IDLE;
    for (int i = 0; i < 2**AW; i++) mem[i] = 0;
  end
  always @(posedge clk) begin
    s.srdy <= 1'b0;
    if (m.sel && m.mrdy && !s.srdy) begin
      if (dly < 0) dly = $urandom_range(3, 0);
      else if (dly == 0) begin
        s.srdy <= 1'b1;
        if (m.we) mem[m.a[AW-1:0]] <= m.dw;
        s.dr <= mem[m.a[AW-1:0]];
        dly = -1;
      end else dly--;
    end
  end
endmodule
