// delay_line: a chain of DEPTH registers, used to align operands inside the
// fixed-latency pipelines of the processing elements. DEPTH = 0 is a wire.
// Output = input delayed by exactly DEPTH clock cycles; there is no enable.
module delay_line #(
  parameter int W     = 32,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
    assign q = sr[DEPTH-1];
  end
endmodule
