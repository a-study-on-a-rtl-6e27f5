// vibus_controller: iteration sequencer of a Processing VS that exchanges
// boundary data with its six neighbours (VIBusController).
//
// For each iteration: the PEs compute (compute_start, wait compute_done);
// then the PEs are stalled while boundary data moves in two stages.
//   Stage 1 (forward):  FRONT, RIGHT, UP transmit;  BACK, LEFT, DOWN receive.
//   Stage 2 (backward): BACK, LEFT, DOWN transmit;  FRONT, RIGHT, UP receive.
// A stage ends when every transfer of that stage on a connected side
// (link_present) has reported done. Then oEnd is raised on every side and
// the controller waits until iEnd has been seen high on every connected side;
// only then does the next iteration start (oEnd drops again). iEnd is
// latched, because a faster neighbour may drop its End as soon as it moves
// on. Direction order of all 6-bit vectors: 0 FRONT, 1 BACK, 2 RIGHT,
// 3 LEFT, 4 UP, 5 DOWN. The order of stages follows the source design; the
// handshake details (pulses, latching) are this design's own.
module vibus_controller #(
  parameter int ITW = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,          // pulse: run n_iter iterations
  input  logic [ITW-1:0] n_iter,
  input  logic [5:0]     link_present,
  output logic           compute_start,  // pulse to the PE controller
  input  logic           compute_done,   // pulse from the PE controller
  output logic [5:0]     tx_start,       // pulse per side
  output logic [5:0]     rx_start,
  input  logic [5:0]     tx_done,        // pulse per side
  input  logic [5:0]     rx_done,
  output logic [5:0]     o_end,
  input  logic [5:0]     i_end,
  output logic           busy,
  output logic           done,           // level, until the next start
  output logic [ITW-1:0] iter,           // iterations completed
  output logic           stalled         // PEs idle waiting for data/sync
);
  typedef enum logic [2:0] {S_IDLE, S_COMP, S_ST1, S_ST2, S_END, S_DONE} state_t;
  state_t st;
  logic [5:0] pend, seen;
  localparam logic [5:0] FWD_TX = 6'b010101, BWD_TX = 6'b101010;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pend <= '0; seen <= '0; iter <= '0;
      compute_start <= 1'b0; tx_start <= '0; rx_start <= '0; o_end <= '0; done <= 1'b0;
    end else begin
      compute_start <= 1'b0;
      tx_start <= '0;
      rx_start <= '0;
      seen <= seen | (i_end & link_present);
      case (st)
        S_IDLE, S_DONE: if (start) begin
          iter <= '0; done <= 1'b0; seen <= '0; o_end <= '0;
          if (n_iter == 0) begin
            st <= S_DONE; done <= 1'b1;
          end else begin
            st <= S_COMP; compute_start <= 1'b1;
          end
        end
        S_COMP: if (compute_done) begin
          st <= S_ST1;
          tx_start <= FWD_TX & link_present;
          rx_start <= BWD_TX & link_present;
          pend <= link_present;
        end
        S_ST1: begin
          if ((pend & ~(tx_done | rx_done)) == 0) begin
            st <= S_ST2;
            tx_start <= BWD_TX & link_present;
            rx_start <= FWD_TX & link_present;
            pend <= link_present;
          end else pend <= pend & ~(tx_done | rx_done);
        end
        S_ST2: begin
          if ((pend & ~(tx_done | rx_done)) == 0) begin
            st <= S_END;
            o_end <= 6'h3F;
          end else pend <= pend & ~(tx_done | rx_done);
        end
        S_END: if (((seen | i_end) & link_present) == link_present) begin
          iter <= iter + 1'b1;
          o_end <= '0;
          seen <= '0;
          if (iter + 1'b1 >= n_iter) begin
            st <= S_DONE; done <= 1'b1;
          end else begin
            st <= S_COMP; compute_start <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
  assign busy    = (st != S_IDLE) && (st != S_DONE);
  assign stalled = (st == S_ST1) || (st == S_ST2) || (st == S_END);
endmodule
