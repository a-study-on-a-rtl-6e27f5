// poisson_hwnet: application circuit (hwNet) of one Processing VS solving the
// 3D Poisson equation by Jacobi iteration.
//
// The PVS owns an NX x NY x NPE block of grid points; PE k updates plane k
// (one plane per PE), all PEs stepping through the same (x, y) point in the
// same cycle, one point per cycle. The cache holds two banks of the block
// with a one-point ghost layer on every face, (NX+2)(NY+2)(NPE+2) words per
// bank; each iteration reads one bank and writes the other (Jacobi), then the
// banks swap roles. rhs (= -6 h^2 rho, pre-scaled by the host) is a separate
// NX*NY*NPE table.
//
// Iterations are sequenced by vibus_controller: compute (NX*NY cycles plus
// the 41-stage PE pipeline, plus one cache read stage), then the two-stage
// boundary exchange through the six VI Bus ports (FRONT/BACK = +x/-x,
// RIGHT/LEFT = +y/-y, UP/DOWN = +z/-z), then the End handshake. Each transmit
// engine streams one face of the new iterate (NY*NPE, NX*NPE or NX*NY words)
// and each receive engine writes the words it gets into the matching ghost
// face. Sides without a neighbour (link_present = 0) keep the ghost values
// the host loaded, which act as fixed boundary values.
//
// Host access (FIB slave, one word per access, srdy one cycle after the
// request): word address bits [17:16] select 0 = phi (writes go to both
// banks, reads come from the newest), 1 = rhs; the low 16 bits are
// (z*(NY+2) + y)*(NX+2) + x for phi (ghost layer included) and
// (z*NY + y)*NX + x for rhs. Control word A bit 0: a rising edge starts a
// run of ctrl[1] iterations. Status: A = {29'b0, stalled, done, busy},
// B = iterations completed, C = cycles spent stalled, D = cycles computing.
// The plane-per-PE partitioning, the two-stage exchange and the End
// synchronisation follow the source design; the cache organisation, address
// map and control/status words are this design's own.
module poisson_hwnet
  import fp_pkg::*;
  import fib_pkg::*;
#(
  parameter int NX  = 10,
  parameter int NY  = 10,
  parameter int NPE = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // FIB slave port for the host (through the VC Bus slave)
  input  fib_m2s_t    fib_i,
  output fib_s2m_t    fib_o,
  // control / status words
  input  logic [31:0] ctrl [4],
  output logic [31:0] stts [4],
  // six VI Bus ports: local streams
  input  logic [5:0]  link_present,
  output logic [5:0]  tx_valid,
  output logic [31:0] tx_data [6],
  input  logic [5:0]  tx_ready,
  input  logic [5:0]  rx_valid,
  input  logic [31:0] rx_data [6],
  output logic [5:0]  rx_ready,
  output logic [5:0]  o_end,
  input  logic [5:0]  i_end
);
  localparam int SX = NX + 2, SY = NY + 2, SZ = NPE + 2;
  localparam int PLANE = SX * SY;
  localparam int BANK  = PLANE * SZ;
  localparam int NPTS  = NX * NY;
  localparam int PE_LAT = 41;

  fp32_t phi [2*BANK];
  fp32_t rhs [NPTS*NPE];

  function automatic int pidx(logic b, int z, int y, int x);
    return int'(b) * BANK + z * PLANE + y * SX + x;
  endfunction

  // ---------------------------------------------------------------- control
  logic cur;                      // bank holding the newest iterate
  logic start_q, start_p;
  logic compute_start, compute_done;
  logic [5:0] tx_start, rx_start, tx_done, rx_done;
  logic busy, done, stalled;
  logic [31:0] iter, stall_cycles, comp_cycles;

  assign start_p = ctrl[0][0] && !start_q;

  vibus_controller #(.ITW(32)) u_ctl (
    .clk, .rst_n, .start(start_p), .n_iter(ctrl[1]), .link_present,
    .compute_start, .compute_done, .tx_start, .rx_start, .tx_done, .rx_done,
    .o_end, .i_end, .busy, .done, .iter, .stalled);

  // ------------------------------------------------------ PE controller
  logic feeding;
  int   cx, cy;
  logic rd_v;
  int   rd_x, rd_y;
  fp32_t pe_nb [NPE][6];
  fp32_t pe_c [NPE], pe_r [NPE], pe_out [NPE];
  logic [NPE-1:0] pe_ov;
  logic [31:0] wb_xy, wb_xy_d;
  logic wb_v;
  int   nwritten;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feeding <= 1'b0; cx <= 0; cy <= 0; rd_v <= 1'b0; rd_x <= 0; rd_y <= 0;
    end else begin
      rd_v <= feeding;
      rd_x <= cx;
      rd_y <= cy;
      if (compute_start) begin
        feeding <= 1'b1; cx <= 0; cy <= 0;
      end else if (feeding) begin
        if (cx == NX - 1) begin
          cx <= 0;
          if (cy == NY - 1) feeding <= 1'b0;
          else cy <= cy + 1;
        end else cx <= cx + 1;
      end
    end
  end

  // cache read stage: registered neighbourhood of the current point
  always_ff @(posedge clk) begin
    for (int k = 0; k < NPE; k++) begin
      pe_nb[k][0] <= phi[pidx(cur, k+1, cy+1, cx)];
      pe_nb[k][1] <= phi[pidx(cur, k+1, cy+1, cx+2)];
      pe_nb[k][2] <= phi[pidx(cur, k+1, cy,   cx+1)];
      pe_nb[k][3] <= phi[pidx(cur, k+1, cy+2, cx+1)];
      pe_nb[k][4] <= phi[pidx(cur, k,   cy+1, cx+1)];
      pe_nb[k][5] <= phi[pidx(cur, k+2, cy+1, cx+1)];
      pe_c[k]     <= phi[pidx(cur, k+1, cy+1, cx+1)];
      pe_r[k]     <= rhs[(k * NY + cy) * NX + cx];
    end
  end

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    poisson_pe u_pe (.clk, .in_valid(rd_v), .nb(pe_nb[k]), .center(pe_c[k]), .rhs(pe_r[k]),
                     .out_valid(pe_ov[k]), .phi_new(pe_out[k]));
  end

  assign wb_xy = {16'(rd_y), 16'(rd_x)};
  delay_line #(.W(32), .DEPTH(PE_LAT)) u_dxy (.clk, .d(wb_xy), .q(wb_xy_d));
  assign wb_v = pe_ov[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nwritten <= 0; compute_done <= 1'b0; cur <= 1'b0; start_q <= 1'b0;
      stall_cycles <= '0; comp_cycles <= '0;
    end else begin
      start_q <= ctrl[0][0];
      compute_done <= 1'b0;
      if (start_p) begin
        stall_cycles <= '0; comp_cycles <= '0;
      end
      if (stalled) stall_cycles <= stall_cycles + 1'b1;
      if (busy && !stalled) comp_cycles <= comp_cycles + 1'b1;
      if (compute_start) nwritten <= 0;
      else if (wb_v) begin
        if (nwritten == NPTS - 1) begin
          compute_done <= 1'b1;
          cur <= !cur;
        end
        nwritten <= nwritten + 1;
      end
    end
  end

  // -------------------------------------------------- exchange engines
  // side d: face axis (0 x, 1 y, 2 z), face position on tx, ghost on rx
  function automatic int axis_of(int d);
    return d / 2;
  endfunction
  function automatic int na_of(int d);     // extent of the first free axis
    return (axis_of(d) == 0) ? NY : NX;
  endfunction
  function automatic int nb_of(int d);     // extent of the second free axis
    return (axis_of(d) == 2) ? NY : NPE;
  endfunction
  // interior coordinate of the face (tx) or ghost coordinate (rx)
  function automatic int face_pos(int d, bit rx);
    int n;
    n = (axis_of(d) == 0) ? NX : (axis_of(d) == 1) ? NY : NPE;
    if (d % 2 == 0) return rx ? n + 1 : n;  // FRONT/RIGHT/UP: + side
    else            return rx ? 0 : 1;      // BACK/LEFT/DOWN: - side
  endfunction
  function automatic int face_idx(logic b, int d, bit rx, int ia, int ib);
    int p;
    p = face_pos(d, rx);
    case (axis_of(d))
      0:       return pidx(b, ib + 1, ia + 1, p);
      1:       return pidx(b, ib + 1, p, ia + 1);
      default: return pidx(b, p, ib + 1, ia + 1);
    endcase
  endfunction

  logic [5:0] tx_act, rx_act;
  int tx_a [6], tx_b [6], rx_a [6], rx_b [6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_act <= '0; rx_act <= '0; tx_done <= '0; rx_done <= '0;
      for (int d = 0; d < 6; d++) begin
        tx_a[d] <= 0; tx_b[d] <= 0; rx_a[d] <= 0; rx_b[d] <= 0;
      end
    end else begin
      tx_done <= '0;
      rx_done <= '0;
      for (int d = 0; d < 6; d++) begin
        if (tx_start[d]) begin
          tx_act[d] <= 1'b1; tx_a[d] <= 0; tx_b[d] <= 0;
        end else if (tx_act[d] && tx_ready[d]) begin
          if (tx_a[d] == na_of(d) - 1) begin
            tx_a[d] <= 0;
            if (tx_b[d] == nb_of(d) - 1) begin
              tx_act[d] <= 1'b0; tx_done[d] <= 1'b1;
            end else tx_b[d] <= tx_b[d] + 1;
          end else tx_a[d] <= tx_a[d] + 1;
        end
        if (rx_start[d]) begin
          rx_act[d] <= 1'b1; rx_a[d] <= 0; rx_b[d] <= 0;
        end else if (rx_act[d] && rx_valid[d]) begin
          if (rx_a[d] == na_of(d) - 1) begin
            rx_a[d] <= 0;
            if (rx_b[d] == nb_of(d) - 1) begin
              rx_act[d] <= 1'b0; rx_done[d] <= 1'b1;
            end else rx_b[d] <= rx_b[d] + 1;
          end else rx_a[d] <= rx_a[d] + 1;
        end
      end
    end
  end

  always_comb begin
    for (int d = 0; d < 6; d++) begin
      tx_valid[d] = tx_act[d];
      tx_data[d]  = phi[face_idx(cur, d, 1'b0, tx_a[d], tx_b[d])];
      rx_ready[d] = rx_act[d];
    end
  end

  // -------------------------------------------------- cache writes / host
  logic fib_srdy;
  fp32_t fib_dr;
  logic [15:0] ha;
  assign ha = fib_i.a[15:0];

  always_ff @(posedge clk) begin
    // PE results into the bank being written
    if (wb_v)
      for (int k = 0; k < NPE; k++)
        phi[pidx(!cur, k + 1, int'(wb_xy_d[31:16]) + 1, int'(wb_xy_d[15:0]) + 1)] <= pe_out[k];
    // received boundary data into the ghost layer of the newest bank
    for (int d = 0; d < 6; d++)
      if (rx_act[d] && rx_valid[d]) phi[face_idx(cur, d, 1'b1, rx_a[d], rx_b[d])] <= rx_data[d];
    // host writes
    if (fib_i.sel && fib_i.mrdy && fib_i.we && !fib_srdy) begin
      if (fib_i.a[17:16] == 2'd0 && int'(ha) < BANK) begin
        phi[int'(ha)]        <= fib_i.dw;
        phi[BANK + int'(ha)] <= fib_i.dw;
      end else if (fib_i.a[17:16] == 2'd1 && int'(ha) < NPTS * NPE) begin
        rhs[int'(ha)] <= fib_i.dw;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fib_srdy <= 1'b0; fib_dr <= '0;
    end else begin
      fib_srdy <= fib_i.sel && fib_i.mrdy && !fib_srdy;
      if (fib_i.a[17:16] == 2'd0 && int'(ha) < BANK) fib_dr <= phi[int'(cur) * BANK + int'(ha)];
      else if (fib_i.a[17:16] == 2'd1 && int'(ha) < NPTS * NPE) fib_dr <= rhs[int'(ha)];
      else fib_dr <= '0;
    end
  end
  assign fib_o = '{srdy: fib_srdy, dr: fib_dr};

  assign stts[0] = {29'd0, stalled, done, busy};
  assign stts[1] = iter;
  assign stts[2] = stall_cycles;
  assign stts[3] = comp_cycles;
endmodule
