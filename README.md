# Vocalise: a 3D array of FPGA boards for stencil computations

## The main idea

Vocalise is a personal supercomputer built from FPGA boards wired into a
**three-dimensional mesh**. Every processing board has a direct 32-bit link
to each of its six neighbours (±x, ±y, ±z). A 3D finite-difference problem
can therefore be cut into boxes, one box per board, and every face exchange
goes straight to the board that needs it. No data crosses another board on
the way.

Two networks connect the boards:

* **VC Bus** (control bus). A tree-shaped, arbitrated master/slave bus. The
  host uses it to load bit streams into the FPGAs, write and read data, send
  commands and poll status.
* **VI Bus** (inter-board bus). The six point-to-point neighbour links. The
  computing circuits use them to swap boundary planes after every
  iteration.

This repository holds synthesizable SystemVerilog for the whole system:

* the host-side controller board;
* the bridge board that fans the VC Bus out to rows of processing boards;
* the switch on each processing board;
* a complete 3D Poisson solver circuit with its six-way exchange and
  iteration-level synchronisation;
* the pipelined processing element of the CIP advection solver.

## System structure

```
 host ports
     |
 hwmodule_ctrl ---- VC Bus ----> bvs_sub_bridge --(own PE board)--> bvs_pe_bridge
 (master, HN controller,            |                                 | | | |
  SelectMAP configurator)       next bridge VS                   row 0 1 2 3
                                                                      |
                                    pvs_sub_selector -> pvs_sub_selector -> ...
                                           |                  (next board in the row)
                                   vc_slave + poisson_hwnet + 6 x vibus_port
```

`vocalise_top` builds:

* one controller board;
* one bridge VS (bridge "virtual system": a sub board plus a PE board);
* NBX × NBY × NBZ processing VSs (PVSs). The default is 2×2×2.

PVS (x, y, z) sits in row `z·NBY + y` at position `x`. Its 8-bit VC Bus ID
is `{bvs[1:0], row[1:0], fpga[3:0]}`. Its six VI Bus ports connect to the
matching ports of its neighbours. A side with no neighbour is marked absent.
A CIP processing element (`cip_pe`, 2D) stands beside the Poisson system and
has its own operand and result ports.

## VC Bus

### Signals and handshake

One struct, `vc_sig_t`, carries a whole bus segment in both directions.

* From the master: `busmode`, `req`, `sel`, `frame`, `mrdy`, `ad_m`, and the
  SelectMAP pins `cclk`, `prog_b`, `cs_b`, `rdwr_b`.
* From the target side: `ack`, `srdy`, `ad_s`, `init_b`, `done`.

A data transfer runs in this order:

1. The master raises `req`.
2. An arbiter answers with `ack`.
3. The master raises `sel` and sends an address word with `frame` high:
   `{target ID, initiator ID, mode, burst length}`.
4. The master sends a second header word with the word address inside the
   target.
5. A burst of data words follows. A word moves on each clock edge where
   `sel`, `mrdy` and `srdy` are all high.
6. The master drops `sel`, then `req`.

Mode codes are 1 = write, 2 = read, 3 = command (control words), and
4 = status. The host's ID is `FF`.

### Routing: the hard part

Routing is decided once per transfer. The bridge latches the route when it
sees the address word and holds it until the initiator drops `req`.

* **`vc_xbar`** is the combinational switch under every bridge.
  * It copies the initiator's fields to each selected target.
  * It returns the AND of the targets' `srdy`/`init_b`/`done`. This models
    the wired-AND SelectMAP lines.
  * It returns the OR of their `ad_s`. Idle targets drive zero.
* **`bvs_sub_bridge`** (bridge VS sub board) compares the BVS bits of the
  target ID with its own ID. On a match it sends the transfer to its own
  PE board. Otherwise it sends it on to the next bridge VS.
* **`bvs_pe_bridge`** (bridge VS PE board) is the only arbiter.
  * It has five ports: the host side and four rows.
  * Grants rotate round-robin, and a grant is held while `req` stays high.
  * Traffic from the host goes to row `target.row`.
  * Traffic from a row goes to the host when the target is `FF` or on
    another bridge VS. Otherwise it goes to the target's row. This allows
    PVS-to-PVS traffic over the VC Bus.
* **`pvs_sub_selector`** (each PVS sub board) hands a transfer addressed to
  its own ID to its PE board. Anything else goes further down the row.
  Requests coming up the row or from its own PE board go to the front.

### Configuration mode

`busmode = 1` turns the same wires into a SelectMAP configuration bus.

* The configurator first sends three bytes with `frame` high:
  1. the target ID;
  2. the stage (1 = bridge sub board, 2 = bridge PE board, 3 = PVS sub
     board, 4 = PVS PE board);
  3. a don't-care mask over the ID bits.
* Each bridge and selector decides from these bytes whether to open its own
  FPGA's configuration port or pass the stream on. Several boards can
  therefore be loaded with one bit stream.
* A board is configured through its already-configured neighbour, so the
  chain is brought up one stage at a time.

## Poisson hwNet (`poisson_hwnet`)

This circuit solves the Poisson equation ∇²φ = ρ by Jacobi iteration. Each
PVS owns a block of NX × NY × NPE points: NPE planes, one per PE.

* **PE (`poisson_pe`).** Each cycle it computes
  `φ' = (six neighbours + 2φ + rhs) / 8`.
  * A tree of seven 13-stage adders sums the eight terms.
  * Exponent shifts do ×2 and /8.
  * The result appears after 41 stages. One point enters per cycle.
* **Cache.** Two banks hold the block with a one-point ghost layer on every
  face. Each iteration reads one bank and writes the other.
  * All NPE PEs work on the same (x, y) point in the same cycle.
  * After the iteration the two banks swap roles.
* **Iteration sequence (`vibus_controller`).**
  1. Compute: NX·NY cycles, plus the pipeline flush.
  2. Exchange, in two stages. Each transmit engine streams the matching face
     of the new iterate to its neighbour. Each receive engine writes the
     words it gets into its own ghost face.
  3. End handshake. A PVS raises `oEnd` on every side and stalls until all
     neighbours raise `iEnd`. This keeps the whole array in step, iteration
     by iteration. Stall cycles are counted in the status words.
* **VI Bus port (`vibus_port`).**
  * A transmit element and a receive element, each behind a dual-clock FIFO
    (`async_fifo`, Gray-coded pointers).
  * The link carries its own clock, 32 data bits and an MRDY/SRDY pair.
  * A word crosses when MRDY is high and the receiver's SRDY (FIFO not full)
    is high.
* **Host access.** This is a FIB (FPGA-internal bus) slave behind
  `vc_slave`.
  * Address bits [17:16] select the table: 0 = φ (ghost layer included),
    1 = rhs.
  * Control word 0 bit 0 starts a run on its rising edge. Control word 1
    holds the iteration count.
  * Status words: {stalled, done, busy}, iterations done, stall cycles,
    compute cycles.
* **Boundary conditions.** Ghost faces on sides with no neighbour keep
  whatever the host loaded. They act as fixed boundary values.

## CIP processing element (`cip_pe`)

The CIP method advects a value f together with its spatial derivative g,
using a cubic profile between neighbouring points. A multi-dimensional
problem is solved as a sequence of one-dimensional sweeps (type-M).

The element accepts one grid point per clock and produces the result after
69 stages:

* **Block1** (34 stages): the cubic coefficients a and b. Six
  adders/subtractors, one multiplier and two ×2 shifts. The a path is
  delayed 7 stages to line up with b.
* **Block2** (34 stages, running in parallel with Block1): u, u², u³.
* **Block3** (35 stages): the new f and g from the cubic. Its inputs are the
  point's f and g, delayed 34 stages.
* **Block4** (one per extra dimension, 34 stages plus a 35-stage delay):
  advects the cross derivatives with a first-order upwind step.

The floating-point units are IEEE754 single precision:

* `fp_add`: 13 stages, round-to-nearest-even.
* `fp_mul`: 8 stages, round-to-nearest-even.
* `fp_pow2`: 1 stage, exponent adjust.

Denormals are flushed to zero. Velocities are taken as non-negative, so the
upwind neighbour is always i−1.

## Controller board (`hwmodule_ctrl`)

The controller board holds three units that share one VC Bus port. A mux
chooses between them by bus mode.

* **`vc_master`** runs host write, read, command and status transfers.
* **`hn_controller`** keeps a table of PVS IDs and their four control words.
  On `run` it:
  1. sends every PVS its parameters;
  2. starts them all;
  3. polls their status over the VC Bus until every one reports done.
* **`selectmap_config`** loads FPGAs. It has a FIFO of bit stream bytes, a
  CCLK divider and the PROG_B / INIT_B / DONE sequence. Bytes change on the
  falling edge of CCLK. A timeout flags an error if DONE never rises.

## Where this design departs from the original

* **Local memory.** There is no SDRAM local memory and no DMA. The host
  reads and writes the hwNet's on-chip tables directly, one word per FIB
  access.
* **CIP hwNet.** The CIP hwNet (cache, PE controller, buffers) is not built.
  Only its processing element is, and its operands come from top-level
  ports.
* **Vendor parts and software.** These are not built: DCM, IOBUF and GPIF
  connectors, the PCI interface, the host driver, and the FPGA's own
  SelectMAP logic. The last is stood in for by a testbench model.
* **Block1 sign.** Block1 uses the signs that follow from fitting the cubic
  profile. The abbreviated formula in the original gives a different sign on
  one term.
* **Block4 sign.** Block4 uses the upwind form `h − u(h − h_up)`. The
  original's simplified form shows a plus sign.
* **Defined by this design.** The original does not define these:
  * the mode codes;
  * the second header word;
  * the configuration address bytes and don't-care mask;
  * round-robin arbitration;
  * the hwNet address map and control/status words.
* **VI Bus mode.** VI Bus links are simplex in each direction. Half-duplex
  and full-duplex modes are not built.
* **Processing elements per board.** The top uses 6 PEs per board, the
  largest count the original fitted together with six-way exchange.
  `poisson_hwnet` alone defaults to 8.

## Lint notes

Verilator reports circular logic (UNOPTFLAT) on the VC Bus structs inside
the bridges. This is not a real loop: one struct carries both directions.
Each affected module explains this in its header. A few unused-bit warnings
are also reported, for address fields a given bridge does not look at.

## Simulating with Verilator

Each testbench is self-checking. It prints a line with its check and
failure counts and finishes with `$finish`. To build and run one:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/fp_pkg.sv rtl/fib_pkg.sv rtl/vc_pkg.sv tb/*_pkg.sv \
    tb/tb_vocalise_top.sv --top-module tb_vocalise_top -Mdir obj -o sim
./obj/sim
```

Swap `tb_vocalise_top` for any other `tb/tb_<module>.sv`. `-Wno-fatal`
keeps the warnings on screen but lets the build finish. Builds that
include the bridges print the circular-logic warnings described above.

* **`tb_vocalise_top`** covers the system on a small grid (4×3 points,
  2 PEs, 2×2×2 boards):
  * it configures boards over the VC Bus;
  * it loads φ and rhs into every PVS;
  * the controller runs three iterations with full exchange;
  * it reads the results back;
  * it compares every point with a software Jacobi model of the whole
    domain spread over the eight boards;
  * it streams 200 points through the CIP element and compares them with a
    reference model.
* **`tb_vocalise_full`** runs the same test at full size: 10×10×6 points per
  board, 2×2×2 boards, two iterations. It takes about a minute.
