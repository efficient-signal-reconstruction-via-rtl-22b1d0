# A systolic, locally clocked least-squares solver for signal reconstruction

This RTL implements an array of small processors that together solve a large
least-squares problem by iterating, each processor talking only to its eight
immediate neighbours. The application is reconstruction of a 2D signal from
non-uniformly placed samples (CT and MRI data are typical), following the
architecture published as *Efficient Signal Reconstruction via Distributed
Least Square Optimization on a Systolic FPGA Architecture*. There is no global
clock: every core has its own clock and cores exchange data over asynchronous
4-phase handshakes built from Muller C-elements.

## The computation

The signal is modelled as a sum of lapped cosine-IV basis functions, one set of
NX x NY basis functions per frame, with the picture cut into ROWS x COLS frames.
Each sample gives one linear equation in the basis coefficients z, so the
coefficients solve `A z = b`. Instead of a pseudo-inverse the array solves the
normal equations `B z = c` with `B = A^T A`, `c = A^T b` by block-Jacobi
iteration:

    z_j(k) = B_jj^-1 * ( c_j - sum over neighbours i of B_ji * z_i(k-1) )

`z_j` are the N = NX*NY coefficients of frame j. Because a smoothed basis
function only overlaps the adjacent frames, `B_ji` is zero unless frame i is
one of the eight neighbours of frame j. So one core per frame, holding `c_j`,
`B_jj^-1` and the eight `B_ji` blocks, needs only its neighbours' previous
coefficients. `A^T A`, `A^T b` and the small block inverses are computed
off-line and scanned into the cores. The RTL does none of the signal-model
work. It is a generic sparse block-Jacobi engine.

Numbers are signed Q16.16 (32 bits, 16 fraction bits). This is the precision at
which the original work reports that reconstruction error stops improving.

## Array organisation (`lsq_array`)

```
   core(0,0) ── core(0,1) ── ...        every core links to up to 8 neighbours:
      │   ╲   ╱   │                      0 NW  1 N  2 NE
   core(1,0) ── core(1,1) ── ...         3 W         4 E
      ...                                5 SW  6 S  7 SE   (opposite = 7-d)
```

* Core k = row*COLS + col runs on `core_clk[k]`. The clocks need not be related.
* Each core broadcasts one 6-bit word at a time to all its live neighbours.
  It receives from each neighbour on a separate receiver.
* `mode_1d = 1` switches off the vertical and diagonal channels in every
  router. Each row then works as an independent 1D chain.
* A 32-bit scan chain, clocked by `scan_clk`, passes through all cores. It
  loads the constants and reads back the results.

Defaults: `ROWS = COLS = 8`, `NX = NY = 5` (N = 25), `ITW = 8` (width of
`num_iter`). The 8x8 array with a 5x5 subspace is the configuration used for
the CT-image demonstration in the original work. Fig. 2 of that work draws a
3x3 example.

## Inside a core (`lsq_core`)

```
 rx_req/rx_data[8] ─► hs_receiver x8 ─► zn_postproc x8 ─► zn_memory (8 banks)
                                                              │
                        local_memory (c, B_jj^-1, B_ji) ─► compute_unit
                                                              │
 tx_req[8] ◄─ comm_router ◄─ hs_transmitter ◄─ zself_preproc ◄─ zself_memory
```

A controller alternates two phases, `num_iter` times:

1. **Computation.** `compute_unit` forms `r = c - sum B_ji z_i` over the live
   neighbours (pass 1), then `z = B_jj^-1 r` (pass 2). It uses one 32x32
   multiplier and a 72-bit accumulator. `c` enters as `c * 1.0`, so both passes
   share one datapath. Each row result is shifted right by 16 (rounding towards
   minus infinity) and saturated to 32 bits. The sum itself is exact. One term
   is issued per clock, so with E live neighbours and G dead directions passed
   over, one update takes `N*(1 + E*N + G) + N*N + 7` cycles. That is 5,657
   cycles for an interior core at N = 25.
2. **Communication.** The transmitter sends the N new coefficients, in index
   order, as delta-MSB words. At the same time the receivers accept N words
   from every live neighbour and the post-processors fold them into the
   Z_neighbor banks. The phase ends when all acknowledges are in and all live
   receivers are complete.

When a solve starts, the core clears its neighbour copies and the
pre-processor's reference copy, word by word, which takes N cycles.

The receivers accept words only during their own core's communication phase,
and at most N words per neighbour per iteration. A neighbour that runs ahead
therefore does not get its acknowledge until this core is ready for it, so
every update uses exactly the previous iteration's values. Deadlock cannot
occur: a core leaves its communication phase only after every live neighbour
has taken all its words, so two neighbours are never more than one phase apart.

## Delta-MSB link coding (`zself_preproc`, `zn_postproc`)

Sending 32-bit words to eight neighbours would make routing the bottleneck, so
the link carries `log2(32) + 1 = 6` wires per word:

    code = { neg, pos[4:0] }   stands for  (neg ? -1 : +1) * 2^pos,   pos = 31 means "no change"

The encoder takes the difference `d = z - zt` and sends the sign and the
position of the most significant bit of |d|. The receiver adds `+/-2^pos` to
its copy. `zt` is the sender's private copy of what the neighbours have
reconstructed, and it is advanced by exactly the value sent. So sender and
receivers never drift apart, and every neighbour's copy equals `zt`. Each
word removes the leading bit of the remaining error, so the copy at least
halves its distance to z per iteration. Once z stops changing, the copy
reaches it exactly within about 31 iterations, and most words become "no
change". A difference too large for 31 bits is clamped to 2^30 and finishes in
later iterations. All adds saturate.

The original work specifies only the two steps: the change, then the MSB
position. The reference copy `zt`, the zero code and the clamping are this
design's choices.

## Handshake and clock crossing (`comm_router`, `hs_transmitter`, `hs_receiver`, `muller_c`)

Each word goes through one return-to-zero (4-phase) cycle: Req rises, Ack
rises, Req falls, Ack falls. The data is valid before Req rises.

* The transmitter places the code on `tx_data`. One local clock later it raises
  Data Ready.
* In the router, `Req = C(DataReady, not AckAll)`. Req goes out on every live
  direction.
* `AckAll` is a second C-element over the eight acknowledges. A dead direction
  (array edge, or vertical/diagonal in 1D mode) feeds Data Ready into it in
  place of an acknowledge. A core with no neighbours still completes its
  handshakes, and no combinational loop arises.
* Req and AckAll are asynchronous. Each enters the other core's clock domain
  through a two-flop synchroniser (`sync2`). One word therefore costs about
  four synchroniser delays plus a few local cycles, roughly 10 to 15 cycles.
  This is small next to the computation phase.

`muller_c` is written as a level-sensitive latch: it is enabled when all inputs
agree, and it takes the agreed value. The latch a synthesis or lint tool
reports there is that intended storage. A reset forces every C-element low.
Assertions check that the transmitter holds its data while Data Ready is high
and that the receiver's Ack follows Req.

## Loading constants and reading results (scan chain)

Local memory map per core, with words at Q16.16 and blocks row-major:

| address | contents |
|---|---|
| `0 .. N-1` | `c_j` |
| `N + n*N + m` | `B_jj^-1 (n, m)` |
| `N + (1+d)*N*N + n*N + m` | `B_ji (n, m)` for the neighbour in direction d |

In total `N + 9*N*N` words: 5,650 for N = 25, or 180.8 kbit per core.

Protocol, all on `scan_clk`:

* **Write one address.** Shift `ROWS*COLS` words in with `scan_shift`. The word
  for the last core goes first. Then pulse `scan_wr` with `scan_addr` set. Every
  core writes its own word.
* **Read coefficient n.** Pulse `scan_rd` with `scan_addr = n` and keep
  `scan_addr` for one more clock. Every core then holds its `z_j[n]`. Shift
  `ROWS*COLS` times. `scan_out` shows the last core's word first.
* **Solve.** Raise `start` (any clock) with `num_iter` set. Wait until every
  `done[k]` is high, then lower `start`. Keep `mode_1d` and `num_iter` steady
  while the array runs.

`rst_n` is an asynchronous, active-low reset shared by all cores. The core
clocks must run while it is low.

## What follows the original work and what does not

Taken from the original work:

* the array of cores with eight-neighbour links;
* one local clock per core and 4-phase handshakes with C-elements;
* the 1D/2D switch in the routers;
* the block structure of a core: receiver, post-processor, Z_neighbor memory,
  computation unit with local memory, Z_self memory, pre-processor,
  transmitter;
* the split into a computation phase and a communication phase;
* the Jacobi update with precomputed `B_jj^-1` and `B_ji`;
* the delta-MSB idea with 6 wires;
* Q16.16 numbers, the 8x8 / 5x5 configuration and scanned-in constants.

This design's own choices, where the original is silent:

* the direction numbering;
* the single multiplier and the accumulator width;
* rounding (truncation) and saturation;
* the use of the full block inverse;
* the reference copy, zero code and clamping of the delta-MSB coder;
* the synchronisers;
* the stall rule that keeps iterations aligned;
* the dead-direction rule in the acknowledge join;
* the scan chain format and the result read-back;
* the start/done convention;
* the reset.

Not built:

* **Full-word links.** The original compares delta-MSB links with sending
  full 32-bit words (reporting about 44 % lower power for delta-MSB and
  nearly equal accuracy). Only delta-MSB is built.
* **Other number formats and signal models.** The precision sweeps
  (Q2.2 to Q32.32) and the signal-model pre-computation (basis functions,
  `A^T A`, block inverses) are not built. The latter is host software.
* **FPGA board and software emulator.** Both are outside the RTL.

Workloads from the original evaluation, at the default parameters:

* **Fits:** the 800x800 CT image on 8x8 cores with a 5x5 subspace. In total
  11.6 Mbit of constants, within the 27 Mbit of block RAM of the Virtex-7
  XC7VX485T it was built on.
* **Fits with zero padding:** smaller subspaces (2x2 to 4x4), 1D chains of up
  to 8 cores and 2D grids up to 6x6. Unused coefficients or cores get zero
  constants.
* **Does not fit:** subspaces 6x6 to 9x9 and 1D chains of 16 or 32 cores.
  These need `NX`/`NY` raised, or `ROWS = 1, COLS = 32`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_muller_c` | C-element truth table and hold, with inversion |
| `tb_local_memory`, `tb_zself_memory`, `tb_zn_memory` | dual-clock reads and writes, banking, clear |
| `tb_zself_preproc`, `tb_zn_postproc` | delta-MSB coding against an independent model, convergence of the copy, saturation |
| `tb_hs_transmitter`, `tb_hs_receiver` | 4-phase order, word order, stall, per-iteration limit, crossing to an unrelated clock |
| `tb_comm_router` | live directions in 1D/2D at corner, edge and centre; Req fan-out; Ack join |
| `tb_compute_unit` | every z word against a wide-integer model for several neighbour sets, saturation, exact cycle count |
| `tb_lsq_core` | one core against a modelled neighbour: every sent word, results, restart, `num_iter = 0` |
| `tb_lsq_array` | 3x3 cores, N = 4, 30 iterations, 2D then 1D, bit-exact against a model of the whole array, and converged to the real-valued solution |
| `tb_lsq_array_full` | the same at the default 8x8 cores, N = 25, 10 iterations per run |

The array testbenches give each core a different clock period. They count the
mechanisms that occur (handshakes, receiver stalls, delta and no-change words,
1D and 2D runs, scan writes and reads) and fail if one never happens. At full
size, 10 iterations bring every coefficient within 2e-5 of the real-valued
solution of the random test problem.

To run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/lsq_pkg.sv tb/tb_lsq_array.sv \
        --top-module tb_lsq_array -Mdir obj_tb -o sim
    ./obj_tb/sim

The full-size testbench builds in about 2 minutes and simulates in about half a
minute.

## Files

* `rtl/lsq_pkg.sv`: word and code types, direction tables, the coding and
  saturation functions.
* `rtl/lsq_array.sv`: the top level.
* `rtl/lsq_core.sv`: one core.
* The other modules are the blocks named above. `rtl/sync2.sv` is the two-flop
  synchroniser.
