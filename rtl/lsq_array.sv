// lsq_array: top level, a ROWS x COLS array of least-squares cores.
//
// The array reconstructs a non-uniformly sampled 2D signal by solving the
// least-squares system (A^T A) z = A^T b for the coefficients of a lapped
// cosine-IV basis. The signal is cut into ROWS x COLS frames; each core owns
// the NX*NY coefficients of one frame and its constants (c_j and the Gram
// blocks B_jj^-1, B_ji, precomputed off-line). Because the basis of a frame
// only overlaps its neighbours, each core needs only the coefficients of its
// eight neighbours, which it receives every iteration over asynchronous
// 4-phase handshake links: every core runs on its own clock (core_clk[k],
// k = row*COLS + col) and there is no global clock (GALS). In 1D mode
// (mode_1d = 1) the vertical and diagonal channels are switched off and each
// row of cores works as an independent 1D chain.
//
// Operation:
//  1. Load constants with the scan chain (scan_clk domain). The chain is one
//     32-bit word per core, from scan_in through core 0, 1, ... to scan_out.
//     For each local-memory address: shift ROWS*COLS words in (the word for
//     the last core first), then pulse scan_wr with scan_addr set; every core
//     writes its word. Address map per core: see local_memory.
//  2. Raise start (asynchronous level) with num_iter set. Each core clears its
//     neighbour copies, runs num_iter compute/communicate iterations and
//     raises done[k].
//  3. Read the result: pulse scan_rd with scan_addr = coefficient index (each
//     core loads z_j[scan_addr] one scan clock later), then shift ROWS*COLS
//     times; scan_out shows the last core's word first.
// The array, the neighbour links, the 1D/2D switch, the per-core clocks and
// the scanned-in constants follow the document; the scan chain format, the
// start/done convention and the result read-back are this design's choices.
module lsq_array #(
  parameter int          ROWS = 8,
  parameter int          COLS = 8,
  parameter int unsigned NX   = 5,
  parameter int unsigned NY   = 5,
  parameter int unsigned ITW  = 8,
  parameter int unsigned N    = NX * NY,
  parameter int unsigned LMAW = $clog2(N + 9 * N * N)
) (
  input  logic [ROWS*COLS-1:0] core_clk,
  input  logic                 rst_n,
  input  logic                 mode_1d,
  input  logic                 start,
  input  logic [ITW-1:0]       num_iter,
  output logic [ROWS*COLS-1:0] done,
  input  logic                 scan_clk,
  input  logic                 scan_shift,
  input  logic                 scan_wr,
  input  logic                 scan_rd,
  input  logic [LMAW-1:0]      scan_addr,
  input  lsq_pkg::word_t       scan_in,
  output lsq_pkg::word_t       scan_out
);
  import lsq_pkg::*;

  localparam int NC = ROWS * COLS;

  logic [NDIR-1:0]         tx_req  [NC];
  logic [NDIR-1:0]         tx_ack  [NC];
  dcode_t                  tx_data [NC];
  logic [NDIR-1:0]         rx_req  [NC];
  logic [NDIR-1:0]         rx_ack  [NC];
  dcode_t [NDIR-1:0]       rx_data [NC];
  word_t                   chain   [NC+1];

  assign chain[0] = scan_in;
  assign scan_out = chain[NC];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int K = r * COLS + c;

      // Link wiring: my outgoing link d reaches the neighbour in direction d,
      // which receives it on its direction 7-d.
      for (genvar d = 0; d < NDIR; d++) begin : g_link
        localparam int R2 = r + dir_drow(d);
        localparam int C2 = c + dir_dcol(d);
        if (R2 >= 0 && R2 < ROWS && C2 >= 0 && C2 < COLS) begin : g_on
          localparam int K2 = R2 * COLS + C2;
          assign rx_req[K][d]  = tx_req[K2][NDIR-1-d];
          assign rx_data[K][d] = tx_data[K2];
          assign tx_ack[K][d]  = rx_ack[K2][NDIR-1-d];
        end else begin : g_off
          assign rx_req[K][d]  = 1'b0;
          assign rx_data[K][d] = '{neg: 1'b0, pos: POS_ZERO};
          assign tx_ack[K][d]  = 1'b0;
        end
      end

      lsq_core #(
        .ROW(r), .COL(c), .ROWS(ROWS), .COLS(COLS), .N(N), .ITW(ITW)
      ) u_core (
        .clk        (core_clk[K]),
        .rst_n      (rst_n),
        .start      (start),
        .num_iter   (num_iter),
        .mode_1d    (mode_1d),
        .done       (done[K]),
        .tx_req     (tx_req[K]),
        .tx_data    (tx_data[K]),
        .tx_ack     (tx_ack[K]),
        .rx_req     (rx_req[K]),
        .rx_data    (rx_data[K]),
        .rx_ack     (rx_ack[K]),
        .scan_clk   (scan_clk),
        .scan_shift (scan_shift),
        .scan_wr    (scan_wr),
        .scan_rd    (scan_rd),
        .scan_addr  (scan_addr),
        .scan_in    (chain[K]),
        .scan_out   (chain[K+1])
      );
    end
  end

endmodule
