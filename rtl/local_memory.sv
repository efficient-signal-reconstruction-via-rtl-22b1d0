// local_memory: per-core constant store of the least-squares solver.
//
// Holds the constants one core needs for its block-Jacobi update, all
// precomputed off-line and scanned in before a solve:
//   [0, N)                    c_j = (A^T b)_j, the core's right-hand side
//   [N, N + N*N)              B_jj^-1, inverse of the core's own Gram block,
//                             row-major (element n,m at N + n*N + m)
//   [N + (1+d)*N*N, ...)      B_ji for the neighbour in direction d (0..7),
//                             row-major
// which is the contents the document lists for a core (c, B_jj^-1 and the
// eight B_ji blocks); the address map is this design's.
//
// Interface: write port on the scan clock (wclk, we, waddr, wdata), read port
// on the core clock (rclk, raddr, rdata) with one cycle of read latency, as a
// dual-clock block RAM.
module local_memory #(
  parameter int unsigned N     = 25,
  parameter int unsigned DEPTH = N + 9 * N * N,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                 wclk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  lsq_pkg::word_t       wdata,
  input  logic                 rclk,
  input  logic [AW-1:0]        raddr,
  output lsq_pkg::word_t       rdata
);

  lsq_pkg::word_t mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we && (waddr < AW'(DEPTH))) mem[waddr] <= wdata;
  end

  always_ff @(posedge rclk) begin
    rdata <= mem[raddr];
  end

endmodule
