// zn_memory: Z_neighbor memory of one core.
//
// Keeps the core's reconstruction of every neighbour's N coefficients, one
// bank of N words per direction (0..7), so that the eight receivers can update
// their banks in the same cycle. During the communication phase each bank is
// read and written by its own post-processor (read-modify-write); during the
// computation phase (comp_sel = 1) all banks are read at comp_raddr by the
// computation unit, which picks one bank's output. clr writes 0 at clr_addr
// in every bank (used to clear the memory word by word when a solve starts).
// The memory and its role follow the document; the banking, the clear port
// and the one-cycle registered read are this design's choices.
module zn_memory #(
  parameter int unsigned N  = 25,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                              clk,
  input  logic                              clr,
  input  logic [AW-1:0]                     clr_addr,
  input  logic [lsq_pkg::NDIR-1:0]          we,
  input  logic [lsq_pkg::NDIR-1:0][AW-1:0]  waddr,
  input  lsq_pkg::word_t [lsq_pkg::NDIR-1:0] wdata,
  input  logic [lsq_pkg::NDIR-1:0][AW-1:0]  pp_raddr,
  input  logic                              comp_sel,
  input  logic [AW-1:0]                     comp_raddr,
  output lsq_pkg::word_t [lsq_pkg::NDIR-1:0] rdata
);

  for (genvar d = 0; d < lsq_pkg::NDIR; d++) begin : g_bank
    lsq_pkg::word_t bank [N];
    logic [AW-1:0]  ra;

    assign ra = comp_sel ? comp_raddr : pp_raddr[d];

    always_ff @(posedge clk) begin
      if (clr)     bank[clr_addr] <= '0;
      else if (we[d]) bank[waddr[d]] <= wdata[d];
      rdata[d] <= bank[ra];
    end
  end

endmodule
