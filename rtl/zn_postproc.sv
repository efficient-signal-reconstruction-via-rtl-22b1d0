// zn_postproc: Z_neighbor post-processor, the delta-MSB decoder for one
// neighbour direction.
//
// A received code word {neg, pos} stands for +/-2^pos (or no change for
// pos = 31). The post-processor reads the stored copy of that coefficient from
// its Z_neighbor bank, adds the decoded value with saturation and writes the
// sum back. Decoding follows the document's delta-MSB scheme; the
// read-modify-write timing is this design's.
//
// Interface and timing: in_valid with in_idx and in_code starts an update; the
// bank read address is in_idx in that cycle (one-cycle read latency); the
// write (we, waddr, wdata) happens in the next cycle. A new word may arrive
// every second cycle, far faster than the handshake delivers them.
module zn_postproc #(
  parameter int unsigned N  = 25,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [AW-1:0]   in_idx,
  input  lsq_pkg::dcode_t in_code,
  output logic [AW-1:0]   raddr,
  input  lsq_pkg::word_t  rdata,
  output logic            we,
  output logic [AW-1:0]   waddr,
  output lsq_pkg::word_t  wdata
);
  import lsq_pkg::*;

  logic   pend;
  dcode_t code_q;

  assign raddr = in_idx;
  assign we    = pend;
  assign wdata = sat_add(rdata, dcode_value(code_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend   <= 1'b0;
      waddr  <= '0;
      code_q <= '{neg: 1'b0, pos: POS_ZERO};
    end else begin
      pend <= in_valid;
      if (in_valid) begin
        waddr  <= in_idx;
        code_q <= in_code;
      end
    end
  end

endmodule
