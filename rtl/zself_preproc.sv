// zself_preproc: Z_self pre-processor, the delta-MSB encoder of a core.
//
// To cut the number of wires between cores, a coefficient is not sent whole.
// The encoder takes the change of the coefficient and sends only its sign and
// the position of its most significant bit, log2(32)+1 = 6 wires; the receiver
// adds +/-2^pos to its copy. The change is measured against a private copy,
// zt, of what the neighbours have reconstructed so far, and zt is advanced by
// exactly the value sent, so sender and receivers always agree and the
// neighbours' copies approach z by at least half the remaining error per
// iteration. The two-step encoding (change, then MSB position) follows the
// document; the reference copy zt, the zero code and the clamping are this
// design's choices (see lsq_pkg).
//
// Interface and timing: pulse req with idx; the Z_self read address is idx in
// that cycle; two cycles later valid pulses with code. clr with clr_addr
// zeroes one word of zt (done word by word when a solve starts).
module zself_preproc #(
  parameter int unsigned N  = 25,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic [AW-1:0]   clr_addr,
  input  logic            req,
  input  logic [AW-1:0]   idx,
  output logic [AW-1:0]   zs_raddr,
  input  lsq_pkg::word_t  zs_rdata,
  output logic            valid,
  output lsq_pkg::dcode_t code
);
  import lsq_pkg::*;

  word_t         zt [N];
  word_t         zt_q;
  logic          pend;
  logic [AW-1:0] idx_q;
  dcode_t        c_next;

  assign zs_raddr = idx;
  assign c_next   = dcode_encode(sat_sub(zs_rdata, zt_q));

  always_ff @(posedge clk) begin
    zt_q <= zt[idx];
    if (clr) zt[clr_addr] <= '0;
    else if (pend) zt[idx_q] <= sat_add(zt_q, dcode_value(c_next));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend  <= 1'b0;
      idx_q <= '0;
      valid <= 1'b0;
      code  <= '{neg: 1'b0, pos: POS_ZERO};
    end else begin
      pend  <= req;
      valid <= pend;
      if (req)  idx_q <= idx;
      if (pend) code  <= c_next;
    end
  end

endmodule
