// zself_memory: Z_self memory of one core.
//
// Holds the core's own N coefficients z_j. The computation unit writes them
// (port we/waddr/wdata, core clock), the pre-processor reads them on the core
// clock (raddr/rdata) and the scan chain reads them back on the scan clock
// (sraddr/srdata) once a solve has finished. Both reads have one cycle of
// latency. The two read clocks are served by two copies that are always
// written together, as a dual-clock block RAM would be built. The memory
// follows the document; the scan read-back port is this design's addition.
module zself_memory #(
  parameter int unsigned N  = 25,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  lsq_pkg::word_t wdata,
  input  logic [AW-1:0]  raddr,
  output lsq_pkg::word_t rdata,
  input  logic           sclk,
  input  logic [AW-1:0]  sraddr,
  output lsq_pkg::word_t srdata
);

  lsq_pkg::word_t mem_c [N];   // copy read on the core clock
  lsq_pkg::word_t mem_s [N];   // copy read on the scan clock

  always_ff @(posedge clk) begin
    if (we) begin
      mem_c[waddr] <= wdata;
      mem_s[waddr] <= wdata;
    end
    rdata <= mem_c[raddr];
  end

  always_ff @(posedge sclk) begin
    srdata <= mem_s[sraddr];
  end

endmodule
