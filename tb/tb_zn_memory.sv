// tb_zn_memory: exercises the eight Z_neighbor banks: simultaneous
// per-bank writes, per-bank reads for the post-processors, the shared read
// address of the computation unit, and the clear port.
module tb_zn_memory;
  localparam int N = 5;
  localparam int AW = $clog2(N);
  localparam int D = 8;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 0, comp_sel = 0;
  logic [AW-1:0] clr_addr = '0, comp_raddr = '0;
  logic [D-1:0] we = '0;
  logic [D-1:0][AW-1:0] waddr = '0, pp_raddr = '0;
  lsq_pkg::word_t [D-1:0] wdata = '0, rdata;
  lsq_pkg::word_t model [D][N];

  always #5 clk = ~clk;
  zn_memory #(.N(N)) dut (.*);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_bank(input int d, input int a, input lsq_pkg::word_t e);
    checks++;
    if (rdata[d] !== e) begin failures++; $display("FAIL bank %0d addr %0d got %h exp %h", d, a, rdata[d], e); end
  endtask

  initial begin
    // clear all words
    for (int a = 0; a < N; a++) begin
      @(negedge clk); clr = 1; clr_addr = AW'(a);
      for (int d = 0; d < D; d++) model[d][a] = '0;
    end
    @(negedge clk); clr = 0;
    // every bank writes a different address in the same cycle
    for (int k = 0; k < 3 * N; k++) begin
      @(negedge clk);
      for (int d = 0; d < D; d++) begin
        we[d] = 1'($urandom); waddr[d] = AW'($urandom_range(N - 1)); wdata[d] = $urandom;
        if (we[d]) model[d][waddr[d]] = wdata[d];
      end
    end
    @(negedge clk); we = '0;
    // post-processor reads
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      for (int d = 0; d < D; d++) pp_raddr[d] = AW'((a + d) % N);
      @(posedge clk); #1;
      for (int d = 0; d < D; d++) expect_bank(d, (a + d) % N, model[d][(a + d) % N]);
    end
    // computation-unit reads override the per-bank addresses
    @(negedge clk); comp_sel = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); comp_raddr = AW'(a);
      @(posedge clk); #1;
      for (int d = 0; d < D; d++) expect_bank(d, a, model[d][a]);
    end
    // clear one word and check it
    @(negedge clk); clr = 1; clr_addr = AW'(2);
    @(negedge clk); clr = 0; comp_raddr = AW'(2);
    @(posedge clk); #1;
    for (int d = 0; d < D; d++) expect_bank(d, 2, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
