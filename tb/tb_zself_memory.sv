// tb_zself_memory: writes random coefficients on the core clock and checks
// they read back identically on the core-clock port and on the scan-clock
// port, each with one cycle of latency.
module tb_zself_memory;
  localparam int N = 7;
  localparam int AW = $clog2(N);
  int checks = 0, failures = 0;
  logic clk = 0, sclk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0, sraddr = '0;
  lsq_pkg::word_t wdata = '0, rdata, srdata;
  lsq_pkg::word_t model [N];

  always #5 clk = ~clk;
  always #8 sclk = ~sclk;

  zself_memory #(.N(N)) dut (.*);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int a = 0; a < N; a++) begin
        @(negedge clk); we = 1; waddr = AW'(a); wdata = $urandom; model[a] = wdata;
      end
      @(negedge clk); we = 0;
      for (int a = 0; a < N; a++) begin
        @(negedge clk); raddr = AW'(a);
        @(posedge clk); #1; checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL core port %0d", a); end
        @(negedge sclk); sraddr = AW'(N - 1 - a);
        @(posedge sclk); #1; checks++;
        if (srdata !== model[N-1-a]) begin failures++; $display("FAIL scan port %0d", N-1-a); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
