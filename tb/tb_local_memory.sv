// tb_local_memory: writes the whole constant store through the scan-clock
// port with random words, then reads every address back on an unrelated core
// clock and checks the one-cycle read latency and the data.
module tb_local_memory;
  localparam int N = 3;
  localparam int DEPTH = N + 9 * N * N;
  localparam int AW = $clog2(DEPTH);
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  lsq_pkg::word_t wdata = '0, rdata;
  lsq_pkg::word_t model [DEPTH];

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  local_memory #(.N(N)) dut (.*);

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge wclk);
      we = 1; waddr = AW'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge wclk); we = 0;
    // out-of-range write must be ignored
    @(negedge wclk); we = 1; waddr = AW'(DEPTH); wdata = 32'hdead_beef;
    @(negedge wclk); we = 0;
    for (int a = DEPTH - 1; a >= 0; a--) begin
      @(negedge rclk); raddr = AW'(a);
      @(posedge rclk); #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
