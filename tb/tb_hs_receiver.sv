// tb_hs_receiver: checks the receiver side of the 4-phase handshake.
// A sender model on an unrelated clock pushes words with a 4-phase protocol.
// The testbench checks that each word is handed on with its arrival index,
// that Ack follows Req, that no word is taken while enable is low (stall) or
// after N words in one iteration, and that complete rises after N words and
// is cleared by clr_cnt.
module tb_hs_receiver;
  localparam int N = 6;
  localparam int AW = $clog2(N);
  int checks = 0, failures = 0;
  logic clk = 0, sclk = 0, rst_n = 0, enable = 0, clr_cnt = 0, req = 0;
  logic ack, out_valid, complete, stalled;
  lsq_pkg::dcode_t data = '0, out_code;
  logic [AW-1:0] out_idx;
  int sent = 0, got = 0, stall_cycles = 0;
  lsq_pkg::dcode_t words [64];

  always #5 clk = ~clk;
  always #4 sclk = ~sclk;

  hs_receiver #(.N(N)) dut (.*);

  // sender model
  task automatic send(input lsq_pkg::dcode_t w);
    @(posedge sclk); data = w;
    @(posedge sclk); req = 1;
    wait (ack);
    @(posedge sclk); req = 0;
    wait (!ack);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (out_code !== words[got] || int'(out_idx) != (got % N)) begin
        failures++; $display("FAIL word %0d: %h idx %0d", got, out_code, out_idx);
      end
      got++;
    end
    if (rst_n && stalled) stall_cycles++;
  end

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) words[i] = lsq_pkg::dcode_t'(6'($urandom));
    repeat (3) @(negedge clk);
    rst_n = 1;
    // sender runs freely for two iterations worth of words
    fork
      for (int i = 0; i < 2 * N; i++) begin send(words[i]); sent++; end
    join_none
    // not enabled yet: sender must stall
    repeat (40) @(negedge clk);
    checks++;
    if (got != 0 || stall_cycles == 0) begin failures++; $display("FAIL no stall while disabled (got %0d)", got); end
    @(negedge clk); clr_cnt = 1; @(negedge clk); clr_cnt = 0; enable = 1;
    wait (complete);
    @(negedge clk);
    checks++;
    if (got != N) begin failures++; $display("FAIL got %0d words in iteration 1", got); end
    // still enabled but N words taken: further words stall
    repeat (40) @(negedge clk);
    checks++;
    if (got != N) begin failures++; $display("FAIL took more than N words"); end
    enable = 0;
    @(negedge clk); clr_cnt = 1; @(negedge clk); clr_cnt = 0;
    checks++;
    if (complete) begin failures++; $display("FAIL complete not cleared"); end
    enable = 1;
    wait (complete);
    repeat (3) @(negedge clk);
    checks++;
    if (got != 2 * N || sent != 2 * N) begin failures++; $display("FAIL second iteration got %0d sent %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
