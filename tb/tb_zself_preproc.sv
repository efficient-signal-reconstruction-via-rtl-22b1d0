// tb_zself_preproc: checks the delta-MSB encoder.
// The testbench plays the Z_self memory (one-cycle read latency) with random
// coefficients, asks for codes, and compares each code with its own model:
// change = z - (sum of values already sent), sign and MSB position of the
// change, 31 for no change, position clamped to 30. It also checks that the
// value sent so far converges on z when the same z is encoded repeatedly,
// that the code arrives two cycles after the request, and that clr restarts
// the reference at zero.
module tb_zself_preproc;
  localparam int N = 6;
  localparam int AW = $clog2(N);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, req = 0, valid;
  logic [AW-1:0] clr_addr = '0, idx = '0, zs_raddr;
  lsq_pkg::word_t zs_rdata;
  lsq_pkg::dcode_t code;
  longint z [N];
  longint sent [N];

  always #5 clk = ~clk;
  always_ff @(posedge clk) zs_rdata <= lsq_pkg::word_t'(z[zs_raddr]);

  zself_preproc #(.N(N)) dut (.*);

  function automatic longint sat32(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  function automatic longint val_of(input logic neg, input int pos);
    if (pos == 31) return 0;
    return neg ? -(64'sd1 <<< pos) : (64'sd1 <<< pos);
  endfunction

  task automatic one(input int i);
    longint diff, mag;
    int p;
    logic n;
    diff = sat32(z[i] - sent[i]);
    n = diff < 0;
    mag = n ? -diff : diff;
    p = 31;
    if (mag != 0) begin
      p = 0;
      while ((64'sd1 <<< (p + 1)) <= mag && p < 30) p++;
    end
    @(negedge clk); req = 1; idx = AW'(i);
    @(negedge clk); req = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid too early"); end
    @(negedge clk);
    checks++;
    if (!valid || code.neg !== n || int'(code.pos) != p) begin
      failures++;
      $display("FAIL idx %0d diff %0d: got v=%0b neg=%0b pos=%0d exp neg=%0b pos=%0d", i, diff, valid, code.neg, code.pos, n, p);
    end
    sent[i] = sat32(sent[i] + val_of(n, p));
  endtask

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); clr = 1; clr_addr = AW'(i); sent[i] = 0; z[i] = 0;
    end
    @(negedge clk); clr = 0;
    z[0] = 0; z[1] = 1; z[2] = -1; z[3] = 64'sd2147483647; z[4] = -64'sd2147483648; z[5] = 12345678;
    for (int rep = 0; rep < 40; rep++)
      for (int i = 0; i < N; i++) one(i);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent[i] != z[i]) begin failures++; $display("FAIL no convergence idx %0d sent %0d z %0d", i, sent[i], z[i]); end
    end
    // random walks
    for (int rep = 0; rep < 300; rep++) begin
      int i;
      i = $urandom_range(N - 1);
      z[i] = longint'($signed($urandom));
      if ($urandom_range(3) == 0) z[i] = z[i] >>> 12;
      one(i);
    end
    // clear restarts the reference
    for (int i = 0; i < N; i++) begin
      @(negedge clk); clr = 1; clr_addr = AW'(i); sent[i] = 0;
    end
    @(negedge clk); clr = 0;
    for (int i = 0; i < N; i++) one(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
