// tb_lsq_core: tests one core with a modelled neighbour.
//
// The core sits at the west end of a 1 x 2 array, so only its east link is
// live. The testbench plays the east neighbour on its own clock: it pushes a
// batch of N random code words per iteration into the core's receiver over
// the 4-phase handshake (it may run ahead; the core stalls it) and
// acknowledges the words the core transmits after random delays. Constants
// are scanned in, num_iter iterations are run, and the testbench checks
//  * every code word the core sends against a reference computation of the
//    block-Jacobi update and the delta-MSB encoder,
//  * the final coefficients read back through the scan stage,
//  * that done rises, that a second start re-runs from cleared state, and
//    that num_iter = 0 finishes at once.
module tb_lsq_core;
  localparam int N    = 3;
  localparam int NIT  = 6;
  localparam int LMD  = N + 9 * N * N;
  localparam int LMAW = $clog2(LMD);
  localparam int E    = 4;                     // east direction

  int checks = 0, failures = 0;
  logic clk = 0, nclk = 0, scan_clk = 0;
  logic rst_n = 0, start = 0, mode_1d = 0, done;
  logic [7:0] num_iter = 8'(NIT);
  logic [7:0] tx_req, tx_ack = '0, rx_req = '0, rx_ack;
  lsq_pkg::dcode_t tx_data;
  lsq_pkg::dcode_t [7:0] rx_data = '0;
  logic scan_shift = 0, scan_wr = 0, scan_rd = 0;
  logic [LMAW-1:0] scan_addr = '0;
  lsq_pkg::word_t scan_in = '0, scan_out;

  always #5 clk = ~clk;
  always #7 nclk = ~nclk;
  always #4 scan_clk = ~scan_clk;

  lsq_core #(.ROW(0), .COL(0), .ROWS(1), .COLS(2), .N(N)) dut (.*);

  int lm [LMD];
  lsq_pkg::dcode_t batch [NIT][N];       // words the neighbour sends
  lsq_pkg::dcode_t expw  [NIT * N];      // words the core must send
  longint zfinal [N];
  int nsent = 0, nrecv = 0;

  function automatic longint sat32(input logic signed [95:0] v);
    if (v > 96'sd2147483647) return 64'sd2147483647;
    if (v < -96'sd2147483648) return -64'sd2147483648;
    return longint'(v);
  endfunction

  function automatic longint cval(input lsq_pkg::dcode_t c);
    if (c.pos == 5'd31) return 0;
    return c.neg ? -(64'sd1 <<< c.pos) : (64'sd1 <<< c.pos);
  endfunction

  function automatic lsq_pkg::dcode_t enc(input longint diff);
    lsq_pkg::dcode_t c;
    longint mag;
    c.neg = diff < 0;
    mag = c.neg ? -diff : diff;
    c.pos = 5'd31;
    if (mag != 0) begin
      c.pos = 0;
      while ((64'sd1 <<< (c.pos + 1)) <= mag && c.pos < 30) c.pos++;
    end
    return c;
  endfunction

  task automatic reference(input int iters);
    longint zn [N], zt [N], z [N], r [N];
    for (int n = 0; n < N; n++) begin zn[n] = 0; zt[n] = 0; end
    for (int it = 0; it < iters; it++) begin
      for (int n = 0; n < N; n++) begin
        logic signed [95:0] acc;
        acc = 96'(longint'(lm[n])) <<< 16;
        for (int m = 0; m < N; m++) acc -= 96'(longint'(lm[N + N*N*(1+E) + N*n + m])) * 96'(zn[m]);
        r[n] = sat32(acc >>> 16);
      end
      for (int n = 0; n < N; n++) begin
        logic signed [95:0] acc;
        acc = 0;
        for (int m = 0; m < N; m++) acc += 96'(longint'(lm[N + N*n + m])) * 96'(r[m]);
        z[n] = sat32(acc >>> 16);
      end
      for (int n = 0; n < N; n++) begin
        expw[it * N + n] = enc(sat32(96'(z[n] - zt[n])));
        zt[n] = sat32(96'(zt[n] + cval(expw[it * N + n])));
        zn[n] = sat32(96'(zn[n] + cval(batch[it][n])));
      end
    end
    for (int n = 0; n < N; n++) zfinal[n] = z[n];
  endtask

  // neighbour: receiver of the core's words
  always begin
    @(posedge nclk);
    if (tx_req[E] && !tx_ack[E]) begin
      repeat ($urandom_range(3)) @(posedge nclk);
      checks++;
      if (nrecv >= NIT * N || tx_data !== expw[nrecv]) begin
        failures++; $display("FAIL core word %0d: got %b exp %b", nrecv, tx_data, expw[nrecv]);
      end
      nrecv++;
      tx_ack[E] = 1;
    end else if (!tx_req[E] && tx_ack[E]) begin
      repeat ($urandom_range(3)) @(posedge nclk);
      tx_ack[E] = 0;
    end
  end

  // neighbour: sender of its batches
  task automatic push_batches();
    for (int it = 0; it < NIT; it++)
      for (int n = 0; n < N; n++) begin
        @(posedge nclk); rx_data[E] = batch[it][n];
        @(posedge nclk); rx_req[E] = 1;
        while (!rx_ack[E]) @(posedge nclk);
        @(posedge nclk); rx_req[E] = 0;
        while (rx_ack[E]) @(posedge nclk);
        nsent++;
      end
  endtask

  task automatic scan_word_in(input int a, input int w);
    @(negedge scan_clk); scan_shift = 1; scan_wr = 0; scan_in = w;
    @(negedge scan_clk); scan_shift = 0; scan_wr = 1; scan_addr = LMAW'(a);
    @(negedge scan_clk); scan_wr = 0;
  endtask

  task automatic check_result(input string what);
    for (int n = 0; n < N; n++) begin
      @(negedge scan_clk); scan_rd = 1; scan_addr = LMAW'(n);
      @(negedge scan_clk); scan_rd = 0;
      @(negedge scan_clk);
      checks++;
      if (longint'(scan_out) != zfinal[n]) begin
        failures++; $display("FAIL %s z[%0d] got %0d exp %0d", what, n, scan_out, zfinal[n]);
      end
    end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < LMD; a++) lm[a] = $signed(12'($urandom));
    for (int n = 0; n < N; n++) begin
      lm[n] = $signed(19'($urandom));
      lm[N + N*n + n] = 20000 + $urandom_range(10000);
    end
    for (int it = 0; it < NIT; it++) for (int n = 0; n < N; n++)
      batch[it][n] = (n == 1 && it > 2) ? lsq_pkg::dcode_t'({1'b0, 5'd31}) : lsq_pkg::dcode_t'({1'($urandom), 5'($urandom_range(18))});
    reference(NIT);
    repeat (4) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < LMD; a++) scan_word_in(a, lm[a]);

    // first solve: neighbour pushes everything as fast as the core lets it
    fork push_batches(); join_none
    start = 1;
    wait (done);
    checks++;
    if (nrecv != NIT * N) begin failures++; $display("FAIL neighbour got %0d words", nrecv); end
    checks++;
    if (nsent != NIT * N) begin failures++; $display("FAIL core took %0d words", nsent); end
    check_result("run 1");
    start = 0;
    repeat (10) @(negedge clk);

    // second solve from cleared state gives the same result
    nrecv = 0; nsent = 0;
    fork push_batches(); join_none
    start = 1;
    wait (done);
    check_result("run 2");
    start = 0;
    repeat (10) @(negedge clk);

    // zero iterations: done at once, nothing sent
    num_iter = '0; nrecv = 0;
    start = 1;
    repeat (N + 10) @(negedge clk);
    checks++;
    if (!done || nrecv != 0) begin failures++; $display("FAIL num_iter=0: done=%0b words=%0d", done, nrecv); end
    start = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
