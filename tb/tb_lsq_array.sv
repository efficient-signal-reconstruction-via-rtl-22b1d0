// tb_lsq_array: end-to-end test of the core array.
//
// Builds a random, diagonally dominant block system for a ROWS x COLS array,
// scans every core's constants in, runs num_iter iterations in 2D mode, reads
// every coefficient back through the scan chain and compares it bit for bit
// with a reference model of the whole array written here (Q16.16 update,
// delta-MSB link encoding, neighbours' copies). It then switches to 1D mode,
// runs again and compares with the 1D reference (rows independent).
// The 2D result is also compared with the fixed point of the exact real
// valued block-Jacobi iteration, to show the array actually converges.
//
// Every core has its own clock with its own period, so handshakes cross clock
// domains. The testbench counts how often each mechanism happened and fails
// a mechanism that never did: 4-phase handshakes, receiver stalls (a fast
// neighbour held off), "no change" code words, delta words, 1D and 2D runs,
// and scan writes/reads. In 1D mode no vertical or diagonal request may rise.
module tb_lsq_array;
  localparam int ROWS  = 3;
  localparam int COLS  = 3;
  localparam int NX    = 2;
  localparam int NY    = 2;
  localparam int NITER = 30;
  localparam real TOL  = 0.01;

  localparam int N    = NX * NY;
  localparam int NC   = ROWS * COLS;
  localparam int LMD  = N + 9 * N * N;
  localparam int LMAW = $clog2(LMD);

  int checks = 0, failures = 0;

  logic [NC-1:0]  core_clk = '0;
  logic           clk_run = 0;
  logic           rst_n = 0, mode_1d = 0, start = 0;
  logic [7:0]     num_iter = 8'(NITER);
  logic [NC-1:0]  done;
  logic           scan_clk = 0, scan_shift = 0, scan_wr = 0, scan_rd = 0;
  logic [LMAW-1:0] scan_addr = '0;
  lsq_pkg::word_t scan_in = '0, scan_out;

  lsq_array #(.ROWS(ROWS), .COLS(COLS), .NX(NX), .NY(NY)) dut (.*);

  // ----------------------------------------------------------------- clocks
  always #5 scan_clk = ~scan_clk;
  for (genvar k = 0; k < NC; k++) begin : g_clk
    localparam int HP = 4 + ((k * 3) % 5);   // half periods 4..8
    always begin
      #(HP);
      if (clk_run) core_clk[k] = ~core_clk[k];
    end
  end

  // --------------------------------------------------------------- problem
  int cc   [NC][N];
  int binv [NC][N][N];
  int bm   [NC][8][N][N];
  longint zref [NC][N];
  longint zt   [NC][N];

  function automatic int nbr(input int k, input int d, input bit m1d);
    int dr [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    int dc [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    int r2, c2;
    r2 = k / COLS + dr[d]; c2 = k % COLS + dc[d];
    if (r2 < 0 || r2 >= ROWS || c2 < 0 || c2 >= COLS) return -1;
    if (m1d && dr[d] != 0) return -1;
    return r2 * COLS + c2;
  endfunction

  function automatic int lm_word(input int k, input int a);
    int b, rest;
    if (a < N) return cc[k][a];
    if (a < N + N * N) return binv[k][(a - N) / N][(a - N) % N];
    rest = a - N - N * N;
    b = rest / (N * N);
    rest = rest % (N * N);
    return bm[k][b][rest / N][rest % N];
  endfunction

  function automatic longint sat32(input logic signed [95:0] v);
    if (v > 96'sd2147483647) return 64'sd2147483647;
    if (v < -96'sd2147483648) return -64'sd2147483648;
    return longint'(v);
  endfunction

  // value actually sent for a change: sign and MSB only
  function automatic longint msb_step(input longint diff);
    longint mag, p;
    if (diff == 0) return 0;
    mag = diff < 0 ? -diff : diff;
    p = 1;
    while (p * 2 <= mag && p < (64'sd1 <<< 30)) p = p * 2;
    return diff < 0 ? -p : p;
  endfunction

  task automatic make_problem();
    for (int k = 0; k < NC; k++) begin
      for (int n = 0; n < N; n++) begin
        cc[k][n] = $signed(18'($urandom));                 // about +/-2.0
        for (int m = 0; m < N; m++)
          binv[k][n][m] = (n == m) ? 16384 + $urandom_range(8192) : $signed(9'($urandom));
      end
      for (int d = 0; d < 8; d++)
        for (int n = 0; n < N; n++)
          for (int m = 0; m < N; m++)
            bm[k][d][n][m] = (nbr(k, d, 0) < 0) ? 0 : $signed(10'($urandom)) / N;
    end
  endtask

  task automatic reference(input bit m1d, input int iters);
    longint znew [NC][N];
    for (int k = 0; k < NC; k++) for (int n = 0; n < N; n++) begin zref[k][n] = 0; zt[k][n] = 0; end
    for (int it = 0; it < iters; it++) begin
      for (int k = 0; k < NC; k++) begin
        longint r [N];
        for (int n = 0; n < N; n++) begin
          logic signed [95:0] acc;
          acc = 96'(longint'(cc[k][n])) <<< 16;
          for (int d = 0; d < 8; d++) begin
            int j;
            j = nbr(k, d, m1d);
            if (j >= 0)
              for (int m = 0; m < N; m++) acc -= 96'(longint'(bm[k][d][n][m])) * 96'(zt[j][m]);
          end
          r[n] = sat32(acc >>> 16);
        end
        for (int n = 0; n < N; n++) begin
          logic signed [95:0] acc;
          acc = 0;
          for (int m = 0; m < N; m++) acc += 96'(longint'(binv[k][n][m])) * 96'(r[m]);
          znew[k][n] = sat32(acc >>> 16);
        end
      end
      for (int k = 0; k < NC; k++) for (int n = 0; n < N; n++) begin
        zref[k][n] = znew[k][n];
        zt[k][n]   = sat32(96'(zt[k][n] + msb_step(sat32(96'(znew[k][n] - zt[k][n])))));
      end
    end
  endtask

  // exact real-valued fixed point of the 2D iteration
  real zf [NC][N];
  task automatic float_solution();
    real zo [NC][N];
    for (int k = 0; k < NC; k++) for (int n = 0; n < N; n++) zf[k][n] = 0.0;
    for (int it = 0; it < 200; it++) begin
      zo = zf;
      for (int k = 0; k < NC; k++) begin
        real r [N];
        for (int n = 0; n < N; n++) begin
          r[n] = cc[k][n] / 65536.0;
          for (int d = 0; d < 8; d++) begin
            int j;
            j = nbr(k, d, 0);
            if (j >= 0) for (int m = 0; m < N; m++) r[n] -= (bm[k][d][n][m] / 65536.0) * zo[j][m];
          end
        end
        for (int n = 0; n < N; n++) begin
          zf[k][n] = 0.0;
          for (int m = 0; m < N; m++) zf[k][n] += (binv[k][n][m] / 65536.0) * r[m];
        end
      end
    end
  endtask

  // ------------------------------------------------------------ scan access
  int n_scan_wr = 0, n_scan_rd = 0;

  task automatic scan_load();
    for (int a = 0; a < LMD; a++) begin
      for (int s = 0; s < NC; s++) begin
        @(negedge scan_clk);
        scan_shift = 1; scan_wr = 0; scan_in = lsq_pkg::word_t'(lm_word(NC - 1 - s, a));
      end
      @(negedge scan_clk);
      scan_shift = 0; scan_wr = 1; scan_addr = LMAW'(a);
      n_scan_wr++;
    end
    @(negedge scan_clk);
    scan_wr = 0;
  endtask

  task automatic scan_read(output longint zhw [NC][N]);
    for (int n = 0; n < N; n++) begin
      @(negedge scan_clk); scan_rd = 1; scan_addr = LMAW'(n);
      @(negedge scan_clk); scan_rd = 0;
      @(negedge scan_clk);
      n_scan_rd++;
      for (int s = 0; s < NC; s++) begin
        zhw[NC - 1 - s][n] = longint'(scan_out);
        scan_shift = 1;
        @(negedge scan_clk);
        scan_shift = 0;
      end
    end
  endtask

  // -------------------------------------------------------------- monitors
  int n_hs = 0, n_zero = 0, n_delta = 0, n_vert_1d = 0, n_stall = 0;
  logic [7:0] req_q [NC];
  initial for (int k = 0; k < NC; k++) req_q[k] = '0;
  always #1 begin
    for (int k = 0; k < NC; k++) begin
      logic [7:0] rq;
      rq = dut.tx_req[k];
      for (int d = 0; d < 8; d++) if (rq[d] && !req_q[k][d]) begin
        n_hs++;
        if (dut.tx_data[k].pos == 5'd31) n_zero++; else n_delta++;
        if (mode_1d && d != 3 && d != 4) n_vert_1d++;
      end
      req_q[k] = rq;
    end
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_mr
    for (genvar c = 0; c < COLS; c++) begin : g_mc
      always @(posedge core_clk[r * COLS + c])
        if (rst_n && |dut.g_row[r].g_col[c].u_core.rx_stalled) n_stall++;
    end
  end

  task automatic mech(input string name, input int count);
    checks++;
    $display("mechanism %-28s %0d", name, count);
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", name); end
  endtask

  // ------------------------------------------------------------------ run
  task automatic run_solve(input bit m1d, output longint zhw [NC][N], output longint cycles);
    longint t0;
    mode_1d = m1d;
    @(negedge scan_clk);
    clk_run = 1;
    t0 = $time;
    start = 1;
    wait (&done);
    cycles = ($time - t0) / 10;
    start = 0;
    repeat (20) @(negedge scan_clk);
    clk_run = 0;
    scan_read(zhw);
  endtask

  task automatic compare(input longint zhw [NC][N], input string what);
    int bad;
    bad = 0;
    for (int k = 0; k < NC; k++) for (int n = 0; n < N; n++) begin
      checks++;
      if (zhw[k][n] != zref[k][n]) begin
        failures++; bad++;
        if (bad < 10) $display("FAIL %s core %0d z[%0d] got %0d exp %0d", what, k, n, zhw[k][n], zref[k][n]);
      end
    end
  endtask

  initial begin
    #(64'd2000000000); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint zhw [NC][N];
    longint cyc2, cyc1;
    real maxerr;
    int n_runs_2d = 0, n_runs_1d = 0;
    make_problem();
    clk_run = 1;                       // clock every core through reset
    repeat (4) @(negedge scan_clk);
    rst_n = 1;
    repeat (2) @(negedge scan_clk);
    clk_run = 0;                       // core clocks stay off while loading
    scan_load();

    // 2D
    run_solve(0, zhw, cyc2);
    n_runs_2d++;
    reference(0, NITER);
    compare(zhw, "2D");
    float_solution();
    maxerr = 0.0;
    for (int k = 0; k < NC; k++) for (int n = 0; n < N; n++) begin
      real e;
      e = zhw[k][n] / 65536.0 - zf[k][n];
      if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
    end
    checks++;
    $display("2D: %0d iterations in about %0d scan-clock periods, max |z - z*| = %f", NITER, cyc2, maxerr);
    if (maxerr > TOL) begin failures++; $display("FAIL no convergence to the real solution"); end

    // 1D: the vertical and diagonal channels are off
    run_solve(1, zhw, cyc1);
    n_runs_1d++;
    reference(1, NITER);
    compare(zhw, "1D");
    checks++;
    if (n_vert_1d != 0) begin failures++; $display("FAIL %0d vertical/diagonal requests in 1D mode", n_vert_1d); end
    $display("1D: %0d iterations in about %0d scan-clock periods", NITER, cyc1);

    mech("4-phase handshakes", n_hs);
    mech("receiver stall cycles", n_stall);
    mech("delta-MSB words", n_delta);
    mech("no-change words", n_zero);
    mech("2D runs", n_runs_2d);
    mech("1D runs (mode switch)", n_runs_1d);
    mech("scan writes", n_scan_wr);
    mech("scan reads", n_scan_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
