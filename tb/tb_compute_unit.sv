// tb_compute_unit: checks one block-Jacobi update of the computation unit.
// The testbench plays the local memory and the eight Z_neighbor banks (one
// cycle read latency), fills them with random Q16.16 constants and neighbour
// values, and compares every z_j word written with its own wide-integer
// computation r = sat((c*2^16 - sum B_ji z_i) >> 16), z = sat((Binv r) >> 16).
// Several sets of live neighbours are used (all, none, only W/E, a sparse
// set), plus a case with large values that drives the results into
// saturation. The number of cycles from start to done is checked against
//   N*(1 + E*N + G) + N*N + 7
// with E live directions and G dead directions before the last live one.
module tb_compute_unit;
  localparam int N = 4;
  localparam int AW = $clog2(N);
  localparam int LMD = N + 9 * N * N;
  localparam int LMAW = $clog2(LMD);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, zs_we;
  logic [7:0] nbr_en = '0;
  logic [LMAW-1:0] lm_raddr;
  logic [AW-1:0] zn_raddr, zs_waddr;
  lsq_pkg::word_t lm_rdata, zs_wdata;
  lsq_pkg::word_t [7:0] zn_rdata;
  lsq_pkg::word_t lm [LMD];
  lsq_pkg::word_t zn [8][N];
  longint zexp [N];
  int writes;

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    lm_rdata <= lm[lm_raddr];
    for (int d = 0; d < 8; d++) zn_rdata[d] <= zn[d][zn_raddr];
  end

  compute_unit #(.N(N)) dut (.*);

  function automatic longint sat32w(input logic signed [95:0] v);
    if (v > 96'sd2147483647) return 64'sd2147483647;
    if (v < -96'sd2147483648) return -64'sd2147483648;
    return longint'(v);
  endfunction

  task automatic reference();
    longint r [N];
    for (int n = 0; n < N; n++) begin
      logic signed [95:0] acc;
      acc = 96'(longint'(lm[n])) <<< 16;
      for (int d = 0; d < 8; d++) if (nbr_en[d])
        for (int m = 0; m < N; m++)
          acc -= 96'(longint'(lm[N + N*N*(1+d) + N*n + m])) * 96'(longint'(zn[d][m]));
      r[n] = sat32w(acc >>> 16);
    end
    for (int n = 0; n < N; n++) begin
      logic signed [95:0] acc;
      acc = 0;
      for (int m = 0; m < N; m++) acc += 96'(longint'(lm[N + N*n + m])) * 96'(r[m]);
      zexp[n] = sat32w(acc >>> 16);
    end
  endtask

  always @(posedge clk) if (rst_n && zs_we) begin
    checks++;
    writes++;
    if (longint'(zs_wdata) != zexp[zs_waddr]) begin
      failures++; $display("FAIL z[%0d] got %0d exp %0d (en %b)", zs_waddr, zs_wdata, zexp[zs_waddr], nbr_en);
    end
  end

  task automatic run(input logic [7:0] en, input int big);
    int cyc, e, g, last, expc;
    nbr_en = en;
    for (int a = 0; a < LMD; a++) lm[a] = big ? $urandom : 32'($signed(15'($urandom)));
    for (int n = 0; n < N; n++) lm[N + N*n + n] = big ? 32'h7fff_0000 : 32'sd16384 + 32'($urandom_range(4000));
    for (int d = 0; d < 8; d++) for (int m = 0; m < N; m++) zn[d][m] = big ? $urandom : 32'($signed(20'($urandom)));
    reference();
    writes = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    e = $countones(en); last = -1; g = 0;
    for (int d = 0; d < 8; d++) if (en[d]) last = d;
    for (int d = 0; d < last; d++) if (!en[d]) g++;
    expc = N * (1 + e * N + g) + N * N + 7;
    checks++;
    if (cyc != expc) begin failures++; $display("FAIL cycles %0d exp %0d (en %b)", cyc, expc, en); end
    checks++;
    if (writes != N) begin failures++; $display("FAIL %0d writes", writes); end
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    #10000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(8'hff, 0);
    run(8'h00, 0);
    run(8'b0001_1000, 0);
    run(8'b1010_0100, 0);
    run(8'h01, 0);
    for (int i = 0; i < 4; i++) run(8'($urandom), 0);
    run(8'hff, 1);
    run(8'b0001_1000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
