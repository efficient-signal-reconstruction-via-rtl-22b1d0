// tb_zn_postproc: checks the delta-MSB decoder. The testbench plays the
// Z_neighbor bank (one-cycle read), sends random codes and checks that each
// write, one cycle after the word, stores the old value plus +/-2^pos
// (nothing for pos 31), saturated to 32 bits.
module tb_zn_postproc;
  localparam int N = 5;
  localparam int AW = $clog2(N);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, we;
  logic [AW-1:0] in_idx = '0, raddr, waddr;
  lsq_pkg::dcode_t in_code = '0;
  lsq_pkg::word_t rdata, wdata;
  longint mem [N];

  always #5 clk = ~clk;
  always_ff @(posedge clk) rdata <= lsq_pkg::word_t'(mem[raddr]);

  zn_postproc #(.N(N)) dut (.*);

  function automatic longint sat32(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  initial begin
    #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) mem[i] = 0;
    mem[1] = 64'sd2147483000; mem[2] = -64'sd2147483000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 400; k++) begin
      int i, p;
      logic n;
      longint e;
      i = $urandom_range(N - 1);
      n = 1'($urandom);
      p = (k % 7 == 0) ? 31 : $urandom_range(30);
      if (k < 4) begin i = 1 + (k % 2); n = (k % 2); p = 20; end  // saturation cases
      e = (p == 31) ? mem[i] : sat32(mem[i] + (n ? -(64'sd1 <<< p) : (64'sd1 <<< p)));
      @(negedge clk); in_valid = 1; in_idx = AW'(i); in_code = '{neg: n, pos: 5'(p)};
      @(negedge clk); in_valid = 0;
      checks++;
      if (!we || waddr != AW'(i) || longint'(wdata) != e) begin
        failures++; $display("FAIL k=%0d idx %0d code %0b/%0d got we=%0b %0d exp %0d", k, i, n, p, we, wdata, e);
      end
      @(posedge clk); mem[i] = e;
      #1; checks++;
      if (we) begin failures++; $display("FAIL extra write"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
