// tb_hs_transmitter: checks the sender side of the 4-phase handshake.
// The testbench models the pre-processor (code two cycles after a request,
// a known function of the index) and an acknowledging partner on an
// unrelated clock with random response delays. It checks the word order and
// values, the 4-phase order (Data Ready rises only with Ack low, falls only
// after Ack rose), data stability while Data Ready is high, and done after
// exactly N words.
module tb_hs_transmitter;
  localparam int N = 9;
  localparam int AW = $clog2(N);
  int checks = 0, failures = 0;
  logic clk = 0, pclk = 0, rst_n = 0, start = 0, done;
  logic pp_req, pp_valid = 0, data_ready, ack_all = 0;
  logic [AW-1:0] pp_idx;
  lsq_pkg::dcode_t pp_code = '0, data;
  logic [AW-1:0] pend_idx [2];
  logic pend_v [2];
  int words = 0;

  always #5 clk = ~clk;
  always #6 pclk = ~pclk;

  hs_transmitter #(.N(N)) dut (.*);

  function automatic lsq_pkg::dcode_t f(input int i, input int burst);
    return lsq_pkg::dcode_t'(6'((i * 7 + burst * 3 + 1) % 64));
  endfunction

  int burst = 0;
  // pre-processor model: code two cycles after the request
  always_ff @(posedge clk) begin
    pend_v[0] <= pp_req; pend_idx[0] <= pp_idx;
    pend_v[1] <= pend_v[0]; pend_idx[1] <= pend_idx[0];
    pp_valid <= pend_v[1];
    pp_code  <= f(int'(pend_idx[1]), burst);
  end

  // partner: acknowledge after a random delay on its own clock
  always begin
    @(posedge pclk);
    if (data_ready && !ack_all) begin
      repeat ($urandom_range(4)) @(posedge pclk);
      checks++;
      if (data !== f(words, burst)) begin
        failures++; $display("FAIL word %0d data %h exp %h", words, data, f(words, burst));
      end
      words++;
      ack_all = 1;
    end else if (!data_ready && ack_all) begin
      repeat ($urandom_range(4)) @(posedge pclk);
      ack_all = 0;
    end
  end

  // protocol monitor (the two clocks never have coincident edges)
  always @(posedge data_ready) begin
    checks++;
    if (ack_all) begin failures++; $display("FAIL Data Ready rose with Ack high"); end
  end
  always @(negedge data_ready) begin
    checks++;
    if (!ack_all && rst_n) begin failures++; $display("FAIL Data Ready fell before Ack"); end
  end
  always @(data) begin
    if (rst_n && data_ready) begin
      checks++; failures++; $display("FAIL data changed under Data Ready");
    end
  end

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    pend_v[0] = 0; pend_v[1] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (burst = 0; burst < 3; burst++) begin
      words = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (done) begin failures++; $display("FAIL done not cleared by start"); end
      wait (done);
      checks++;
      if (words != N) begin failures++; $display("FAIL burst %0d sent %0d words", burst, words); end
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
