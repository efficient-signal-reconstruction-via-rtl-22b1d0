// tb_comm_router: checks the channel fabric of a core.
// Three routers (corner, edge and centre of a 3x3 array) are checked for
// which directions are live in 2D and in 1D mode, and each is taken through
// complete 4-phase cycles: Req goes out only on live directions, the joined
// acknowledge rises only after the last live neighbour acknowledged and falls
// only after the last one released, and Req returns to zero in between.
module tb_comm_router;
  int checks = 0, failures = 0;
  logic rst_n = 0, mode_1d = 0;
  logic [2:0] data_ready = '0;
  logic [2:0][7:0] req_out, ack_in, link_en;
  logic [2:0] ack_all;

  comm_router #(.ROW(0), .COL(0), .ROWS(3), .COLS(3)) r0 (.rst_n, .mode_1d, .data_ready(data_ready[0]),
    .req_out(req_out[0]), .ack_in(ack_in[0]), .ack_all(ack_all[0]), .link_en(link_en[0]));
  comm_router #(.ROW(0), .COL(1), .ROWS(3), .COLS(3)) r1 (.rst_n, .mode_1d, .data_ready(data_ready[1]),
    .req_out(req_out[1]), .ack_in(ack_in[1]), .ack_all(ack_all[1]), .link_en(link_en[1]));
  comm_router #(.ROW(1), .COL(1), .ROWS(3), .COLS(3)) r2 (.rst_n, .mode_1d, .data_ready(data_ready[2]),
    .req_out(req_out[2]), .ack_in(ack_in[2]), .ack_all(ack_all[2]), .link_en(link_en[2]));

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b exp %b", what, got, exp); end
  endtask

  // expected live directions: 0 NW,1 N,2 NE,3 W,4 E,5 SW,6 S,7 SE
  function automatic logic [7:0] exp_en(input int row, input int col, input bit m1d);
    logic [7:0] e;
    int dr [8] = '{-1, -1, -1, 0, 0, 1, 1, 1};
    int dc [8] = '{-1, 0, 1, -1, 1, -1, 0, 1};
    for (int d = 0; d < 8; d++) begin
      int r2, c2;
      r2 = row + dr[d]; c2 = col + dc[d];
      e[d] = (r2 >= 0 && r2 < 3 && c2 >= 0 && c2 < 3) && (!m1d || dr[d] == 0);
    end
    return e;
  endfunction

  task automatic cycle(input int k, input int row, input int col);
    logic [7:0] en;
    int order [8];
    en = exp_en(row, col, mode_1d);
    for (int i = 0; i < 8; i++) order[i] = i;
    order.shuffle();
    data_ready[k] = 1; #1;
    chk(req_out[k], en, "req out");
    for (int i = 0; i < 8; i++) begin
      if (en[order[i]]) begin
        logic [7:0] after;
        ack_in[k][order[i]] = 1; #1;
        after = ack_in[k] & en;
        chk(8'(ack_all[k]), 8'(after == en), "ack join rise");
      end
    end
    chk(8'(ack_all[k]), 8'(1), "ack all up");
    chk(req_out[k], en, "req held");
    data_ready[k] = 0; #1;
    chk(req_out[k], 8'h00, "req returns to zero");
    for (int i = 0; i < 8; i++) if (en[order[i]]) begin
      logic [7:0] after;
      ack_in[k][order[i]] = 0; #1;
      after = ack_in[k] & en;
      chk(8'(ack_all[k]), 8'(after != 8'h00), "ack join fall");
    end
    chk(8'(ack_all[k]), 8'(0), "ack all down");
    chk(req_out[k], 8'h00, "req idle");
  endtask

  initial begin
    #1000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ack_in = '0;
    #1 rst_n = 1; #1;
    for (int m = 0; m < 2; m++) begin
      mode_1d = 1'(m); #1;
      chk(link_en[0], exp_en(0, 0, mode_1d), "en corner");
      chk(link_en[1], exp_en(0, 1, mode_1d), "en edge");
      chk(link_en[2], exp_en(1, 1, mode_1d), "en centre");
      for (int rep = 0; rep < 3; rep++) begin
        cycle(0, 0, 0); cycle(1, 0, 1); cycle(2, 1, 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
