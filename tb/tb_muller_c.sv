// tb_muller_c: self-checking test of the Muller C-element.
// Walks a 2-input element with one inverted input and a 3-input element
// through random input sequences and compares the output after every step
// with a reference that holds its state unless all (inverted) inputs agree.
module tb_muller_c;
  int checks = 0, failures = 0;
  logic       rst_n;
  logic [1:0] a2;
  logic [2:0] a3;
  logic       y2, y3;
  logic       ref2, ref3;

  muller_c #(.NIN(2), .INV(2'b10)) dut2 (.rst_n(rst_n), .a(a2), .y(y2));
  muller_c #(.NIN(3), .INV(3'b000)) dut3 (.rst_n(rst_n), .a(a3), .y(y3));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; a2 = 2'b00; a3 = 3'b111;
    #1;
    check(y2, 1'b0, "reset 2"); check(y3, 1'b0, "reset 3");
    rst_n = 1; ref2 = 0; ref3 = 0;
    #1;
    // a3 all ones after reset released: output rises
    ref3 = 1; check(y3, ref3, "rise 3");
    for (int i = 0; i < 400; i++) begin
      logic [1:0] e2;
      a2 = 2'($urandom); a3 = 3'($urandom);
      #1;
      e2 = a2 ^ 2'b10;
      if (e2 == 2'b11) ref2 = 1; else if (e2 == 2'b00) ref2 = 0;
      if (a3 == 3'b111) ref3 = 1; else if (a3 == 3'b000) ref3 = 0;
      check(y2, ref2, "c2");
      check(y3, ref3, "c3");
    end
    // explicit hold: set to 1, then disagree
    a3 = 3'b111; #1; a3 = 3'b101; #1; check(y3, 1'b1, "hold high");
    a3 = 3'b000; #1; a3 = 3'b010; #1; check(y3, 1'b0, "hold low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
