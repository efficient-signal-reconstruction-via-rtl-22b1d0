// sync2: two-flop synchroniser.
//
// Brings an asynchronous level (a handshake Req or Ack from a neighbouring
// core running on its own clock, or the global start) into the local clock
// domain. Output lags the input by two local clock edges. Cleared by the
// asynchronous reset. Synchronisers are not described by the document; they
// are what a locally clocked core needs to sample a handshake wire safely.
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0;
      q    <= 1'b0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
