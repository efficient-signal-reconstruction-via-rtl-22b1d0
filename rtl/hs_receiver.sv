// hs_receiver: receiver logic for one neighbour direction of a core.
//
// Takes one neighbour's words over the 4-phase handshake. When the
// synchronised Req is high and the receiver may accept, it captures the code
// word, hands it to the post-processor (out_valid, out_idx, out_code) and
// raises Ack ("Data Accepted"); it lowers Ack once Req has fallen. Words are
// numbered 0..N-1 in arrival order. A receiver accepts only while enable is
// high (the core's communication phase) and only N words per iteration: a
// neighbour that runs ahead is stalled until this core reaches its next
// communication phase, so every update uses the previous iteration's values.
// The handshake follows the document; the two-flop synchroniser on Req, the
// word counting and the stall rule are this design's choices.
//
// Interface: clr_cnt (pulse, only while idle) restarts the count; complete is
// high once N words have been taken and the last handshake has returned to
// zero. stalls counts the cycles a pending Req was held off (for tests).
module hs_receiver #(
  parameter int unsigned N  = 25,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  input  logic            clr_cnt,
  input  logic            req,
  input  lsq_pkg::dcode_t data,
  output logic            ack,
  output logic            out_valid,
  output logic [AW-1:0]   out_idx,
  output lsq_pkg::dcode_t out_code,
  output logic            complete,
  output logic            stalled
);
  import lsq_pkg::*;

  logic          req_s;
  logic [AW:0]   cnt;
  logic          can_take;

  sync2 u_req_sync (.clk(clk), .rst_n(rst_n), .d(req), .q(req_s));

  assign can_take = enable && (cnt < (AW+1)'(N));
  assign complete = (cnt == (AW+1)'(N)) && !ack;
  assign stalled  = req_s && !ack && !can_take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack       <= 1'b0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_code  <= '{neg: 1'b0, pos: POS_ZERO};
    end else begin
      out_valid <= 1'b0;
      if (clr_cnt) cnt <= '0;
      if (!ack) begin
        if (req_s && can_take && !clr_cnt) begin
          out_valid <= 1'b1;
          out_idx   <= cnt[AW-1:0];
          out_code  <= data;
          ack       <= 1'b1;
          cnt       <= cnt + 1'b1;
        end
      end else if (!req_s) begin
        ack <= 1'b0;
      end
    end
  end

  // Ack only rises in answer to a request and only falls after it.
  a_ack_rise: assert property (@(posedge clk) disable iff (!rst_n) $rose(ack) |-> $past(req_s));
  a_ack_fall: assert property (@(posedge clk) disable iff (!rst_n) $fell(ack) |-> !$past(req_s));

endmodule
