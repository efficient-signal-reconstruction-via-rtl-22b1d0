// hs_transmitter: sender logic of a core's communication block.
//
// In the communication phase the core broadcasts its N coefficients, each as
// one delta-MSB code word, to all its neighbours over a 4-phase (return to
// zero) handshake. For each word the transmitter asks the pre-processor for
// the code, puts it on the data wires, and one clock later raises Data Ready.
// The router's C-element turns Data Ready into Req; when the joined
// acknowledge of all enabled neighbours rises, Data Ready is lowered; when the
// joined acknowledge has fallen again the next word starts. The 4-phase order
// (Req up, Ack up, Req down, Ack down, data valid before Req) follows the
// document; the word-serial order 0..N-1 and the two-flop synchroniser on the
// asynchronous acknowledge are this design's choices.
//
// Interface: start (pulse) begins a burst of N words; done is high from the
// end of a burst until the next start. Per word the handshake costs about
// 2 x (synchroniser + neighbour receiver) latency, some 10 local cycles.
module hs_transmitter #(
  parameter int unsigned N  = 25,
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            done,
  // pre-processor
  output logic            pp_req,
  output logic [AW-1:0]   pp_idx,
  input  logic            pp_valid,
  input  lsq_pkg::dcode_t pp_code,
  // handshake
  output logic            data_ready,
  output lsq_pkg::dcode_t data,
  input  logic            ack_all
);
  import lsq_pkg::*;

  typedef enum logic [2:0] {T_IDLE, T_FETCH, T_CODE, T_RAISE, T_WAIT_ACK, T_WAIT_REL} tstate_e;

  tstate_e       st;
  logic          ack_s;
  logic [AW-1:0] idx;

  sync2 u_ack_sync (.clk(clk), .rst_n(rst_n), .d(ack_all), .q(ack_s));

  assign pp_req = (st == T_FETCH);
  assign pp_idx = idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= T_IDLE;
      idx        <= '0;
      done       <= 1'b0;
      data_ready <= 1'b0;
      data       <= '{neg: 1'b0, pos: POS_ZERO};
    end else begin
      unique case (st)
        T_IDLE: if (start) begin
          idx  <= '0;
          done <= 1'b0;
          st   <= T_FETCH;
        end
        T_FETCH: st <= T_CODE;
        T_CODE: if (pp_valid) begin
          data <= pp_code;
          st   <= T_RAISE;
        end
        T_RAISE: begin
          data_ready <= 1'b1;
          st         <= T_WAIT_ACK;
        end
        T_WAIT_ACK: if (ack_s) begin
          data_ready <= 1'b0;
          st         <= T_WAIT_REL;
        end
        T_WAIT_REL: if (!ack_s) begin
          if (idx == AW'(N - 1)) begin
            done <= 1'b1;
            st   <= T_IDLE;
          end else begin
            idx <= idx + 1'b1;
            st  <= T_FETCH;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // Bundled data: the code must not change while Data Ready is up.
  a_data_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (data_ready && $past(data_ready)) |-> $stable(data));

endmodule
