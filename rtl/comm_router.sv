// comm_router: the channel fabric of one core (communication routers and the
// C-elements of the 4-phase handshake).
//
// A core broadcasts the same word to all its neighbours. The router
//  * decides which of the 8 directions are live: a direction is off when
//    there is no neighbour at the array edge, and vertical and diagonal
//    directions are switched off in 1D mode, leaving each row an independent
//    1D chain (link_en);
//  * generates Req with a C-element from the sender's Data Ready and the
//    inverted joined acknowledge, and fans it out to the live directions;
//  * joins the acknowledges of the live directions with a second C-element;
//    a dead direction feeds Data Ready into the join instead, so the join
//    behaves as if that neighbour answered at once.
// Using C-elements for Req and Ack and switching 1D/2D in the routers follow
// the document; the join rule for dead directions is this design's.
//
// There is no clock here: req_out and ack_all are asynchronous levels that the
// receiving and sending cores synchronise. mode_1d must only change while the
// array is idle.
module comm_router #(
  parameter int ROW  = 0,
  parameter int COL  = 0,
  parameter int ROWS = 8,
  parameter int COLS = 8
) (
  input  logic                     rst_n,
  input  logic                     mode_1d,
  input  logic                     data_ready,
  output logic [lsq_pkg::NDIR-1:0] req_out,
  input  logic [lsq_pkg::NDIR-1:0] ack_in,
  output logic                     ack_all,
  output logic [lsq_pkg::NDIR-1:0] link_en
);
  import lsq_pkg::*;

  logic                req;
  logic [NDIR-1:0]     join_in;

  for (genvar d = 0; d < NDIR; d++) begin : g_dir
    localparam int  NR     = ROW + dir_drow(d);
    localparam int  NC     = COL + dir_dcol(d);
    localparam bit  EXISTS = (NR >= 0) && (NR < ROWS) && (NC >= 0) && (NC < COLS);
    localparam bit  HORIZ  = dir_is_horizontal(d);

    assign link_en[d] = EXISTS && (HORIZ || !mode_1d);
    assign join_in[d] = link_en[d] ? ack_in[d] : data_ready;
    assign req_out[d] = req && link_en[d];
  end

  // Req = C(Data Ready, not Ack): rises on Data Ready once the last
  // acknowledge has fallen, falls when Data Ready drops after the acknowledge.
  muller_c #(.NIN(2), .INV(2'b10)) u_c_req (
    .rst_n (rst_n),
    .a     ({ack_all, data_ready}),
    .y     (req)
  );

  // Ack = C(acknowledges of all directions).
  muller_c #(.NIN(NDIR), .INV('0)) u_c_ack (
    .rst_n (rst_n),
    .a     (join_in),
    .y     (ack_all)
  );

endmodule
