// lsq_core: one locally clocked core of the least-squares array.
//
// The core owns the N coefficients of one frame of the signal model and runs
// block-Jacobi iterations on them. Each iteration has two phases:
//   computation   - the computation unit forms z_j = B_jj^-1 (c_j - sum B_ji z_i)
//                   from its constants (local memory) and the neighbours'
//                   previous values (Z_neighbor memory) and writes Z_self;
//   communication - the transmitter sends the N new coefficients, delta-MSB
//                   encoded by the pre-processor, to every live neighbour over
//                   a 4-phase handshake, while the eight receivers take the
//                   neighbours' words and the post-processors fold them into
//                   Z_neighbor. The phase ends when all words went out and all
//                   live neighbours' words came in.
// After num_iter iterations the core raises done. The core also holds one
// word of the array's scan chain (scan_clk domain): shift, write the word to
// local memory at scan_addr, or load it from Z_self at scan_addr.
// The block structure (receiver, post-processor, Z_neighbor memory,
// computation unit with local memory, Z_self memory, pre-processor,
// transmitter) and the two phases follow the document. The controller, the
// clearing of the neighbour copies at start, the start/done convention and the
// scan commands are this design's choices.
//
// Interface: clk is the core's own clock; start is an asynchronous level (a
// solve starts on its rising edge, after synchronisation; lower it after done
// to re-arm); num_iter and mode_1d must be steady while running. Directions
// 0..7 = NW, N, NE, W, E, SW, S, SE: tx_req[d]/tx_ack[d] is the link to the
// neighbour in direction d, rx_req[d]/rx_data[d]/rx_ack[d] the link from it.
module lsq_core #(
  parameter int          ROW  = 0,
  parameter int          COL  = 0,
  parameter int          ROWS = 8,
  parameter int          COLS = 8,
  parameter int unsigned N    = 25,
  parameter int unsigned ITW  = 8,
  parameter int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned LMAW = $clog2(N + 9 * N * N)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                start,
  input  logic [ITW-1:0]                      num_iter,
  input  logic                                mode_1d,
  output logic                                done,
  // outgoing links
  output logic [lsq_pkg::NDIR-1:0]            tx_req,
  output lsq_pkg::dcode_t                     tx_data,
  input  logic [lsq_pkg::NDIR-1:0]            tx_ack,
  // incoming links
  input  logic [lsq_pkg::NDIR-1:0]            rx_req,
  input  lsq_pkg::dcode_t [lsq_pkg::NDIR-1:0] rx_data,
  output logic [lsq_pkg::NDIR-1:0]            rx_ack,
  // scan chain stage
  input  logic                                scan_clk,
  input  logic                                scan_shift,
  input  logic                                scan_wr,
  input  logic                                scan_rd,
  input  logic [LMAW-1:0]                     scan_addr,
  input  lsq_pkg::word_t                      scan_in,
  output lsq_pkg::word_t                      scan_out
);
  import lsq_pkg::*;

  typedef enum logic [2:0] {K_IDLE, K_CLEAR, K_COMP, K_COMM_START, K_COMM, K_DONE} kstate_e;

  kstate_e        st;
  logic           start_s;
  logic [AW-1:0]  clr_addr;
  logic [ITW-1:0] iter;

  // ------------------------------------------------------------- wiring
  logic [NDIR-1:0] link_en;
  logic            data_ready, ack_all;
  logic            tx_start, tx_done;
  logic            pp_req, pp_valid;
  logic [AW-1:0]   pp_idx, pp_zs_raddr;
  dcode_t          pp_code;
  word_t           zs_rdata, zs_srdata;
  logic            comp_start, comp_done, comp_busy;
  logic [LMAW-1:0] lm_raddr;
  word_t           lm_rdata;
  logic [AW-1:0]   zn_craddr;
  word_t [NDIR-1:0] zn_rdata;
  logic            zs_we;
  logic [AW-1:0]   zs_waddr;
  word_t           zs_wdata;
  logic            clr;

  logic [NDIR-1:0]           rx_en_phase, rx_clr, rx_complete, rx_stalled;
  logic [NDIR-1:0]           rv_valid;
  logic [NDIR-1:0][AW-1:0]   rv_idx;
  dcode_t [NDIR-1:0]         rv_code;
  logic [NDIR-1:0]           zn_we;
  logic [NDIR-1:0][AW-1:0]   zn_waddr, zn_praddr;
  word_t [NDIR-1:0]          zn_wdata;

  sync2 u_start_sync (.clk(clk), .rst_n(rst_n), .d(start), .q(start_s));

  // ---------------------------------------------------------- controller
  logic rx_all_done;
  assign rx_all_done = &(rx_complete | ~link_en);
  assign clr         = (st == K_CLEAR);
  assign tx_start    = (st == K_COMM_START);
  assign done        = (st == K_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= K_IDLE;
      clr_addr   <= '0;
      iter       <= '0;
      comp_start <= 1'b0;
    end else begin
      comp_start <= 1'b0;
      unique case (st)
        K_IDLE: if (start_s) begin
          clr_addr <= '0;
          iter     <= '0;
          st       <= K_CLEAR;
        end
        K_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == AW'(N - 1)) begin
            if (num_iter == '0) st <= K_DONE;
            else begin
              comp_start <= 1'b1;
              st         <= K_COMP;
            end
          end
        end
        K_COMP: if (comp_done) st <= K_COMM_START;
        K_COMM_START: st <= K_COMM;
        K_COMM: if (tx_done && rx_all_done) begin
          iter <= iter + 1'b1;
          if (iter + 1'b1 == num_iter) st <= K_DONE;
          else begin
            comp_start <= 1'b1;
            st         <= K_COMP;
          end
        end
        K_DONE: if (!start_s) st <= K_IDLE;
        default: st <= K_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------ computation block
  local_memory #(.N(N)) u_lmem (
    .wclk  (scan_clk), .we(scan_wr), .waddr(scan_addr), .wdata(scan_out),
    .rclk  (clk),      .raddr(lm_raddr), .rdata(lm_rdata)
  );

  compute_unit #(.N(N)) u_comp (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (comp_start),
    .nbr_en   (link_en),
    .busy     (comp_busy),
    .done     (comp_done),
    .lm_raddr (lm_raddr),
    .lm_rdata (lm_rdata),
    .zn_raddr (zn_craddr),
    .zn_rdata (zn_rdata),
    .zs_we    (zs_we),
    .zs_waddr (zs_waddr),
    .zs_wdata (zs_wdata)
  );

  zself_memory #(.N(N)) u_zself (
    .clk    (clk),
    .we     (zs_we),
    .waddr  (zs_waddr),
    .wdata  (zs_wdata),
    .raddr  (pp_zs_raddr),
    .rdata  (zs_rdata),
    .sclk   (scan_clk),
    .sraddr (scan_addr[AW-1:0]),
    .srdata (zs_srdata)
  );

  zself_preproc #(.N(N)) u_pre (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (clr),
    .clr_addr (clr_addr),
    .req      (pp_req),
    .idx      (pp_idx),
    .zs_raddr (pp_zs_raddr),
    .zs_rdata (zs_rdata),
    .valid    (pp_valid),
    .code     (pp_code)
  );

  zn_memory #(.N(N)) u_zn (
    .clk        (clk),
    .clr        (clr),
    .clr_addr   (clr_addr),
    .we         (zn_we),
    .waddr      (zn_waddr),
    .wdata      (zn_wdata),
    .pp_raddr   (zn_praddr),
    .comp_sel   (st == K_COMP),
    .comp_raddr (zn_craddr),
    .rdata      (zn_rdata)
  );

  // ---------------------------------------------------- communication block
  hs_transmitter #(.N(N)) u_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (tx_start),
    .done       (tx_done),
    .pp_req     (pp_req),
    .pp_idx     (pp_idx),
    .pp_valid   (pp_valid),
    .pp_code    (pp_code),
    .data_ready (data_ready),
    .data       (tx_data),
    .ack_all    (ack_all)
  );

  comm_router #(.ROW(ROW), .COL(COL), .ROWS(ROWS), .COLS(COLS)) u_router (
    .rst_n      (rst_n),
    .mode_1d    (mode_1d),
    .data_ready (data_ready),
    .req_out    (tx_req),
    .ack_in     (tx_ack),
    .ack_all    (ack_all),
    .link_en    (link_en)
  );

  for (genvar d = 0; d < NDIR; d++) begin : g_rx
    assign rx_en_phase[d] = (st == K_COMM) && link_en[d];
    assign rx_clr[d]      = (st == K_COMM_START);

    hs_receiver #(.N(N)) u_rx (
      .clk       (clk),
      .rst_n     (rst_n),
      .enable    (rx_en_phase[d]),
      .clr_cnt   (rx_clr[d]),
      .req       (rx_req[d]),
      .data      (rx_data[d]),
      .ack       (rx_ack[d]),
      .out_valid (rv_valid[d]),
      .out_idx   (rv_idx[d]),
      .out_code  (rv_code[d]),
      .complete  (rx_complete[d]),
      .stalled   (rx_stalled[d])
    );

    zn_postproc #(.N(N)) u_post (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (rv_valid[d]),
      .in_idx   (rv_idx[d]),
      .in_code  (rv_code[d]),
      .raddr    (zn_praddr[d]),
      .rdata    (zn_rdata[d]),
      .we       (zn_we[d]),
      .waddr    (zn_waddr[d]),
      .wdata    (zn_wdata[d])
    );
  end

  // ---------------------------------------------------------- scan stage
  logic rd_pend;
  always_ff @(posedge scan_clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_out <= '0;
      rd_pend  <= 1'b0;
    end else begin
      rd_pend <= scan_rd;
      if (scan_shift)   scan_out <= scan_in;
      else if (rd_pend) scan_out <= zs_srdata;
    end
  end

endmodule
