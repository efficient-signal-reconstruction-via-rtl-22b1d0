// compute_unit: computation unit of a core, one block-Jacobi update.
//
// Each core owns N coefficients z_j of the least-squares problem
// (A^T A) z = A^T b. One iteration computes
//     r   = c_j - sum over live neighbours i of B_ji * z_i      (pass 1)
//     z_j = B_jj^-1 * r                                         (pass 2)
// from the neighbours' values of the previous iteration, the Jacobi update of
// the document with the core's whole Gram block inverted ahead of time.
// All arithmetic is signed Q16.16: a 32x32 multiplier feeds a 72-bit
// accumulator, and each row result is shifted back by 16 bits (truncating
// towards minus infinity) and saturated to 32 bits. The right-hand side enters
// as the product c * 1.0 so that one multiply-accumulate path serves both
// passes. The equation follows the document; the single multiplier, the term
// order, the rounding and the saturation are this design's choices.
//
// Interface and timing: start pulses one update; one term is issued per
// cycle, pass 1 takes N*(1 + E*N) cycles for E live neighbours plus one idle
// cycle per dead direction passed over (G per row), pass 2 takes N*N, with
// 3 drain cycles after each pass; done pulses N*(1 + E*N + G) + N*N + 7
// cycles after start (5657 for an interior core at N = 25). Memory reads (local memory, Z_neighbor
// banks, internal r store) have one cycle of latency; z_j words are written to
// Z_self through zs_we/zs_waddr/zs_wdata as rows finish.
module compute_unit #(
  parameter int unsigned N    = 25,
  parameter int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned LMAW = $clog2(N + 9 * N * N)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [lsq_pkg::NDIR-1:0]           nbr_en,
  output logic                               busy,
  output logic                               done,
  // local memory read port
  output logic [LMAW-1:0]                    lm_raddr,
  input  lsq_pkg::word_t                     lm_rdata,
  // Z_neighbor read port (same address in all banks)
  output logic [AW-1:0]                      zn_raddr,
  input  lsq_pkg::word_t [lsq_pkg::NDIR-1:0] zn_rdata,
  // Z_self write port
  output logic                               zs_we,
  output logic [AW-1:0]                      zs_waddr,
  output lsq_pkg::word_t                     zs_wdata
);
  import lsq_pkg::*;

  localparam int unsigned ACC_W = 72;
  localparam logic signed [ACC_W-1:0] WMAX = 72'sd2147483647;
  localparam logic signed [ACC_W-1:0] WMIN = -72'sd2147483648;

  typedef enum logic [2:0] {C_IDLE, C_CTERM, C_BTERM, C_DRAIN1, C_P2, C_DRAIN2} cstate_e;
  typedef enum logic [1:0] {OP_ONE, OP_ZN, OP_R} opsel_e;

  typedef struct packed {
    logic          valid;
    logic          sub;     // subtract the product
    logic          first;   // first term of a row: restart the accumulator
    logic          last;    // last term of a row: write the result
    logic          pass2;
    logic [AW-1:0] n;
    opsel_e        opsel;
    logic [2:0]    d;
  } tag_t;

  cstate_e       st;
  logic [AW-1:0] n, m;
  logic [2:0]    d;
  logic [1:0]    drain;
  tag_t          t0, t1, t2;

  word_t         r_mem [N];
  word_t         r_rdata;
  logic [AW-1:0] r_raddr;

  logic signed [2*WORD_W-1:0] prod;
  logic signed [ACC_W-1:0]    acc, acc_next;
  word_t                      row_result;

  // Some live direction after d?
  function automatic logic later_en(input logic [NDIR-1:0] en, input logic [2:0] dd);
    logic r;
    r = 1'b0;
    for (int k = 0; k < NDIR; k++)
      if (k > int'(dd) && en[k]) r = 1'b1;
    return r;
  endfunction

  // ---------------------------------------------------------------- issue
  always_comb begin
    t0       = '0;
    t0.opsel = OP_ONE;
    t0.n     = n;
    t0.d     = d;
    lm_raddr = '0;
    zn_raddr = m;
    r_raddr  = m;
    unique case (st)
      C_CTERM: begin
        t0.valid = 1'b1;
        t0.first = 1'b1;
        t0.last  = (nbr_en == '0);
        lm_raddr = LMAW'(n);
      end
      C_BTERM: if (nbr_en[d]) begin
        t0.valid = 1'b1;
        t0.sub   = 1'b1;
        t0.opsel = OP_ZN;
        t0.last  = (m == AW'(N - 1)) && !later_en(nbr_en, d);
        lm_raddr = LMAW'(N + N * N * (1 + int'(d)) + N * int'(n) + int'(m));
      end
      C_P2: begin
        t0.valid = 1'b1;
        t0.pass2 = 1'b1;
        t0.opsel = OP_R;
        t0.first = (m == '0);
        t0.last  = (m == AW'(N - 1));
        lm_raddr = LMAW'(N + N * int'(n) + int'(m));
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= C_IDLE;
      n     <= '0;
      m     <= '0;
      d     <= '0;
      drain <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        C_IDLE: if (start) begin
          n  <= '0;
          m  <= '0;
          d  <= '0;
          st <= C_CTERM;
        end
        C_CTERM: begin
          m <= '0;
          d <= '0;
          if (nbr_en != '0) st <= C_BTERM;
          else if (n == AW'(N - 1)) begin
            n <= '0; drain <= '0; st <= C_DRAIN1;
          end else n <= n + 1'b1;
        end
        C_BTERM: begin
          if (!nbr_en[d]) d <= d + 1'b1;
          else if (m != AW'(N - 1)) m <= m + 1'b1;
          else begin
            m <= '0;
            if (later_en(nbr_en, d)) d <= d + 1'b1;
            else if (n == AW'(N - 1)) begin
              n <= '0; drain <= '0; st <= C_DRAIN1;
            end else begin
              n <= n + 1'b1; st <= C_CTERM;
            end
          end
        end
        C_DRAIN1: begin
          drain <= drain + 1'b1;
          if (drain == 2'd2) begin
            n <= '0; m <= '0; st <= C_P2;
          end
        end
        C_P2: begin
          if (m != AW'(N - 1)) m <= m + 1'b1;
          else begin
            m <= '0;
            if (n == AW'(N - 1)) begin
              drain <= '0; st <= C_DRAIN2;
            end else n <= n + 1'b1;
          end
        end
        C_DRAIN2: begin
          drain <= drain + 1'b1;
          if (drain == 2'd2) begin
            done <= 1'b1; st <= C_IDLE;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  assign busy = (st != C_IDLE);

  // ------------------------------------------- stage 1: operands, multiply
  word_t opb;
  always_comb begin
    unique case (t1.opsel)
      OP_ZN:   opb = zn_rdata[t1.d];
      OP_R:    opb = r_rdata;
      default: opb = word_t'(1) <<< FRAC_W;
    endcase
  end

  always_ff @(posedge clk) begin
    r_rdata <= r_mem[r_raddr];
    prod    <= lm_rdata * opb;
  end

  // --------------------------------------------------- stage 2: accumulate
  always_comb begin
    logic signed [ACC_W-1:0] base, p, sh;
    base = t2.first ? '0 : acc;
    p    = ACC_W'(prod);
    acc_next = t2.sub ? base - p : base + p;
    sh   = acc_next >>> FRAC_W;
    if (sh > WMAX)      row_result = {1'b0, {(WORD_W-1){1'b1}}};
    else if (sh < WMIN) row_result = {1'b1, {(WORD_W-1){1'b0}}};
    else                row_result = word_t'(sh);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t1  <= '0;
      t2  <= '0;
      acc <= '0;
    end else begin
      t1 <= t0;
      t2 <= t1;
      if (t2.valid) acc <= acc_next;
    end
  end

  always_ff @(posedge clk) begin
    if (t2.valid && t2.last && !t2.pass2) r_mem[t2.n] <= row_result;
  end

  assign zs_we    = t2.valid && t2.last && t2.pass2;
  assign zs_waddr = t2.n;
  assign zs_wdata = row_result;

endmodule
