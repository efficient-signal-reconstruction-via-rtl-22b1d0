// lsq_pkg: types, constants and helper functions shared by the least-squares
// core array.
//
// Numbers are signed Q16.16 fixed point (32 bits, 16 fraction bits), the
// precision at which reconstruction error stops improving. Coefficient updates
// travel between cores as a 6-bit "delta-MSB" code: log2(32)+1 wires, i.e. a
// sign bit and the 5-bit position of the most significant bit of the change.
// The receiver adds +/-2^pos to its copy. Position 31 can never be the MSB of
// a saturated 32-bit magnitude, so the code {x, 31} means "no change" (this
// zero code, the clamping and the rounding are this design's own choices).
//
// Neighbour directions are numbered so that the opposite direction is 7-d:
//   0 NW, 1 N, 2 NE, 3 W, 4 E, 5 SW, 6 S, 7 SE.
package lsq_pkg;

  localparam int unsigned WORD_W = 32;   // Q16.16 word
  localparam int unsigned FRAC_W = 16;   // fraction bits
  localparam int unsigned CODE_W = 6;    // log2(WORD_W) + 1
  localparam int unsigned NDIR   = 8;    // neighbour directions

  typedef enum logic [2:0] {
    DIR_NW = 3'd0, DIR_N  = 3'd1, DIR_NE = 3'd2, DIR_W  = 3'd3,
    DIR_E  = 3'd4, DIR_SW = 3'd5, DIR_S  = 3'd6, DIR_SE = 3'd7
  } dir_e;

  typedef logic signed [WORD_W-1:0] word_t;

  // Delta-MSB code word: sign of the change and MSB position of |change|.
  typedef struct packed {
    logic       neg;
    logic [4:0] pos;
  } dcode_t;

  localparam logic [4:0] POS_ZERO = 5'd31;

  // Row / column offset of the neighbour in direction d.
  function automatic int dir_drow(input int d);
    case (d)
      0, 1, 2: return -1;
      5, 6, 7: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic int dir_dcol(input int d);
    case (d)
      0, 3, 5: return -1;
      2, 4, 7: return 1;
      default: return 0;
    endcase
  endfunction

  // Horizontal channels stay on in 1D mode; vertical and diagonal ones do not.
  function automatic bit dir_is_horizontal(input int d);
    return (d == 3) || (d == 4);
  endfunction

  // Encode a (saturated) difference into a delta-MSB code.
  function automatic dcode_t dcode_encode(input word_t diff);
    dcode_t     c;
    logic [WORD_W-1:0] mag;
    c.neg = diff[WORD_W-1];
    mag   = c.neg ? WORD_W'(-diff) : WORD_W'(diff);
    c.pos = POS_ZERO;
    if (diff != '0) begin
      c.pos = 5'd30;                        // clamp (covers the most negative value)
      for (int b = 0; b <= 30; b++)
        if (mag[b]) c.pos = 5'(b);
    end
    return c;
  endfunction

  // Value a code stands for: 0 or +/-2^pos.
  function automatic word_t dcode_value(input dcode_t c);
    word_t v;
    if (c.pos == POS_ZERO) v = '0;
    else begin
      v = word_t'(1) <<< c.pos;
      if (c.neg) v = -v;
    end
    return v;
  endfunction

  // Saturating add of two Q16.16 words.
  function automatic word_t sat_add(input word_t a, input word_t b);
    logic signed [WORD_W:0] s;
    s = {a[WORD_W-1], a} + {b[WORD_W-1], b};
    if (s[WORD_W] != s[WORD_W-1])
      return s[WORD_W] ? {1'b1, {(WORD_W-1){1'b0}}} : {1'b0, {(WORD_W-1){1'b1}}};
    return word_t'(s[WORD_W-1:0]);
  endfunction

  // Saturating subtract a - b.
  function automatic word_t sat_sub(input word_t a, input word_t b);
    logic signed [WORD_W:0] s;
    s = {a[WORD_W-1], a} - {b[WORD_W-1], b};
    if (s[WORD_W] != s[WORD_W-1])
      return s[WORD_W] ? {1'b1, {(WORD_W-1){1'b0}}} : {1'b0, {(WORD_W-1){1'b1}}};
    return word_t'(s[WORD_W-1:0]);
  endfunction

endpackage
