// ecc_pkg: constants, code-word layout and code-construction functions shared by the
// 32-bit double error correction (DEC) codec and the interleaved 4-bit burst codec.
//
// DEC code (32 data bits, 19 check bits, 51-bit code word):
//   * data bits d1..d32 are bits 0..31; block 1 = bits 0..10, block 2 = bits 11..21,
//     block 3 = bits 22..31 (10 bits, padded with a zero to 11 for the XOR);
//   * blocks 1 and 2 each carry a (16,11) Hsiao SEC-DED code (5 check bits);
//   * the XOR of the three blocks carries a (20,11) Difference Set (DS) code (9 check bits).
// The block split, the 5+5+9 check bits and the DS code family follow the document; the
// Hsiao matrix, the difference set used, the removed DS parity position and the bit order
// of the code word are this design's choices.
//
// The DS code: the cyclic (21,11) code whose parity checks are the 21 cyclic shifts
// ("lines") of the perfect difference set {0,2,7,8,11} mod 21. Its generator polynomial is
// g(x) = 1 + x^3 + x^4 + x^6 + x^8 + x^10. Systematic code words hold the data at positions
// 10..20 and the remainder of x^10*d(x) mod g(x) at positions 0..9. Position 0 is removed,
// giving the (20,11) code; the 5 lines through position 0 can then no longer be checked, and
// each data position keeps 4 lines that meet only in that position (orthogonal check sums).
package ecc_pkg;

  // ---------------- DEC code ----------------
  localparam int unsigned DEC_DATA_W = 32;
  localparam int unsigned BLK_W      = 11;  // width of blocks 1 and 2 and of the DS data
  localparam int unsigned BLK3_W     = 10;
  localparam int unsigned SECDED_R   = 5;
  localparam int unsigned DS_N       = 21;  // unpunctured DS code length
  localparam int unsigned DS_K       = 11;
  localparam int unsigned DS_R       = 9;   // check bits kept after removing position 0
  localparam int unsigned DS_THRESH  = 3;   // flip a bit when 3 of its 4 check sums fail

  // generator polynomial of the (21,11) DS code, bit i = coefficient of x^i
  localparam logic [10:0] DS_GEN = 11'b101_0101_1001;

  // the perfect difference set mod 21
  localparam int unsigned DS_SET [5] = '{0, 2, 7, 8, 11};

  typedef logic [DEC_DATA_W-1:0] dec_data_t;

  // DEC code word, LSB first: data, block-1 checks, block-2 checks, DS checks
  typedef struct packed {
    logic [DS_R-1:0]       pd;    // s9d..s1d
    logic [SECDED_R-1:0]   pb;    // s5b..s1b
    logic [SECDED_R-1:0]   pa;    // s5a..s1a
    logic [DEC_DATA_W-1:0] data;  // d32..d1
  } dec_cw_t;

  // Column i (0..10) of the Hsiao (16,11) data part: the ten 5-bit vectors of weight 3 in
  // increasing order, then the all-ones vector. Every column has odd weight, so an
  // even-weight non-zero syndrome means a double error.
  function automatic logic [SECDED_R-1:0] hsiao_col(input int unsigned i);
    int unsigned n;
    logic [SECDED_R-1:0] col;
    n   = 0;
    col = '1;
    for (int unsigned v = 1; v < 32; v++) begin
      if ($countones(5'(v)) == 3) begin
        if (n == i) col = 5'(v);
        n++;
      end
    end
    return col;
  endfunction

  // True when position p (0..20) lies on line s, the shift of the difference set by s.
  function automatic bit ds_on_line(input int unsigned s, input int unsigned p);
    bit hit;
    hit = 1'b0;
    for (int unsigned j = 0; j < 5; j++)
      if ((s + DS_SET[j]) % DS_N == p) hit = 1'b1;
    return hit;
  endfunction

  // Tables evaluated once, at elaboration, so the codec logic is plain XOR trees.
  typedef logic [SECDED_R-1:0] hsiao_cols_t [BLK_W];
  typedef logic [DS_N-1:0]     ds_masks_t   [DS_N];
  typedef logic [DS_N-1:0]     ds_votes_t   [DS_K];

  function automatic hsiao_cols_t hsiao_cols();
    hsiao_cols_t t;
    for (int unsigned i = 0; i < BLK_W; i++) t[i] = hsiao_col(i);
    return t;
  endfunction

  // ds_check_masks()[s]: the positions of line s, or nothing for a line through position 0
  function automatic ds_masks_t ds_check_masks();
    ds_masks_t t;
    logic [DS_N-1:0] m;
    for (int unsigned s = 0; s < DS_N; s++) begin
      m = '0;
      if (!ds_on_line(s, 0))
        for (int unsigned p = 0; p < DS_N; p++) m[p] = ds_on_line(s, p);
      t[s] = m;
    end
    return t;
  endfunction

  // ds_vote_masks()[i]: the usable lines through data position i (DS position 10+i)
  function automatic ds_votes_t ds_vote_masks();
    ds_votes_t t;
    logic [DS_N-1:0] m;
    for (int unsigned i = 0; i < DS_K; i++) begin
      for (int unsigned s = 0; s < DS_N; s++)
        m[s] = ds_on_line(s, i + DS_R + 1) && !ds_on_line(s, 0);
      t[i] = m;
    end
    return t;
  endfunction

  localparam hsiao_cols_t HSIAO_COLS = hsiao_cols();
  localparam ds_masks_t   DS_CHECKS  = ds_check_masks();
  localparam ds_votes_t   DS_VOTES   = ds_vote_masks();

  // ---------------- SEC (Hamming) code of the burst codec ----------------
  // Column i of a shortened Hamming data part: the i-th integer >= 3 that is not a power
  // of two (3, 5, 6, 7, 9, 10, ...). Check bits have unit columns.
  function automatic int unsigned hamming_col(input int unsigned i);
    int unsigned n;
    int unsigned col;
    n   = 0;
    col = 0;
    for (int unsigned v = 3; v < 256; v++) begin
      if ($countones(v) > 1) begin
        if (n == i) col = v;
        n++;
      end
    end
    return col;
  endfunction

endpackage
