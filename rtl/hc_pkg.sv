// hc_pkg: shared types, constants and helper functions of the hyper-code
// encoder and decoder.
//
// The code is a three-dimensional even-parity box (row, column and depth
// parity) to which one extra plane of roll parity is appended. Default
// geometry is the 16x16x16 / 17x17x18 "3D+" code: 4096 information bits,
// 5202 channel bits, rate 0.79. A bit at (plane, row, col) lives at linear
// address (plane*ROWS + row)*COLS + col; planes 0..PLANES-2 are the parity
// cube, plane PLANES-1 holds the roll (diagonal) parity bits. The roll rules
// of the optional four-dimensional code are here too.
//
// Channel bits are carried by antipodal samples, Gray-coded 8PSK or
// Gray-coded 16QAM; the 16QAM labels follow the thesis' printed
// assignment, the 8PSK point positions and labels are this design's own
// (the thesis only says they are Gray-coded).
//
// Soft values are signed fixed-point log-likelihood ratios (positive means
// "0"), saturated symmetrically to +/-(2^(LLR_W-1)-1) so that a magnitude
// always fits in LLR_W-1 bits. The fixed-point format is this design's own
// choice; the thesis gives no word length.
package hc_pkg;

  // Default code geometry (lengths include the parity positions).
  localparam int unsigned HC_ROWS   = 17;
  localparam int unsigned HC_COLS   = 17;
  localparam int unsigned HC_PLANES = 18;

  // Soft-value word length used by the whole datapath.
  localparam int unsigned LLR_W = 10;
  localparam int unsigned MAG_W = LLR_W - 1;

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic        [MAG_W-1:0] mag_t;

  localparam llr_t LLR_MAX = llr_t'((1 << (LLR_W - 1)) - 1);

  // The four sets of parity equations, in decoding (and encoding) order.
  typedef enum logic [1:0] {
    SET_ROW   = 2'd0,  // along the column index, one per (plane,row)
    SET_COL   = 2'd1,  // along the row index, one per (plane,col)
    SET_DEPTH = 2'd2,  // across cube planes, one per (row,col)
    SET_ROLL  = 2'd3   // rolled across cube planes, one per (row,col)
  } hc_set_e;

  localparam int unsigned NUM_SETS = 4;

  // Saturate a wide signed value to the LLR range.
  function automatic llr_t sat_llr(input logic signed [LLR_W+1:0] v);
    if (v > $signed({2'b00, LLR_MAX}))
      return LLR_MAX;
    else if (v < -$signed({2'b00, LLR_MAX}))
      return -LLR_MAX;
    else
      return llr_t'(v);
  endfunction

  // Extrinsic scale factor 0.625 = 1/2 + 1/8, two shifts and an add.
  function automatic mag_t scale_5_8(input mag_t m);
    return mag_t'((m >> 1) + (m >> 3));
  endfunction

  // Row roll of cube plane k: plane k is rolled up by k rows.
  function automatic int unsigned roll_row(input int unsigned k, input int unsigned rows);
    return k % rows;
  endfunction

  // Column roll of cube plane k (nplanes cube planes in all). When either
  // side is odd this is plain diagonal parity (roll k). When both sides are
  // even, the last nplanes/2 column rolls are themselves rolled by one so
  // that no pair of planes differs by exactly (rows/2, cols/2).
  function automatic int unsigned roll_col(input int unsigned k, input int unsigned rows,
                                           input int unsigned cols, input int unsigned nplanes);
    int unsigned h;
    h = cols / 2;
    if ((rows % 2) == 1 || (cols % 2) == 1 || k < h)
      return k % cols;
    else if (k == nplanes - 1)
      return h;
    else
      return (k + 1) % cols;
  endfunction

  // Rolls of a four-dimensional code: cube k (of ncubes rolled cubes) is
  // rolled by k planes, roll4_row(k) rows and roll4_col(k) columns. The row
  // roll uses the three-dimensional rule above; the column roll is 2k for the
  // first half of the cubes and 2k+1 for the rest (plain k for an odd side).
  // For equal even sides no two cubes then differ by half a side in more
  // than one dimension; for n = 4 this is the assignment
  // (0,0,0) (1,1,2) (2,3,1) (3,2,3).
  function automatic int unsigned roll4_row(input int unsigned k, input int unsigned rows,
                                            input int unsigned ncubes);
    return roll_col(k, 2, rows, ncubes);  // 3D rule with an even partner side
  endfunction

  function automatic int unsigned roll4_col(input int unsigned k, input int unsigned cols,
                                            input int unsigned ncubes);
    if ((cols % 2) == 1)
      return k % cols;
    else if (k < (ncubes + 1) / 2)
      return (2 * k) % cols;
    else
      return (2 * k + 1) % cols;
  endfunction

  // Gray-coded 16QAM label of the point in grid row r (0 = top, y = +3A)
  // and grid column c (0 = left, x = -3A). Bits 3 and 1 follow the row,
  // bits 2 and 0 follow the column; label bit 3 is the leftmost character
  // of the printed constellation.
  function automatic logic [3:0] qam16_label(input int unsigned r, input int unsigned c);
    logic [1:0] rb, cb;  // rb = {b3,b1}, cb = {b2,b0}
    case (r)
      0: rb = 2'b10;
      1: rb = 2'b00;
      2: rb = 2'b01;
      default: rb = 2'b11;
    endcase
    case (c)
      0: cb = 2'b11;
      1: cb = 2'b01;
      2: cb = 2'b00;
      default: cb = 2'b10;
    endcase
    return {rb[1], cb[1], rb[0], cb[0]};
  endfunction

  // Modulation of the channel bits.
  typedef enum logic [1:0] {
    MOD_ANTIPODAL = 2'd0,  // one bit per real sample (BPSK, or QPSK on two rails)
    MOD_8PSK      = 2'd1,  // three bits per Gray-coded 8PSK symbol
    MOD_16QAM     = 2'd2   // four bits per Gray-coded 16QAM symbol
  } hc_mod_e;

  // 8PSK: point m (m = 0..7) sits at angle m*45 degrees on a circle of
  // radius R and carries the binary-reflected Gray label m ^ (m >> 1), so
  // that neighbouring points differ in one bit.
  function automatic logic [2:0] psk8_label(input int unsigned m);
    return 3'(m ^ (m >> 1));
  endfunction

  // Coordinates of 8PSK point m; the diagonal points use R/sqrt(2), taken
  // as round(R*181/256).
  function automatic int psk8_x(input int unsigned m, input int r);
    int d;
    d = (r * 181 + 128) / 256;
    case (m % 8)
      0: return r;
      1, 7: return d;
      3, 5: return -d;
      4: return -r;
      default: return 0;
    endcase
  endfunction

  function automatic int psk8_y(input int unsigned m, input int r);
    return psk8_x((m + 6) % 8, r);  // y of point m = x of point m - 90 degrees
  endfunction

endpackage
