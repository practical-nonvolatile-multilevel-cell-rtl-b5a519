// tlc_pkg: shared types and sizes of the three-level-cell (3LC) PCM block
// organisation.
//
// A 64-byte block is stored as 3-ON-2 symbols: three bits in a pair of
// ternary cells. 171 data pairs (342 cells) hold the 512 data bits (one bit
// of the 513 is padding), 6 spare pairs (12 cells) tolerate six worn-out
// pairs with mark-and-spare, and a 10-bit single-error-correcting code over
// the 708-bit cell message (2 bits per cell) guards against drift. The check
// bits live in 10 single-level cells. Cell state codes follow the 2-bit
// reading used by the transient error code: S1 = 00, S2 = 01, S4 = 11, so a
// one-state upward drift flips exactly one bit. Code 10 never comes out of
// the sense amplifiers; it is read as S4 (its high bit marks high resistance),
// which is this design's own choice.
package tlc_pkg;

  localparam int unsigned DATA_BITS   = 512;              // 64B block
  localparam int unsigned DATA_PAIRS  = 171;              // ceil(512/3)
  localparam int unsigned SPARE_PAIRS = 6;                // six wearout failures
  localparam int unsigned PAIRS       = DATA_PAIRS + SPARE_PAIRS;  // 177
  localparam int unsigned CELLS       = 2 * PAIRS;        // 354 ternary cells
  localparam int unsigned MSG_BITS    = 2 * CELLS;        // 708
  localparam int unsigned CHECK_BITS  = 10;               // BCH-1 / Hamming
  localparam int unsigned TOTAL_CELLS = CELLS + CHECK_BITS;  // 364 per block

  typedef enum logic [1:0] {
    ST_S1 = 2'b00,   // lowest resistance (crystalline)
    ST_S2 = 2'b01,   // intermediate
    ST_S4 = 2'b11    // highest resistance (amorphous)
  } cell_state_e;

  // Output of a cell pair (Fig. 11 style): INV flag and 3 data bits that are
  // meaningful only when inv is 0.
  typedef struct packed {
    logic       inv;
    logic [2:0] data;
  } pair_sym_t;

  localparam pair_sym_t SYM_INV    = '{inv: 1'b1, data: 3'b000};
  // What unused spare pairs hold after a write (lowest-resistance pair).
  localparam pair_sym_t SYM_FILLER = '{inv: 1'b0, data: 3'b000};

  // Ternary digit (0,1,2) <-> cell state
  function automatic logic [1:0] trit_to_cell(input logic [1:0] t);
    case (t)
      2'd0:    return ST_S1;
      2'd1:    return ST_S2;
      default: return ST_S4;
    endcase
  endfunction

  function automatic logic [1:0] cell_to_trit(input logic [1:0] c);
    if (c[1])      return 2'd2;   // S4 (and the unused code 10)
    else if (c[0]) return 2'd1;   // S2
    else           return 2'd0;   // S1
  endfunction

  // Hamming position (1-based) of message bit k: the k-th position that is
  // not a power of two (powers of two hold the check bits).
  function automatic int unsigned msg_pos(input int unsigned k);
    int unsigned p;
    p = k + 3;
    for (int unsigned j = 2; j < 16; j++)
      if (p >= (32'd1 << j)) p = p + 1;
    return p;
  endfunction

  // Message bits covered by check bit i: those whose position has bit i set.
  function automatic logic [MSG_BITS-1:0] check_mask(input int unsigned i);
    logic [MSG_BITS-1:0] m;
    for (int unsigned k = 0; k < MSG_BITS; k++)
      m[k] = msg_pos(k)[i];
    return m;
  endfunction

  // Highest Hamming position in use: 708 message + 10 check bits.
  localparam int unsigned MAX_POS = MSG_BITS + CHECK_BITS;  // 718

endpackage
