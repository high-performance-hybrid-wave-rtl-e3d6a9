// hwp_pkg: types and constants shared by the hybrid wave-pipelined parallel adder and the
// carry-prediction carry-lookahead adder.
//
// The carry generator of the parallel adder is a tree of four kinds of cells (filled circle,
// filled square, open circle, open square). cell_kind() picks the kind of the cell at a given
// level and bit position; the rule reproduces the 32-bit expanded tree drawing row by row:
//   - a bit whose index has bit (level-1) set combines with the top of the group just below it
//     (filled cell); the result is a complete carry (square) when the bit index is below
//     2**level, otherwise a group (generate, propagate) pair (circle);
//   - every other bit is padding (open cell), a circle while it carries a multi-bit group
//     propagate and a square when its propagate is just its own bit propagate or no longer needed.
// The numeric defaults (32-bit adder, 3/2/3 waves per stage, 16-bit CLA in 4-bit blocks) are
// the published design's numbers; the stage boundaries inside the carry tree are this design's
// choice, made to match the published per-stage delays.
package hwp_pkg;

  typedef enum logic [1:0] {
    CELL_BLACK_CIRCLE = 2'd0,  // g = gl | pl&gr, p = pl&pr, f forwarded
    CELL_BLACK_SQUARE = 2'd1,  // g = gl | pl&gr,            f forwarded
    CELL_WHITE_CIRCLE = 2'd2,  // padding: f, p, g forwarded
    CELL_WHITE_SQUARE = 2'd3   // padding: f, g forwarded
  } cell_kind_e;

  localparam int unsigned ADDER_WIDTH  = 32;  // parallel adder width
  localparam int unsigned CLA_WIDTH    = 16;  // carry-prediction CLA width
  localparam int unsigned CLA_GROUP    = 4;   // bits per lookahead block
  localparam int unsigned WAVES_STAGE1 = 3;   // sustainable waves per stage
  localparam int unsigned WAVES_STAGE2 = 2;
  localparam int unsigned WAVES_STAGE3 = 3;

  // Kind of the carry-tree cell at tree level lvl (1-based) and bit position i.
  function automatic cell_kind_e cell_kind(int unsigned lvl, int unsigned i);
    int unsigned half;
    half = 1 << (lvl - 1);
    if ((i & half) != 0)
      return (i < 2 * half) ? CELL_BLACK_SQUARE : CELL_BLACK_CIRCLE;
    if (i < half || (i % half) == 0)
      return CELL_WHITE_SQUARE;
    return CELL_WHITE_CIRCLE;
  endfunction

  // Bit position whose group output a filled cell at (lvl, i) combines with.
  function automatic int unsigned cell_partner(int unsigned lvl, int unsigned i);
    int unsigned half;
    half = 1 << (lvl - 1);
    return ((i / half) * half) - 1;
  endfunction

  // True when the group held at bit i before level lvl is the single bit i, so its group
  // propagate equals the forwarded bit propagate f.
  function automatic bit single_bit_group(int unsigned lvl, int unsigned i);
    int unsigned half;
    half = 1 << (lvl - 1);
    return (i % half) == 0;
  endfunction

endpackage
