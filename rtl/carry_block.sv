// carry_block: levels FIRST_LEVEL..LAST_LEVEL of the expanded-tree carry generator.
//
// The full generator has log2(WIDTH) levels (5 for 32 bits). At level k every bit either
// combines its group (g, p) with the group that ends just below its 2**(k-1)-aligned block (filled
// cell) or passes its signals unchanged through a padding cell, so that every column has the
// same depth: one prefix_cell per bit per level. After the last level g[i] is the carry out of
// bit i (no carry input). hwp_pkg::cell_kind() gives the cell at each position; it reproduces
// the published 32-bit tree drawing cell for cell. The "f" signal is read here as the column's
// own propagate bit carried to the sum block, which the published text does not define.
//
// A block covering only some levels lets the pipeline put its internal registers between
// levels; the full generator is FIRST_LEVEL = 1, LAST_LEVEL = log2(WIDTH). Inputs and outputs
// are the per-bit forwarded propagate f, group generate g and group propagate p. A group
// propagate is only meaningful where the column holds a multi-bit, incomplete group; elsewhere
// the cells use f instead and p may be 0. Combinational.
module carry_block
  import hwp_pkg::*;
#(
  parameter int unsigned WIDTH       = 32,
  parameter int unsigned FIRST_LEVEL = 1,
  parameter int unsigned LAST_LEVEL  = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] f_i,
  input  logic [WIDTH-1:0] g_i,
  input  logic [WIDTH-1:0] p_i,
  output logic [WIDTH-1:0] f_o,
  output logic [WIDTH-1:0] g_o,
  output logic [WIDTH-1:0] p_o
);
  localparam int unsigned NLEV = LAST_LEVEL - FIRST_LEVEL + 1;

  // row r holds the signals entering level FIRST_LEVEL + r
  logic [WIDTH-1:0] f_r [NLEV+1];
  logic [WIDTH-1:0] g_r [NLEV+1];
  logic [WIDTH-1:0] p_r [NLEV+1];

  assign f_r[0] = f_i;
  assign g_r[0] = g_i;
  assign p_r[0] = p_i;

  for (genvar r = 0; r < NLEV; r++) begin : g_level
    localparam int unsigned LVL = FIRST_LEVEL + r;
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      localparam cell_kind_e KIND = cell_kind(LVL, i);
      localparam bit IS_BLACK = (KIND == CELL_BLACK_CIRCLE) || (KIND == CELL_BLACK_SQUARE);
      // lower-order partner; padding cells tie their unused r inputs to their own column
      localparam int unsigned J = IS_BLACK ? cell_partner(LVL, i) : i;
      logic pl, pr;
      assign pl = single_bit_group(LVL, i) ? f_r[r][i] : p_r[r][i];
      assign pr = single_bit_group(LVL, J) ? f_r[r][J] : p_r[r][J];
      prefix_cell #(.KIND(KIND)) u_cell (
        .fi(f_r[r][i]),
        .gl(g_r[r][i]),
        .pl(pl),
        .gr(g_r[r][J]),
        .pr(pr),
        .fo(f_r[r+1][i]),
        .go(g_r[r+1][i]),
        .po(p_r[r+1][i])
      );
    end
  end

  assign f_o = f_r[NLEV];
  assign g_o = g_r[NLEV];
  assign p_o = p_r[NLEV];

  initial begin
    assert (FIRST_LEVEL >= 1 && LAST_LEVEL >= FIRST_LEVEL && LAST_LEVEL <= $clog2(WIDTH))
      else $error("carry_block: bad level range %0d..%0d", FIRST_LEVEL, LAST_LEVEL);
  end
endmodule
