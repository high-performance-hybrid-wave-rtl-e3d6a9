// prefix_cell: one cell of the carry-generator tree, built from two levels of biased NAND2s.
//
// KIND selects one of the four cells of the tree notation:
//   CELL_BLACK_CIRCLE  g = gl | (pl & gr),  p = pl & pr,  f = fi
//   CELL_BLACK_SQUARE  g = gl | (pl & gr),  f = fi       (the result is already a carry; p_o = 0)
//   CELL_WHITE_CIRCLE  g = gl, p = pl, f = fi            (padding: delay only)
//   CELL_WHITE_SQUARE  g = gl, f = fi                    (padding; p_o = 0)
// "l" is the cell's own column, "r" the lower-order column it combines with, f the bit propagate
// carried up the column for the sum XOR. Every path through every kind is exactly two NAND
// levels deep, which is the point of the padding cells: all columns see the same delay per tree
// level. The gate-level structure follows the published cell drawings; outputs a cell kind does
// not have are tied to 0 here. Purely combinational.
module prefix_cell
  import hwp_pkg::*;
#(
  parameter cell_kind_e KIND = CELL_BLACK_CIRCLE
) (
  input  logic fi,   // forwarded bit propagate
  input  logic gl,   // own group generate
  input  logic pl,   // own group propagate
  input  logic gr,   // lower group generate
  input  logic pr,   // lower group propagate
  output logic fo,
  output logic go,
  output logic po
);
  logic f_n;
  biased_nand2 u_f1 (.a(fi),  .b(1'b1), .y(f_n));
  biased_nand2 u_f2 (.a(f_n), .b(1'b1), .y(fo));

  if (KIND == CELL_BLACK_CIRCLE || KIND == CELL_BLACK_SQUARE) begin : g_combine
    logic pg_n, gl_n;
    biased_nand2 u_g1 (.a(pl),   .b(gr),   .y(pg_n));
    biased_nand2 u_g2 (.a(gl),   .b(1'b1), .y(gl_n));
    biased_nand2 u_g3 (.a(pg_n), .b(gl_n), .y(go));
  end else begin : g_pad
    logic gl_n;
    biased_nand2 u_g1 (.a(gl),   .b(1'b1), .y(gl_n));
    biased_nand2 u_g2 (.a(gl_n), .b(1'b1), .y(go));
  end

  if (KIND == CELL_BLACK_CIRCLE) begin : p_combine
    logic pp_n;
    biased_nand2 u_p1 (.a(pl),   .b(pr),   .y(pp_n));
    biased_nand2 u_p2 (.a(pp_n), .b(1'b1), .y(po));
  end else if (KIND == CELL_WHITE_CIRCLE) begin : p_pad
    logic pl_n;
    biased_nand2 u_p1 (.a(pl),   .b(1'b1), .y(pl_n));
    biased_nand2 u_p2 (.a(pl_n), .b(1'b1), .y(po));
  end else begin : p_none
    assign po = 1'b0;
  end

endmodule
