// tb_prefix_cell: all four cell kinds, every input pattern, against the cell equations
// (combine: g = gl | pl & gr, p = pl & pr; padding: pass-through; f always forwarded).
module tb_prefix_cell;
  import hwp_pkg::*;
  logic fi, gl, pl, gr, pr;
  logic [3:0] fo, go, po;
  int checks = 0, failures = 0;

  prefix_cell #(.KIND(CELL_BLACK_CIRCLE)) u_bc (.fi, .gl, .pl, .gr, .pr, .fo(fo[0]), .go(go[0]), .po(po[0]));
  prefix_cell #(.KIND(CELL_BLACK_SQUARE)) u_bs (.fi, .gl, .pl, .gr, .pr, .fo(fo[1]), .go(go[1]), .po(po[1]));
  prefix_cell #(.KIND(CELL_WHITE_CIRCLE)) u_wc (.fi, .gl, .pl, .gr, .pr, .fo(fo[2]), .go(go[2]), .po(po[2]));
  prefix_cell #(.KIND(CELL_WHITE_SQUARE)) u_ws (.fi, .gl, .pl, .gr, .pr, .fo(fo[3]), .go(go[3]), .po(po[3]));

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b%b got=%b exp=%b", what, fi, gl, pl, gr, pr, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {fi, gl, pl, gr, pr} = 5'(v);
      #1;
      for (int k = 0; k < 4; k++) expect_bit("f", fo[k], fi);
      expect_bit("bc.g", go[0], gl | (pl & gr));
      expect_bit("bc.p", po[0], pl & pr);
      expect_bit("bs.g", go[1], gl | (pl & gr));
      expect_bit("bs.p", po[1], 1'b0);
      expect_bit("wc.g", go[2], gl);
      expect_bit("wc.p", po[2], pl);
      expect_bit("ws.g", go[3], gl);
      expect_bit("ws.p", po[3], 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
