// tb_carry_block: the full 32-bit carry tree and the same tree cut into levels 1-2, 3, 4-5.
// For operands a, b the tree gets f = p = a ^ b, g = a & b; after the last level g[i] must be
// the carry out of bit i of a + b (no carry in), computed here by integer addition, and f must
// still be a ^ b. The cut tree must give the same result.
module tb_carry_block;
  localparam int W = 32;
  logic [W-1:0] a, b, g0, p0;
  logic [W-1:0] ff, gf, pf;              // full tree
  logic [W-1:0] f1, g1, p1, f2, g2, p2, f3, g3, p3;  // cut tree
  int checks = 0, failures = 0;

  assign g0 = a & b;
  assign p0 = a ^ b;

  carry_block #(.WIDTH(W)) u_full (.f_i(p0), .g_i(g0), .p_i(p0), .f_o(ff), .g_o(gf), .p_o(pf));

  carry_block #(.WIDTH(W), .FIRST_LEVEL(1), .LAST_LEVEL(2)) u_c1 (.f_i(p0), .g_i(g0), .p_i(p0), .f_o(f1), .g_o(g1), .p_o(p1));
  carry_block #(.WIDTH(W), .FIRST_LEVEL(3), .LAST_LEVEL(3)) u_c2 (.f_i(f1), .g_i(g1), .p_i(p1), .f_o(f2), .g_o(g2), .p_o(p2));
  carry_block #(.WIDTH(W), .FIRST_LEVEL(4), .LAST_LEVEL(5)) u_c3 (.f_i(f2), .g_i(g2), .p_i(p2), .f_o(f3), .g_o(g3), .p_o(p3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] cref;
      case (n)
        0: begin a = '1; b = 1; end        // carry ripples through every bit
        1: begin a = 32'h7fff_ffff; b = 1; end
        2: begin a = '0; b = '0; end
        3: begin a = 32'h5555_5555; b = 32'haaaa_aaaa; end
        default: begin
          a = $urandom;
          // bias towards long propagate runs
          b = (n % 3 == 0) ? ~a ^ (32'h1 << ($urandom % 32)) : $urandom;
        end
      endcase
      #1;
      for (int i = 0; i < W; i++) begin
        logic [W:0] t;
        t = ({1'b0, a} & ((33'h1 << (i + 1)) - 1)) + ({1'b0, b} & ((33'h1 << (i + 1)) - 1));
        cref[i] = t[i+1];
      end
      checks++;
      if (gf !== cref || ff !== p0) begin
        failures++;
        $display("FAIL full a=%h b=%h c=%h exp=%h", a, b, gf, cref);
      end
      checks++;
      if (g3 !== cref || f3 !== p0) begin
        failures++;
        $display("FAIL cut a=%h b=%h c=%h exp=%h", a, b, g3, cref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
