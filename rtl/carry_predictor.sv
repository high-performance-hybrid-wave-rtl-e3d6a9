// carry_predictor: early carry-out prediction for a 4-bit lookahead block.
//
// From the upper three bit pairs alone (a[3:1], b[3:1]) it predicts the block's carry out:
//   cpred = a3 b3 + a2 b2 (a3 + b3) + a1 b1 (a2 a3 + b2 b3 + a2 b3 + b2 a3)
// This is correct whenever one of bits 1..3 generates or kills the carry, i.e. in 56 of the 64
// patterns. The remaining 8 patterns are those where bits 1, 2 and 3 all propagate
// (p1 = p2 = p3 = 1); there the carry out equals the carry out of bit 0. pred_ok is the carry
// select: NAND(p1, p2, p3), high when cpred may be used. The prediction formula and the 3-input
// NAND select follow the published scheme; it is evaluated from the latched operands at the
// same level as the generate/propagate signals. Combinational.
module carry_predictor (
  input  logic [3:1] a,
  input  logic [3:1] b,
  output logic       cpred,
  output logic       pred_ok
);
  logic [3:1] p;
  assign p = a ^ b;

  assign cpred = (a[3] & b[3])
               | (a[2] & b[2] & (a[3] | b[3]))
               | (a[1] & b[1] & ((a[2] & a[3]) | (b[2] & b[3]) | (a[2] & b[3]) | (b[2] & a[3])));

  assign pred_ok = ~(p[1] & p[2] & p[3]);
endmodule
