// biased_nand2: two-input NAND, the single gate from which every carry-tree cell is built.
//
// In silicon this is a biased (pseudo-NMOS style) NAND chosen because its delay depends little
// on the input pattern, which keeps the data waves coherent. Logically it is a plain NAND2:
// y = ~(a & b). Tying one input high gives the delay-matched inverter used by the padding cells.
// Purely combinational; no clock.
module biased_nand2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = ~(a & b);
endmodule
