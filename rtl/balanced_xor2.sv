// balanced_xor2: two-input XOR used for the bit propagate signals and for the final sums.
//
// In silicon the XOR is preceded by buffering that makes a, ~a, b and ~b arrive together, so its
// delay does not depend on which input switched. Logically it is y = a ^ b. Combinational.
module balanced_xor2 (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n, b_n;
  // complement rails, generated alongside the true rails as in the balanced circuit
  assign a_n = ~a;
  assign b_n = ~b;
  assign y   = (a & b_n) | (a_n & b);
endmodule
