// sum_generator: the sum block of the parallel adder.
//
// s[0] = f[0] and s[i] = f[i] ^ c[i-1] for i > 0, where f is the bit propagate carried up the
// carry tree and c[i] the carry out of bit i. The adder has no carry input, as in the published
// recurrence (the lowest sum bit is the lowest propagate). Combinational.
module sum_generator #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] f,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s
);
  assign s[0] = f[0];
  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    balanced_xor2 u_xor (.a(f[i]), .b(c[i-1]), .y(s[i]));
  end
endmodule
