// gp_generator: the (g, p) generator of the parallel adder.
//
// For every bit i: g[i] = a[i] & b[i] and p[i] = a[i] ^ b[i]. The XORs are the balanced XOR
// cell, the ANDs are a biased NAND followed by a biased NAND wired as an inverter, so both
// outputs pass two gate levels. The equations and the 32-bit default width are the published
// design's; building the AND from two NANDs is this design's choice (the published text says
// only that the carry cells are built from biased NANDs). Combinational.
module gp_generator #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] p
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic g_n;
    biased_nand2  u_and1 (.a(a[i]), .b(b[i]), .y(g_n));
    biased_nand2  u_and2 (.a(g_n),  .b(1'b1), .y(g[i]));
    balanced_xor2 u_xor  (.a(a[i]), .b(b[i]), .y(p[i]));
  end
endmodule
