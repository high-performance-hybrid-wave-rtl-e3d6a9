// cla4_pred_block: one 4-bit carry-lookahead block with carry-out prediction.
//
// Three layers: generate/propagate (g = a & b, p = a ^ b), carry generation of the first three
// carries c0..c2 by two-level lookahead from cin, and the sum s[i] = p[i] ^ c[i-1] (s[0] uses
// cin). The fourth carry is never computed. The carry passed to the next block is chosen by a
// multiplexer: the predicted carry from carry_predictor when a prediction can be made, otherwise
// the block's first carry c0, which equals the fourth carry exactly when p1 = p2 = p3 = 1.
// Ports: a, b, cin in; s, cout (carry to the next block) and pred_ok (prediction used) out.
// Combinational; structure as in the published block diagram.
module cla4_pred_block (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout,
  output logic       pred_ok
);
  logic [3:0] g, p;
  logic [2:0] c;
  logic       cpred;

  // layer 1: generate and propagate
  assign g = a & b;
  assign p = a ^ b;

  // layer 2: lookahead carries c0..c2 (expanded form, no ripple inside the block)
  assign c[0] = g[0] | (p[0] & cin);
  assign c[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
  assign c[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);

  // prediction and carry select, at the level of layer 1
  carry_predictor u_pred (.a(a[3:1]), .b(b[3:1]), .cpred(cpred), .pred_ok(pred_ok));

  // carry to the next block
  assign cout = pred_ok ? cpred : c[0];

  // layer 3: sum
  assign s = p ^ {c, cin};
endmodule
