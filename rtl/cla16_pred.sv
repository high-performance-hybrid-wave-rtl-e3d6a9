// cla16_pred: carry-lookahead adder with carry-out prediction (WIDTH bits, default 16).
//
// WIDTH/4 blocks of cla4_pred_block are chained in ripple fashion, but each block hands on
// either its predicted carry out (computed from its operands alone, available at the first
// logic level) or, when it cannot predict, its first carry c0. A block whose carry in was
// predicted therefore starts at once, and only a run of non-predicting blocks ripples.
// The adder sits between an input register (a, b, cin) and an output register (sum, cout and
// the per-block prediction flags), both rising-edge triggered on clk; the output register stands
// for the register clocked by the delayed clock in the published diagram. Timing: operands
// presented before edge k are captured at edge k and their sum is at the outputs after edge
// k + 1 (one cycle through the adder). pred_ok[j] reports whether block j predicted.
module cla16_pred
  import hwp_pkg::*;
#(
  parameter int unsigned WIDTH = CLA_WIDTH
) (
  input  logic                   clk,
  input  logic [WIDTH-1:0]       a,
  input  logic [WIDTH-1:0]       b,
  input  logic                   cin,
  output logic [WIDTH-1:0]       sum,
  output logic                   cout,
  output logic [WIDTH/4-1:0]     pred_ok
);
  localparam int unsigned NB = WIDTH / CLA_GROUP;

  // input register
  logic [WIDTH-1:0] a_q, b_q;
  logic             cin_q;
  always_ff @(posedge clk) begin
    a_q   <= a;
    b_q   <= b;
    cin_q <= cin;
  end

  logic [NB:0]      carry;
  logic [WIDTH-1:0] s_d;
  logic [NB-1:0]    ok_d;

  assign carry[0] = cin_q;
  for (genvar j = 0; j < NB; j++) begin : g_blk
    cla4_pred_block u_blk (
      .a(a_q[4*j +: 4]), .b(b_q[4*j +: 4]), .cin(carry[j]),
      .s(s_d[4*j +: 4]), .cout(carry[j+1]), .pred_ok(ok_d[j])
    );
  end

  // output register
  always_ff @(posedge clk) begin
    sum     <= s_d;
    cout    <= carry[NB];
    pred_ok <= ok_d;
  end

  initial begin
    assert (WIDTH % CLA_GROUP == 0 && WIDTH >= CLA_GROUP)
      else $error("cla16_pred: WIDTH must be a multiple of 4");
  end
endmodule
