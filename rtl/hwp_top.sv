// hwp_top: the two adders side by side, each with its own ports.
//
//  - hwp_adder: 32-bit hybrid wave-pipelined parallel-prefix adder, three stages holding
//    3, 2 and 3 waves; a result leaves 8 cycles after its operands enter register 1.
//    Ports prefixed pa_.
//  - cla16_pred: 16-bit carry-lookahead adder whose 4-bit blocks predict their carry out;
//    registered in and out, one cycle through the adder. Ports prefixed cla_.
// The two share only clk. rst_n clears the valid bits of the pipelined adder.
module hwp_top
  import hwp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // hybrid wave-pipelined parallel adder
  input  logic                    pa_in_valid,
  input  logic [ADDER_WIDTH-1:0]  pa_a,
  input  logic [ADDER_WIDTH-1:0]  pa_b,
  output logic                    pa_out_valid,
  output logic [ADDER_WIDTH-1:0]  pa_sum,
  output logic                    pa_cout,
  output logic [3:0]              pa_waves_in_flight,
  // carry-prediction carry-lookahead adder
  input  logic [CLA_WIDTH-1:0]    cla_a,
  input  logic [CLA_WIDTH-1:0]    cla_b,
  input  logic                    cla_cin,
  output logic [CLA_WIDTH-1:0]    cla_sum,
  output logic                    cla_cout,
  output logic [CLA_WIDTH/4-1:0]  cla_pred_ok
);
  hwp_adder u_hwp_adder (
    .clk, .rst_n,
    .in_valid(pa_in_valid), .a(pa_a), .b(pa_b),
    .out_valid(pa_out_valid), .sum(pa_sum), .cout(pa_cout),
    .waves_in_flight(pa_waves_in_flight)
  );

  cla16_pred u_cla16_pred (
    .clk,
    .a(cla_a), .b(cla_b), .cin(cla_cin),
    .sum(cla_sum), .cout(cla_cout), .pred_ok(cla_pred_ok)
  );
endmodule
