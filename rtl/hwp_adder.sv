// hwp_adder: hybrid wave-pipelined parallel-prefix adder (WIDTH bits, default 32).
//
// The adder is the three-block parallel adder: a (g, p) generator, a log2(WIDTH)-level carry
// tree of NAND-built cells with padding cells that give every column the same depth, and a sum
// block of XORs. Hybrid wave pipelining cuts it into three stages with internal registers,
// registers 1 (input) to 4 (output), and lets several data waves travel through each stage at
// once; each stage's register is clocked by a copy of the clock delayed to match the stage, so a
// wave and its clock edge move together.
//
//   register 1 (a, b)  -> stage 1: (g, p) generator + carry levels 1..S1_LAST_LEVEL
//   register 2         -> stage 2: carry levels S1_LAST_LEVEL+1..S2_LAST_LEVEL
//   register 3         -> stage 3: remaining carry levels + sum generator
//   register 4 (sum, cout)
//
// Stage k holds up to WAVES_Sk waves (published: 3, 2, 3, 8 in all), so in terms of the input
// clock a result leaves register 4 WAVES_S1 + WAVES_S2 + WAVES_S3 edges after register 1 took
// its operands, and one result can be accepted every cycle. The cycle behaviour of each stage
// and its delayed-clock register is modelled by wave_stage_reg.
//
// Interface: in_valid high at a rising edge launches a wave with a, b (in_valid low is the input
// clock gated off: no new wave, those in flight still reach the output). out_valid marks a new
// result in sum/cout; otherwise the output register holds. waves_in_flight counts the waves
// launched from register 1 that have not yet reached register 4. There is no carry input: the
// lowest sum bit is the lowest propagate, as in the published recurrence. rst_n (asynchronous,
// active low) clears the valid bits only.
//
// The stage boundaries inside the carry tree are not published; levels 1-2 / 3 / 4-5 is this
// design's choice, picked because it reproduces the published ratio of stage delays (stage 2
// about half of stages 1 and 3).
module hwp_adder
  import hwp_pkg::*;
#(
  parameter int unsigned WIDTH         = ADDER_WIDTH,
  parameter int unsigned WAVES_S1      = WAVES_STAGE1,
  parameter int unsigned WAVES_S2      = WAVES_STAGE2,
  parameter int unsigned WAVES_S3      = WAVES_STAGE3,
  parameter int unsigned S1_LAST_LEVEL = 2,
  parameter int unsigned S2_LAST_LEVEL = 3
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           in_valid,
  input  logic [WIDTH-1:0]                               a,
  input  logic [WIDTH-1:0]                               b,
  output logic                                           out_valid,
  output logic [WIDTH-1:0]                               sum,
  output logic                                           cout,
  output logic [$clog2(1+WAVES_S1+WAVES_S2+WAVES_S3)-1:0] waves_in_flight
);
  localparam int unsigned LEVELS = $clog2(WIDTH);

  typedef struct packed {
    logic [WIDTH-1:0] f;  // bit propagate carried to the sum block
    logic [WIDTH-1:0] g;  // group generate
    logic [WIDTH-1:0] p;  // group propagate
  } tree_t;

  typedef struct packed {
    logic             cout;
    logic [WIDTH-1:0] sum;
  } result_t;

  // ---------------- register 1: input register, undelayed clock ----------------
  logic             r1_valid;
  logic [WIDTH-1:0] r1_a, r1_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r1_valid <= 1'b0;
    else        r1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      r1_a <= a;
      r1_b <= b;
    end
  end

  // ---------------- stage 1 ----------------
  logic [WIDTH-1:0] g0, p0;
  tree_t            s1_out, r2_q;
  logic             r2_valid;
  logic [$clog2(WAVES_S1+1)-1:0] occ1;

  gp_generator #(.WIDTH(WIDTH)) u_gp (.a(r1_a), .b(r1_b), .g(g0), .p(p0));

  carry_block #(.WIDTH(WIDTH), .FIRST_LEVEL(1), .LAST_LEVEL(S1_LAST_LEVEL)) u_carry1 (
    .f_i(p0), .g_i(g0), .p_i(p0),
    .f_o(s1_out.f), .g_o(s1_out.g), .p_o(s1_out.p)
  );

  wave_stage_reg #(.DW($bits(tree_t)), .WAVES(WAVES_S1)) u_reg2 (
    .clk, .rst_n, .valid_i(r1_valid), .d_i(s1_out),
    .valid_o(r2_valid), .d_o(r2_q), .occupancy(occ1)
  );

  // ---------------- stage 2 ----------------
  tree_t s2_out, r3_q;
  logic  r3_valid;
  logic [$clog2(WAVES_S2+1)-1:0] occ2;

  carry_block #(.WIDTH(WIDTH), .FIRST_LEVEL(S1_LAST_LEVEL+1), .LAST_LEVEL(S2_LAST_LEVEL)) u_carry2 (
    .f_i(r2_q.f), .g_i(r2_q.g), .p_i(r2_q.p),
    .f_o(s2_out.f), .g_o(s2_out.g), .p_o(s2_out.p)
  );

  wave_stage_reg #(.DW($bits(tree_t)), .WAVES(WAVES_S2)) u_reg3 (
    .clk, .rst_n, .valid_i(r2_valid), .d_i(s2_out),
    .valid_o(r3_valid), .d_o(r3_q), .occupancy(occ2)
  );

  // ---------------- stage 3 ----------------
  tree_t   s3_tree;
  result_t s3_out, r4_q;
  logic [$clog2(WAVES_S3+1)-1:0] occ3;

  carry_block #(.WIDTH(WIDTH), .FIRST_LEVEL(S2_LAST_LEVEL+1), .LAST_LEVEL(LEVELS)) u_carry3 (
    .f_i(r3_q.f), .g_i(r3_q.g), .p_i(r3_q.p),
    .f_o(s3_tree.f), .g_o(s3_tree.g), .p_o(s3_tree.p)
  );

  sum_generator #(.WIDTH(WIDTH)) u_sum (.f(s3_tree.f), .c(s3_tree.g), .s(s3_out.sum));
  assign s3_out.cout = s3_tree.g[WIDTH-1];

  // register 4: output register
  wave_stage_reg #(.DW($bits(result_t)), .WAVES(WAVES_S3)) u_reg4 (
    .clk, .rst_n, .valid_i(r3_valid), .d_i(s3_out),
    .valid_o(out_valid), .d_o(r4_q), .occupancy(occ3)
  );

  assign sum  = r4_q.sum;
  assign cout = r4_q.cout;

  // waves between register 1 (inclusive) and register 4 (exclusive)
  assign waves_in_flight = $bits(waves_in_flight)'(r1_valid) + $bits(waves_in_flight)'(occ1)
                         + $bits(waves_in_flight)'(occ2) + $bits(waves_in_flight)'(occ3)
                         - $bits(waves_in_flight)'(out_valid);

  initial begin
    assert (S1_LAST_LEVEL >= 1 && S2_LAST_LEVEL > S1_LAST_LEVEL && LEVELS > S2_LAST_LEVEL)
      else $error("hwp_adder: every stage needs at least one carry level");
  end
endmodule
