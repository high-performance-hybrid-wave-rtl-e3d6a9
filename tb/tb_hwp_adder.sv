// tb_hwp_adder: the 32-bit hybrid wave-pipelined adder at its default parameters.
// Every operation is checked against a + b computed by the testbench, and it must come out
// exactly 8 cycles (3 + 2 + 3 waves) after register 1 captured it. Phases: a continuous burst
// (the pipe must hold 8 waves at once and deliver one result per cycle), random gaps, the
// input clock gated off until the pipe has drained by itself (output then holds), and sparse
// single operations. waves_in_flight is checked every cycle. A second instance with one wave
// per stage (the same adder clocked without clock delays, a conventional 3-stage pipeline) runs
// on the same stream and must deliver each result 3 cycles after register 1.
module tb_hwp_adder;
  localparam int W = 32;
  localparam int LAT = 8;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [W-1:0] a = '0, b = '0;
  logic out_valid;
  logic [W-1:0] sum;
  logic cout;
  logic [3:0] waves_in_flight;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_full = 0, n_drained = 0, n_results = 0, n_gap = 0;

  logic [W:0] exp_res [int];   // expected {cout, sum} by output edge
  logic [W:0] last_res;
  bit         last_known = 0;

  hwp_adder dut (.*);

  localparam int LAT_C = 3;
  logic       c_out_valid;
  logic [W-1:0] c_sum;
  logic       c_cout;
  logic [1:0] c_waves;
  logic [W:0] exp_conv [int];
  logic [W:0] last_conv;
  bit         conv_known = 0;
  int         n_conv = 0;

  hwp_adder #(.WAVES_S1(1), .WAVES_S2(1), .WAVES_S3(1)) dut_conv (
    .clk, .rst_n, .in_valid, .a, .b,
    .out_valid(c_out_valid), .sum(c_sum), .cout(c_cout), .waves_in_flight(c_waves)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs();
    int infl;
    checks++;
    if (out_valid !== exp_res.exists(cyc)) begin
      failures++;
      $display("FAIL out_valid=%0b at edge %0d", out_valid, cyc);
    end
    if (exp_res.exists(cyc)) begin
      last_res = exp_res[cyc];
      last_known = 1;
      n_results++;
    end
    if (last_known) begin
      checks++;
      if ({cout, sum} !== last_res) begin
        failures++;
        $display("FAIL edge %0d got %h exp %h", cyc, {cout, sum}, last_res);
      end
    end
    // waves launched from register 1 at edges (cyc-LAT, cyc] are still inside
    infl = 0;
    for (int e = cyc - LAT + 1; e <= cyc; e++) infl += int'(exp_res.exists(e + LAT));
    checks++;
    if (int'(waves_in_flight) != infl) begin
      failures++;
      $display("FAIL waves_in_flight=%0d exp %0d at edge %0d", waves_in_flight, infl, cyc);
    end
    if (infl == 8) n_full++;
    // conventional (one wave per stage) instance
    checks++;
    if (c_out_valid !== exp_conv.exists(cyc)) begin
      failures++;
      $display("FAIL conventional out_valid=%0b at edge %0d", c_out_valid, cyc);
    end
    if (exp_conv.exists(cyc)) begin
      last_conv = exp_conv[cyc];
      conv_known = 1;
      n_conv++;
    end
    if (conv_known) begin
      checks++;
      if ({c_cout, c_sum} !== last_conv) begin
        failures++;
        $display("FAIL conventional edge %0d got %h exp %h", cyc, {c_cout, c_sum}, last_conv);
      end
    end
  endtask

  task automatic drive(bit v);
    in_valid = v;
    a = $urandom;
    b = ($urandom % 4 == 0) ? ~a : $urandom;   // many long carry chains
    if (v) exp_res[cyc + 1 + LAT] = {1'b0, a} + {1'b0, b};
    if (v) exp_conv[cyc + 1 + LAT_C] = {1'b0, a} + {1'b0, b};
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase A: continuous burst
    for (int n = 0; n < 40; n++) begin
      @(negedge clk); check_outputs(); drive(1);
    end
    // phase B: random gaps
    for (int n = 0; n < 300; n++) begin
      @(negedge clk); check_outputs(); drive(($urandom % 4) != 0);
    end
    // phase C: input clock gated after a burst; the waves in flight must come out unaided
    for (int n = 0; n < 8; n++) begin
      @(negedge clk); check_outputs(); drive(1);
    end
    begin
      int n_before;
      n_before = n_results;
      for (int n = 0; n < 20; n++) begin
        @(negedge clk); check_outputs(); drive(0);
      end
      if (n_results - n_before == 9 && waves_in_flight == 0) n_drained++;
      else begin
        failures++;
        $display("FAIL drain: %0d results after gating", n_results - n_before);
      end
      checks++;
    end
    // phase D: sparse single operations
    for (int n = 0; n < 100; n++) begin
      @(negedge clk); check_outputs(); drive((n % 11) == 0);
      if ((n % 11) == 0) n_gap++;
    end
    repeat (12) begin
      @(negedge clk); check_outputs(); drive(0);
    end
    $display("mechanisms: full_pipe(8 waves)=%0d gated_drain=%0d sparse_ops=%0d results=%0d conventional_results=%0d",
             n_full, n_drained, n_gap, n_results, n_conv);
    checks++;
    if (n_full == 0 || n_drained == 0 || n_gap == 0 || n_conv != n_results) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
