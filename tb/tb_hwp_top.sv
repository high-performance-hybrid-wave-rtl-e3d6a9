// tb_hwp_top: end-to-end test of both adders through the top at default parameters
// (32-bit hybrid wave-pipelined adder, 16-bit carry-prediction adder).
// Both adders run at once on independent operand streams. Every result is compared with
// integer addition and must arrive with the published/implemented latency: 8 cycles after
// register 1 for the pipelined adder, 2 edges after presentation for the lookahead adder.
// Mechanisms counted, each must happen at least once: 8 waves in flight at once, the input
// clock gated with the pipe draining unaided, a sparse (bubbled) stream, and for the lookahead
// adder all blocks predicting, no block predicting, and a block failing to predict between
// predicting ones.
module tb_hwp_top;
  localparam int PW = 32, CW = 16, LAT = 8;
  logic clk = 0, rst_n = 0;
  logic pa_in_valid = 0;
  logic [PW-1:0] pa_a = '0, pa_b = '0, pa_sum;
  logic pa_out_valid, pa_cout;
  logic [3:0] pa_waves_in_flight;
  logic [CW-1:0] cla_a = '0, cla_b = '0, cla_sum;
  logic cla_cin = 0, cla_cout;
  logic [3:0] cla_pred_ok;

  int checks = 0, failures = 0;
  int cyc = 0;
  int m_full = 0, m_drain = 0, m_sparse = 0, m_all = 0, m_none = 0, m_mixed = 0;

  logic [PW:0] pa_exp [int];
  logic [PW:0] pa_last;
  bit          pa_known = 0;
  logic [CW:0] cla_exp [int];
  logic [3:0]  cla_ok_exp [int];

  hwp_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL edge %0d: %s", cyc, msg);
  endtask

  // called at each negedge: outputs reflect edge cyc
  task automatic check();
    int infl;
    checks++;
    if (pa_out_valid !== pa_exp.exists(cyc)) fail("pa_out_valid");
    if (pa_exp.exists(cyc)) begin
      pa_last = pa_exp[cyc];
      pa_known = 1;
    end
    if (pa_known) begin
      checks++;
      if ({pa_cout, pa_sum} !== pa_last)
        fail($sformatf("pa result %h exp %h", {pa_cout, pa_sum}, pa_last));
    end
    infl = 0;
    for (int e = cyc - LAT + 1; e <= cyc; e++) infl += int'(pa_exp.exists(e + LAT));
    checks++;
    if (int'(pa_waves_in_flight) != infl) fail("waves_in_flight");
    if (pa_waves_in_flight == 4'd8) m_full++;
    if (cla_exp.exists(cyc)) begin
      checks++;
      if ({cla_cout, cla_sum} !== cla_exp[cyc] || cla_pred_ok !== cla_ok_exp[cyc])
        fail($sformatf("cla result %h/%b exp %h/%b", {cla_cout, cla_sum}, cla_pred_ok,
                       cla_exp[cyc], cla_ok_exp[cyc]));
      if (cla_ok_exp[cyc] == 4'b1111) m_all++;
      if (cla_ok_exp[cyc] == 4'b0000) m_none++;
      if (cla_ok_exp[cyc] == 4'b1101) m_mixed++;
    end
  endtask

  task automatic drive_pa(bit v);
    pa_in_valid = v;
    pa_a = $urandom;
    pa_b = ($urandom % 4 == 0) ? ~pa_a : $urandom;
    if (v) pa_exp[cyc + 1 + LAT] = {1'b0, pa_a} + {1'b0, pa_b};
  endtask

  task automatic drive_cla(logic [3:0] mode);
    logic [3:0] ok;
    for (int j = 0; j < 4; j++) begin
      logic [3:0] x, y;
      x = 4'($urandom);
      y = 4'($urandom);
      if (!mode[j]) y[3:1] = ~x[3:1];
      else if ((x[3:1] ^ y[3:1]) == 3'b111) y[3] = x[3];   // make bit 3 generate or kill
      cla_a[4*j +: 4] = x;
      cla_b[4*j +: 4] = y;
      ok[j] = mode[j];
    end
    cla_cin = 1'($urandom);
    cla_exp[cyc + 2]    = {1'b0, cla_a} + {1'b0, cla_b} + {16'b0, cla_cin};
    cla_ok_exp[cyc + 2] = ok;
  endtask

  task automatic step(bit pa_v);
    @(negedge clk);
    check();
    drive_pa(pa_v);
    drive_cla(4'($urandom));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // continuous streams
    for (int n = 0; n < 60; n++) step(1);
    // explicit lookahead cases alongside a random pipelined stream
    for (int n = 0; n < 30; n++) begin
      @(negedge clk);
      check();
      drive_pa(($urandom % 3) != 0);
      drive_cla(n % 3 == 0 ? 4'b1111 : n % 3 == 1 ? 4'b0000 : 4'b1101);
    end
    // input clock gated: the pipe drains on its own
    for (int n = 0; n < 10; n++) step(1);
    begin
      int before_res;
      before_res = 0;
      for (int n = 0; n < 12; n++) begin
        step(0);
        before_res += int'(pa_out_valid);
      end
      checks++;
      if (pa_waves_in_flight == 0 && before_res >= 8) m_drain++;
      else fail("pipe did not drain after gating");
    end
    // sparse operations
    for (int n = 0; n < 60; n++) begin
      step(n % 10 == 0);
      if (n % 10 == 0) m_sparse++;
    end
    repeat (12) step(0);
    $display("mechanisms: pa_full=%0d pa_drain=%0d pa_sparse=%0d cla_all=%0d cla_none=%0d cla_mixed=%0d",
             m_full, m_drain, m_sparse, m_all, m_none, m_mixed);
    checks++;
    if (m_full == 0 || m_drain == 0 || m_sparse == 0 || m_all == 0 || m_none == 0 || m_mixed == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
