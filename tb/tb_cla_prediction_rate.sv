// tb_cla_prediction_rate: how often the carry-prediction blocks can predict on uniformly random
// operands. With independent uniform bits a block fails only when its bits 1..3 all propagate,
// probability (1/2)^3 = 12.5%, so about 87.5% of block evaluations should predict. Runs 20000
// random additions through the registered 16-bit adder, checks every sum, and checks that the
// measured prediction rate lies within 86.5%..88.5%.
module tb_cla_prediction_rate;
  localparam int W = 16, N = 20000;
  logic clk = 0;
  logic [W-1:0] a = '0, b = '0, sum;
  logic cin = 0, cout;
  logic [3:0] pred_ok;
  int checks = 0, failures = 0;
  int cyc = 0, n_pred = 0, n_blocks = 0;
  logic [W:0] exp_res [int];

  cla16_pred dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N + 2; n++) begin
      @(negedge clk);
      if (exp_res.exists(cyc)) begin
        checks++;
        if ({cout, sum} !== exp_res[cyc]) begin
          failures++;
          $display("FAIL edge %0d got %h exp %h", cyc, {cout, sum}, exp_res[cyc]);
        end
        for (int j = 0; j < 4; j++) n_pred += int'(pred_ok[j]);
        n_blocks += 4;
        exp_res.delete(cyc);
      end
      if (n < N) begin
        a = W'($urandom);
        b = W'($urandom);
        cin = 1'($urandom);
        exp_res[cyc + 2] = {1'b0, a} + {1'b0, b} + {16'b0, cin};
      end
    end
    $display("prediction rate: %0d of %0d block evaluations (%0d.%01d%%)", n_pred, n_blocks,
             n_pred * 100 / n_blocks, (n_pred * 1000 / n_blocks) % 10);
    checks++;
    if (n_pred * 1000 < n_blocks * 865 || n_pred * 1000 > n_blocks * 885) begin
      failures++;
      $display("FAIL prediction rate out of range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
