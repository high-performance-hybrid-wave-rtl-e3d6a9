// tb_cla16_pred: the registered 16-bit carry-prediction adder at its default width.
// Operands presented before edge k must give a + b + cin at the outputs after edge k + 1.
// Operand patterns are built block by block so that every block is seen predicting and failing
// to predict, including the best case (all four predict), the worst case (none predicts, the
// carry ripples through every block's first carry) and the published mixed case (blocks 1, 3
// and 4 predict, block 2 does not). pred_ok is checked per block.
module tb_cla16_pred;
  localparam int W = 16;
  logic clk = 0;
  logic [W-1:0] a = '0, b = '0, sum;
  logic cin = 0, cout;
  logic [3:0] pred_ok;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_all = 0, n_none = 0, n_mixed = 0, n_ok = 0, n_nok = 0;

  logic [W:0] exp_res [int];
  logic [3:0] exp_ok  [int];

  cla16_pred dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // operands for one block: predicting (bits 1..3 not all propagate) or not
  function automatic logic [7:0] block_ops(bit predict);
    logic [3:0] x, y;
    do begin
      x = 4'($urandom);
      y = 4'($urandom);
      if (!predict) y[3:1] = ~x[3:1];
    end while (predict && ((x[3:1] ^ y[3:1]) == 3'b111));
    return {x, y};
  endfunction

  task automatic drive(logic [3:0] mode);
    logic [3:0] ok;
    for (int j = 0; j < 4; j++) begin
      logic [7:0] xy;
      xy = block_ops(mode[j]);
      a[4*j +: 4] = xy[7:4];
      b[4*j +: 4] = xy[3:0];
    end
    cin = 1'($urandom);
    for (int j = 0; j < 4; j++)
      ok[j] = (a[4*j+1 +: 3] ^ b[4*j+1 +: 3]) != 3'b111;
    exp_res[cyc + 2] = {1'b0, a} + {1'b0, b} + {16'b0, cin};
    exp_ok[cyc + 2]  = ok;
    if (ok == 4'b1111) n_all++;
    if (ok == 4'b0000) n_none++;
    if (ok == 4'b1101) n_mixed++;
    for (int j = 0; j < 4; j++) begin
      if (ok[j]) n_ok++;
      else       n_nok++;
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (exp_res.exists(cyc)) begin
        checks++;
        if ({cout, sum} !== exp_res[cyc] || pred_ok !== exp_ok[cyc]) begin
          failures++;
          $display("FAIL edge %0d got %h/%b exp %h/%b", cyc, {cout, sum}, pred_ok,
                   exp_res[cyc], exp_ok[cyc]);
        end
      end
      case (n % 4)
        0: drive(4'b1111);             // best case
        1: drive(4'b0000);             // worst case
        2: drive(4'b1101);             // block 2 (of 1..4) fails to predict
        default: drive(4'($urandom));
      endcase
    end
    repeat (3) begin
      @(negedge clk);
      if (exp_res.exists(cyc)) begin
        checks++;
        if ({cout, sum} !== exp_res[cyc]) begin
          failures++;
          $display("FAIL edge %0d", cyc);
        end
      end
    end
    $display("mechanisms: all_predict=%0d none_predict=%0d mixed=%0d block_pred=%0d block_nopred=%0d",
             n_all, n_none, n_mixed, n_ok, n_nok);
    checks++;
    if (n_all == 0 || n_none == 0 || n_mixed == 0 || n_ok == 0 || n_nok == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
