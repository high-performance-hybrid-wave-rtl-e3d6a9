// tb_cla4_pred_block: all 512 (a, b, cin) combinations of one 4-bit block.
// s and cout must equal a + b + cin; pred_ok must be low exactly when bits 1..3 all propagate.
module tb_cla4_pred_block;
  logic [3:0] a, b, s;
  logic cin, cout, pred_ok;
  int checks = 0, failures = 0;

  cla4_pred_block dut (.a, .b, .cin, .s, .cout, .pred_ok);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_pred = 0;
    for (int v = 0; v < 512; v++) begin
      logic [4:0] t;
      logic [3:0] p;
      {a, b, cin} = 9'(v);
      #1;
      t = {1'b0, a} + {1'b0, b} + {4'b0, cin};
      p = a ^ b;
      checks++;
      if ({cout, s} !== t) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%0b got %h exp %h", a, b, cin, {cout, s}, t);
      end
      checks++;
      if (pred_ok !== !(p[1] && p[2] && p[3])) begin
        failures++;
        $display("FAIL pred_ok a=%h b=%h", a, b);
      end
      n_pred += int'(pred_ok);
    end
    // 56 of 64 patterns of bits 1..3 predict; each occurs for 8 (a0, b0, cin) values
    checks++;
    if (n_pred != 56 * 8) begin
      failures++;
      $display("FAIL %0d predicting cases", n_pred);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
