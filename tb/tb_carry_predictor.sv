// tb_carry_predictor: all 64 patterns of the upper three bit pairs.
// pred_ok must be low exactly for the 8 patterns where bits 1..3 all propagate (listed below
// as a table, independently of the formula); wherever it is high, cpred must equal the true
// carry out of bit 3 for both values of the carry out of bit 0.
module tb_carry_predictor;
  logic [3:1] a, b;
  logic cpred, pred_ok;
  int checks = 0, failures = 0;

  // the 8 no-prediction patterns as {a3,b3,a2,b2,a1,b1}
  localparam logic [5:0] NO_PRED [8] = '{6'b010101, 6'b010110, 6'b011001, 6'b011010,
                                         6'b100101, 6'b100110, 6'b101001, 6'b101010};

  carry_predictor dut (.a, .b, .cpred, .pred_ok);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fail_pred = 0;
    for (int v = 0; v < 64; v++) begin
      logic [5:0] pat;
      bit in_table;
      pat = 6'(v);
      {a[3], b[3], a[2], b[2], a[1], b[1]} = pat;
      #1;
      in_table = 0;
      foreach (NO_PRED[k]) if (NO_PRED[k] == pat) in_table = 1;
      checks++;
      if (pred_ok !== !in_table) begin
        failures++;
        $display("FAIL pred_ok=%0b for pattern %b", pred_ok, pat);
      end
      if (!pred_ok) n_fail_pred++;
      if (pred_ok) begin
        for (int c0 = 0; c0 < 2; c0++) begin
          int t;
          // bits 1..3 of a and b plus the carry into bit 1
          t = int'({a, 1'b0}) + int'({b, 1'b0}) + 2 * c0;
          checks++;
          if (cpred !== t[4]) begin
            failures++;
            $display("FAIL cpred=%0b exp %0b for pattern %b c0=%0d", cpred, t[4], pat, c0);
          end
        end
      end
    end
    checks++;
    if (n_fail_pred != 8) begin
      failures++;
      $display("FAIL %0d no-prediction patterns, expected 8", n_fail_pred);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
