// tb_biased_nand2: exhaustive check of the two-input NAND over its four input patterns.
module tb_biased_nand2;
  logic a, b, y;
  int checks = 0, failures = 0;

  biased_nand2 dut (.a, .b, .y);

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== !(v == 3)) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
