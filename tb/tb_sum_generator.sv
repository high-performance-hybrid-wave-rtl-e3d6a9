// tb_sum_generator: s[0] = f[0], s[i] = f[i] ^ c[i-1]; checked bit by bit on random vectors.
module tb_sum_generator;
  localparam int W = 32;
  logic [W-1:0] f, c, s;
  int checks = 0, failures = 0;

  sum_generator #(.WIDTH(W)) dut (.f, .c, .s);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      f = $urandom;
      c = $urandom;
      #1;
      for (int i = 0; i < W; i++) begin
        logic e;
        e = (i == 0) ? f[0] : (f[i] ^ c[i-1]);
        checks++;
        if (s[i] !== e) begin
          failures++;
          $display("FAIL bit %0d f=%h c=%h s=%h", i, f, c, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
