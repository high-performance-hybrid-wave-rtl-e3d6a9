// tb_gp_generator: random and corner operands; g must be a & b and p must be a ^ b per bit.
module tb_gp_generator;
  localparam int W = 32;
  logic [W-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  gp_generator #(.WIDTH(W)) dut (.a, .b, .g, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = '0; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (g[i] !== (a[i] && b[i]) || p[i] !== (a[i] != b[i])) begin
          failures++;
          $display("FAIL bit %0d a=%h b=%h g=%h p=%h", i, a, b, g, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
