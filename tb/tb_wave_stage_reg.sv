// tb_wave_stage_reg: a 3-wave stage boundary with random launches and gaps.
// A wave launched at edge k (driven just after it, as by an upstream register) must appear at the register output at edge k + 3 with its data;
// edges without a wave must leave the register holding. occupancy must equal the number of
// waves launched in the last 3 edges. A one-wave instance (an ordinary register that loads only
// with a wave) is checked on the same stream with a latency of 1.
module tb_wave_stage_reg;
  localparam int DW = 16;
  localparam int WAVES = 3;
  logic clk = 0, rst_n = 0;
  logic valid_i = 0;
  logic [DW-1:0] d_i = '0;
  logic valid_o;
  logic [DW-1:0] d_o;
  logic [1:0] occupancy;
  int checks = 0, failures = 0;
  int cyc = 0;

  // reference: what was launched at each edge
  logic          hist_v [int];
  logic [DW-1:0] hist_d [int];
  logic [DW-1:0] held;
  bit            held_known = 0;

  wave_stage_reg #(.DW(DW), .WAVES(WAVES)) dut (.*);

  // one-wave instance: an ordinary register that loads only with a wave
  logic          valid_o1;
  logic [DW-1:0] d_o1;
  logic          occ1;
  logic [DW-1:0] held1;
  bit            held1_known = 0;
  wave_stage_reg #(.DW(DW), .WAVES(1)) dut1 (
    .clk, .rst_n, .valid_i, .d_i, .valid_o(valid_o1), .d_o(d_o1), .occupancy(occ1)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      // outputs reflect edge cyc
      if (hist_v.exists(cyc - WAVES) && rst_n) begin
        int occ;
        checks++;
        if (valid_o !== hist_v[cyc - WAVES]) begin
          failures++;
          $display("FAIL valid at edge %0d", cyc);
        end
        if (hist_v[cyc - WAVES]) begin
          held = hist_d[cyc - WAVES];
          held_known = 1;
        end
        if (held_known) begin
          checks++;
          if (d_o !== held) begin
            failures++;
            $display("FAIL data at edge %0d got %h exp %h", cyc, d_o, held);
          end
        end
        occ = 0;
        for (int k = 1; k <= WAVES; k++) occ += int'(hist_v[cyc - k]);
        checks++;
        if (int'(occupancy) != occ) begin
          failures++;
          $display("FAIL occupancy at edge %0d got %0d exp %0d", cyc, occupancy, occ);
        end
      end
      if (hist_v.exists(cyc - 1)) begin
        checks++;
        if (valid_o1 !== hist_v[cyc - 1] || occ1 !== hist_v[cyc - 1]) begin
          failures++;
          $display("FAIL one-wave valid at edge %0d", cyc);
        end
        if (hist_v[cyc - 1]) begin
          held1 = hist_d[cyc - 1];
          held1_known = 1;
        end
        if (held1_known) begin
          checks++;
          if (d_o1 !== held1) begin
            failures++;
            $display("FAIL one-wave data at edge %0d", cyc);
          end
        end
      end
      // drive as an upstream register would just after edge cyc: that edge launches the wave
      valid_i = ($urandom % 4) != 0;
      d_i = DW'($urandom);
      hist_v[cyc] = valid_i;
      hist_d[cyc] = d_i;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
