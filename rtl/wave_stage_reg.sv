// wave_stage_reg: cycle-level model of one hybrid wave-pipelined stage boundary.
//
// In the hybrid scheme a stage of logic is not cut by registers; instead up to WAVES data waves
// travel through it at once, and the register at its end is clocked by a copy of the clock
// delayed by as much as the stage delays the data, so each clock edge travels with the wave it
// launched. Seen from the input clock, a wave launched at edge k is captured by the stage's
// register at edge k + WAVES.
//
// This module reproduces that behaviour cycle for cycle. Slots 0..WAVES-2 stand for waves still
// in flight in the stage's logic (they always advance; they are not registers of the circuit).
// Slot WAVES-1 is the stage's real edge-triggered register: it loads only when a wave (valid_i
// of WAVES cycles ago) arrives with its own clock edge, so when the input clock is gated the
// waves already launched keep moving and the register then holds its last value. valid
// travels with each wave and is reset by rst_n; data is not reset.
//
// Interface: d_i/valid_i enter at the launch edge, d_o/valid_o are the register outputs.
// occupancy counts the valid waves in slots 0..WAVES-1. WAVES = 1 gives an ordinary pipeline
// register (the same adder clocked without clock delays, i.e. conventionally pipelined).
module wave_stage_reg #(
  parameter int unsigned DW    = 96,
  parameter int unsigned WAVES = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       valid_i,
  input  logic [DW-1:0]              d_i,
  output logic                       valid_o,
  output logic [DW-1:0]              d_o,
  output logic [$clog2(WAVES+1)-1:0] occupancy
);
  logic [WAVES-1:0] v_q;
  logic [DW-1:0]    reg_q;  // the stage register

  if (WAVES == 1) begin : g_one_wave
    // one wave per stage: an ordinary pipeline register
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q <= '0;
      else        v_q <= valid_i;
    end

    always_ff @(posedge clk) begin
      if (valid_i) reg_q <= d_i;
    end
  end else begin : g_waves
    logic [DW-1:0] fly_q [WAVES-1];  // waves in flight in the logic

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q <= '0;
      else        v_q <= {v_q[WAVES-2:0], valid_i};
    end

    // waves in flight inside the logic: always advance
    always_ff @(posedge clk) begin
      fly_q[0] <= d_i;
      for (int s = 1; s < WAVES - 1; s++) fly_q[s] <= fly_q[s-1];
    end

    // the stage register: clocked only by edges that accompany a wave
    always_ff @(posedge clk) begin
      if (v_q[WAVES-2]) reg_q <= fly_q[WAVES-2];
    end
  end

  assign valid_o = v_q[WAVES-1];
  assign d_o     = reg_q;

  always_comb begin
    occupancy = '0;
    for (int s = 0; s < WAVES; s++) occupancy += v_q[s];
  end

  initial begin
    assert (WAVES >= 1) else $error("wave_stage_reg: WAVES must be at least 1");
  end
endmodule
