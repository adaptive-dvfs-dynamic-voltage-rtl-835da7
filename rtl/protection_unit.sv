// protection_unit: safety layer of the adaptive controller.
//
// Three checks, as the published design lists them ("invalid transitions,
// unstable clocks, or unsafe thermal conditions"):
//  * thermal: while thermal_alarm is high the workload target passed to the
//    FSM is capped at THERMAL_CAP (thermal_limited shows that the cap cut
//    the target), so the FSM steps down to at most that state;
//  * clock: cpu_clk is brought into the clk domain through two flip-flops;
//    if it shows no edge for CLK_TIMEOUT clk cycles clk_fault is set;
//  * transitions: seq_fault is set if freq_level ever exceeds
//    voltage_level, or if state moves by more than one between two cycles.
// clk_fault and seq_fault are sticky until reset; fault is their OR and is
// meant to hold the FSM in its present state. target is combinational;
// the fault flags rise one clk cycle after the event (clk_fault after the
// timeout). CLK_TIMEOUT must exceed the longest gap between cpu_clk edges,
// including the low time of a clock switch (up to about 32 clk cycles for the
// clk/16 clock). The cap value, the timeout and the reaction to a fault are
// this design's choices; the published design names the checks only.
// Reset (asynchronous, active high) clears all flags.
module protection_unit
  import dvfs_pkg::*;
#(
  parameter int unsigned THERMAL_CAP = 3,
  parameter int unsigned CLK_TIMEOUT = 64
) (
  input  logic   clk,
  input  logic   rst,
  input  level_t load,
  input  logic   thermal_alarm,
  input  logic   cpu_clk,
  input  level_t state,
  input  level_t voltage_level,
  input  level_t freq_level,
  output level_t target,
  output logic   thermal_limited,
  output logic   clk_fault,
  output logic   seq_fault,
  output logic   fault
);

  localparam level_t CAP = level_t'(THERMAL_CAP);
  localparam int unsigned TW = $clog2(CLK_TIMEOUT + 1);

  logic          ck_s1, ck_s2, ck_s3;
  logic [TW-1:0] idle_cnt;
  level_t        state_q;
  logic          bad_step;

  // Thermal cap.
  assign thermal_limited = thermal_alarm && (load > CAP);
  assign target          = thermal_limited ? CAP : load;

  // A step of more than one state (either direction).
  assign bad_step = (state != state_q) && (state != state_q + 3'd1) && (state + 3'd1 != state_q);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ck_s1     <= 1'b0;
      ck_s2     <= 1'b0;
      ck_s3     <= 1'b0;
      idle_cnt  <= '0;
      clk_fault <= 1'b0;
      seq_fault <= 1'b0;
      state_q   <= '0;
    end else begin
      ck_s1   <= cpu_clk;
      ck_s2   <= ck_s1;
      ck_s3   <= ck_s2;
      state_q <= state;
      if (ck_s2 != ck_s3)                    idle_cnt  <= '0;
      else if (idle_cnt < TW'(CLK_TIMEOUT))  idle_cnt  <= idle_cnt + 1'b1;
      else                                   clk_fault <= 1'b1;
      if (freq_level > voltage_level || bad_step) seq_fault <= 1'b1;
    end
  end

  assign fault = clk_fault | seq_fault;

endmodule
