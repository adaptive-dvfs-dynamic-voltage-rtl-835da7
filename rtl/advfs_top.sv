// advfs_top: adaptive DVFS controller.
//
// Chain: workload_monitor makes the 3-bit workload code load (measured from
// busy, or taken from ext_load); protection_unit caps it under a thermal
// alarm and gives the FSM its target; advfs_fsm steps through the eight
// operating states S0..S7, raising voltage before frequency and lowering
// frequency before voltage; voltage_request drives the 4-bit regulator
// request voltage_out and waits for the voltage to settle (v_stable);
// freq_bank and adaptive_freq_controller switch cpu_clk between clk/16,
// clk/8, clk/4 and clk/2 glitch-free and report the finished switch
// (f_done); freq_out is the 4-bit frequency code. A protection fault (clock
// stall or invalid transition) holds the FSM where it is.
// Timing: one step up takes about SETTLE_CYCLES + 2 clk cycles plus the
// clock switch; one step down takes the clock switch plus SETTLE_CYCLES + 2.
// All logic runs on clk except the clock multiplexer, which runs on the
// divided clocks. Reset is asynchronous, active high; after reset the design
// is in S0 with both levels at 0.
// The block chain and signal names follow the published block diagram; the
// widths of internal handshakes and every parameter value are this design's
// choices.
module advfs_top
  import dvfs_pkg::*;
#(
  parameter int unsigned WINDOW        = 256,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned THERMAL_CAP   = 3,
  parameter int unsigned CLK_TIMEOUT   = 64
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       busy,
  input  logic       use_ext_load,
  input  level_t     ext_load,
  input  logic       thermal_alarm,
  input  logic       vreg_pgood,
  output level_t     load,
  output level_t     state,
  output level_t     voltage_level,
  output level_t     freq_level,
  output logic [3:0] voltage_out,
  output logic [3:0] freq_out,
  output logic       cpu_clk,
  output logic       v_stable,
  output logic       f_done,
  output logic       transitioning,
  output logic       thermal_limited,
  output logic       fault,
  output logic       clk_fault,
  output logic       seq_fault,
  output logic       load_update,
  output logic       step_up,
  output logic       step_down,
  output level_t     applied_level
);

  level_t     target;
  logic [3:0] clk_div;

  workload_monitor #(.WINDOW(WINDOW)) u_monitor (
    .clk          (clk),
    .rst          (rst),
    .busy         (busy),
    .use_ext_load (use_ext_load),
    .ext_load     (ext_load),
    .load         (load),
    .load_update  (load_update)
  );

  protection_unit #(
    .THERMAL_CAP (THERMAL_CAP),
    .CLK_TIMEOUT (CLK_TIMEOUT)
  ) u_protect (
    .clk             (clk),
    .rst             (rst),
    .load            (load),
    .thermal_alarm   (thermal_alarm),
    .cpu_clk         (cpu_clk),
    .state           (state),
    .voltage_level   (voltage_level),
    .freq_level      (freq_level),
    .target          (target),
    .thermal_limited (thermal_limited),
    .clk_fault       (clk_fault),
    .seq_fault       (seq_fault),
    .fault           (fault)
  );

  advfs_fsm #(.NUM_STATES(8)) u_fsm (
    .clk           (clk),
    .rst           (rst),
    .target        (target),
    .hold          (fault),
    .v_stable      (v_stable),
    .f_done        (f_done),
    .state         (state),
    .voltage_level (voltage_level),
    .freq_level    (freq_level),
    .transitioning (transitioning),
    .step_up       (step_up),
    .step_down     (step_down)
  );

  voltage_request #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_vreq (
    .clk           (clk),
    .rst           (rst),
    .voltage_level (voltage_level),
    .vreg_pgood    (vreg_pgood),
    .voltage_out   (voltage_out),
    .applied_level (applied_level),
    .v_stable      (v_stable)
  );

  freq_bank #(.NUM_TAPS(4)) u_bank (
    .clk     (clk),
    .rst     (rst),
    .clk_div (clk_div)
  );

  adaptive_freq_controller #(.NUM_LEVELS(8), .NUM_CLKS(4)) u_freq (
    .clk        (clk),
    .rst        (rst),
    .freq_level (freq_level),
    .clk_div    (clk_div),
    .freq_out   (freq_out),
    .cpu_clk    (cpu_clk),
    .f_done     (f_done)
  );

endmodule
