// dvfs_system: top level holding both DVFS designs side by side.
//
// * The adaptive controller (advfs_top, ports prefixed adv_): measures or
//   receives a 3-bit workload code and steps an eight-state FSM S0..S7 toward
//   it, raising the supply request before the clock and lowering the clock
//   before the supply, with a thermal cap and clock/sequence protection.
// * The basic four-mode datapath (dvfs_top, unprefixed ports as in the
//   published schematic): a 2-bit mode selects one of clk/2..clk/16 and a
//   thermometer voltage code.
// The two share only clk and rst (asynchronous, active high) and do not
// interact. Parameters are passed through to the adaptive controller; the
// basic datapath has none.
module dvfs_system
  import dvfs_pkg::*;
#(
  parameter int unsigned WINDOW        = 256,
  parameter int unsigned SETTLE_CYCLES = 16,
  parameter int unsigned THERMAL_CAP   = 3,
  parameter int unsigned CLK_TIMEOUT   = 64
) (
  input  logic       clk,
  input  logic       rst,
  // adaptive controller
  input  logic       busy,
  input  logic       use_ext_load,
  input  level_t     ext_load,
  input  logic       thermal_alarm,
  input  logic       vreg_pgood,
  output level_t     adv_load,
  output level_t     adv_state,
  output level_t     adv_voltage_level,
  output level_t     adv_freq_level,
  output logic [3:0] adv_voltage_out,
  output logic [3:0] adv_freq_out,
  output logic       adv_cpu_clk,
  output logic       adv_v_stable,
  output logic       adv_f_done,
  output logic       adv_transitioning,
  output logic       adv_thermal_limited,
  output logic       adv_fault,
  output logic       adv_clk_fault,
  output logic       adv_seq_fault,
  output logic       adv_load_update,
  output logic       adv_step_up,
  output logic       adv_step_down,
  output level_t     adv_applied_level,
  // basic four-mode datapath
  input  mode_t      mode,
  output logic       freq_out,
  output logic [3:0] freq_code,
  output logic [3:0] voltage_out,
  output logic       freq_switched
);

  advfs_top #(
    .WINDOW        (WINDOW),
    .SETTLE_CYCLES (SETTLE_CYCLES),
    .THERMAL_CAP   (THERMAL_CAP),
    .CLK_TIMEOUT   (CLK_TIMEOUT)
  ) u_advfs (
    .clk             (clk),
    .rst             (rst),
    .busy            (busy),
    .use_ext_load    (use_ext_load),
    .ext_load        (ext_load),
    .thermal_alarm   (thermal_alarm),
    .vreg_pgood      (vreg_pgood),
    .load            (adv_load),
    .state           (adv_state),
    .voltage_level   (adv_voltage_level),
    .freq_level      (adv_freq_level),
    .voltage_out     (adv_voltage_out),
    .freq_out        (adv_freq_out),
    .cpu_clk         (adv_cpu_clk),
    .v_stable        (adv_v_stable),
    .f_done          (adv_f_done),
    .transitioning   (adv_transitioning),
    .thermal_limited (adv_thermal_limited),
    .fault           (adv_fault),
    .clk_fault       (adv_clk_fault),
    .seq_fault       (adv_seq_fault),
    .load_update     (adv_load_update),
    .step_up         (adv_step_up),
    .step_down       (adv_step_down),
    .applied_level   (adv_applied_level)
  );

  dvfs_top u_dvfs (
    .clk           (clk),
    .rst           (rst),
    .mode          (mode),
    .freq_out      (freq_out),
    .freq_code     (freq_code),
    .voltage_out   (voltage_out),
    .freq_switched (freq_switched)
  );

endmodule
