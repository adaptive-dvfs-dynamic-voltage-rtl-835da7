// voltage_request: voltage request interface of the adaptive controller.
//
// Turns the FSM's 3-bit voltage_level into the 4-bit request voltage_out
// sent to the external regulator (the level zero-extended: S0 -> 0000,
// S1 -> 0001, S2 -> 0010, ..., S7 -> 0111) and tells the FSM when the
// requested voltage can be trusted. applied_level is the last level known to
// be stable. When voltage_level differs from it, a timer runs; once it has
// counted SETTLE_CYCLES cycles and the regulator reports vreg_pgood, the new
// level is taken as applied. A change of the request while the timer runs
// restarts it. v_stable = (applied_level == voltage_level) is combinational,
// so it drops in the same cycle as the request changes and rises
// SETTLE_CYCLES + 1 cycles later at the earliest.
// The published design says only that the module "communicates with the
// external regulator and confirms when the requested voltage level has
// stabilized"; the minimum settle time together with a power-good input is
// this design's choice (tie vreg_pgood high for a timer-only design).
// Reset (asynchronous, active high) sets applied_level to 0.
module voltage_request
  import dvfs_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  level_t     voltage_level,
  input  logic       vreg_pgood,
  output logic [3:0] voltage_out,
  output level_t     applied_level,
  output logic       v_stable
);

  localparam int unsigned CW = $clog2(SETTLE_CYCLES + 1);

  level_t        req_q;    // request the timer is running for
  logic [CW-1:0] timer;

  always_comb voltage_out = level_code(voltage_level);
  assign v_stable = (applied_level == voltage_level);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      applied_level <= '0;
      req_q         <= '0;
      timer         <= '0;
    end else if (v_stable) begin
      req_q <= voltage_level;
      timer <= '0;
    end else if (voltage_level != req_q) begin
      req_q <= voltage_level;          // new request: restart the settle time
      timer <= CW'(1);
    end else if (timer < CW'(SETTLE_CYCLES)) begin
      timer <= timer + 1'b1;
    end else if (vreg_pgood) begin
      applied_level <= voltage_level;
      timer         <= '0;
    end
  end

endmodule
