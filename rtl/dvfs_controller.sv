// dvfs_controller: mode decoder of the basic four-mode DVFS datapath.
//
// Registers the requested mode into two selects, one for the clock
// (freq_sel) and one for the supply (voltage_sel), and moves them in the safe
// order: when the mode rises the voltage select follows it one cycle before
// the frequency select; when the mode falls the frequency select follows it
// one cycle before the voltage select. freq_sel therefore never exceeds
// voltage_sel, so the clock is never faster than the supply allows.
// Reset (asynchronous, active high) puts both selects in mode 00 (idle).
// Interface: mode in, freq_sel/voltage_sel out, both registered; a step
// takes two clk cycles. The mode-to-select mapping and port names follow the
// published schematic; the clock, the reset and the one-cycle ordering are
// this design's reading of the published rule "voltage is increased before
// frequency ... frequency is reduced before voltage". The controller does not
// wait for the clock switch to complete; that wait is done by the adaptive
// controller (advfs_fsm).
module dvfs_controller
  import dvfs_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  mode_t mode,
  output mode_t freq_sel,
  output mode_t voltage_sel
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      freq_sel    <= MODE_IDLE;
      voltage_sel <= MODE_IDLE;
    end else begin
      // Upward: voltage first, then frequency.
      if (mode > voltage_sel)   voltage_sel <= mode;
      else if (mode > freq_sel) freq_sel    <= mode;
      // Downward: frequency first, then voltage.
      if (mode < freq_sel)         freq_sel    <= mode;
      else if (mode < voltage_sel) voltage_sel <= mode;
    end
  end

  // The clock must never run faster than the supply allows.
  a_freq_le_volt: assert property (@(posedge clk) disable iff (rst) freq_sel <= voltage_sel);

endmodule
