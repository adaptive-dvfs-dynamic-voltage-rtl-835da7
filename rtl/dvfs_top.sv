// dvfs_top: basic four-mode DVFS datapath.
//
// The requested operating mode (mode[1:0]: 00 idle, 01 light load, 10 heavy
// load, 11 turbo) goes to dvfs_controller, which produces a frequency select
// and a voltage select in the safe order. freq_bank divides clk into clk/2,
// clk/4, clk/8 and clk/16; frequency_controller passes the selected one to
// freq_out through a glitch-free mux and gives its code freq_code
// (0001/0010/0100/1000); voltage_controller gives the voltage code
// voltage_out (0001/0011/0111/1111).
// Timing: a mode change reaches the first select one clk cycle later and the
// second one cycle after that; freq_out switches a few cycles of the old and
// new divided clocks after freq_sel. Reset is asynchronous, active high.
// The structure and names are the published schematic; freq_code and
// freq_switched are brought out in addition to the schematic's ports.
module dvfs_top
  import dvfs_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  mode_t      mode,
  output logic       freq_out,
  output logic [3:0] freq_code,
  output logic [3:0] voltage_out,
  output logic       freq_switched
);

  logic [3:0] clk_div;
  mode_t      freq_sel;
  mode_t      voltage_sel;

  freq_bank #(.NUM_TAPS(4)) fb (
    .clk     (clk),
    .rst     (rst),
    .clk_div (clk_div)
  );

  dvfs_controller dvfs (
    .clk         (clk),
    .rst         (rst),
    .mode        (mode),
    .freq_sel    (freq_sel),
    .voltage_sel (voltage_sel)
  );

  frequency_controller fc (
    .rst       (rst),
    .clk_div2  (clk_div[0]),
    .clk_div4  (clk_div[1]),
    .clk_div8  (clk_div[2]),
    .clk_div16 (clk_div[3]),
    .freq_sel  (freq_sel),
    .freq_out  (freq_out),
    .freq_code (freq_code),
    .switched  (freq_switched)
  );

  voltage_controller vc (
    .voltage_sel (voltage_sel),
    .voltage_out (voltage_out)
  );

endmodule
