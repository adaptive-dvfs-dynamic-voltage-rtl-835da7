// voltage_controller: voltage code of the basic four-mode DVFS datapath.
//
// Combinational lookup from the 2-bit voltage select to the 4-bit voltage
// code sent to the supply: 00 -> 0001, 01 -> 0011, 10 -> 0111, 11 -> 1111.
// The code table is the published mode table; each step up turns on one more
// bit, so the code reads as a thermometer of the supply level.
// No clock: voltage_out follows voltage_sel in the same cycle.
module voltage_controller
  import dvfs_pkg::*;
(
  input  mode_t       voltage_sel,
  output logic [3:0]  voltage_out
);

  always_comb voltage_out = mode_voltage_code(voltage_sel);

endmodule
