// dvfs_pkg: types and code tables shared by the DVFS and ADVFS blocks.
//
// Two designs share this package. The basic DVFS datapath has four modes
// (mode[1:0] = 00 idle, 01 light, 10 heavy, 11 turbo). Each mode has a voltage
// code and a frequency code: the voltage code fills 1, 2, 3 or 4 bits from the
// bottom (0001, 0011, 0111, 1111), and the frequency code is one-hot
// (0001, 0010, 0100, 1000). These codes are the published mode table.
// The frequency code equals the selected clock's rate in units of clk/16,
// because mode m selects the clock clk / 2^(4-m).
// The adaptive controller has eight operating states S0..S7. For each state
// its 3-bit voltage and frequency levels are zero-extended into 4-bit
// voltage_out/freq_out codes, as in the published S0, S1, S2 and TURBO rows.
// The sequencing phases of the adaptive FSM are this design's own encoding.
package dvfs_pkg;

  typedef logic [2:0] level_t;   // ADVFS state / voltage level / frequency level
  typedef logic [1:0] mode_t;    // basic DVFS mode

  localparam mode_t MODE_IDLE  = 2'b00;
  localparam mode_t MODE_LIGHT = 2'b01;
  localparam mode_t MODE_HEAVY = 2'b10;
  localparam mode_t MODE_TURBO = 2'b11;

  // Phase of the adaptive FSM inside one step between neighbouring states.
  typedef enum logic [2:0] {
    PH_STEADY = 3'd0,  // voltage and frequency both at the state's level
    PH_V_UP   = 3'd1,  // voltage raised, waiting for it to settle
    PH_F_UP   = 3'd2,  // frequency raised, waiting for the clock switch
    PH_F_DOWN = 3'd3,  // frequency lowered, waiting for the clock switch
    PH_V_DOWN = 3'd4   // voltage lowered, waiting for it to settle
  } seq_phase_e;

  // Basic DVFS voltage code: (1 << (m+1)) - 1.
  function automatic logic [3:0] mode_voltage_code(mode_t m);
    case (m)
      MODE_IDLE:  return 4'b0001;
      MODE_LIGHT: return 4'b0011;
      MODE_HEAVY: return 4'b0111;
      MODE_TURBO: return 4'b1111;
      default:    return 4'b0001;
    endcase
  endfunction

  // Basic DVFS frequency code: 1 << m.
  function automatic logic [3:0] mode_freq_code(mode_t m);
    case (m)
      MODE_IDLE:  return 4'b0001;
      MODE_LIGHT: return 4'b0010;
      MODE_HEAVY: return 4'b0100;
      MODE_TURBO: return 4'b1000;
      default:    return 4'b0001;
    endcase
  endfunction

  // ADVFS 4-bit code of a 3-bit level.
  function automatic logic [3:0] level_code(level_t l);
    return {1'b0, l};
  endfunction

endpackage
