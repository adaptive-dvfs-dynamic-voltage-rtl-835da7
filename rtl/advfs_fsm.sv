// advfs_fsm: adaptive DVFS state machine with safe voltage/frequency
// sequencing.
//
// A Moore machine with NUM_STATES operating states S0..S7; in state Sn the
// voltage level and the frequency level are both n. The workload target
// (0..7) says which state the load calls for. The machine moves one state at
// a time toward it, and each step is sequenced:
//   up   (Sn -> Sn+1): raise voltage_level to n+1 and wait for v_stable;
//                      then raise freq_level and state to n+1 and wait for
//                      f_done (the clock switch) before the next step;
//   down (Sn -> Sn-1): lower freq_level to n-1 and wait for f_done; then
//                      lower voltage_level and state to n-1 and wait for
//                      v_stable before the next step.
// So freq_level never exceeds voltage_level, and the clock never runs faster
// than a voltage that has not settled. While hold is high no new step starts;
// a step already begun finishes. transitioning is high outside the steady
// phase; step_up/step_down pulse for one cycle when state changes.
// Outputs are registers (Moore). Reset (asynchronous, active high) puts the
// machine in S0, steady. The eight states, the Moore structure and the
// ordering rule follow the published design; moving one state per step, the
// phase encoding and the waits on v_stable/f_done are this design's reading of
// "moves step-by-step from low-power states to higher performance states".
// The transition conditions are named high_load and low_load after the labels
// of the published state diagram.
module advfs_fsm
  import dvfs_pkg::*;
#(
  parameter int unsigned NUM_STATES = 8
) (
  input  logic   clk,
  input  logic   rst,
  input  level_t target,
  input  logic   hold,
  input  logic   v_stable,
  input  logic   f_done,
  output level_t state,
  output level_t voltage_level,
  output level_t freq_level,
  output logic   transitioning,
  output logic   step_up,
  output logic   step_down
);

  localparam logic [3:0] TOP = 4'(NUM_STATES - 1);

  seq_phase_e phase;
  level_t     goal;
  logic       high_load, low_load;   // the load calls for a higher / lower state

  assign goal          = ({1'b0, target} > TOP) ? TOP[2:0] : target;
  assign high_load     = !hold && (goal > state);
  assign low_load      = !hold && (goal < state);
  assign transitioning = (phase != PH_STEADY);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase         <= PH_STEADY;
      state         <= '0;
      voltage_level <= '0;
      freq_level    <= '0;
      step_up       <= 1'b0;
      step_down     <= 1'b0;
    end else begin
      step_up   <= 1'b0;
      step_down <= 1'b0;
      unique case (phase)
        PH_STEADY: begin
          if (high_load) begin
            voltage_level <= state + 1'b1;   // voltage first on the way up
            phase         <= PH_V_UP;
          end else if (low_load) begin
            freq_level <= state - 1'b1;      // frequency first on the way down
            phase      <= PH_F_DOWN;
          end
        end
        PH_V_UP: if (v_stable) begin
          freq_level <= state + 1'b1;
          state      <= state + 1'b1;
          step_up    <= 1'b1;
          phase      <= PH_F_UP;
        end
        PH_F_UP: if (f_done) phase <= PH_STEADY;
        PH_F_DOWN: if (f_done) begin
          voltage_level <= state - 1'b1;
          state         <= state - 1'b1;
          step_down     <= 1'b1;
          phase         <= PH_V_DOWN;
        end
        PH_V_DOWN: if (v_stable) phase <= PH_STEADY;
        default: phase <= PH_STEADY;
      endcase
    end
  end

  // Safety rules of the sequencing.
  a_freq_le_volt: assert property (@(posedge clk) disable iff (rst) freq_level <= voltage_level);
  a_single_step:  assert property (@(posedge clk) disable iff (rst)
                                   (state == $past(state)) || (state == $past(state) + 3'd1) ||
                                   (state + 3'd1 == $past(state)));

endmodule
