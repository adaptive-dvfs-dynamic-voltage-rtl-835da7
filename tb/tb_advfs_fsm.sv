// tb_advfs_fsm: checks the eight-state sequencing FSM against a model of its
// environment. The testbench plays regulator and clock switch: after any
// change of voltage_level it holds v_stable low for a random 2..12 cycles,
// after any change of freq_level it holds f_done low for 1..10 cycles.
// Checked on every cycle:
//  * freq_level <= voltage_level (frequency never ahead of voltage);
//  * freq_level only rises while v_stable is high (voltage has settled);
//  * voltage_level only falls while f_done is high (clock switch done);
//  * state changes by at most one, and levels only move one at a time;
// and after each target change, once the FSM is steady, state, voltage_level
// and freq_level all equal the target and the number of step_up/step_down
// pulses equals the distance moved. hold must stop new steps.
module tb_advfs_fsm;
  logic       clk = 0, rst = 0;
  logic [2:0] target = 0, state, vl, fl;
  logic       hold = 0, vst, fdone, trans, sup, sdn;
  int         vcnt = 0, fcnt = 0;
  logic [2:0] vl_q = 0, fl_q = 0, st_q = 0;
  int checks = 0, failures = 0, ups = 0, downs = 0;

  initial #1 rst = 1;  // a real edge, so the asynchronous resets act

  advfs_fsm #(.NUM_STATES(8)) dut (
    .clk(clk), .rst(rst), .target(target), .hold(hold), .v_stable(vst), .f_done(fdone),
    .state(state), .voltage_level(vl), .freq_level(fl), .transitioning(trans),
    .step_up(sup), .step_down(sdn));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // Environment: busy counters restart on every level change.
  assign vst   = (vcnt == 0) && (vl == vl_q);
  assign fdone = (fcnt == 0) && (fl == fl_q);
  always @(posedge clk) begin
    if (rst) begin
      vcnt <= 0; fcnt <= 0; vl_q <= 0; fl_q <= 0; st_q <= 0;
    end else begin
      vl_q <= vl;
      fl_q <= fl;
      st_q <= state;
      if (vl != vl_q)    vcnt <= $urandom_range(2, 12);
      else if (vcnt > 0) vcnt <= vcnt - 1;
      if (fl != fl_q)    fcnt <= $urandom_range(1, 10);
      else if (fcnt > 0) fcnt <= fcnt - 1;
      if (sup) ups++;
      if (sdn) downs++;
    end
  end

  // Cycle-by-cycle rules, checked just before each rising edge.
  always @(negedge clk) if (!rst) begin
    chk(fl <= vl, "freq_level above voltage_level");
    if (fl > fl_q) chk(vl_q == vl && fl == fl_q + 3'd1, "frequency raised by one after voltage");
    if (vl < vl_q) chk(fl == fl_q && vl + 3'd1 == vl_q, "voltage lowered by one after frequency");
    chk(state == st_q || state == st_q + 3'd1 || state + 3'd1 == st_q, "single-state step");
  end

  // Sampled at the edge: frequency rises only on a settled voltage and
  // voltage falls only on a finished clock switch.
  logic vst_at_edge, fdone_at_edge;
  always @(posedge clk) begin
    vst_at_edge   <= vst;
    fdone_at_edge <= fdone;
  end
  always @(negedge clk) if (!rst) begin
    if (fl > fl_q) chk(vst_at_edge, "frequency raised before voltage settled");
    if (vl < vl_q) chk(fdone_at_edge, "voltage lowered before clock switch finished");
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(state === 0 && vl === 0 && fl === 0 && !trans, "reset in S0");
    for (int k = 0; k < 40; k++) begin
      int u0, d0, n, dst;
      logic [2:0] from;
      from = state;
      u0 = ups; d0 = downs;
      target = (k == 0) ? 3'd7 : (k == 1) ? 3'd0 : 3'($urandom_range(0, 7));
      dst = int'(target) - int'(from);
      n = 0;
      @(posedge clk);
      while ((trans || state != target) && n < 2000) begin @(posedge clk); n++; end
      #1;
      chk(state === target && vl === target && fl === target, $sformatf("reached target %0d (state %0d)", target, state));
      chk((ups - u0) == (dst > 0 ? dst : 0) && (downs - d0) == (dst < 0 ? -dst : 0), "step pulse count");
    end
    // hold: no new step starts.
    hold = 1;
    target = (state == 0) ? 3'd5 : 3'd0;
    repeat (50) @(posedge clk);
    #1 chk(!trans && state != target, "hold freezes the state");
    hold = 0;
    repeat (400) @(posedge clk);
    #1 chk(state === target, "released hold reaches target");
    $display("steps up %0d, down %0d", ups, downs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
