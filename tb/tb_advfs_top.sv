// tb_advfs_top: end-to-end test of the adaptive controller alone, with a
// short measurement window (WINDOW = 32) and settle time (SETTLE_CYCLES = 4)
// so that many workload phases fit in a short run.
// A processor model drives busy with a utilisation profile that changes
// every few windows (idle, bursts, ramps). For each phase the testbench
// computes the expected load code itself, min(7, floor(8 * busy / 32)) over
// the last window, and waits for the FSM to reach it; then it checks the
// state, both levels, the codes and the cpu_clk period.
// It also holds the regulator's power-good low and checks that the FSM
// stays in its up-step with frequency unchanged (voltage must settle first),
// then releases it and checks that the step completes.
// Every cycle: freq_level <= voltage_level and no protection fault.
module tb_advfs_top;
  logic       clk = 0, rst = 0;
  logic       busy = 0, use_ext = 0, alarm = 0, pgood = 1;
  logic [2:0] ext_load = 0;
  logic [2:0] load, state, vl, fl, applied;
  logic [3:0] vout, fout;
  logic       cpu_clk, vst, fdone, trans, tlim, fault, cfault, sfault, upd, sup, sdn;
  int checks = 0, failures = 0;
  int nb = 0, last_load = 0;

  initial #1 rst = 1;  // a real edge, so the asynchronous resets act

  advfs_top #(.WINDOW(32), .SETTLE_CYCLES(4), .THERMAL_CAP(3), .CLK_TIMEOUT(64)) dut (
    .clk(clk), .rst(rst), .busy(busy), .use_ext_load(use_ext), .ext_load(ext_load),
    .thermal_alarm(alarm), .vreg_pgood(pgood), .load(load), .state(state), .voltage_level(vl),
    .freq_level(fl), .voltage_out(vout), .freq_out(fout), .cpu_clk(cpu_clk), .v_stable(vst),
    .f_done(fdone), .transitioning(trans), .thermal_limited(tlim), .fault(fault),
    .clk_fault(cfault), .seq_fault(sfault), .load_update(upd), .step_up(sup), .step_down(sdn),
    .applied_level(applied));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // Independent load model: count busy over each 32-cycle window.
  int wc = 0;
  always @(posedge clk) if (!rst) begin
    if (wc == 31) begin
      int t;
      t = (nb + (busy ? 1 : 0)) * 8 / 32;
      last_load <= (t > 7) ? 7 : t;
      nb <= 0;
      wc <= 0;
    end else begin
      nb <= nb + (busy ? 1 : 0);
      wc <= wc + 1;
    end
  end

  always @(negedge clk) if (!rst) begin
    chk(fl <= vl, "frequency level above voltage level");
    chk(!fault, "no protection fault");
    if (upd) chk(int'(load) == last_load, $sformatf("load %0d, model %0d", load, last_load));
  end

  int pct = 0;
  always @(negedge clk) busy = ($urandom_range(1, 100) <= pct);

  task automatic phase(input int p);
    int n;
    logic [2:0] s0;
    realtime t0;
    pct = p;
    repeat (2) @(posedge upd);     // one full window at the new utilisation
    n = 0;
    while ((trans || state != load) && n < 3000) begin @(posedge clk); n++; end
    #1;
    chk(state === load && vl === load && fl === load, $sformatf("utilisation %0d%%: state %0d load %0d", p, state, load));
    chk(vout === {1'b0, state} && fout === {1'b0, state}, "codes");
    s0 = fl;
    @(posedge cpu_clk); t0 = $realtime;
    @(posedge cpu_clk);
    // The load may move on at the next window; measure only a steady clock.
    if (fl == s0 && fdone) chk($realtime - t0 == 10.0 * (16 >> (s0 / 2)), "cpu_clk period");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    phase(0); phase(100); phase(10); phase(55); phase(80); phase(0); phase(30); phase(100);
    for (int k = 0; k < 10; k++) phase($urandom_range(0, 100));
    // Regulator never settles: the up-step must wait with frequency unchanged.
    pct = 0;
    repeat (2) @(posedge upd);
    while (trans || state != 0) @(posedge clk);
    pgood = 0;
    pct = 100;
    repeat (2) @(posedge upd);
    repeat (100) @(posedge clk);
    #1 chk(trans && state === 0 && vl === 3'd1 && fl === 3'd0 && !vst, "up-step waits for power-good");
    pgood = 1;
    repeat (400) @(posedge clk);
    #1 chk(state === 3'd7 && !trans, "up-steps finish after power-good");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
