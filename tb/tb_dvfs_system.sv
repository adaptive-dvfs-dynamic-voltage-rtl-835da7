// tb_dvfs_system: end-to-end test of the whole design at its default
// parameters (WINDOW 256, SETTLE_CYCLES 16, THERMAL_CAP 3, CLK_TIMEOUT 64).
//
// Adaptive controller. A regulator model pulls power-good low for 4..20
// cycles after every change of the voltage request. The test
//  1. drives external workload codes 1, 3, 7, 2, 0 and waits until the FSM
//     is steady, checking state, both levels, voltage_out = freq_out =
//     {0, level} and the cpu_clk period (16, 8, 4 or 2 clk cycles for
//     levels 0-1, 2-3, 4-5, 6-7);
//  2. raises the thermal alarm at workload 7 and expects the state to settle
//     at 3, then clears it and expects 7 again;
//  3. switches to measured utilisation: busy high 100% of cycles for two
//     windows (expect load 7), then 30% (expect load floor(8*n/256) for the
//     counted n), then idle (expect 0).
// On every cycle it checks freq_level <= voltage_level and that no
// protection fault appears. Mechanisms counted (each must happen): step up,
// step down, wait for voltage to settle, wait for a clock switch, wait for
// regulator power-good, thermal cap, measured-load window, external load.
// The clock-stall and invalid-transition faults cannot be provoked from the
// ports of a working design; the protection unit's own test covers them.
//
// Basic datapath. Modes 00, 01, 10, 11, 00 then random, checking
// voltage_out (0001/0011/0111/1111), freq_code (0001/0010/0100/1000) and the
// freq_out period (16/8/4/2 clk cycles). Counted: mode up, mode down,
// clock switch.
module tb_dvfs_system;
  logic       clk = 0, rst = 0;
  logic       busy = 0, use_ext = 1, alarm = 0, pgood = 1;
  logic [2:0] ext_load = 0;
  logic [2:0] a_load, a_state, a_vl, a_fl, a_applied;
  logic [3:0] a_vout, a_fout;
  logic       a_cpu_clk, a_vst, a_fdone, a_trans, a_tlim, a_fault, a_cfault, a_sfault, a_upd, a_up, a_dn;
  logic [1:0] mode = 0;
  logic       b_fout, b_fsw;
  logic [3:0] b_fcode, b_vout;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_up = 0, n_down = 0, n_vwait = 0, n_fwait = 0, n_pgwait = 0, n_therm = 0, n_window = 0, n_ext = 0;
  int n_mode_up = 0, n_mode_down = 0, n_bswitch = 0;

  initial #1 rst = 1;  // a real edge, so the asynchronous resets act

  dvfs_system dut (
    .clk(clk), .rst(rst),
    .busy(busy), .use_ext_load(use_ext), .ext_load(ext_load), .thermal_alarm(alarm), .vreg_pgood(pgood),
    .adv_load(a_load), .adv_state(a_state), .adv_voltage_level(a_vl), .adv_freq_level(a_fl),
    .adv_voltage_out(a_vout), .adv_freq_out(a_fout), .adv_cpu_clk(a_cpu_clk), .adv_v_stable(a_vst),
    .adv_f_done(a_fdone), .adv_transitioning(a_trans), .adv_thermal_limited(a_tlim), .adv_fault(a_fault),
    .adv_clk_fault(a_cfault), .adv_seq_fault(a_sfault), .adv_load_update(a_upd),
    .adv_step_up(a_up), .adv_step_down(a_dn), .adv_applied_level(a_applied),
    .mode(mode), .freq_out(b_fout), .freq_code(b_fcode), .voltage_out(b_vout), .freq_switched(b_fsw));

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

  // Regulator model: power-good low for a while after each new request.
  logic [3:0] vout_q = 0;
  int         pg_cnt = 0;
  always @(posedge clk) begin
    vout_q <= a_vout;
    if (a_vout != vout_q) begin
      pg_cnt <= $urandom_range(4, 20);
      pgood  <= 1'b0;
    end else if (pg_cnt > 1) begin
      pg_cnt <= pg_cnt - 1;
    end else begin
      pg_cnt <= 0;
      pgood  <= 1'b1;
    end
  end

  // Longest run of clk cycles without an edge on the adaptive cpu_clk.
  int gap = 0, max_gap = 0;
  logic cpu_q = 0;
  always @(posedge clk) if (!rst) begin
    cpu_q <= a_cpu_clk;
    if (a_cpu_clk != cpu_q) gap <= 0;
    else begin
      gap <= gap + 1;
      if (gap + 1 > max_gap) max_gap <= gap + 1;
    end
  end

  // Per-cycle checks and mechanism counting.
  logic b_fsw_q = 1;
  always @(negedge clk) if (!rst) begin
    chk(a_fl <= a_vl, "ADVFS frequency level above voltage level");
    chk(!a_fault, "no protection fault");
    if (a_up) n_up++;
    if (a_dn) n_down++;
    if (a_trans && !a_vst) n_vwait++;
    if (a_trans && !a_fdone) n_fwait++;
    if (a_trans && !a_vst && !pgood) n_pgwait++;
    if (a_tlim) n_therm++;
    if (a_upd) n_window++;
    if (use_ext) n_ext++;
    if (b_fsw_q && !b_fsw) n_bswitch++;
    b_fsw_q <= b_fsw;
  end

  function automatic int period_of(input logic [2:0] l);
    return 16 >> (l / 2);
  endfunction

  task automatic settle_and_check(input logic [2:0] exp_state, input string what);
    int n;
    realtime t0;
    n = 0;
    while ((a_trans || a_state != exp_state) && n < 5000) begin @(posedge clk); n++; end
    repeat (2) @(posedge clk);
    #1;
    chk(a_state === exp_state && a_vl === exp_state && a_fl === exp_state,
        $sformatf("%s: state %0d levels %0d/%0d, expected %0d", what, a_state, a_vl, a_fl, exp_state));
    chk(a_vout === {1'b0, exp_state} && a_fout === {1'b0, exp_state}, $sformatf("%s: codes", what));
    chk(a_vst && a_fdone && a_applied === exp_state, $sformatf("%s: settled", what));
    @(posedge a_cpu_clk); t0 = $realtime;
    @(posedge a_cpu_clk);
    chk($realtime - t0 == 10.0 * period_of(exp_state), $sformatf("%s: cpu_clk period", what));
  endtask

  task automatic basic_mode(input logic [1:0] m);
    int waited;
    realtime t0;
    if (m > mode) n_mode_up++;
    if (m < mode) n_mode_down++;
    mode = m;
    repeat (2) @(posedge clk);
    #1;
    chk(b_vout === 4'((1 << (m + 1)) - 1) && b_fcode === (4'b0001 << m), $sformatf("basic mode %0d codes", m));
    waited = 0;
    while (!b_fsw && waited < 64) begin @(negedge clk); waited++; end
    chk(b_fsw, "basic clock switched");
    @(posedge b_fout); t0 = $realtime;
    @(posedge b_fout);
    chk($realtime - t0 == 10.0 * (1 << (4 - m)), $sformatf("basic mode %0d freq_out period", m));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    fork
      begin : adaptive
        int nb, exp;
        // 1. External workload codes.
        use_ext = 1;
        ext_load = 3'd1; settle_and_check(3'd1, "load 1");
        ext_load = 3'd3; settle_and_check(3'd3, "load 3");
        ext_load = 3'd7; settle_and_check(3'd7, "load 7");
        ext_load = 3'd2; settle_and_check(3'd2, "load 2");
        ext_load = 3'd0; settle_and_check(3'd0, "load 0");
        // 2. Thermal cap.
        ext_load = 3'd7; settle_and_check(3'd7, "load 7 again");
        alarm = 1;       settle_and_check(3'd3, "thermal alarm");
        chk(a_tlim === 1'b1, "thermal_limited shown");
        alarm = 0;       settle_and_check(3'd7, "alarm cleared");
        // 3. Measured utilisation.
        use_ext = 0;
        busy = 1;
        @(posedge a_upd); @(posedge a_upd);
        #1 chk(a_load === 3'd7, "full utilisation gives load 7");
        settle_and_check(3'd7, "measured full load");
        @(posedge clk iff a_upd);
        nb = 0;
        for (int c = 0; c < 256; c++) begin
          @(negedge clk);
          busy = ($urandom_range(1, 100) <= 30);
          if (busy) nb++;
          @(posedge clk);
        end
        #1;
        exp = nb * 8 / 256;
        chk(a_load === 3'(exp), $sformatf("30%% utilisation: load %0d expected %0d", a_load, exp));
        settle_and_check(3'(exp), "measured partial load");
        busy = 0;
        @(posedge a_upd); @(posedge a_upd);
        #1 chk(a_load === 3'd0, "idle gives load 0");
        settle_and_check(3'd0, "measured idle");
      end
      begin : basic
        basic_mode(2'd0); basic_mode(2'd1); basic_mode(2'd2); basic_mode(2'd3); basic_mode(2'd0);
        repeat (30) basic_mode(2'($urandom_range(0, 3)));
      end
    join
    $display("mechanisms: step_up=%0d step_down=%0d voltage_wait=%0d clock_wait=%0d pgood_wait=%0d thermal=%0d window=%0d ext_load=%0d",
             n_up, n_down, n_vwait, n_fwait, n_pgwait, n_therm, n_window, n_ext);
    $display("mechanisms: mode_up=%0d mode_down=%0d basic_clock_switch=%0d", n_mode_up, n_mode_down, n_bswitch);
    $display("longest cpu_clk gap: %0d clk cycles", max_gap);
    chk(max_gap < 64, "cpu_clk gap below the clock-stall timeout");
    chk(n_up > 0, "step up happened");
    chk(n_down > 0, "step down happened");
    chk(n_vwait > 0, "voltage settle wait happened");
    chk(n_fwait > 0, "clock switch wait happened");
    chk(n_pgwait > 0, "power-good wait happened");
    chk(n_therm > 0, "thermal cap happened");
    chk(n_window > 0, "measured window happened");
    chk(n_ext > 0, "external load used");
    chk(n_mode_up > 0 && n_mode_down > 0 && n_bswitch > 0, "basic datapath moved both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
