// tb_protection_unit: checks the three protection checks.
//  * thermal: for every load 0..7 with and without alarm, target must be
//    load, or min(load, 3) under alarm; thermal_limited only when cut;
//  * clock: a cpu_clk toggling every 8 clk cycles (the slowest clock) must
//    never set clk_fault over 500 cycles; a stopped cpu_clk must set it
//    after CLK_TIMEOUT = 64 cycles plus the synchroniser (65..70 edges),
//    not before;
//  * transitions: steps of one state are fine; a jump of two states, and
//    separately freq_level above voltage_level, must set seq_fault;
//  * the faults are sticky and fault is their OR; reset clears them.
module tb_protection_unit;
  logic       clk = 0, rst = 0;
  logic [2:0] load = 0, state = 0, vl = 0, fl = 0, target;
  logic       alarm = 0, cpu_clk = 0, run_clk = 1;
  logic       tlim, cfault, sfault, fault;
  int checks = 0, failures = 0;

  initial #1 rst = 1;  // a real edge, so the asynchronous resets act

  protection_unit #(.THERMAL_CAP(3), .CLK_TIMEOUT(64)) dut (
    .clk(clk), .rst(rst), .load(load), .thermal_alarm(alarm), .cpu_clk(cpu_clk), .state(state),
    .voltage_level(vl), .freq_level(fl), .target(target), .thermal_limited(tlim),
    .clk_fault(cfault), .seq_fault(sfault), .fault(fault));

  always #5 clk = ~clk;
  always #80 if (run_clk) cpu_clk = ~cpu_clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  task automatic do_reset();
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Thermal cap.
    for (int a = 0; a < 2; a++)
      for (int l = 0; l < 8; l++) begin
        int exp;
        alarm = a[0];
        load  = 3'(l);
        #1;
        exp = (a == 1 && l > 3) ? 3 : l;
        chk(target === 3'(exp), $sformatf("target for load %0d alarm %0d", l, a));
        chk(tlim === (a == 1 && l > 3), "thermal_limited");
      end
    alarm = 0;
    // Legal single steps and a running clock: no fault.
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      if (k % 20 == 0) begin
        state = (state == 7) ? 3'd6 : state + 3'd1;
        vl = state;
        fl = state;
      end
    end
    chk(fault === 1'b0 && cfault === 1'b0 && sfault === 1'b0, "no fault in normal operation");
    // Clock stops.
    run_clk = 0;
    begin
      int n;
      n = 0;
      while (!cfault && n < 200) begin @(posedge clk); #1; n++; end
      chk(cfault === 1'b1, "clock stall detected");
      chk(n >= 65 && n <= 90, $sformatf("clock stall detected after %0d cycles", n));
    end
    chk(fault === 1'b1 && sfault === 1'b0, "fault from clock only");
    run_clk = 1;
    repeat (50) @(posedge clk);
    #1 chk(cfault === 1'b1, "clk_fault sticky");
    do_reset();
    chk(fault === 1'b0, "reset clears faults");
    // Jump of two states.
    state = 3'd0; vl = 3'd0; fl = 3'd0;
    repeat (3) @(posedge clk);
    #1 state = 3'd2; vl = 3'd2; fl = 3'd2;
    repeat (2) @(posedge clk);
    #1 chk(sfault === 1'b1 && fault === 1'b1, "two-state jump flagged");
    state = 3'd0; vl = 3'd1; fl = 3'd0;
    do_reset();
    repeat (3) @(posedge clk);
    #1 chk(sfault === 1'b0, "steady no fault");
    fl = 3'd2;
    repeat (2) @(posedge clk);
    #1 chk(sfault === 1'b1, "frequency above voltage flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
