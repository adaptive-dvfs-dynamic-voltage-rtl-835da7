// tb_adaptive_freq_controller: checks level code, clock grouping and f_done.
// The four divided clocks come from a testbench counter (clk/2..clk/16).
// For random level changes it checks:
//  * freq_out = {0, level};
//  * f_done drops at once when the new level needs another clock, and stays
//    high when it does not;
//  * f_done returns within 80 clk cycles;
//  * cpu_clk then has period 16, 8, 4 or 2 clk cycles for levels 0-1, 2-3,
//    4-5, 6-7 (measured between two rising edges).
module tb_adaptive_freq_controller;
  logic       clk = 0, rst = 0;
  logic [3:0] cnt = 0;
  logic [2:0] lvl = 0;
  logic [3:0] fout;
  logic       cpu_clk, fdone;
  int checks = 0, failures = 0;

  initial #1 rst = 1;  // a real edge, so the asynchronous resets act

  adaptive_freq_controller #(.NUM_LEVELS(8), .NUM_CLKS(4)) dut (
    .clk(clk), .rst(rst), .freq_level(lvl), .clk_div(cnt), .freq_out(fout), .cpu_clk(cpu_clk), .f_done(fdone));

  always #5 clk = ~clk;
  always @(posedge clk) cnt <= rst ? 4'd0 : cnt + 4'd1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  function automatic int period_of(input logic [2:0] l);
    return 16 >> (l / 2);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 40; k++) begin
      logic [2:0] old, nl;
      int waited;
      realtime t0;
      waited = 0;
      old = lvl;
      nl = 3'($urandom_range(0, 7));
      lvl = nl;
      #1;
      chk(fout === {1'b0, nl}, "freq_out code");
      if (period_of(nl) != period_of(old)) chk(fdone === 1'b0, "f_done drops on clock change");
      else if (k > 0)                      chk(fdone === 1'b1, "f_done stays on same clock");
      while (!fdone && waited < 80) begin @(posedge clk); #1; waited++; end
      chk(fdone === 1'b1, "f_done returns");
      @(posedge cpu_clk); t0 = $realtime;
      @(posedge cpu_clk);
      chk($realtime - t0 == 10.0 * period_of(nl),
          $sformatf("level %0d period %0t expected %0d cycles", nl, $realtime - t0, period_of(nl)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
