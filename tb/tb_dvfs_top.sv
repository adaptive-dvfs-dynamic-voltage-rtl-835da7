// tb_dvfs_top: end-to-end check of the basic four-mode DVFS datapath.
// Runs the mode sequence 00, 01, 10, 11, 00 (the published simulation) and
// then random modes. After each change, once freq_switched is high, checks
// voltage_out against the published table (0001, 0011, 0111, 1111),
// freq_code against (0001, 0010, 0100, 1000), and the period of freq_out
// against 2^(4-mode) clk cycles measured between two rising edges.
// Also checks that the mode reaches the outputs within 2 clk cycles.
module tb_dvfs_top;
  logic       clk = 0, rst = 0;
  initial #1 rst = 1;  // a real edge, so the asynchronous resets act
  logic [1:0] mode = 0;
  logic       fout, fsw;
  logic [3:0] fcode, vout;
  int checks = 0, failures = 0;
  logic [3:0] vtab [4] = '{4'b0001, 4'b0011, 4'b0111, 4'b1111};
  logic [3:0] ftab [4] = '{4'b0001, 4'b0010, 4'b0100, 4'b1000};

  dvfs_top dut (.clk(clk), .rst(rst), .mode(mode), .freq_out(fout), .freq_code(fcode),
                .voltage_out(vout), .freq_switched(fsw));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic go(input logic [1:0] m);
    int waited = 0;
    realtime t0;
    mode = m;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (vout !== vtab[m] || fcode !== ftab[m]) begin
      failures++;
      $display("FAIL mode %0d: voltage_out=%b freq_code=%b", m, vout, fcode);
    end
    while (!fsw && waited < 64) begin @(negedge clk); waited++; end
    checks++;
    if (!fsw) begin failures++; $display("FAIL mode %0d: clock never switched", m); end
    @(posedge fout); t0 = $realtime;
    @(posedge fout);
    checks++;
    if ($realtime - t0 != 10.0 * (1 << (4 - m))) begin
      failures++;
      $display("FAIL mode %0d: freq_out period %0t", m, $realtime - t0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (vout !== 4'b0001 || fcode !== 4'b0001) begin failures++; $display("FAIL reset outputs"); end
    rst = 0;
    go(2'd0); go(2'd1); go(2'd2); go(2'd3); go(2'd0);
    repeat (20) go(2'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
