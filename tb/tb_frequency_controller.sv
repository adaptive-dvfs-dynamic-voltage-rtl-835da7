// tb_frequency_controller: checks the four-mode clock selection.
// The four divided clocks come from a testbench counter. For a sequence of
// selects (all 16 ordered pairs of modes) it checks:
//  * freq_code equals 1 << freq_sel at once (0001, 0010, 0100, 1000);
//  * switched rises within 64 clk cycles;
//  * after that freq_out equals the divided clock that the mode names:
//    mode m -> clk / 2^(4-m), so its period is 2^(4-m) clk cycles, checked
//    by timing two rising edges of freq_out.
module tb_frequency_controller;
  logic       clk = 0, rst = 0;
  initial #1 rst = 1;  // a real edge, so the asynchronous resets act
  logic [3:0] cnt = 0;
  logic [1:0] sel = 0;
  logic       fout, switched;
  logic [3:0] fcode;
  int checks = 0, failures = 0;

  frequency_controller dut (
    .rst(rst), .clk_div2(cnt[0]), .clk_div4(cnt[1]), .clk_div8(cnt[2]), .clk_div16(cnt[3]),
    .freq_sel(sel), .freq_out(fout), .freq_code(fcode), .switched(switched));

  always #5 clk = ~clk;
  always @(posedge clk) cnt <= rst ? 4'd0 : cnt + 4'd1;

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
    sel = m;
    #1;
    checks++;
    if (fcode !== (4'b0001 << m)) begin
      failures++;
      $display("FAIL mode %0d freq_code=%b", m, fcode);
    end
    while (!switched && waited < 64) begin @(negedge clk); waited++; end
    checks++;
    if (!switched) begin failures++; $display("FAIL mode %0d never switched", m); end
    @(posedge fout); t0 = $realtime;
    @(posedge fout);
    checks++;
    if ($realtime - t0 != 10.0 * (1 << (4 - m))) begin
      failures++;
      $display("FAIL mode %0d freq_out period %0t, expected %0d cycles", m, $realtime - t0, 1 << (4 - m));
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        go(2'(a));
        go(2'(b));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
