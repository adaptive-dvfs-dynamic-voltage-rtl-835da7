// tb_dvfs_controller: checks mode decoding and the safe ordering.
// For every ordered pair of modes (a, b): settle in a, then request b and
// check the two following cycles against the rule:
//   b > a: cycle 1 voltage_sel = b, freq_sel = a; cycle 2 both b;
//   b < a: cycle 1 freq_sel = b, voltage_sel = a; cycle 2 both b;
//   b = a: nothing moves.
// On every cycle freq_sel <= voltage_sel must hold. Reset must give 00/00.
module tb_dvfs_controller;
  logic       clk = 0, rst = 0;
  initial #1 rst = 1;  // a real edge, so the asynchronous resets act
  logic [1:0] mode = 0, fsel, vsel;
  int checks = 0, failures = 0;

  dvfs_controller dut (.clk(clk), .rst(rst), .mode(mode), .freq_sel(fsel), .voltage_sel(vsel));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (fsel > vsel) begin failures++; $display("FAIL freq_sel %0d above voltage_sel %0d", fsel, vsel); end
  end

  task automatic expect2(input logic [1:0] f, input logic [1:0] v, input string what);
    checks++;
    if (fsel !== f || vsel !== v) begin
      failures++;
      $display("FAIL %s: freq_sel=%0d voltage_sel=%0d expected %0d/%0d", what, fsel, vsel, f, v);
    end
  endtask

  initial begin
    mode = 2'd3;
    repeat (2) @(posedge clk);
    #1 expect2(2'd0, 2'd0, "reset");
    rst = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        mode = 2'(a);
        repeat (3) @(posedge clk);
        #1 expect2(2'(a), 2'(a), "settled");
        mode = 2'(b);
        @(posedge clk); #1;
        if (b > a)      expect2(2'(a), 2'(b), "up step 1");
        else if (b < a) expect2(2'(b), 2'(a), "down step 1");
        else            expect2(2'(a), 2'(a), "hold step 1");
        @(posedge clk); #1;
        expect2(2'(b), 2'(b), "step 2");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
