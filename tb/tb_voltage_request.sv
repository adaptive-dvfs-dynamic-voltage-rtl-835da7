// tb_voltage_request: checks the regulator request code and the settle wait.
// SETTLE_CYCLES = 16 (default). For random level changes it checks:
//  * voltage_out = {0, level} at once (0000, 0001, 0010, ..., 0111);
//  * v_stable drops in the cycle the level changes;
//  * with power-good high, v_stable comes back exactly 17 clk edges later;
//  * with power-good low, v_stable stays low until power-good rises and
//    then returns on the next edge;
//  * a change of level during the wait restarts the 17-edge wait.
module tb_voltage_request;
  logic       clk = 0, rst = 0;
  logic [2:0] lvl = 0, applied;
  logic       pgood = 1, vst;
  logic [3:0] vout;
  int checks = 0, failures = 0;

  initial #1 rst = 1;  // a real edge, so the asynchronous resets act

  voltage_request #(.SETTLE_CYCLES(16)) dut (.clk(clk), .rst(rst), .voltage_level(lvl), .vreg_pgood(pgood),
                                             .voltage_out(vout), .applied_level(applied), .v_stable(vst));

  always #5 clk = ~clk;

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

  // Change the level and count edges until v_stable returns.
  task automatic step(input logic [2:0] nl, input int expect_edges);
    int edges = 0;
    lvl = nl;
    #1;
    chk(vout === {1'b0, nl}, "voltage_out code");
    chk(vst === 1'b0, "v_stable drops on change");
    while (!vst && edges < 100) begin @(posedge clk); #1; edges++; end
    chk(edges == expect_edges, $sformatf("settle took %0d edges, expected %0d", edges, expect_edges));
    chk(applied === nl, "applied level");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(vst === 1'b1 && applied === 3'd0 && vout === 4'd0, "reset state");
    for (int k = 0; k < 20; k++) begin
      logic [2:0] nl;
      nl = 3'($urandom_range(0, 7));
      if (nl == lvl) nl = nl + 3'd1;
      step(nl, 17);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    // Regulator not ready: wait for power-good.
    pgood = 0;
    lvl = lvl + 3'd1;
    repeat (30) @(posedge clk);
    #1 chk(vst === 1'b0, "v_stable waits for power-good");
    pgood = 1;
    @(posedge clk); #1;
    chk(vst === 1'b1, "v_stable one edge after power-good");
    // Change during the wait restarts the timer.
    lvl = 3'd2;
    repeat (8) @(posedge clk);
    #1 step(3'd5, 17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
