// tb_workload_monitor: checks both sources of the workload code.
// Measured mode (WINDOW = 256, the default): for 12 windows busy is driven
// high with a different probability per window; the testbench counts the
// busy cycles itself and expects load = min(7, floor(busy_cycles * 8 / 256))
// right after load_update, which must pulse exactly every 256 cycles.
// Windows with no activity and with full activity are included (000, 111).
// External mode: ext_load must appear on load one cycle later.
module tb_workload_monitor;
  logic       clk = 0, rst = 0;
  logic       busy = 0, use_ext = 0;
  logic [2:0] ext_load = 0, load;
  logic       upd;
  int checks = 0, failures = 0;
  int pct [12] = '{0, 100, 50, 12, 25, 75, 90, 3, 60, 100, 30, 0};

  initial #1 rst = 1;  // a real edge, so the asynchronous resets act

  workload_monitor #(.WINDOW(256)) dut (.clk(clk), .rst(rst), .busy(busy), .use_ext_load(use_ext),
                                        .ext_load(ext_load), .load(load), .load_update(upd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (load !== 3'd0) begin failures++; $display("FAIL load after reset %0d", load); end
    for (int w = 0; w < 12; w++) begin
      int nbusy, exp;
      nbusy = 0;
      for (int c = 0; c < 256; c++) begin
        busy = ($urandom_range(1, 100) <= pct[w]);
        if (busy) nbusy++;
        @(posedge clk); #1;
        checks++;
        if (upd !== (c == 255)) begin
          failures++;
          $display("FAIL window %0d cycle %0d load_update=%b", w, c, upd);
        end
      end
      exp = nbusy * 8 / 256;
      if (exp > 7) exp = 7;
      checks++;
      if (load !== 3'(exp)) begin
        failures++;
        $display("FAIL window %0d: %0d busy cycles, load=%0d expected %0d", w, nbusy, load, exp);
      end
    end
    use_ext = 1;
    for (int k = 0; k < 20; k++) begin
      ext_load = 3'($urandom_range(0, 7));
      @(posedge clk); #1;
      checks++;
      if (load !== ext_load) begin failures++; $display("FAIL external load %0d shown as %0d", ext_load, load); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
