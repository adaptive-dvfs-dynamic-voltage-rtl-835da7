// tb_glitch_free_clk_mux: checks the glitch-free clock multiplexer.
// Four clocks clk/2, clk/4, clk/8, clk/16 are made from a testbench counter.
// The select is changed 60 times, at random times, to random inputs. Checked:
//  * en is never more than one-hot (two clocks never pass at once);
//  * every high pulse of clk_out lasts 1, 2, 4 or 8 clk cycles and every low
//    pulse at least 1 cycle, so no shortened pulse (glitch) ever appears;
//  * within 64 clk cycles of a select change en equals onehot(sel), and
//    from then on clk_out equals the selected input clock;
//  * the switch completes within 64 cycles (bounded latency).
module tb_glitch_free_clk_mux;
  logic       clk = 0, rst = 0;
  initial #1 rst = 1;  // a real edge, so the asynchronous resets act
  logic [3:0] cnt = 0;
  logic [3:0] clks;
  logic [1:0] sel = 0;
  logic       clk_out;
  logic [3:0] en;
  int checks = 0, failures = 0;
  realtime t_rise = 0, t_fall = 0;

  glitch_free_clk_mux #(.N(4)) dut (.rst(rst), .clk_in(clks), .sel(sel), .clk_out(clk_out), .en(en));

  always #5 clk = ~clk;
  always @(posedge clk) cnt <= rst ? 4'd0 : cnt + 4'd1;
  assign clks = cnt;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pulse-width check on clk_out.
  always @(posedge clk_out) begin
    t_rise = $realtime;
    if (t_fall > 0) begin
      checks++;
      if (t_rise - t_fall < 10) begin
        failures++;
        $display("FAIL low pulse of %0t", t_rise - t_fall);
      end
    end
  end
  always @(negedge clk_out) begin
    realtime w;
    t_fall = $realtime;
    w = t_fall - t_rise;
    checks++;
    if (!(w == 10 || w == 20 || w == 40 || w == 80)) begin
      failures++;
      $display("FAIL high pulse of %0t at %0t", w, $realtime);
    end
  end

  // Enable exclusivity.
  always @(negedge clk) if (!rst) begin
    checks++;
    if (!$onehot0(en)) begin failures++; $display("FAIL en=%b not one-hot", en); end
  end

  initial begin
    repeat (4) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 60; k++) begin
      int waited;
      sel = 2'($urandom_range(0, 3));
      waited = 0;
      while (en !== (4'b0001 << sel) && waited < 64) begin
        @(negedge clk);
        waited++;
      end
      checks++;
      if (en !== (4'b0001 << sel)) begin
        failures++;
        $display("FAIL switch to %0d not done after 64 cycles, en=%b", sel, en);
      end
      repeat ($urandom_range(1, 40)) begin
        @(negedge clk);
        #1;
        checks++;
        if (clk_out !== clks[sel]) begin
          failures++;
          $display("FAIL clk_out=%b input %0d=%b", clk_out, sel, clks[sel]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
