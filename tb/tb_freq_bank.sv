// tb_freq_bank: checks the divider bank.
// A testbench cycle counter n (cleared with the bank's reset) predicts each
// output: clk_div[i] must equal bit i of n after n rising edges of clk, so
// clk_div[i] runs at clk / 2^(i+1). The rising edges of each output are also
// counted over 320 clk cycles: 160, 80, 40 and 20 expected.
module tb_freq_bank;
  logic       clk = 0, rst = 0;
  initial #1 rst = 1;  // a real edge, so the asynchronous resets act
  logic [3:0] clk_div;
  int checks = 0, failures = 0;
  int unsigned n = 0;
  int rises [4] = '{0, 0, 0, 0};

  freq_bank #(.NUM_TAPS(4)) dut (.clk(clk), .rst(rst), .clk_div(clk_div));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < 4; i++) begin : g_cnt
    always @(posedge clk_div[i]) if (!rst) rises[i]++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (clk_div !== 4'b0000) begin failures++; $display("FAIL not cleared by reset"); end
    repeat (320) begin
      @(posedge clk);
      n++;
      #1;
      checks++;
      if (clk_div !== 4'(n)) begin
        failures++;
        $display("FAIL after %0d edges clk_div=%b expected %b", n, clk_div, 4'(n));
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (rises[i] != (160 >> i)) begin
        failures++;
        $display("FAIL clk_div[%0d] rose %0d times, expected %0d", i, rises[i], 160 >> i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
