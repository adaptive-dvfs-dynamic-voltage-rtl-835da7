// tb_voltage_controller: checks the four-mode voltage code table.
// For every select s the expected code is computed as (1 << (s+1)) - 1,
// i.e. 0001, 0011, 0111, 1111, and compared with voltage_out.
module tb_voltage_controller;
  logic [1:0] sel;
  logic [3:0] vout;
  int checks = 0, failures = 0;

  voltage_controller dut (.voltage_sel(sel), .voltage_out(vout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int s = 0; s < 4; s++) begin
        logic [3:0] exp;
        sel = 2'(s);
        #1;
        exp = 4'((1 << (s + 1)) - 1);
        checks++;
        if (vout !== exp) begin
          failures++;
          $display("FAIL sel=%0d voltage_out=%b expected %b", s, vout, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
