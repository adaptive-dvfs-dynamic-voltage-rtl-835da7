// freq_bank: binary clock divider bank.
//
// A free-running NUM_TAPS-bit counter clocked by clk; bit i toggles every
// 2^i cycles, so clk_div[i] is a 50% duty clock at clk / 2^(i+1). With the
// default NUM_TAPS = 4 the outputs are the clk/2, clk/4, clk/8 and clk/16
// clocks of the published frequency bank. Every output is a flip-flop output,
// so the divided clocks are free of glitches and all change just after a
// rising edge of clk (they are phase-related to clk and to each other).
// Reset (asynchronous, active high) clears the counter, which puts every
// divided clock low. Using a counter for the divider is this design's choice.
module freq_bank #(
  parameter int unsigned NUM_TAPS = 4
) (
  input  logic                clk,
  input  logic                rst,
  output logic [NUM_TAPS-1:0] clk_div
);

  logic [NUM_TAPS-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign clk_div = cnt;

endmodule
