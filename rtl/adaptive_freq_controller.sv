// adaptive_freq_controller: frequency control interface of the adaptive
// controller.
//
// Takes the FSM's 3-bit freq_level and
//  * gives freq_out[3:0], the level zero-extended (S0 -> 0000, S1 -> 0001,
//    S2 -> 0010, ..., S7 -> 0111), as the code of the selected frequency;
//  * switches cpu_clk, through a glitch-free multiplexer, to one of the
//    NUM_CLKS divided clocks of the frequency bank. Levels are grouped
//    NUM_LEVELS/NUM_CLKS to a clock, lowest group on the slowest clock: with
//    the defaults, levels 0-1 run at clk/16, 2-3 at clk/8, 4-5 at clk/4 and
//    6-7 at clk/2;
//  * reports f_done when the multiplexer's enables, brought back into the clk
//    domain by a two-flop synchroniser, show that exactly the requested clock
//    is on. f_done is combinational in freq_level, so it drops in the same
//    cycle as a request for a different clock and rises a few divided-clock
//    cycles later.
// The level codes follow the published frequency control table; its rows
// give 800 MHz at S0 up to 1800 MHz at TURBO, which a divider bank cannot
// produce from one clock, so the level-to-clock grouping onto the published
// four-clock bank is this design's choice. clk_div[i] must run at
// clk / 2^(i+1). Reset is asynchronous, active high.
module adaptive_freq_controller
  import dvfs_pkg::*;
#(
  parameter int unsigned NUM_LEVELS = 8,
  parameter int unsigned NUM_CLKS   = 4,
  localparam int unsigned SW = (NUM_CLKS > 1) ? $clog2(NUM_CLKS) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  level_t              freq_level,
  input  logic [NUM_CLKS-1:0] clk_div,
  output logic [3:0]          freq_out,
  output logic                cpu_clk,
  output logic                f_done
);

  localparam int unsigned PER_CLK = NUM_LEVELS / NUM_CLKS;

  logic [SW-1:0]       mux_sel;
  logic [NUM_CLKS-1:0] en;
  logic [NUM_CLKS-1:0] en_s1, en_s2;

  always_comb begin
    freq_out = level_code(freq_level);
    mux_sel  = SW'(NUM_CLKS - 1 - (int'(freq_level) / PER_CLK));
  end

  glitch_free_clk_mux #(.N(NUM_CLKS)) u_mux (
    .rst     (rst),
    .clk_in  (clk_div),
    .sel     (mux_sel),
    .clk_out (cpu_clk),
    .en      (en)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      en_s1 <= '0;
      en_s2 <= '0;
    end else begin
      en_s1 <= en;
      en_s2 <= en_s1;
    end
  end

  assign f_done = (en_s2 == (NUM_CLKS'(1) << mux_sel));

  initial assert (NUM_LEVELS % NUM_CLKS == 0 && NUM_LEVELS <= 8)
    else $error("NUM_LEVELS must be a multiple of NUM_CLKS and at most 8");

endmodule
