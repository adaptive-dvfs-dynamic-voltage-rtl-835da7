// frequency_controller: clock selection of the basic four-mode DVFS datapath.
//
// Takes the four divided clocks of the frequency bank and passes the one that
// freq_sel asks for to freq_out through a glitch-free clock multiplexer:
// freq_sel 00 (idle) -> clk/16, 01 -> clk/8, 10 -> clk/4, 11 (turbo) -> clk/2.
// freq_code is the published frequency code of the select, 0001, 0010, 0100,
// 1000, i.e. the clock rate in units of clk/16; it changes with freq_sel at
// once, while freq_out changes over after one to two cycles of the old clock
// and two of the new one (see glitch_free_clk_mux). switched is high when the
// clock that freq_sel asks for is the one on freq_out.
// Port names follow the published schematic; the reset input, the switched
// status and the glitch-free multiplexer inside are this design's additions.
module frequency_controller
  import dvfs_pkg::*;
(
  input  logic       rst,
  input  logic       clk_div2,
  input  logic       clk_div4,
  input  logic       clk_div8,
  input  logic       clk_div16,
  input  mode_t      freq_sel,
  output logic       freq_out,
  output logic [3:0] freq_code,
  output logic       switched
);

  logic [3:0] clks;
  logic [3:0] en;
  logic [1:0] mux_sel;

  // Mux input 0 is the fastest clock, so the mux index is the inverted select.
  assign clks    = {clk_div16, clk_div8, clk_div4, clk_div2};
  assign mux_sel = ~freq_sel;

  glitch_free_clk_mux #(.N(4)) u_mux (
    .rst     (rst),
    .clk_in  (clks),
    .sel     (mux_sel),
    .clk_out (freq_out),
    .en      (en)
  );

  always_comb freq_code = mode_freq_code(freq_sel);
  assign switched = (en == (4'b0001 << mux_sel));

endmodule
