// glitch_free_clk_mux: N-input glitch-free clock multiplexer.
//
// Each input clock i has an enable en[i]. The enable is requested when sel
// points at input i and every other enable is off; the request passes a
// two-stage synchroniser in clock i's own domain (rising edge, then falling
// edge) so en[i] only ever changes while clk_in[i] is low. The output is the
// OR of clk_in[i] & en[i]. On a switch the old enable therefore drops at a
// falling edge of the old clock, and only then does the new enable rise at a
// falling edge of the new clock: no shortened pulse reaches clk_out, and
// clk_out stays low for the gap between the two.
// sel may change at any time; it is sampled in each source domain. en is
// one-hot or zero and tells the caller when a switch has completed.
// After the asynchronous active-high reset all enables are off and clk_out
// is low until the selected clock's enable comes up (about two of its
// cycles). The multiplexing scheme follows the published design's
// "glitch-free clock multiplexing"; this particular circuit is a standard
// one chosen here.
module glitch_free_clk_mux #(
  parameter int unsigned N  = 4,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          rst,
  input  logic [N-1:0]  clk_in,
  input  logic [SW-1:0] sel,
  output logic          clk_out,
  output logic [N-1:0]  en
);

  for (genvar i = 0; i < N; i++) begin : g_branch
    logic [N-1:0] others;
    logic         req, sync1, en_q;

    always_comb begin
      others    = en;
      others[i] = 1'b0;
    end
    assign req = (sel == SW'(i)) && (others == '0);

    always_ff @(posedge clk_in[i] or posedge rst) begin
      if (rst) sync1 <= 1'b0;
      else     sync1 <= req;
    end

    always_ff @(negedge clk_in[i] or posedge rst) begin
      if (rst) en_q <= 1'b0;
      else     en_q <= sync1;
    end

    assign en[i] = en_q;
  end

  assign clk_out = |(clk_in & en);

endmodule
