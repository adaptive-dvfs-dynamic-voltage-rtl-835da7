// workload_monitor: workload monitor / input interface of the adaptive
// controller.
//
// Produces the 3-bit workload code load[2:0] that drives the adaptive FSM;
// 000 means idle and 111 means full load. Two sources:
//  * use_ext_load = 1: the code comes from outside on ext_load and is
//    registered once (one cycle of latency), as in the published input
//    interface that "accepts workload signal load[2:0]";
//  * use_ext_load = 0: the monitor measures utilisation itself. It counts the
//    cycles in which busy is high over a window of WINDOW cycles and at the
//    end of the window sets load = min(7, floor(8 * busy_cycles / WINDOW)),
//    pulsing load_update for one cycle. load holds between windows.
// The published design names processor utilisation as one possible activity
// indicator and gives no window or quantiser; the busy-cycle counter, its
// window length and the linear 8-step quantiser are this design's choices.
// WINDOW must be a power of two of at least 8. Reset (asynchronous, active
// high) clears the code to 000 and restarts the window.
module workload_monitor
  import dvfs_pkg::*;
#(
  parameter int unsigned WINDOW = 256
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   busy,
  input  logic   use_ext_load,
  input  level_t ext_load,
  output level_t load,
  output logic   load_update
);

  localparam int unsigned WW    = $clog2(WINDOW);
  localparam int unsigned SHIFT = WW - 3;

  logic [WW-1:0] wcnt;
  logic [WW:0]   busy_cnt;
  logic [WW:0]   total;
  logic [WW:0]   scaled;

  assign total  = busy_cnt + (WW+1)'(busy);
  assign scaled = total >> SHIFT;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wcnt        <= '0;
      busy_cnt    <= '0;
      load        <= '0;
      load_update <= 1'b0;
    end else begin
      load_update <= 1'b0;
      if (wcnt == WW'(WINDOW - 1)) begin
        wcnt        <= '0;
        busy_cnt    <= '0;
        load_update <= ~use_ext_load;
        if (!use_ext_load) load <= (scaled > 7) ? 3'd7 : scaled[2:0];
      end else begin
        wcnt     <= wcnt + 1'b1;
        busy_cnt <= total;
      end
      if (use_ext_load) load <= ext_load;
    end
  end

  initial assert (WINDOW >= 8 && (WINDOW & (WINDOW - 1)) == 0)
    else $error("WINDOW must be a power of two of at least 8");

endmodule
