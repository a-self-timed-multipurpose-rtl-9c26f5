// Circulation counter of the self-timed sensor.
//
// Clocked locally by the rising edge of the delay chain output: it counts
// the pulses that have completed a trip round the chain. It counts
// 0, 1, ..., LOOP_COUNT-1 and then wraps to 0, so the terminal value (the
// one the comparator turns into Done) lasts until one more pulse passes.
// The self-timed loop sends exactly that one pulse after Start is released,
// which brings the count back to 0 and Done low again, ready for the next
// measurement.
//
// Interface: chain_clk is the delay chain output; rst is an asynchronous
// active-high reset to 0; count is the current value.
//
// Clocking by the chain output follows the published design; the wrap from
// LOOP_COUNT-1 to 0 follows its chronogram (count 63 followed by 0). The
// counter width, $clog2(LOOP_COUNT), is this design's choice.
`timescale 1ps / 1ps
module loop_counter
  import delay_sensor_pkg::*;
#(
  parameter int unsigned LOOP_COUNT = LOOP_COUNT_DEFAULT,  // counter states
  localparam int unsigned W = (LOOP_COUNT > 1) ? $clog2(LOOP_COUNT) : 1
) (
  input  logic         chain_clk,  // delay chain output
  input  logic         rst,        // asynchronous reset, active high
  output logic [W-1:0] count
);

  localparam logic [W-1:0] LAST = W'(LOOP_COUNT - 1);

  always_ff @(posedge chain_clk or posedge rst) begin
    if (rst)                count <= '0;
    else if (count == LAST) count <= '0;
    else                    count <= count + 1'b1;
  end

endmodule
