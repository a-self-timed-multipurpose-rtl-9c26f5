// Count-limit comparator of the self-timed sensor.
//
// Combinational: done is high while the circulation counter holds the
// count limit. Since the counter only changes on a rising edge of the chain
// output, done changes only then too, which is what keeps the clock
// generator glitch-free.
//
// Interface: count from loop_counter; done is the sensor output. LIMIT is
// the terminal count (LOOP_COUNT - 1, as in the chronogram where Done rises
// at count 63 of a 64-state count).
`timescale 1ps / 1ps
module comparator #(
  parameter int unsigned W     = 10,    // counter width
  parameter int unsigned LIMIT = 1023   // count at which done is raised
) (
  input  logic [W-1:0] count,
  output logic         done
);

  always_comb done = (count == W'(LIMIT));

endmodule
