// Clock generator f(x) of the self-timed pulse generator.
//
// A three-input combinational function of Start, Done (the sensor output)
// and the delay chain output. Its truth table has exactly two true rows:
// Start=0, Done=1, chain=0 (the extra cycle that lets the counter wrap after
// a measurement) and Start=1, Done=0, chain=0 (a measurement in progress and
// the previous pulse has returned low). Every other row gives 0, which
// reduces to clk_gen = ~chain_out & (start ^ done).
//
// Because Done only changes on a rising edge of the chain output, and a high
// chain output forces clk_gen low, a change of Done never meets a high
// clk_gen: the generated clock has no glitch from the Done feedback.
//
// The truth table follows the published design; purely combinational, no
// clock, no reset.
`timescale 1ps / 1ps
module clock_gen (
  input  logic start,      // Start request
  input  logic done,       // sensor output, fed back
  input  logic chain_out,  // delay chain output, fed back
  output logic clk_gen     // local clock of the pulse generator flip-flops
);

  always_comb clk_gen = ~chain_out & (start ^ done);

endmodule
