// Self-timed pulse generator.
//
// The local clock from clock_gen drives two toggle flip-flops (D = ~Q): one
// through a buffer, so it toggles on the rising edge of the clock, and one
// through an inverter, so it toggles on the falling edge. The XOR of the two
// outputs therefore rises one flip-flop delay after each rising clock edge
// and falls after each falling edge: the output copies the clock's high time
// but is driven from flip-flops, so combinational hazards in f(x) cannot
// reach the delay chain. With the delay chain closing the loop
// (chain_out -> f(x)), each pulse returning from the chain ends the current
// pulse and each low level returning from the chain starts the next one, so
// the circuit oscillates with a period of two chain traversals while
// Start is high and Done is low.
//
// Interface: rst is an asynchronous active-high reset clearing both
// flip-flops (pulse_out = 0). No system clock is used.
//
// The structure (f(x), buffer/inverter, two toggle flip-flops, XOR) follows
// the published design; the reset polarity and its asynchronous action are
// this design's choice.
`timescale 1ps / 1ps
module pulse_generator (
  input  logic rst,        // asynchronous reset, active high
  input  logic start,      // Start request
  input  logic done,       // sensor output Done
  input  logic chain_out,  // delay chain output
  output logic pulse_out   // pulse into the delay chain
);

  logic clk_gen;   // f(x)
  logic clk_rise;  // buffered copy: rising-edge flip-flop clock
  logic clk_fall;  // inverted copy: falling-edge flip-flop clock
  logic q_rise;
  logic q_fall;

  clock_gen u_clock_gen (
    .start    (start),
    .done     (done),
    .chain_out(chain_out),
    .clk_gen  (clk_gen)
  );

  assign clk_rise = clk_gen;
  assign clk_fall = ~clk_gen;

  always_ff @(posedge clk_rise or posedge rst) begin
    if (rst) q_rise <= 1'b0;
    else     q_rise <= ~q_rise;
  end

  always_ff @(posedge clk_fall or posedge rst) begin
    if (rst) q_fall <= 1'b0;
    else     q_fall <= ~q_fall;
  end

  assign pulse_out = q_rise ^ q_fall;

endmodule
