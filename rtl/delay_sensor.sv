// Self-timed multipurpose delay sensor.
//
// A pulse generator, a delay chain and a circulation counter with its
// comparator form a loop that needs no clock. When Start rises (with Done
// low) the pulse generator launches a pulse into the chain; every time the
// chain output rises the counter advances and the pulse generator ends the
// pulse, and every time the chain output falls it launches the next one. The
// pulse therefore circulates, with a period of two chain traversals plus the
// small fixed delay of the control logic, until the counter reaches
// LOOP_COUNT-1 and the comparator raises Done. The Start-to-Done interval,
// about (2*LOOP_COUNT - 3) chain delays, is the measurement: an amplified
// copy of the chain delay, which depends on process, temperature and ageing.
//
// Handshake: Start is held high until Done is seen high, then pulled low.
// The clock generator then sends one more pulse, which wraps the counter to
// 0 and brings Done low again; the sensor is then idle and ready. Reset
// (asynchronous, active high) clears the counter and the pulse generator.
//
// Structure and handshake follow the published design; the chain length and
// loop count default to its 80-stage, 1024-loop implementation.
`timescale 1ps / 1ps
module delay_sensor
  import delay_sensor_pkg::*;
#(
  parameter int unsigned CHAIN_STAGES   = CHAIN_STAGES_DEFAULT,   // delay chain length
  parameter int unsigned LOOP_COUNT     = LOOP_COUNT_DEFAULT,  // counter states
  parameter int unsigned STAGE_DELAY_PS = STAGE_DELAY_PS_DEFAULT  // model delay per stage
) (
  input  logic rst,    // Reset
  input  logic start,  // Start
  output logic done    // Done: high from the end of the measurement until
                       // the loop has wrapped after Start falls
);

  localparam int unsigned W = (LOOP_COUNT > 1) ? $clog2(LOOP_COUNT) : 1;

  logic         pulse;      // pulse generator output
  logic         chain_out;  // delay chain output, local clock of the counter
  logic [W-1:0] count;

  pulse_generator u_pulse_gen (
    .rst      (rst),
    .start    (start),
    .done     (done),
    .chain_out(chain_out),
    .pulse_out(pulse)
  );

  delay_chain #(
    .STAGES        (CHAIN_STAGES),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_chain (
    .chain_in (pulse),
    .chain_out(chain_out)
  );

  loop_counter #(
    .LOOP_COUNT(LOOP_COUNT)
  ) u_counter (
    .chain_clk(chain_out),
    .rst      (rst),
    .count    (count)
  );

  comparator #(
    .W    (W),
    .LIMIT(LOOP_COUNT - 1)
  ) u_comparator (
    .count(count),
    .done (done)
  );

endmodule
