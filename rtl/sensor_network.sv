// Temperature-monitoring network: self-timed delay sensors sharing one
// time-to-digital converter.
//
// NUM_SENSORS delay sensors, each with its own chain length, are started
// together by the converter's common Start line. Each returns a Done edge
// after about (2*LOOP_COUNT - 3) traversals of its own chain; the converter
// timestamps every edge with its clock and ranks the sensors by arrival, so
// the fastest sensor (shortest chain, lowest temperature, fastest process
// corner or least aged) comes first. The sensors need no clock: only the
// converter is clocked.
//
// Interface: clk is the converter clock (100 MHz in the published set-up);
// rst resets the converter synchronously and every sensor asynchronously;
// meas_req starts one measurement of all sensors; result_valid pulses when
// result[] (cycles from Start to each Done, plus the synchroniser latency)
// and rank[] are ready. sensor_done brings each sensor's Done out for
// observation.
//
// Four sensors of 20, 40, 60 and 80 stages follow the published
// temperature experiment; the loop count of 1024 follows its 80-stage
// implementation. The direct wiring of Start and Done between sensors and
// converter is this design's choice.
//
// Lint reports rst as used both synchronously (converter) and
// asynchronously (sensors). That is intended: the sensors have no clock, so
// their reset can only act asynchronously, while the converter resets in
// its own clock domain; release rst with the converter clock running.
`timescale 1ps / 1ps
module sensor_network
  import delay_sensor_pkg::*;
#(
  parameter int unsigned NUM_SENSORS    = NUM_SENSORS_DEFAULT,
  parameter int unsigned CHAIN_STAGES [NUM_SENSORS] = '{20, 40, 60, 80},
  parameter int unsigned LOOP_COUNT     = LOOP_COUNT_DEFAULT,
  parameter int unsigned STAGE_DELAY_PS = STAGE_DELAY_PS_DEFAULT,
  parameter int unsigned TDC_WIDTH      = TDC_WIDTH_DEFAULT,
  localparam int unsigned RW = (NUM_SENSORS > 1) ? $clog2(NUM_SENSORS) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic                                  meas_req,
  output logic                                  busy,
  output logic                                  result_valid,
  output logic [NUM_SENSORS-1:0][TDC_WIDTH-1:0] result,
  output logic [NUM_SENSORS-1:0][RW-1:0]        rank,
  output logic [NUM_SENSORS-1:0]                sensor_done
);

  logic sensor_start;

  for (genvar i = 0; i < NUM_SENSORS; i++) begin : g_sensor
    delay_sensor #(
      .CHAIN_STAGES  (CHAIN_STAGES[i]),
      .LOOP_COUNT    (LOOP_COUNT),
      .STAGE_DELAY_PS(STAGE_DELAY_PS)
    ) u_sensor (
      .rst  (rst),
      .start(sensor_start),
      .done (sensor_done[i])
    );
  end

  tdc #(
    .NUM_SENSORS(NUM_SENSORS),
    .WIDTH      (TDC_WIDTH)
  ) u_tdc (
    .clk         (clk),
    .rst         (rst),
    .meas_req    (meas_req),
    .sensor_start(sensor_start),
    .sensor_done (sensor_done),
    .busy        (busy),
    .result_valid(result_valid),
    .result      (result),
    .rank        (rank)
  );

endmodule
