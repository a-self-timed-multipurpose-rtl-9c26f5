// Shared constants of the self-timed delay sensor and its time-to-digital
// converter (TDC).
//
// The sensor turns the propagation delay of a chain of logic stages into the
// width of a Start-to-Done pulse by letting a pulse circulate round the chain
// a fixed number of times. These constants are the default sizes used by the
// modules: 80 chain stages and 1024 counted loops per measurement, a 100 MHz
// converter clock and a network of four sensors with 20, 40, 60 and 80
// stages follow the published implementation. The per-stage delay of
// 1100 ps is derived from its 180,000 ns total delay
// (180000 ns / (2 * 1023 loops * 80 stages) = 1.1 ns); the converter width
// is this design's own choice.
`timescale 1ps / 1ps
package delay_sensor_pkg;

  // Number of LUT + latch stages in one delay chain.
  localparam int unsigned CHAIN_STAGES_DEFAULT = 80;
  // Number of states of the circulation counter; Done is raised at the last.
  localparam int unsigned LOOP_COUNT_DEFAULT   = 1024;
  // Simulation delay of one LUT + latch stage, picoseconds.
  localparam int unsigned STAGE_DELAY_PS_DEFAULT = 1100;
  // Converter clock period (100 MHz), picoseconds; used by the testbenches.
  localparam int unsigned TDC_CLK_PERIOD_PS = 10000;
  // Converter timestamp width: 2^16 cycles = 655 us at 100 MHz.
  localparam int unsigned TDC_WIDTH_DEFAULT = 16;
  // Sensors in the temperature-monitoring network.
  localparam int unsigned NUM_SENSORS_DEFAULT = 4;

  // Converter sequencing.
  typedef enum logic [1:0] {
    TDC_IDLE    = 2'd0,  // Start low, waiting for a request
    TDC_MEASURE = 2'd1,  // Start high, timestamping Done edges
    TDC_RELEASE = 2'd2,  // Start low, waiting for every Done to fall
    TDC_REPORT  = 2'd3   // one cycle: results valid
  } tdc_state_e;

endpackage
