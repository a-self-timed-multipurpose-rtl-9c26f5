// Shared time-to-digital converter (TDC) for a group of self-timed sensors.
//
// One clocked converter digitises the Start-to-Done intervals of
// NUM_SENSORS sensors in one operation. A measurement request raises the
// common Start line and clears a free-running cycle counter. Each sensor's
// Done passes a two-flip-flop synchroniser; the first cycle it is seen high
// the current counter value is stored as that sensor's result, together
// with its rank, the number of sensors that finished in earlier cycles
// (fastest sensor first: rank 0). When every sensor has reported, Start is
// released; the converter waits until every Done has fallen (each sensor
// wraps its counter once more after Start falls), then pulses result_valid
// for one cycle and accepts the next request.
//
// Timing: Start rises on the clock edge after meas_req is seen in idle.
// A Done edge that arrives T after Start yields result = ceil(T / Tclk) + 1,
// i.e. the interval in clock cycles plus the constant latency of the
// synchroniser; the counter saturates at all ones.
//
// The use of one clocked converter for all sensors, with a common start,
// and the 100 MHz clock follow the published design; the synchroniser, the
// ranking, the width and the request/valid handshake are this design's own.
`timescale 1ps / 1ps
module tdc
  import delay_sensor_pkg::*;
#(
  parameter int unsigned NUM_SENSORS = NUM_SENSORS_DEFAULT,  // sensors sharing the converter
  parameter int unsigned WIDTH       = TDC_WIDTH_DEFAULT,  // timestamp width
  localparam int unsigned RW = (NUM_SENSORS > 1) ? $clog2(NUM_SENSORS) : 1
) (
  input  logic                                  clk,           // converter clock
  input  logic                                  rst,           // synchronous reset, active high
  input  logic                                  meas_req,      // start a measurement (sampled in idle)
  output logic                                  sensor_start,  // common Start of all sensors
  input  logic [NUM_SENSORS-1:0]                sensor_done,   // Done of each sensor, asynchronous
  output logic                                  busy,          // a measurement is in progress
  output logic                                  result_valid,  // one-cycle pulse: results ready
  output logic [NUM_SENSORS-1:0][WIDTH-1:0]     result,        // interval of each sensor, in cycles
  output logic [NUM_SENSORS-1:0][RW-1:0]        rank           // arrival order, 0 = fastest
);

  tdc_state_e                 state;
  logic [WIDTH-1:0]           timer;
  logic [NUM_SENSORS-1:0]     done_meta, done_sync;
  logic [NUM_SENSORS-1:0]     captured;
  logic [NUM_SENSORS-1:0]     arriving;
  logic [RW:0]                n_captured;
  logic [RW:0]                n_arriving;

  // Two-flip-flop synchroniser for the asynchronous Done lines.
  always_ff @(posedge clk) begin
    if (rst) begin
      done_meta <= '0;
      done_sync <= '0;
    end else begin
      done_meta <= sensor_done;
      done_sync <= done_meta;
    end
  end

  always_comb begin
    arriving   = done_sync & ~captured;
    n_arriving = '0;
    for (int i = 0; i < NUM_SENSORS; i++) n_arriving += (RW+1)'(arriving[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= TDC_IDLE;
      sensor_start <= 1'b0;
      timer        <= '0;
      captured     <= '0;
      n_captured   <= '0;
      result       <= '0;
      rank         <= '0;
    end else begin
      unique case (state)
        TDC_IDLE: begin
          if (meas_req) begin
            state        <= TDC_MEASURE;
            sensor_start <= 1'b1;
            timer        <= '0;
            captured     <= '0;
            n_captured   <= '0;
          end
        end
        TDC_MEASURE: begin
          if (timer != '1) timer <= timer + 1'b1;
          for (int i = 0; i < NUM_SENSORS; i++) begin
            if (arriving[i]) begin
              result[i] <= timer;
              rank[i]   <= RW'(n_captured);
            end
          end
          captured   <= captured | arriving;
          n_captured <= n_captured + n_arriving;
          if ((captured | arriving) == '1) begin
            state        <= TDC_RELEASE;
            sensor_start <= 1'b0;
          end
        end
        TDC_RELEASE: begin
          if (done_sync == '0) state <= TDC_REPORT;
        end
        TDC_REPORT: state <= TDC_IDLE;
        default:    state <= TDC_IDLE;
      endcase
    end
  end

  assign busy         = (state != TDC_IDLE);
  assign result_valid = (state == TDC_REPORT);

  // Start must stay high for the whole measurement and low outside it.
  a_start_in_measure : assert property (@(posedge clk) disable iff (rst)
    (state == TDC_MEASURE) |-> sensor_start);
  a_start_low_in_release : assert property (@(posedge clk) disable iff (rst)
    (state == TDC_RELEASE) |-> !sensor_start);

endmodule
