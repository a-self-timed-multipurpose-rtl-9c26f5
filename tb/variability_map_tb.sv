// Process-variability map workload: a 30 x 10 array of 16-stage sensors,
// all read in one operation by a single 100 MHz converter, as in the
// published within-die map of a larger device. The loop count of that
// experiment is not known; 256 loops keep the simulation short.
//
// Each sensor gets its own stage delay, one of eight levels from 1012 to
// 1187 ps (about -8 % to +8 % around 1100 ps), laid out as stripes over
// the array. None of the levels is a multiple of 125 ps, so no Done edge
// falls on a clock edge and every result is exact: ceil(T / 10 ns) + 1 with
// T = (2*256 - 3) * 16 * delay. The testbench checks all 300 results, the
// arrival rank of every sensor (the number of sensors seen in earlier
// cycles), and that the map recovered from the results reproduces the
// delay of each sensor to within one converter cycle.
`timescale 1ps / 1ps
module variability_map_tb;
  import delay_sensor_pkg::*;
  localparam int unsigned ROWS = 30;
  localparam int unsigned COLS = 10;
  localparam int unsigned NS   = ROWS * COLS;
  localparam int unsigned N    = 16;                    // stages per sensor
  localparam int unsigned L    = 256;                   // loops per measurement
  localparam int unsigned P    = TDC_CLK_PERIOD_PS;
  localparam int unsigned W    = TDC_WIDTH_DEFAULT;
  localparam int unsigned RW   = $clog2(NS);

  function automatic int unsigned delay_of(int i);
    int unsigned row = i / COLS;
    int unsigned col = i % COLS;
    return 1012 + 25 * ((row * 3 + col / 4) % 8);
  endfunction

  logic clk = 0, rst, meas_req, sensor_start, busy, result_valid;
  logic [NS-1:0]         sensor_done;
  logic [NS-1:0][W-1:0]  result;
  logic [NS-1:0][RW-1:0] rank;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NS; i++) begin : g_sensor
    delay_sensor #(.CHAIN_STAGES(N), .LOOP_COUNT(L), .STAGE_DELAY_PS(delay_of(i))) u_sensor (
      .rst(rst), .start(sensor_start), .done(sensor_done[i]));
  end

  tdc #(.NUM_SENSORS(NS)) u_tdc (
    .clk(clk), .rst(rst), .meas_req(meas_req), .sensor_start(sensor_start),
    .sensor_done(sensor_done), .busy(busy), .result_valid(result_valid),
    .result(result), .rank(rank));

  always #(P / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  longint exp_cyc [NS];

  initial begin
    longint t;
    int ahead, bad_res, bad_rank, bad_map;
    real d_est;
    rst = 0; meas_req = 0;
    #1 rst = 1;
    repeat (10) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    meas_req = 1;
    @(negedge clk) meas_req = 0;
    @(posedge result_valid);
    #1;
    for (int i = 0; i < NS; i++) begin
      t = longint'(2 * L - 3) * N * delay_of(i);
      exp_cyc[i] = (t + P - 1) / P + 1;
    end
    bad_res = 0; bad_rank = 0; bad_map = 0;
    for (int i = 0; i < NS; i++) begin
      ahead = 0;
      for (int j = 0; j < NS; j++) if (exp_cyc[j] < exp_cyc[i]) ahead++;
      checks++;
      if (result[i] != W'(exp_cyc[i])) begin
        failures++; bad_res++;
        if (bad_res < 5) $display("FAIL sensor %0d result %0d exp %0d", i, result[i], exp_cyc[i]);
      end
      checks++;
      if (rank[i] != RW'(ahead)) begin
        failures++; bad_rank++;
        if (bad_rank < 5) $display("FAIL sensor %0d rank %0d exp %0d", i, rank[i], ahead);
      end
      d_est = real'(result[i] - 2) * real'(P) / real'((2 * L - 3) * N);
      checks++;
      if ((d_est - real'(delay_of(i))) * real'((2 * L - 3) * N) > real'(P) ||
          (real'(delay_of(i)) - d_est) * real'((2 * L - 3) * N) > real'(P)) begin
        failures++; bad_map++;
        if (bad_map < 5) $display("FAIL sensor %0d map delay %f exp %0d", i, d_est, delay_of(i));
      end
    end
    $display("row 0 cycles: %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d", result[0], result[1],
             result[2], result[3], result[4], result[5], result[6], result[7], result[8], result[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20_000 * P);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
