// End-to-end test of the sensor network at its default sizes: four sensors
// of 20, 40, 60 and 80 stages, 1024 loops each, one 100 MHz converter.
// Two complete measurements are run. For each sensor the converter result
// must equal the Start-to-Done interval, (2*1024 - 3) chain delays, in
// clock cycles plus the two-cycle synchroniser latency (either cycle is
// accepted when Done lands exactly on a clock edge). The ranks must order
// the sensors by chain length, each sensor must circulate its pulse
// exactly 1023 times before Done and once more after Start falls, and the
// 80-stage sensor must read close to the 180,000 ns of the reference
// implementation. Each mechanism (common start, self-timed loop, Done,
// ranking, release and counter wrap) is counted and must occur.
`timescale 1ps / 1ps
module sensor_network_tb;
  import delay_sensor_pkg::*;
  localparam int unsigned NS = NUM_SENSORS_DEFAULT;
  localparam int unsigned L  = LOOP_COUNT_DEFAULT;
  localparam int unsigned D  = STAGE_DELAY_PS_DEFAULT;
  localparam int unsigned P  = TDC_CLK_PERIOD_PS;
  localparam int unsigned W  = TDC_WIDTH_DEFAULT;
  localparam int unsigned RW = $clog2(NS);
  localparam int unsigned STAGES [NS] = '{20, 40, 60, 80};

  logic clk = 0, rst, meas_req, busy, result_valid;
  logic [NS-1:0][W-1:0]  result;
  logic [NS-1:0][RW-1:0] rank;
  logic [NS-1:0]         sensor_done;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_measure = 0, n_done_rise = 0, n_wrap = 0, n_rank_ok = 0, n_release = 0;
  int loops [NS];
  bit armed = 0;   // set once reset has been released

  sensor_network dut (
    .clk(clk), .rst(rst), .meas_req(meas_req), .busy(busy),
    .result_valid(result_valid), .result(result), .rank(rank),
    .sensor_done(sensor_done));

  always #(P / 2) clk = ~clk;

  for (genvar i = 0; i < NS; i++) begin : g_mon
    always @(posedge dut.g_sensor[i].u_sensor.chain_out) loops[i]++;
    always @(posedge sensor_done[i]) n_done_rise++;
    always @(negedge sensor_done[i]) if (armed) n_wrap++;
  end
  always @(negedge dut.sensor_start) if (armed) n_release++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic measure();
    longint t, lo, hi;
    for (int i = 0; i < NS; i++) loops[i] = 0;
    @(negedge clk) meas_req = 1;
    @(negedge clk) meas_req = 0;
    check(dut.sensor_start === 1'b1, "common Start raised");
    @(posedge result_valid);
    #1;
    n_measure++;
    for (int i = 0; i < NS; i++) begin
      t  = longint'(2 * L - 3) * STAGES[i] * D;
      lo = (t + P - 1) / P + 1;
      hi = (t % P == 0) ? lo + 1 : lo;
      check(result[i] >= W'(lo) && result[i] <= W'(hi),
            $sformatf("sensor %0d result %0d expected %0d..%0d", i, result[i], lo, hi));
      check(loops[i] == L, $sformatf("sensor %0d loops %0d", i, loops[i]));
      if (rank[i] == RW'(i)) n_rank_ok++;
      check(rank[i] == RW'(i), $sformatf("sensor %0d rank %0d", i, rank[i]));
    end
    // Reference: 80 stages, 1024 loops measured as 180,000 ns.
    t = longint'(result[NS-1] - 2) * P;
    check(t > 179_000_000 && t < 181_000_000, $sformatf("80-stage interval %0d ps", t));
    $display("measurement %0d: cycles %0d %0d %0d %0d (10 ns each)", n_measure,
             result[0], result[1], result[2], result[3]);
    check(sensor_done == '0, "all sensors idle after report");
  endtask

  initial begin
    rst = 0; meas_req = 0;
    #1 rst = 1;
    repeat (40) @(negedge clk);   // longer than the longest chain delay
    rst = 0;
    armed = 1;
    repeat (4) @(negedge clk);
    measure();
    repeat (7) @(negedge clk);
    measure();
    check(n_measure == 2, "measurements completed");
    check(n_done_rise == 2 * NS, "Done edges");
    check(n_wrap == 2 * NS, "counter wraps after release");
    check(n_release == 2, "Start releases");
    check(n_rank_ok == 2 * NS, "fastest-first ranking");
    $display("mechanisms: measurements=%0d done=%0d wraps=%0d releases=%0d ranks=%0d",
             n_measure, n_done_rise, n_wrap, n_release, n_rank_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100_000 * P);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
