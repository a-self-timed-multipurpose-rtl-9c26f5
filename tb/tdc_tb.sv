// Test of the shared time-to-digital converter with three sensors played
// by the testbench: each raises its Done a chosen time after the converter
// raises Start and lowers it a chosen time after Start falls. Checks the
// timestamps (ceil(T / Tclk) + 1 cycles), the arrival ranks (equal for
// sensors seen in the same cycle), that Start is held until every Done has
// been seen, and that result_valid waits for every Done to fall.
`timescale 1ps / 1ps
module tdc_tb;
  import delay_sensor_pkg::*;
  localparam int unsigned NS = 3;
  localparam int unsigned WD = 12;
  localparam int unsigned P  = TDC_CLK_PERIOD_PS;
  localparam int unsigned RW = $clog2(NS);

  logic clk = 0, rst, meas_req, sensor_start, busy, result_valid;
  logic [NS-1:0] sensor_done;
  logic [NS-1:0][WD-1:0] result;
  logic [NS-1:0][RW-1:0] rank;
  int checks = 0, failures = 0;
  time t_start, t_stop;
  longint dly   [NS];
  longint drop  [NS];

  tdc #(.NUM_SENSORS(NS), .WIDTH(WD)) dut (
    .clk(clk), .rst(rst), .meas_req(meas_req), .sensor_start(sensor_start),
    .sensor_done(sensor_done), .busy(busy), .result_valid(result_valid),
    .result(result), .rank(rank));

  always #(P / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Each sensor: Done rises dly[i] after Start, falls drop[i] after Start falls.
  for (genvar i = 0; i < NS; i++) begin : g_sens
    initial begin
      sensor_done[i] = 1'b0;
      forever begin
        @(posedge sensor_start);
        #(dly[i]) sensor_done[i] = 1'b1;
        @(negedge sensor_start);
        #(drop[i]) sensor_done[i] = 1'b0;
      end
    end
  end

  always @(posedge sensor_start) t_start = $time;
  always @(negedge sensor_start) t_stop = $time;

  function automatic longint expect_cycles(input longint t);
    return (t + P - 1) / P + 1;
  endfunction

  task automatic run(input longint d0, input longint d1, input longint d2,
                     input int r0, input int r1, input int r2);
    longint last;
    dly[0] = d0; dly[1] = d1; dly[2] = d2;
    drop[0] = 3 * P + 1234; drop[1] = 700; drop[2] = 9 * P + 55;
    last = d0 > d1 ? d0 : d1; last = last > d2 ? last : d2;
    @(negedge clk) meas_req = 1;
    @(negedge clk) meas_req = 0;
    check(busy && sensor_start, "Start raised");
    @(posedge result_valid);
    #1;
    for (int i = 0; i < NS; i++)
      check(result[i] == WD'(expect_cycles(dly[i])), $sformatf("timestamp %0d = %0d exp %0d", i, result[i], expect_cycles(dly[i])));
    check(rank[0] == RW'(r0) && rank[1] == RW'(r1) && rank[2] == RW'(r2), "ranks");
    check(t_stop - t_start >= last, "Start held until last Done");
    check(sensor_done == '0, "valid only after every Done fell");
    @(posedge clk);
    #1;
    check(!busy && !result_valid, "back to idle");
  endtask

  initial begin
    rst = 1; meas_req = 0;
    dly[0] = 1; dly[1] = 1; dly[2] = 1; drop[0] = 1; drop[1] = 1; drop[2] = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    run(37 * P + 333, 12 * P + 4000, 80 * P + 9000, 1, 0, 2);
    run(500 * P + 10, 200 * P + 9990, 100 * P + 5000, 2, 1, 0);
    // two sensors seen in the same cycle share a rank
    run(60 * P + 100, 60 * P + 200, 30 * P + 100, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5000 * P);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
