// Temperature workload: the four-sensor network (20, 40, 60 and 80 stages)
// read at five temperatures from 20 to 100 degC in 20 degC steps, one network instance per
// temperature, all started by the same request.
//
// Temperature enters only through the stage delay, using the linear model
// t(T) = t(20 degC) * (1 + K1 * (T - 20)). K1 = 0.00104 /degC and the
// 2726 ps stage delay at 20 degC make the 80-stage sensor read about
// 446 us at 20 degC and 483 us at 100 degC, the published measurements of
// that sensor (assuming 1024 loops). The testbench checks every reading
// against the expected interval, then applies a two-point calibration
// (20 and 100 degC) per sensor and requires every estimated temperature to
// be within 0.5 degC, and the sensitivity to be proportional to the chain
// length.
`timescale 1ps / 1ps
module temperature_tb;
  import delay_sensor_pkg::*;
  localparam int unsigned NS = 4;
  localparam int unsigned NT = 5;            // 20, 40, ..., 100 degC
  localparam int unsigned L  = LOOP_COUNT_DEFAULT;
  localparam int unsigned P  = TDC_CLK_PERIOD_PS;
  localparam int unsigned W  = TDC_WIDTH_DEFAULT;
  localparam int unsigned RW = $clog2(NS);
  localparam real D20 = 2726.0;              // ps per stage at 20 degC
  localparam real K1  = 0.00104;             // relative delay change per degC
  localparam int unsigned STAGES [NS] = '{20, 40, 60, 80};

  function automatic int unsigned temp_of(int k);
    return 20 + 20 * k;
  endfunction

  function automatic int unsigned delay_at(int k);
    return int'(D20 * (1.0 + K1 * real'(temp_of(k) - 20)));
  endfunction

  logic clk = 0, rst, meas_req;
  logic [NT-1:0] valid;
  logic [NT-1:0] busy;
  logic [NT-1:0][NS-1:0][W-1:0]  res;
  logic [NT-1:0][NS-1:0][RW-1:0] rank;
  logic [NT-1:0][NS-1:0]         done;
  logic [NT-1:0]                 got;
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NT; k++) begin : g_temp
    sensor_network #(.STAGE_DELAY_PS(delay_at(k))) u_net (
      .clk(clk), .rst(rst), .meas_req(meas_req), .busy(busy[k]),
      .result_valid(valid[k]), .result(res[k]), .rank(rank[k]),
      .sensor_done(done[k]));
    always @(posedge valid[k]) got[k] = 1'b1;
  end

  always #(P / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint t, lo;
    real r20, r100, est, us20, us100, sens0, sens;
    got = '0;
    rst = 0; meas_req = 0;
    #1 rst = 1;
    repeat (40) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    meas_req = 1;
    @(negedge clk) meas_req = 0;
    wait (got == '1);
    #1;
    for (int i = 0; i < NS; i++) begin
      for (int k = 0; k < NT; k++) begin
        t  = longint'(2 * L - 3) * STAGES[i] * delay_at(k);
        lo = (t + P - 1) / P + 1;
        check(res[k][i] >= W'(lo) && res[k][i] <= W'(lo + ((t % P == 0) ? 1 : 0)),
              $sformatf("%0d stages at %0d degC: %0d exp %0d", STAGES[i], temp_of(k), res[k][i], lo));
        check(rank[k][i] == RW'(i), "rank");
      end
      // two-point calibration on the 20 and 100 degC readings
      r20  = real'(res[0][i]);
      r100 = real'(res[NT-1][i]);
      for (int k = 1; k < NT - 1; k++) begin
        est = 20.0 + 80.0 * (real'(res[k][i]) - r20) / (r100 - r20);
        check(est - real'(temp_of(k)) < 0.5 && real'(temp_of(k)) - est < 0.5,
              $sformatf("%0d stages: %0d degC estimated as %f", STAGES[i], temp_of(k), est));
      end
      sens = (r100 - r20) / 80.0;
      if (i == 0) sens0 = sens;
      check(sens / sens0 > 0.97 * real'(STAGES[i]) / 20.0 && sens / sens0 < 1.03 * real'(STAGES[i]) / 20.0,
            $sformatf("sensitivity of %0d stages not proportional", STAGES[i]));
      $display("%0d stages: %0d cycles at 20 degC, %0d at 100 degC, %f cycles/degC",
               STAGES[i], res[0][i], res[NT-1][i], sens);
    end
    us20  = real'(res[0][NS-1] - 2) * real'(P) * 1e-6;
    us100 = real'(res[NT-1][NS-1] - 2) * real'(P) * 1e-6;
    check(us20 > 441.5 && us20 < 450.5, $sformatf("80 stages at 20 degC: %f us", us20));
    check(us100 > 478.0 && us100 < 488.0, $sformatf("80 stages at 100 degC: %f us", us100));
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
