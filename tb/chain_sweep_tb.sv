// Chain-length sweep: two boards, each a network of seven sensors of 5, 10,
// 15, 20, 40, 80 and 130 stages read by one 100 MHz converter, board 1 with stages 6 %
// faster than board 2. Every result must match the expected Start-to-Done
// interval exactly (the delays are chosen so that no Done lands on a clock
// edge), the readings must grow linearly with the chain length, the ratio
// of the two boards must be 1.06 at every length, and the ranks must follow
// the chain length.
`timescale 1ps / 1ps
module chain_sweep_tb;
  import delay_sensor_pkg::*;
  localparam int unsigned NS = 7;
  localparam int unsigned L  = LOOP_COUNT_DEFAULT;
  localparam int unsigned P  = TDC_CLK_PERIOD_PS;
  localparam int unsigned W  = TDC_WIDTH_DEFAULT;
  localparam int unsigned RW = $clog2(NS);
  localparam int unsigned D2 = 1101;   // board 2, ps per stage
  localparam int unsigned D1 = 1039;   // board 1, about 6 % faster

  localparam int unsigned STAGES [NS] = '{5, 10, 15, 20, 40, 80, 130};

  logic clk = 0, rst, meas_req;
  logic busy1, busy2, valid1, valid2;
  logic [NS-1:0][W-1:0]  res1, res2;
  logic [NS-1:0][RW-1:0] rank1, rank2;
  logic [NS-1:0]         done1, done2;
  int checks = 0, failures = 0;

  sensor_network #(.NUM_SENSORS(NS), .CHAIN_STAGES(STAGES), .STAGE_DELAY_PS(D1)) board1 (
    .clk(clk), .rst(rst), .meas_req(meas_req), .busy(busy1), .result_valid(valid1),
    .result(res1), .rank(rank1), .sensor_done(done1));
  sensor_network #(.NUM_SENSORS(NS), .CHAIN_STAGES(STAGES), .STAGE_DELAY_PS(D2)) board2 (
    .clk(clk), .rst(rst), .meas_req(meas_req), .busy(busy2), .result_valid(valid2),
    .result(res2), .rank(rank2), .sensor_done(done2));

  always #(P / 2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic longint expect_cycles(longint n, longint d);
    longint t = (2 * L - 3) * n * d;
    return (t + P - 1) / P + 1;
  endfunction

  bit got1 = 0, got2 = 0;
  always @(posedge valid1) got1 = 1;
  always @(posedge valid2) got2 = 1;

  initial begin
    real ratio, slope;
    rst = 0; meas_req = 0;
    #1 rst = 1;
    repeat (40) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk) meas_req = 0;
    meas_req = 1;
    @(negedge clk) meas_req = 0;
    wait (got1 && got2);
    #1;
    for (int i = 0; i < NS; i++) begin
      check(res1[i] == W'(expect_cycles(STAGES[i], D1)),
            $sformatf("board 1, %0d stages: %0d exp %0d", STAGES[i], res1[i], expect_cycles(STAGES[i], D1)));
      check(res2[i] == W'(expect_cycles(STAGES[i], D2)),
            $sformatf("board 2, %0d stages: %0d exp %0d", STAGES[i], res2[i], expect_cycles(STAGES[i], D2)));
      check(rank1[i] == RW'(i) && rank2[i] == RW'(i), $sformatf("rank of %0d stages", STAGES[i]));
      ratio = real'(res2[i] - 2) / real'(res1[i] - 2);
      check(ratio > 1.055 && ratio < 1.065, $sformatf("board ratio %f at %0d stages", ratio, STAGES[i]));
      // linearity: cycles per stage equal for every length, to within one cycle
      slope = real'(res2[i] - 2) / real'(STAGES[i]);
      check(slope * STAGES[i] > real'(expect_cycles(STAGES[i], D2)) - 4.0 &&
            (real'(res2[i] - 2) - real'(STAGES[i]) * real'((2 * L - 3) * D2) / real'(P)) < 1.0,
            $sformatf("linearity at %0d stages", STAGES[i]));
      $display("%3d stages: board1 %0d cycles, board2 %0d cycles", STAGES[i], res1[i], res2[i]);
    end
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
