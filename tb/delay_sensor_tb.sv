// Test of one self-timed delay sensor with a short chain and a small loop
// count. With zero-delay control logic the Start-to-Done interval must be
// exactly (2*LOOP_COUNT - 3) chain delays: the count reaches LOOP_COUNT-1
// on the (LOOP_COUNT-1)th rising edge of the chain output. After Start is
// released the sensor must send exactly one more pulse and drop Done when
// it returns: at max(release, Done + chain delay) + chain delay. Start is
// released both while the returning pulse is still high and after it has
// fallen, and the sensor must stay idle while Start is low.
`timescale 1ps / 1ps
module delay_sensor_tb;
  localparam int unsigned N = 6;     // chain stages
  localparam int unsigned L = 16;    // loop count
  localparam int unsigned D = 250;   // ps per stage
  localparam longint CHAIN = N * D;

  logic rst, start, done;
  int checks = 0, failures = 0;
  int loops;
  time t_start, t_done, t_rel, t_fall;

  delay_sensor #(.CHAIN_STAGES(N), .LOOP_COUNT(L), .STAGE_DELAY_PS(D)) dut (
    .rst(rst), .start(start), .done(done));

  always @(posedge dut.chain_out) loops++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic measure(input longint release_after);
    loops = 0;
    t_start = $time;
    start = 1;
    @(posedge done);
    t_done = $time;
    check(t_done - t_start == (2 * L - 3) * CHAIN, "Start-to-Done interval");
    check(loops == L - 1, "loops counted before Done");
    #(release_after);
    check(done === 1'b1, "Done held while Start high");
    t_rel = $time;
    start = 0;
    @(negedge done);
    t_fall = $time;
    check(t_fall == ((t_rel > t_done + CHAIN) ? t_rel : t_done + CHAIN) + CHAIN,
          "Done falls one pulse after release");
    check(loops == L, "one wrap pulse after release");
    #(10 * CHAIN);
    check(loops == L && done === 1'b0 && dut.count == '0, "idle after wrap");
  endtask

  initial begin
    rst = 0; start = 0; loops = 0;
    #1 rst = 1;
    #(3 * CHAIN);
    rst = 0;
    #(CHAIN);
    measure(CHAIN / 3);       // release while the last pulse is still high
    measure(5 * CHAIN);       // release long after
    measure(0);
    // Reset during a measurement stops it and clears the count.
    start = 1;
    #(7 * CHAIN);
    rst = 1;
    #(3 * CHAIN);
    check(dut.count == '0 && done === 1'b0, "reset mid-measurement");
    start = 0;
    #(2 * CHAIN);
    rst = 0;
    #(CHAIN);
    measure(CHAIN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * (2 * L) * CHAIN);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
