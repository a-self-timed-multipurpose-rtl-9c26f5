// Test of the circulation counter: counts rising edges of its local clock,
// wraps from LOOP_COUNT-1 to 0, ignores falling edges and clears on an
// asynchronous reset. Checked against a counter kept by the testbench.
`timescale 1ps / 1ps
module loop_counter_tb;
  localparam int unsigned L = 12;
  localparam int unsigned W = $clog2(L);
  logic chain_clk, rst;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int model;

  loop_counter #(.LOOP_COUNT(L)) dut (.chain_clk(chain_clk), .rst(rst), .count(count));

  task automatic pulse();
    #40 chain_clk = 1;
    #40 chain_clk = 0;
    model = (model + 1) % L;
    #5;
    checks++;
    if (count !== W'(model)) begin failures++; $display("FAIL count %0d exp %0d", count, model); end
  endtask

  initial begin
    chain_clk = 0; rst = 1; model = 0;
    #50 rst = 0;
    checks++; if (count !== '0) begin failures++; $display("FAIL reset value"); end
    for (int k = 0; k < 3 * L + 5; k++) pulse();
    // asynchronous reset with no clock edge
    #10 rst = 1; #5;
    checks++; if (count !== '0) begin failures++; $display("FAIL async reset"); end
    rst = 0; model = 0;
    for (int k = 0; k < L; k++) pulse();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
