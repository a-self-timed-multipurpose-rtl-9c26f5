// Test of the delay chain model: an edge entering the chain must leave it
// exactly STAGES * STAGE_DELAY_PS later, not earlier, for both polarities
// and for a pulse of several stage delays width.
`timescale 1ps / 1ps
module delay_chain_tb;
  localparam int unsigned STAGES = 7;
  localparam int unsigned D      = 130;
  localparam int unsigned TOTAL  = STAGES * D;

  logic chain_in, chain_out;
  int checks = 0, failures = 0;
  time t_in, t_out;

  delay_chain #(.STAGES(STAGES), .STAGE_DELAY_PS(D)) dut (.chain_in(chain_in), .chain_out(chain_out));

  task automatic check_edge(input logic lvl);
    t_in = $time;
    chain_in = lvl;
    #(TOTAL - 1);
    checks++;
    if (chain_out === lvl) begin failures++; $display("FAIL early edge to %b", lvl); end
    #1;
    checks++;
    if (chain_out !== lvl) begin failures++; $display("FAIL edge to %b not out after %0d", lvl, TOTAL); end
  endtask

  initial begin
    chain_in = 0;
    #(2 * TOTAL);
    checks++; if (chain_out !== 1'b0) begin failures++; $display("FAIL settle"); end
    check_edge(1);
    #(3 * D);
    check_edge(0);
    #(3 * D);
    // A pulse of 3 stage delays keeps its width through the chain.
    chain_in = 1; #(3 * D); chain_in = 0;
    @(posedge chain_out); t_in = $time;
    @(negedge chain_out); t_out = $time;
    checks++;
    if (t_out - t_in != 3 * D) begin failures++; $display("FAIL pulse width %0t", t_out - t_in); end
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
