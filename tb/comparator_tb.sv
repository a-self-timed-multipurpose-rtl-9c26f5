// Exhaustive test of the count-limit comparator for a 5-bit count.
`timescale 1ps / 1ps
module comparator_tb;
  localparam int unsigned W = 5;
  localparam int unsigned LIMIT = 21;
  logic [W-1:0] count;
  logic done;
  int checks = 0, failures = 0;

  comparator #(.W(W), .LIMIT(LIMIT)) dut (.count(count), .done(done));

  initial begin
    for (int v = 0; v < 2 ** W; v++) begin
      count = W'(v);
      #1;
      checks++;
      if (done !== (v == LIMIT)) begin failures++; $display("FAIL count=%0d done=%b", v, done); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
