// Test of the pulse generator with the delay chain replaced by the
// testbench: it plays the chain output by hand and checks that the pulse
// follows the clock-generator rows (high only in C2 and C5), that both
// edges of the local clock move the output (one through each flip-flop),
// that Done high stops the pulses, and that reset clears the output.
`timescale 1ps / 1ps
module pulse_generator_tb;
  logic rst, start, done, chain_out, pulse_out;
  int checks = 0, failures = 0;
  int edges = 0;

  pulse_generator dut (.rst(rst), .start(start), .done(done),
                       .chain_out(chain_out), .pulse_out(pulse_out));

  always @(pulse_out) edges++;

  task automatic apply(input logic s, input logic d, input logic c, input logic exp);
    start = s; done = d; chain_out = c;
    #50;
    checks++;
    if (pulse_out !== exp) begin
      failures++;
      $display("FAIL t=%0t start=%b done=%b chain=%b pulse=%b exp=%b", $time, s, d, c, pulse_out, exp);
    end
  endtask

  initial begin
    rst = 0; start = 0; done = 0; chain_out = 0;
    #1 rst = 1;
    #100;
    checks++; if (pulse_out !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    #50;
    edges = 0;
    apply(0, 0, 0, 0);              // C1 idle
    // Ten loops of a measurement: C5 -> chain returns -> C7 -> chain low -> C5
    for (int k = 0; k < 10; k++) begin
      apply(1, 0, 0, 1);            // C5: pulse launched
      apply(1, 0, 1, 0);            // C7: pulse returned, ended
    end
    // Counter reaches the limit while the chain output is high (C8)
    apply(1, 1, 1, 0);
    apply(1, 1, 0, 0);              // C6: no new pulse while Start is high
    apply(0, 1, 0, 1);              // C2: Start released, one more pulse
    apply(0, 1, 1, 0);              // C4 then counter wraps ...
    apply(0, 0, 1, 0);              // C3
    apply(0, 0, 0, 0);              // C1 idle again
    // 10 loops (20 edges) + wrap pulse (2 edges)
    checks++;
    if (edges != 22) begin failures++; $display("FAIL edge count %0d", edges); end
    // Reset in the middle of a pulse clears the output
    apply(1, 0, 0, 1);
    rst = 1; #20;
    checks++; if (pulse_out !== 1'b0) begin failures++; $display("FAIL async reset"); end
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
