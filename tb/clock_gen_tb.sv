// Exhaustive test of the clock generator f(x) against its eight-row truth
// table (conditions C1..C8), written out row by row rather than as the
// reduced expression used in the module.
`timescale 1ps / 1ps
module clock_gen_tb;
  logic start, done, chain_out, clk_gen;
  int checks = 0, failures = 0;

  clock_gen dut (.start(start), .done(done), .chain_out(chain_out), .clk_gen(clk_gen));

  // {start, done, chain_out} -> expected output, conditions C1..C8.
  logic [3:0] table_rows [8] = '{
    4'b000_0,  // C1
    4'b010_1,  // C2
    4'b001_0,  // C3
    4'b011_0,  // C4
    4'b100_1,  // C5
    4'b110_0,  // C6
    4'b101_0,  // C7
    4'b111_0   // C8
  };

  initial begin
    for (int r = 0; r < 8; r++) begin
      {start, done, chain_out} = table_rows[r][3:1];
      #10;
      checks++;
      if (clk_gen !== table_rows[r][0]) begin
        failures++;
        $display("FAIL C%0d: start=%b done=%b chain=%b got %b", r + 1, start, done, chain_out, clk_gen);
      end
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
