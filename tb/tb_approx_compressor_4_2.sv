// Self-checking testbench for approx_compressor_4_2.
//
// Applies all 16 input patterns and compares sum and carry with a truth table
// written out here, whose first four rows are the published ones (0000 -> 0,0;
// 0001 -> 1,0; 0010 -> 1,0; 0011 -> 0,0 with difference -2). It also checks
// the error statistics: exactly three wrong patterns (error rate 18.75 %),
// each with difference -2, sum + 2*carry never above the true count.
module tb_approx_compressor_4_2;
  logic x1, x2, x3, x4, sum, carry;
  int checks = 0, failures = 0;
  int wrong = 0;

  approx_compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .sum(sum), .carry(carry));

  // {carry, sum} for {x1,x2,x3,x4} = 0000 .. 1111.
  localparam logic [1:0] TABLE [16] = '{
    2'b00, 2'b01, 2'b01, 2'b00,   // 0000 0001 0010 0011
    2'b01, 2'b10, 2'b10, 2'b11,   // 0100 0101 0110 0111
    2'b01, 2'b10, 2'b10, 2'b11,   // 1000 1001 1010 1011
    2'b00, 2'b11, 2'b11, 2'b10    // 1100 1101 1110 1111
  };

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int exact, approx;
      {x1, x2, x3, x4} = 4'(v);
      #1;
      checks++;
      if ({carry, sum} !== TABLE[v]) begin
        failures++;
        $display("FAIL in=%04b carry=%0b sum=%0b expected %02b", 4'(v), carry, sum, TABLE[v]);
      end
      exact  = int'(x1) + int'(x2) + int'(x3) + int'(x4);
      approx = int'(sum) + 2 * int'(carry);
      checks++;
      if (approx != exact && approx - exact != -2) begin
        failures++;
        $display("FAIL in=%04b difference %0d", 4'(v), approx - exact);
      end
      if (approx != exact) wrong++;
    end
    checks++;
    if (wrong != 3) begin
      failures++;
      $display("FAIL %0d wrong patterns, expected 3", wrong);
    end
    $display("wrong patterns: %0d of 16", wrong);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
