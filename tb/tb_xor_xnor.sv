// Self-checking testbench for xor_xnor: applies all four input pairs and
// compares XOR and XNOR with the truth table of the cell (low output for equal
// inputs, high for different ones; XNOR the complement).
module tb_xor_xnor;
  logic x1, x2, xor_o, xnor_o;
  int checks = 0, failures = 0;

  xor_xnor dut (.x1(x1), .x2(x2), .xor_o(xor_o), .xnor_o(xnor_o));

  // Expected XOR per {x1,x2} = 00, 01, 10, 11.
  localparam logic [3:0] XOR_TABLE = 4'b0110;

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x1, x2} = 2'(v);
      #1;
      checks++;
      if (xor_o !== XOR_TABLE[v] || xnor_o !== ~XOR_TABLE[v]) begin
        failures++;
        $display("FAIL x1=%0b x2=%0b xor=%0b xnor=%0b", x1, x2, xor_o, xnor_o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
