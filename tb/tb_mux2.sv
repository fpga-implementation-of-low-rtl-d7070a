// Self-checking testbench for mux2: all eight combinations of d0, d1 and sel;
// the output must follow d1 when sel is high and d0 when it is low.
module tb_mux2;
  logic d0, d1, sel, y;
  int checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expected;
      {sel, d1, d0} = 3'(v);
      expected = (v >= 4) ? ((v >> 1) & 1) == 1 : (v & 1) == 1;
      #1;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL sel=%0b d1=%0b d0=%0b y=%0b", sel, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
