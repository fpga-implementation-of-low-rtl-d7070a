// Self-checking testbench for dadda_mult_8x8.
//
// 1. The four operand pairs of the published multiplier simulation:
//    12*1 = 12, 133*17 = 2261, 67*5 = 335, 23*1 = 23.
// 2. All 65536 operand pairs against tb_approx_model_pkg::ref_mult, a model
//    that rebuilds the reduction tree from its rules at run time.
// 3. Properties independent of any model: the product never exceeds a*b, the
//    shortfall is a multiple of 16 (each wrong compressor loses 2 * 2^c with
//    c >= 3), and it is exact when an operand is zero or a power of two.
// Counts and prints how many products are inexact.
module tb_dadda_mult_8x8;
  import approx_dadda_pkg::*;
  import tb_approx_model_pkg::*;

  operand_t a, b;
  product_t p;
  int checks = 0, failures = 0;
  int inexact = 0;

  dadda_mult_8x8 dut (.a(a), .b(b), .p(p));

  // Operand pairs and products of the published multiplier simulation.
  localparam int unsigned FA [4] = '{12, 133, 67, 23};
  localparam int unsigned FB [4] = '{1, 17, 5, 1};
  localparam int unsigned FP [4] = '{12, 2261, 335, 23};

  function automatic bit is_pow2_or_zero(int unsigned v);
    return (v & (v - 1)) == 0;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      a = 8'(FA[k]); b = 8'(FB[k]);
      #1;
      checks++;
      if (p !== 16'(FP[k])) begin
        failures++;
        $display("FAIL %0d*%0d = %0d, expected %0d", FA[k], FB[k], p, FP[k]);
      end
    end

    for (int ia = 0; ia < 256; ia++) begin
      for (int ib = 0; ib < 256; ib++) begin
        int unsigned exact, model;
        a = 8'(ia); b = 8'(ib);
        #1;
        exact = ia * ib;
        model = ref_mult(ia, ib);
        checks++;
        if (int'(p) != int'(model)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d, model %0d", ia, ib, p, model);
        end
        checks++;
        if (int'(p) > int'(exact) || ((exact - int'(p)) % 16) != 0) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d, shortfall not allowed", ia, ib, p);
        end
        if (is_pow2_or_zero(ia) || is_pow2_or_zero(ib)) begin
          checks++;
          if (int'(p) != int'(exact)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d*%0d = %0d, expected exact", ia, ib, p);
          end
        end
        if (int'(p) != int'(exact)) inexact++;
      end
    end
    $display("inexact products: %0d of 65536", inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
