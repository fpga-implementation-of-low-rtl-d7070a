// End-to-end testbench for fir_filter at its default size (3 taps, 16-bit
// output).
//
// Inputs change on the falling clock edge; y_out is checked after every
// rising edge against a model that keeps its own sample history and forms
// sum h(i) * x(n-i) with tb_approx_model_pkg::ref_mult, modulo 2^16. The
// one-cycle latency is checked by comparing y_out with the sum for the sample
// presented just before that edge.
//
// Phases: a step input with unit-like coefficients (the response must build
// up over TAPS cycles and then hold), random samples and coefficients, large
// values that overflow 16 bits, and a reset in the middle of a run. It counts
// how often each behaviour occurred and fails if one never did: reset
// clearing the filter, outputs where the approximate multipliers make y
// differ from the exact filter, exact outputs, and wrap-around of the sum.
module tb_fir_filter;
  import approx_dadda_pkg::*;
  import tb_approx_model_pkg::*;

  localparam int unsigned TAPS = 3;

  logic        clk = 1'b0;
  logic        rst;
  operand_t    x_in;
  operand_t    h [TAPS];
  logic [15:0] y_out;

  int checks = 0, failures = 0;
  int n_reset = 0, n_approx = 0, n_exact = 0, n_wrap = 0, n_step_hold = 0;

  int unsigned hist [TAPS];   // hist[i] = x(n-i) as the model sees it

  fir_filter dut (.clk(clk), .rst(rst), .x_in(x_in), .h(h), .y_out(y_out));

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock cycle: apply x on the falling edge, check y after the rising one.
  task automatic step(input int unsigned x, input bit do_rst);
    int unsigned approx_sum, exact_sum;
    @(negedge clk);
    x_in = 8'(x);
    rst  = do_rst;
    approx_sum = 0; exact_sum = 0;
    hist[0] = x;
    for (int i = 0; i < TAPS; i++) begin
      approx_sum += ref_mult(hist[i], int'(h[i]));
      exact_sum  += hist[i] * int'(h[i]);
    end
    @(posedge clk);
    #1;
    checks++;
    if (do_rst) begin
      n_reset++;
      if (y_out !== 16'h0) begin
        failures++;
        $display("FAIL y_out=%0h after reset", y_out);
      end
      for (int i = 0; i < TAPS; i++) hist[i] = 0;
    end else begin
      if (y_out !== 16'(approx_sum)) begin
        failures++;
        $display("FAIL x=%0d y_out=%0d expected %0d", x, y_out, 16'(approx_sum));
      end
      if (approx_sum != exact_sum) n_approx++;
      else                         n_exact++;
      if (approx_sum >= 32'h1_0000) n_wrap++;
      for (int i = TAPS - 1; i > 0; i--) hist[i] = hist[i-1];
    end
  endtask

  initial begin
    x_in = '0;
    rst  = 1'b1;
    for (int i = 0; i < TAPS; i++) begin
      h[i] = '0;
      hist[i] = 0;
    end

    // Reset, then a step of height 1 through coefficients 1, 1, 2.
    step(0, 1'b1);
    step(0, 1'b1);
    h[0] = 8'd1; h[1] = 8'd1; h[2] = 8'd2;
    for (int k = 0; k < 3; k++) step(0, 1'b0);
    for (int k = 0; k < 8; k++) begin
      step(1, 1'b0);
      // The response must reach h0+h1+h2 = 4 by the third sample and hold.
      if (k >= 2) begin
        checks++;
        if (y_out !== 16'd4) begin
          failures++;
          $display("FAIL step response %0d at sample %0d", y_out, k);
        end else n_step_hold++;
      end
    end

    // Random samples and coefficients.
    for (int blk = 0; blk < 40; blk++) begin
      for (int i = 0; i < TAPS; i++) h[i] = 8'($urandom_range(0, 255));
      for (int k = 0; k < 25; k++) step($urandom_range(0, 255), 1'b0);
    end

    // Large values: the sum of three products exceeds 16 bits.
    for (int i = 0; i < TAPS; i++) h[i] = 8'd250;
    for (int k = 0; k < 10; k++) step($urandom_range(200, 255), 1'b0);

    // Reset in the middle of a run, then carry on.
    step(255, 1'b1);
    for (int k = 0; k < 10; k++) step($urandom_range(0, 255), 1'b0);

    $display("resets=%0d approximate_outputs=%0d exact_outputs=%0d wraps=%0d step_holds=%0d",
             n_reset, n_approx, n_exact, n_wrap, n_step_hold);
    checks++; if (n_reset == 0)     begin failures++; $display("FAIL no reset"); end
    checks++; if (n_approx == 0)    begin failures++; $display("FAIL no approximate output"); end
    checks++; if (n_exact == 0)     begin failures++; $display("FAIL no exact output"); end
    checks++; if (n_wrap == 0)      begin failures++; $display("FAIL no wrap-around"); end
    checks++; if (n_step_hold == 0) begin failures++; $display("FAIL no step response"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
