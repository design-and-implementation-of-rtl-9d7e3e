// Switching-activity comparison: LT-LFSR against a conventional LFSR as the
// pattern source of the 8 x 8 multiplier.
//
// The LT-LFSR (16 bits) drives one vedic_mult; a conventional 16-bit
// Fibonacci LFSR with the same taps and seed, modelled in this testbench and
// advanced once per clock, drives a second one. Over 16384 clocks the
// testbench counts the toggles on the multiplier inputs and on its product
// bits (a proxy for the switching inside it) for both sources.
// Checks: the LT-LFSR never changes more than one 8-bit half per clock, its
// peak input toggles per clock stay at or below 8, and its average input
// toggles per clock are at most 30% of the conventional LFSR's (one LFSR step
// is spread over four clocks, so about 25% is expected); product toggles per
// clock must also be lower. Both products are checked against the integer
// product.
module tb_lt_activity;
  import lt_bist_pkg::*;
  localparam int N = 16, H = 8, CYCLES = 16384;
  localparam logic [N-1:0] TAP_MASK = 16'b1101_0000_0000_1000;  // flip-flops 16, 15, 13, 4

  logic         clk = 1'b0, rst_n, init, test_en;
  logic [N-1:0] lt_pat, conv_pat;
  logic [N-1:0] lt_prod, conv_prod;
  logic         so;
  step_t        step;
  int checks = 0, failures = 0;

  lt_lfsr    u_lt   (.clk(clk), .rst_n(rst_n), .init(init), .test_en(test_en),
                     .pattern(lt_pat), .so(so), .step(step));
  vedic_mult u_cut1 (.a(lt_pat[H-1:0]),   .b(lt_pat[N-1:H]),   .p(lt_prod));
  vedic_mult u_cut2 (.a(conv_pat[H-1:0]), .b(conv_pat[N-1:H]), .p(conv_prod));

  always #5 clk = ~clk;

  int     lt_in = 0, cv_in = 0, lt_out = 0, cv_out = 0;
  int     lt_peak = 0, cv_peak = 0, t;
  logic [N-1:0] lt_prev, cv_prev, ltp_prev, cvp_prev;

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, what);
  endtask

  initial begin
    rst_n = 1'b0; init = 1'b0; test_en = 1'b0;
    conv_pat = '1;
    #12 rst_n = 1'b1;
    @(negedge clk);
    test_en = 1'b1;
    #1;
    lt_prev = lt_pat; cv_prev = conv_pat; ltp_prev = lt_prod; cvp_prev = conv_prod;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk);
      conv_pat = {conv_pat[N-2:0], ^(conv_pat & TAP_MASK)};
      @(negedge clk);
      #1;
      checks++;
      if (int'(lt_prod) != int'(lt_pat[H-1:0]) * int'(lt_pat[N-1:H]) ||
          int'(conv_prod) != int'(conv_pat[H-1:0]) * int'(conv_pat[N-1:H]))
        fail("product mismatch");
      checks++;
      if (lt_pat[H-1:0] != lt_prev[H-1:0] && lt_pat[N-1:H] != lt_prev[N-1:H])
        fail($sformatf("both halves changed: %h -> %h", lt_prev, lt_pat));
      t = $countones(lt_pat ^ lt_prev);
      lt_in += t;
      if (t > lt_peak) lt_peak = t;
      t = $countones(conv_pat ^ cv_prev);
      cv_in += t;
      if (t > cv_peak) cv_peak = t;
      lt_out += $countones(lt_prod ^ ltp_prev);
      cv_out += $countones(conv_prod ^ cvp_prev);
      lt_prev = lt_pat; cv_prev = conv_pat; ltp_prev = lt_prod; cvp_prev = conv_prod;
    end
    $display("input toggles per clock: LT-LFSR %0.3f (peak %0d), conventional %0.3f (peak %0d)",
             real'(lt_in) / CYCLES, lt_peak, real'(cv_in) / CYCLES, cv_peak);
    $display("product toggles per clock: LT-LFSR %0.3f, conventional %0.3f",
             real'(lt_out) / CYCLES, real'(cv_out) / CYCLES);
    checks++;
    if (lt_peak > H) fail($sformatf("LT-LFSR peak %0d toggles in one clock", lt_peak));
    checks++;
    if (real'(lt_in) > 0.30 * real'(cv_in)) fail("LT-LFSR input activity not below 30% of conventional");
    checks++;
    if (lt_out >= cv_out) fail("LT-LFSR product activity not lower");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
