// Self-check of lt_lfsr at its default size (16 bits, 8 per half).
//
// Checks, pattern by pattern, against a reference model of the four-step
// algorithm kept in this testbench:
//   - steps 1 and 3 show the two halves; step 2 shows the second half and
//     step 4 the first half through R-injection (a bit that keeps its value
//     is copied, a bit that toggles shows R, the serial output);
//   - between two consecutive patterns only one half changes;
//   - over one round (step 1 to the next step 1) each bit toggles at most
//     once, so the toggles of a round add up to the Hamming distance between
//     the two step-1 patterns;
//   - the state after both halves advanced (step 3) follows a plain Fibonacci
//     LFSR with taps 16, 15, 13, 4, and returns to its first value after
//     exactly 2^16 - 1 rounds (maximal length);
//   - test_en low holds everything; init restarts from the seed.
module tb_lt_lfsr;
  import lt_bist_pkg::*;
  localparam int N = 16, H = 8;
  localparam logic [N-1:0] TAP_MASK = 16'b1101_0000_0000_1000;  // flip-flops 16, 15, 13, 4
  localparam logic [N-1:0] SEED_VAL = '1;

  logic         clk = 1'b0, rst_n, init, test_en;
  logic [N-1:0] pattern;
  logic         so;
  step_t        step;
  int checks = 0, failures = 0;

  lt_lfsr dut (.clk(clk), .rst_n(rst_n), .init(init), .test_en(test_en),
               .pattern(pattern), .so(so), .step(step));

  always #5 clk = ~clk;

  // Reference model.
  logic [H-1:0] ra, rb;
  logic         rbuf;
  int           rstep;

  function automatic logic [N-1:0] plain_next(logic [N-1:0] s);
    return {s[N-2:0], ^(s & TAP_MASK)};
  endfunction

  function automatic logic [H-1:0] inject(logic [H-1:0] cur, logic [H-1:0] nxt, logic r);
    logic [H-1:0] m;
    for (int j = 0; j < H; j++) m[j] = (cur[j] == nxt[j]) ? cur[j] : r;
    return m;
  endfunction

  function automatic logic [N-1:0] ref_pattern();
    logic [H-1:0] an, bn;
    an = {ra[H-2:0], ^({rb, ra} & TAP_MASK)};
    bn = {rb[H-2:0], rbuf};
    case (rstep)
      2:       return {inject(rb, bn, rb[H-1]), ra};
      4:       return {rb, inject(ra, an, rb[H-1])};
      default: return {rb, ra};
    endcase
  endfunction

  task automatic ref_advance();
    rstep = (rstep == 4) ? 1 : rstep + 1;
    if (rstep == 1) begin
      rbuf = ra[H-1];
      ra   = {ra[H-2:0], ^({rb, ra} & TAP_MASK)};
    end else if (rstep == 3) begin
      rb = {rb[H-2:0], rbuf};
    end
  endtask

  task automatic ref_reset();
    ra = SEED_VAL[H-1:0]; rb = SEED_VAL[N-1:H]; rbuf = 1'b0; rstep = 1;
  endtask

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, what);
  endtask

  logic [N-1:0] prev_pat, round_start, full_first, full_prev;
  int           round_toggles, rounds, period, n_inject;
  bit           have_prev, have_full, entered;

  initial begin
    rst_n = 1'b0; init = 1'b0; test_en = 1'b0;
    ref_reset();
    have_prev = 0; have_full = 0; entered = 0; rounds = 0; period = 0; n_inject = 0;
    round_toggles = 0; round_start = '0; full_first = '0; full_prev = '0; prev_pat = '0;
    #12 rst_n = 1'b1;

    for (int cyc = 0; cyc < 300000 && period == 0; cyc++) begin
      @(negedge clk);
      test_en = (cyc > 2000) || ($urandom_range(0, 15) != 0);
      #1;
      // Pattern against the model.
      checks++;
      if (pattern !== ref_pattern())
        fail($sformatf("step %0d pattern %h, want %h", rstep, pattern, ref_pattern()));
      if (int'(step) + 1 != rstep) fail($sformatf("step %0d, want %0d", int'(step) + 1, rstep));
      if ((rstep == 2 || rstep == 4) && pattern != {rb, ra}) n_inject++;
      // Only one half may change between consecutive patterns.
      if (have_prev && entered) begin
        checks++;
        if ((pattern[H-1:0] != prev_pat[H-1:0]) && (pattern[N-1:H] != prev_pat[N-1:H]))
          fail($sformatf("both halves changed: %h -> %h", prev_pat, pattern));
        round_toggles += $countones(pattern ^ prev_pat);
      end
      // Round bookkeeping at each step 1 reached by advancing.
      if (rstep == 1 && have_prev && entered) begin
        checks++;
        if (round_toggles != $countones(pattern ^ round_start))
          fail($sformatf("round toggles %0d, Hamming distance %0d", round_toggles,
                         $countones(pattern ^ round_start)));
        round_toggles = 0;
        round_start = pattern;
      end
      if (!have_prev) round_start = pattern;
      // Plain-LFSR equivalence and period, sampled at step 3.
      if (rstep == 3 && entered) begin
        if (!have_full) begin
          full_first = pattern; have_full = 1; rounds = 0;
        end else begin
          checks++;
          if (pattern != plain_next(full_prev))
            fail($sformatf("state %h does not follow %h", pattern, full_prev));
          rounds++;
          if (pattern == full_first) period = rounds;
        end
        full_prev = pattern;
      end
      prev_pat = pattern; have_prev = 1;
      @(posedge clk);
      entered = test_en;
      if (test_en) ref_advance();
    end
    checks++;
    if (period != 65535) fail($sformatf("period %0d rounds, want 65535", period));
    checks++;
    if (n_inject == 0) fail("no intermediate pattern differed from the LFSR state");

    // init restarts from the seed at step 1.
    @(negedge clk);
    init = 1'b1; test_en = 1'b1;
    @(negedge clk);
    init = 1'b0; test_en = 1'b0;
    ref_reset();
    #1;
    checks++;
    if (pattern !== SEED_VAL || step != STEP1) fail("init did not restart from the seed");
    $display("period %0d rounds, %0d intermediate patterns differed from the register state", period, n_inject);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (320000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
