// End-to-end self-check of lt_bist_top at its default parameters (8 x 8
// multiplier, 16-bit LT-LFSR, 256 patterns per run).
//
// The testbench computes the pattern sequence with its own model of the
// four-step LT-LFSR algorithm and the expected product of each pattern with
// the integer multiply, then:
//   1. programs the PROM with the 256 expected products and runs a test:
//      every pattern, product and stored word is checked, every pattern must
//      be judged good, done must rise exactly 256 clocks after start, and
//      fail must stay low;
//   2. blows one more fuse in word 100 (a bit that should read 1), which a
//      PROM cannot undo, and runs again: exactly pattern 100 must be judged
//      bad and fail must be set;
//   3. tries to restore that fuse by writing all ones and runs a third time:
//      the PROM must still hold the corrupted word, so the test fails again.
// It counts each mechanism (the four LT-LFSR steps, intermediate patterns
// that differ from the register state, good and bad verdicts, done, restarts)
// and counts a failure for any that never happened.
module tb_lt_bist_top;
  import lt_bist_pkg::*;
  localparam int N = 8, W = 2 * N, H = N, TEST_LEN = 256, AW = 8;
  localparam logic [W-1:0] TAP_MASK = 16'b1101_0000_0000_1000;  // flip-flops 16, 15, 13, 4
  localparam int BAD_WORD = 100;

  logic          clock = 1'b0, reset_n, start, prog_en;
  logic [AW-1:0] prog_addr;
  logic [W-1:0]  prog_data, pattern, response, expected;
  step_t         step;
  logic          so, good, bad, busy, done, fail;

  lt_bist_top dut (
    .clock(clock), .reset_n(reset_n), .start(start),
    .prog_en(prog_en), .prog_addr(prog_addr), .prog_data(prog_data),
    .pattern(pattern), .response(response), .expected(expected), .step(step), .so(so),
    .good(good), .bad(bad), .busy(busy), .done(done), .fail(fail)
  );

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  int n_step [4];
  int n_inject = 0, n_good = 0, n_bad = 0, n_done = 0, n_restart = 0;

  task automatic fail_msg(input string what);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, what);
  endtask

  // Reference pattern sequence.
  logic [W-1:0] ref_pat [TEST_LEN];
  logic [W-1:0] ref_reg [TEST_LEN];  // register state behind each pattern
  logic [W-1:0] ref_prod [TEST_LEN];

  task automatic build_reference();
    logic [H-1:0] ra, rb, an, bn, mid;
    logic         rbuf;
    int           rstep;
    ra = '1; rb = '1; rbuf = 1'b0; rstep = 1;
    for (int k = 0; k < TEST_LEN; k++) begin
      an = {ra[H-2:0], ^({rb, ra} & TAP_MASK)};
      bn = {rb[H-2:0], rbuf};
      ref_reg[k] = {rb, ra};
      case (rstep)
        2: begin
          for (int j = 0; j < H; j++) mid[j] = (rb[j] == bn[j]) ? rb[j] : rb[H-1];
          ref_pat[k] = {mid, ra};
        end
        4: begin
          for (int j = 0; j < H; j++) mid[j] = (ra[j] == an[j]) ? ra[j] : rb[H-1];
          ref_pat[k] = {rb, mid};
        end
        default: ref_pat[k] = {rb, ra};
      endcase
      ref_prod[k] = W'(int'(ref_pat[k][H-1:0]) * int'(ref_pat[k][W-1:H]));
      rstep = (rstep == 4) ? 1 : rstep + 1;
      if (rstep == 1) begin
        rbuf = ra[H-1];
        ra   = an;
      end else if (rstep == 3) begin
        rb = bn;
      end
    end
  endtask

  task automatic burn(input int addr, input logic [W-1:0] data);
    @(negedge clock);
    prog_en = 1'b1; prog_addr = AW'(addr); prog_data = data;
    @(negedge clock);
    prog_en = 1'b0;
  endtask

  // One test run; bad_at < 0 means every pattern must be good.
  task automatic run_test(input int bad_at);
    int bads;
    bads = 0;
    @(negedge clock);
    start = 1'b1;
    @(negedge clock);
    start = 1'b0;
    n_restart++;
    for (int k = 0; k < TEST_LEN; k++) begin
      #1;
      checks++;
      if (!busy || done) fail_msg($sformatf("pattern %0d: busy=%b done=%b", k, busy, done));
      checks++;
      if (pattern !== ref_pat[k]) fail_msg($sformatf("pattern %0d is %h, want %h", k, pattern, ref_pat[k]));
      checks++;
      if (response !== ref_prod[k]) fail_msg($sformatf("product %0d is %h, want %h", k, response, ref_prod[k]));
      checks++;
      if (k == bad_at) begin
        if (!(bad && !good)) fail_msg($sformatf("pattern %0d should be bad", k));
      end else begin
        if (!(good && !bad)) fail_msg($sformatf("pattern %0d should be good (exp %h)", k, expected));
      end
      n_step[int'(step)]++;
      if (pattern != ref_reg[k]) n_inject++;
      if (good) n_good++;
      if (bad)  begin n_bad++; bads++; end
      @(negedge clock);
    end
    // Latency: done exactly TEST_LEN clocks after the start edge.
    #1;
    checks++;
    if (!done || busy || good || bad) fail_msg($sformatf("after %0d patterns: done=%b busy=%b", TEST_LEN, done, busy));
    if (done) n_done++;
    checks++;
    if (fail !== (bad_at >= 0)) fail_msg($sformatf("fail=%b, want %b", fail, bad_at >= 0));
    checks++;
    if (bads != ((bad_at >= 0) ? 1 : 0)) fail_msg($sformatf("%0d bad verdicts", bads));
    // Verdict is held.
    repeat (3) @(negedge clock);
    checks++;
    if (!done || fail !== (bad_at >= 0)) fail_msg("verdict not held");
  endtask

  int bitpos;

  initial begin
    reset_n = 1'b0; start = 1'b0; prog_en = 1'b0; prog_addr = '0; prog_data = '1;
    build_reference();
    #12 reset_n = 1'b1;
    @(negedge clock);
    checks++;
    if (busy || done || fail || good || bad) fail_msg("not idle after reset");

    // 1. Program the expected products and run.
    for (int k = 0; k < TEST_LEN; k++) burn(k, ref_prod[k]);
    run_test(-1);

    // 2. Blow one more fuse in BAD_WORD.
    bitpos = 0;
    while (!ref_prod[BAD_WORD][bitpos]) bitpos++;
    burn(BAD_WORD, ~(W'(1) << bitpos));
    run_test(BAD_WORD);

    // 3. A blown fuse cannot be restored.
    burn(BAD_WORD, '1);
    run_test(BAD_WORD);

    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_step[s] == 0) fail_msg($sformatf("step %0d never happened", s + 1));
    end
    checks += 5;
    if (n_inject == 0)  fail_msg("no intermediate pattern differed from the register state");
    if (n_good == 0)    fail_msg("no good verdict");
    if (n_bad == 0)     fail_msg("no bad verdict");
    if (n_done == 0)    fail_msg("done never rose");
    if (n_restart < 2)  fail_msg("no restart");
    $display("steps %0d/%0d/%0d/%0d, intermediate %0d, good %0d, bad %0d, done %0d, runs %0d",
             n_step[0], n_step[1], n_step[2], n_step[3], n_inject, n_good, n_bad, n_done, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
