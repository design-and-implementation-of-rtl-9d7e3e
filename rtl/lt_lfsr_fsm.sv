// Controller of the low-transition LFSR (LT-LFSR).
//
// A two-bit step register walks STEP1 -> STEP2 -> STEP3 -> STEP4 -> STEP1
// while test_en is high and holds while it is low. sel1/sel2 are those of the
// present step. en1/en2 are the enables of the step being entered, so a half
// of the LFSR advances on the very clock edge that starts the step in which
// the algorithm enables it, and the pattern shown during that step already
// holds the advanced half:
//   step  en1en2  sel1sel2  pattern shown
//   1     10      11        T(i)   first half advanced, both halves direct
//   2     00      10        T(i)1  first half direct, second half via RI
//   3     01      11        T(i)2  second half advanced, both halves direct
//   4     00      01        T(i)3  first half via RI, second half direct
// The step table is the LT-LFSR algorithm's. The timing of the enables
// (applied on entry to a step), the hold on test_en low, and the synchronous
// restart (init, back to STEP1) are this design's choices. Reset is active
// low and asynchronous, into STEP1.
module lt_lfsr_fsm
  import lt_bist_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  init,     // synchronous restart into STEP1
  input  logic  test_en,  // advance one step per clock while high
  output logic  en1,      // first half advances on this clock edge
  output logic  en2,      // second half advances on this clock edge
  output logic  sel1,     // 1: first half direct, 0: through RI cells
  output logic  sel2,     // 1: second half direct, 0: through RI cells
  output step_t step      // present step
);
  step_t step_q, step_d;

  always_comb begin
    step_d = step_q;
    if (test_en) step_d = step_t'(step_q + 2'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    step_q <= STEP1;
    else if (init) step_q <= STEP1;
    else           step_q <= step_d;
  end

  assign {en1, en2}   = (test_en && !init) ? step_en(step_d) : 2'b00;
  assign {sel1, sel2} = step_sel(step_q);
  assign step         = step_q;
endmodule
