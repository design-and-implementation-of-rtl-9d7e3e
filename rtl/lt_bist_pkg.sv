// Shared types and constants of the low-transition BIST.
//
// step_t names the four steps of the low-transition LFSR (LT-LFSR). In each
// step the controller drives two half-enables (en1, en2) and two output
// selects (sel1, sel2); the values per step are the ones of the LT-LFSR
// algorithm and live here so that the controller and the testbenches share
// one table.
//
// lfsr_taps() gives a maximal-length feedback tap set for the Fibonacci LFSR
// used as pattern source. Bit t-1 of the mask set means flip-flop t (counted
// from 1 at the feedback input) feeds the XOR. The tap sets are the widely
// published maximal-length ones; they are this design's choice, not part of
// the LT-LFSR method itself.
package lt_bist_pkg;

  typedef enum logic [1:0] {
    STEP1 = 2'd0,  // first half advanced, both halves shown: pattern T(i)
    STEP2 = 2'd1,  // nothing advanced, second half shown through R-injection: T(i)1
    STEP3 = 2'd2,  // second half advanced, both halves shown: T(i)2
    STEP4 = 2'd3   // nothing advanced, first half shown through R-injection: T(i)3
  } step_t;

  // Test sequencer of the BIST top level.
  typedef enum logic [1:0] {
    BIST_IDLE = 2'd0,  // waiting for start
    BIST_RUN  = 2'd1,  // one pattern applied and checked per clock
    BIST_DONE = 2'd2   // all patterns checked, verdict held
  } bist_state_t;

  // {en1, en2}: which half of the LFSR advances on entering the step.
  function automatic logic [1:0] step_en(step_t s);
    unique case (s)
      STEP1:   return 2'b10;
      STEP3:   return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  // {sel1, sel2}: 1 passes the LFSR half to the outputs, 0 its R-injection cells.
  function automatic logic [1:0] step_sel(step_t s);
    unique case (s)
      STEP2:   return 2'b10;
      STEP4:   return 2'b01;
      default: return 2'b11;
    endcase
  endfunction

  function automatic logic [63:0] lfsr_taps(int unsigned n);
    unique case (n)
      4:       return 64'h0000_0000_0000_000C;  // 4,3
      6:       return 64'h0000_0000_0000_0030;  // 6,5
      8:       return 64'h0000_0000_0000_00B8;  // 8,6,5,4
      10:      return 64'h0000_0000_0000_0240;  // 10,7
      12:      return 64'h0000_0000_0000_0829;  // 12,6,4,1
      14:      return 64'h0000_0000_0000_2015;  // 14,5,3,1
      16:      return 64'h0000_0000_0000_D008;  // 16,15,13,4
      20:      return 64'h0000_0000_0009_0000;  // 20,17
      24:      return 64'h0000_0000_00E1_0000;  // 24,23,22,17
      32:      return 64'h0000_0000_8020_0003;  // 32,22,2,1
      default: return 64'h0000_0000_0000_D008;
    endcase
  endfunction

endpackage
