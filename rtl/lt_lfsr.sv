// Low-transition LFSR (LT-LFSR): a test pattern generator that places three
// intermediate patterns between two consecutive LFSR patterns so that the
// circuit under test sees far fewer bit toggles per clock.
//
// How it works. An N-bit Fibonacci LFSR (flip-flop 1 takes the XOR of the
// tapped flip-flops, every other flip-flop k takes flip-flop k-1) is cut into
// two halves, flip-flops 1..N/2 and N/2+1..N, each with its own enable (a
// "bipartite" LFSR). A buffer flip-flop between the halves keeps the bit the
// first half shifts out until the second half, advanced two steps later,
// takes it in; so after both halves have advanced the register holds exactly
// the next state of the plain LFSR. Every flip-flop also feeds an R-injection
// cell that sees its present value, its next value (its D input) and a random
// bit R, here the LFSR's serial output (flip-flop N). Per half, a multiplexer
// passes to the outputs either the flip-flops (sel = 1) or the RI cells
// (sel = 0). The controller (lt_lfsr_fsm) runs the four steps
//   T(i)  : first half advanced, both halves shown;
//   T(i)1 : second half shown through its RI cells;
//   T(i)2 : second half advanced, both halves shown;
//   T(i)3 : first half shown through its RI cells;
// then T(i+1) again advances the first half. Between any two consecutive
// patterns only one half can change, and a bit that toggles between T(i) and
// T(i+1) does so in at most two of the four transitions, once into the random
// bit and once out of it.
//
// Interface: pattern[k-1] is output O_k (O_1..O_N/2 from the first half).
// One pattern per clock while test_en is high; pattern is combinational from
// the registers and valid during the step it belongs to. init reloads SEED
// (the buffer flip-flop clears) and restarts at step 1 on the next edge.
// so is the serial output (flip-flop N). Asynchronous active-low reset.
//
// From the LT-LFSR method: the split into halves with en1/en2, the buffer
// flip-flop, RI cells fed by each flip-flop's present and next value and R,
// the 0/1 output multiplexers and the four-step table. This design's own
// choices: N = 16 (two 8-bit operands of the multiplier under test), the tap
// set, SEED, R taken from the serial output, and init.
module lt_lfsr
  import lt_bist_pkg::*;
#(
  parameter int unsigned    N    = 16,
  parameter logic [N-1:0]   SEED = '1,
  parameter logic [N-1:0]   TAPS = N'(lfsr_taps(N))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         test_en,
  output logic [N-1:0] pattern,
  output logic         so,
  output step_t        step
);
  localparam int unsigned H = N / 2;

  logic en1, en2, sel1, sel2;

  lt_lfsr_fsm u_fsm (
    .clk    (clk),
    .rst_n  (rst_n),
    .init   (init),
    .test_en(test_en),
    .en1    (en1),
    .en2    (en2),
    .sel1   (sel1),
    .sel2   (sel2),
    .step   (step)
  );

  // Halves: a_q[j] is flip-flop j+1, b_q[j] is flip-flop H+j+1.
  logic [H-1:0] a_q, b_q, a_next, b_next, a_mid, b_mid;
  logic         buf_q;  // bit shifted out of the first half, waiting for the second
  logic         fb, r;

  assign fb     = ^({b_q, a_q} & TAPS);
  assign a_next = {a_q[H-2:0], fb};
  assign b_next = {b_q[H-2:0], buf_q};
  assign r      = b_q[H-1];
  assign so     = b_q[H-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q   <= SEED[H-1:0];
      b_q   <= SEED[N-1:H];
      buf_q <= 1'b0;
    end else if (init) begin
      a_q   <= SEED[H-1:0];
      b_q   <= SEED[N-1:H];
      buf_q <= 1'b0;
    end else begin
      if (en1) begin
        a_q   <= a_next;
        buf_q <= a_q[H-1];
      end
      if (en2) b_q <= b_next;
    end
  end

  for (genvar j = 0; j < H; j++) begin : g_ri
    ri_cell u_ri_a (.t_cur(a_q[j]), .t_next(a_next[j]), .r(r), .t_mid(a_mid[j]));
    ri_cell u_ri_b (.t_cur(b_q[j]), .t_next(b_next[j]), .r(r), .t_mid(b_mid[j]));
  end

  assign pattern = {sel2 ? b_q : b_mid, sel1 ? a_q : a_mid};

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $fatal(1, "lt_lfsr: N must be even and at least 4");
  end
  // The two halves never advance on the same edge.
  always_comb assert (!(en1 && en2)) else $error("lt_lfsr: both halves enabled");
endmodule
