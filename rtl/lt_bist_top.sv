// Built-in self-test of an 8 x 8 Vedic multiplier with a low-transition
// pattern generator.
//
// Data path: the LT-LFSR (lt_lfsr, 2N bits) produces one test pattern per
// clock; its first half O_1..O_N is multiplicand a, its second half
// O_N+1..O_2N multiplier b of the circuit under test, the compressor-based
// Urdhva Tiryakbhyam multiplier (vedic_mult). A PROM holds the expected
// product of every pattern, addressed by the pattern number, and the
// comparator flags each product good or bad.
//
// Use: first program the PROM through prog_en/prog_addr/prog_data with the
// expected products of patterns 0..TEST_LEN-1 (a 0 bit blows a fuse). A
// one-clock start pulse (while not running) restarts the pattern generator
// from its seed; the next TEST_LEN clocks apply and check patterns
// 0..TEST_LEN-1, one per clock, with good or bad high in each of them; then
// done rises and stays high, and fail tells whether any pattern was bad.
// pattern, response and expected show the present pattern, product and
// stored product. step shows the LT-LFSR step and so its serial output. Asynchronous active-low reset.
//
// The blocks and their connections (pattern generator to circuit under test,
// stored responses and circuit response into a comparator with a good/bad
// verdict) follow the design, as do the names clock, start, good and bad.
// The sequencer (start, done, the sticky fail flag), the programming port
// and TEST_LEN are this design's own.
module lt_bist_top
  import lt_bist_pkg::*;
#(
  parameter int unsigned N        = 8,    // operand width of the multiplier
  parameter int unsigned TEST_LEN = 256,  // patterns per test run
  localparam int unsigned AW      = (TEST_LEN > 1) ? $clog2(TEST_LEN) : 1
) (
  input  logic           clock,
  input  logic           reset_n,
  input  logic           start,
  input  logic           prog_en,
  input  logic [AW-1:0]  prog_addr,
  input  logic [2*N-1:0] prog_data,
  output logic [2*N-1:0] pattern,
  output logic [2*N-1:0] response,
  output logic [2*N-1:0] expected,
  output step_t          step,
  output logic           so,
  output logic           good,
  output logic           bad,
  output logic           busy,
  output logic           done,
  output logic           fail
);
  bist_state_t state_q;
  logic [AW-1:0] count_q;
  logic          init, running, last;

  assign running = (state_q == BIST_RUN);
  assign init    = start && !running;
  assign last    = (count_q == AW'(TEST_LEN - 1));

  always_ff @(posedge clock or negedge reset_n) begin
    if (!reset_n) begin
      state_q <= BIST_IDLE;
      count_q <= '0;
      fail    <= 1'b0;
    end else if (init) begin
      state_q <= BIST_RUN;
      count_q <= '0;
      fail    <= 1'b0;
    end else if (running) begin
      if (bad) fail <= 1'b1;
      if (last) state_q <= BIST_DONE;
      else      count_q <= count_q + 1'b1;
    end
  end

  assign busy = running;
  assign done = (state_q == BIST_DONE);

  lt_lfsr #(.N(2 * N)) u_tpg (
    .clk    (clock),
    .rst_n  (reset_n),
    .init   (init),
    .test_en(running),
    .pattern(pattern),
    .so     (so),
    .step   (step)
  );

  vedic_mult #(.N(N)) u_cut (
    .a(pattern[N-1:0]),
    .b(pattern[2*N-1:N]),
    .p(response)
  );

  prom #(.DEPTH(TEST_LEN), .WIDTH(2 * N)) u_rom (
    .clk      (clock),
    .prog_en  (prog_en),
    .prog_addr(prog_addr),
    .prog_data(prog_data),
    .rd_addr  (count_q),
    .rd_data  (expected)
  );

  comparator #(.WIDTH(2 * N)) u_cmp (
    .resp      (response),
    .expect_val(expected),
    .valid     (running),
    .good      (good),
    .bad       (bad)
  );
endmodule
