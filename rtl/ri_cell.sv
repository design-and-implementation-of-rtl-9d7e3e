// R-injection (RI) cell: makes one bit of an intermediate test pattern.
//
// Inputs are a pattern bit's present value t_cur (the flip-flop output) and
// its next value t_next (the flip-flop's D input), plus a random bit r. Where
// the bit keeps its value from one pattern to the next, the intermediate
// pattern repeats it; where it toggles, the random bit r is injected. The
// intermediate pattern therefore never toggles a bit that stays still between
// the two patterns it sits between, and each toggling bit flips in only one of
// the two steps. The three inputs and the name come from the LT-LFSR
// structure; the copy-or-inject rule is the usual R-injection rule and is this
// design's reading of the cell. Combinational, no clock.
module ri_cell (
  input  logic t_cur,
  input  logic t_next,
  input  logic r,
  output logic t_mid
);
  assign t_mid = (t_cur == t_next) ? t_cur : r;
endmodule
