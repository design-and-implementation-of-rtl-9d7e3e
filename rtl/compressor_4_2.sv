// 4:2 compressor: adds four data bits x[0..3] and one carry-in cin and
// gives the count as a 3-bit binary number {cout, c, s} (weights 4, 2, 1).
// Five input bits can sum to at most 5, so three output bits always hold the
// exact count.
//
// Interface names (X0..X3, Cin, S, C, Cout) and "four bits and one carry in,
// a 3-bit output" follow the design. The inside is this design's own,
// simplest choice: two full adders count the five bits into one weight-1 bit
// and two weight-2 bits, and a half adder adds the two weight-2 bits into
// c (weight 2) and cout (weight 4). Combinational, no clock.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       s,
  output logic       c,
  output logic       cout
);
  logic s1, k1, k2;

  full_adder u_fa0 (.a(x[0]), .b(x[1]), .cin(x[2]), .sum(s1), .carry(k1));
  full_adder u_fa1 (.a(s1),   .b(x[3]), .cin(cin),  .sum(s),  .carry(k2));
  half_adder u_ha  (.a(k1),   .b(k2),               .sum(c),  .carry(cout));
endmodule
