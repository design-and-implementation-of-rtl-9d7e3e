// 7:2 compressor: adds the data bits x[0..7] and the two carry-ins cin1,
// cin2 and gives the count as a 4-bit binary number {c2, c1, c0, s}
// (weights 8, 4, 2, 1). Ten input bits sum to at most 10, so the result is
// always exact. Combinational, no clock.
//
// Structure as in the design: two 4:2 compressors, one half adder and two
// full adders.
//   - compressor L adds x[0..3] + cin1, compressor R adds x[4..7] + cin2;
//     each gives a weight-1, a weight-2 and a weight-4 bit;
//   - the half adder adds the two weight-1 bits: its sum is s, its carry
//     joins the weight-2 column;
//   - the first full adder adds the two weight-2 bits and that carry: its
//     sum is c0, its carry joins the weight-4 column;
//   - the second full adder adds the two weight-4 bits and that carry: its
//     sum is c1 and its carry c2.
// The inputs are x[0..7] (eight data bits, as labelled in the design's
// symbol) even though the block is called 7:2; tie x[7] low for seven.
module compressor_7_2 (
  input  logic [7:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       s,
  output logic       c0,
  output logic       c1,
  output logic       c2
);
  logic s_l, c_l, co_l;
  logic s_r, c_r, co_r;
  logic ha_carry, fa_carry;

  compressor_4_2 u_cmp_l (.x(x[3:0]), .cin(cin1), .s(s_l), .c(c_l), .cout(co_l));
  compressor_4_2 u_cmp_r (.x(x[7:4]), .cin(cin2), .s(s_r), .c(c_r), .cout(co_r));

  half_adder u_ha  (.a(s_l),  .b(s_r),                  .sum(s),  .carry(ha_carry));
  full_adder u_fa0 (.a(c_l),  .b(c_r),  .cin(ha_carry), .sum(c0), .carry(fa_carry));
  full_adder u_fa1 (.a(co_l), .b(co_r), .cin(fa_carry), .sum(c1), .carry(c2));
endmodule
