// Full adder: adds three bits a, b and cin into sum (weight 1) and carry
// (weight 2). Combinational, no clock. The building block of the 4:2 and
// 7:2 compressors; sum is the three-input XOR and carry the majority.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b ^ cin;
  assign carry = (a & b) | (a & cin) | (b & cin);
endmodule
