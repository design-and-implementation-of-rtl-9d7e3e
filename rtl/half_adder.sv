// Half adder: adds two bits a and b into sum (weight 1) and carry (weight 2).
// Combinational, no clock. Used in the 7:2 compressor as in its structure
// diagram; the gate form (XOR for sum, AND for carry) is the usual one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
