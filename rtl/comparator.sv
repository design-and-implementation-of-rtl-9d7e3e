// Response comparator of the BIST: compares the response of the circuit
// under test (resp) with the expected response read from the PROM (expect_val)
// and flags the pattern good or bad. Both flags are low while valid is low,
// so exactly one of good/bad is high for every checked pattern. Combinational,
// no clock. The two inputs and the good/bad verdict follow the design; the
// valid qualifier and the split into two flags are this design's choices.
module comparator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] resp,
  input  logic [WIDTH-1:0] expect_val,
  input  logic             valid,
  output logic             good,
  output logic             bad
);
  logic match;
  assign match = (resp == expect_val);
  assign good  = valid &  match;
  assign bad   = valid & ~match;
endmodule
