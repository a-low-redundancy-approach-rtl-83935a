// mult_fu: multiplier functional unit (m1..m4 of the AR filter data path).
//
// Combinational: the product is available within the control step in which
// the operands are applied, matching the one-step operations of the shared
// schedule. The result keeps the low WIDTH bits of the product (two's
// complement wrap-around); the word width and this rounding rule are this
// design's choice, the schedule only fixes that a multiplication takes one
// control step.
//
//   a, b : operands            y : a * b modulo 2**WIDTH
module mult_fu #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a * b;
endmodule
