// add_fu: adder functional unit (a1, a2 of the nominal data path and a3,
// the unit added for the checking schedule).
//
// Combinational: the sum is available within the control step in which the
// operands are applied. The result wraps modulo 2**WIDTH; the word width is
// this design's choice.
//
//   a, b : operands            y : a + b modulo 2**WIDTH
module add_fu #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + b;
endmodule
