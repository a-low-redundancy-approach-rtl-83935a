// sc_checker: self-checking equality checker that compares a primary output
// of the nominal computation with the same output of the checking
// computation.
//
// Bit i of the two words forms the two-rail pair (a[i], ~b[i]), which is a
// code word exactly when a[i] == b[i]. The WIDTH pairs are merged by a chain
// of two-rail checker cells into one pair z: z is 01 or 10 when the words are
// equal and 00 or 11 when they differ or when the checker itself is faulty.
// Combinational; in the data path its output is sampled at the end of the
// control step in which the check is scheduled (one step per check).
// Using a self-checking checker follows the design method; the two-rail
// construction is this design's choice.
//
//   a, b : words to compare    z : two-rail result (z[0] != z[1] means equal)
module sc_checker #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [1:0]       z
);
  logic [1:0] pair [WIDTH];
  logic [1:0] acc  [WIDTH];

  always_comb
    for (int unsigned i = 0; i < WIDTH; i++) pair[i] = {~b[i], a[i]};

  assign acc[0] = pair[0];

  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    trc_cell u_cell (.x(acc[i-1]), .y(pair[i]), .z(acc[i]));
  end

  assign z = acc[WIDTH-1];
endmodule
