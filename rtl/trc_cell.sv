// trc_cell: two-rail checker cell, the building block of the self-checking
// comparator.
//
// Each input pair is a two-rail code word when its two bits differ. The
// output pair differs exactly when both input pairs do, so a non-code input
// propagates to a non-code output, and every internal stuck-at fault turns a
// code output into a non-code one for some code input (the cell is totally
// self-checking).
//
//   x, y : two-rail inputs     z : two-rail output
//   z[0] = x[0]&y[0] | x[1]&y[1],  z[1] = x[0]&y[1] | x[1]&y[0]
module trc_cell (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [1:0] z
);
  always_comb begin
    z[0] = (x[0] & y[0]) | (x[1] & y[1]);
    z[1] = (x[0] & y[1]) | (x[1] & y[0]);
  end
endmodule
