// qdi_and4: QDI 4-input AND, y = x[0].x[1].x[2].x[3], in DIMOS.
//
// A balanced tree of three dimos_and2 terms: 9 C elements and 6 OR2 gates,
// the counts reported for this benchmark. Only the function and the counts
// are known for it; the tree shape is this design's choice (the one the
// AND2/OR2 mapping step yields and the one that matches the counts).
//
// Interface: x[3:0] dual-rail inputs, y dual-rail output.
// Timing: no clock; two DIMOS levels from input to output.
module qdi_and4
  import qdi_pkg::*;
(
  input  dr_t [3:0] x,
  output dr_t       y
);

  dr_t lo, hi;

  dimos_and2 u_lo  (.a(x[0]), .b(x[1]), .f(lo));
  dimos_and2 u_hi  (.a(x[2]), .b(x[3]), .f(hi));
  dimos_and2 u_top (.a(lo),   .b(hi),   .f(y));

endmodule
