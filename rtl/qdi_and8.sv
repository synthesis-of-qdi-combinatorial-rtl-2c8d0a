// qdi_and8: QDI 8-input AND in DIMOS.
//
// Two qdi_and4 trees joined by one dimos_and2: seven AND terms, i.e.
// 21 C elements and 14 OR2 gates, the counts reported for this benchmark.
// The tree shape is this design's choice; only the function and the counts
// are known.
//
// Interface: x[7:0] dual-rail inputs, y dual-rail output.
// Timing: no clock; three DIMOS levels from input to output.
module qdi_and8
  import qdi_pkg::*;
(
  input  dr_t [7:0] x,
  output dr_t       y
);

  dr_t lo, hi;

  qdi_and4   u_lo  (.x(x[3:0]), .y(lo));
  qdi_and4   u_hi  (.x(x[7:4]), .y(hi));
  dimos_and2 u_top (.a(lo), .b(hi), .f(y));

endmodule
