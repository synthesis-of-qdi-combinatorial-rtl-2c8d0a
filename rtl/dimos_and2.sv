// dimos_and2: DIMOS (optimised delay-insensitive minterm synthesis) AND term,
// F = A.B on dual-rail signals.
//
// Instead of one C element per minterm (four for a DIMS AND), the false rail
// uses a disjoint minimised cover, and the variable missing from a product is
// brought back through an OR of both its rails, so that every product still
// waits for both inputs:
//   F1 = C(A1, B1)
//   F0 = C(B0, A0 + A1) + C(A0, B1)
// Three C elements and two OR2 gates. Both equations are the method's own.
//
// Interface: dual-rail inputs a, b and output f (qdi_pkg::dr_t).
// Timing: f becomes valid only after both a and b are valid, and returns to
// NULL only after both are NULL (the firing C element holds until then).
module dimos_and2
  import qdi_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t f
);

  logic a_any;     // A0 + A1: "A has arrived", whatever its value
  logic p_b0_a;    // C(B0, A0+A1)
  logic p_a0_b1;   // C(A0, B1)
  logic p_a1_b1;   // C(A1, B1)

  assign a_any = a.r0 | a.r1;

  c_element u_c_t  (.c1(a.r1), .c2(b.r1),  .q(p_a1_b1));
  c_element u_c_f1 (.c1(b.r0), .c2(a_any), .q(p_b0_a));
  c_element u_c_f2 (.c1(a.r0), .c2(b.r1),  .q(p_a0_b1));

  assign f.r1 = p_a1_b1;
  assign f.r0 = p_b0_a | p_a0_b1;

endmodule
