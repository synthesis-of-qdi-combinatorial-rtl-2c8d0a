// dimos_or2: DIMOS OR term, F = A + B on dual-rail signals.
//
// The true rail uses the disjoint minimised cover A1 + A0.B1, and the
// product A1, which lacks B, is completed with an OR of both rails of B:
//   F1 = C(A1, B0 + B1) + C(A0, B1)
//   F0 = C(A0, B0)
// Three C elements and two OR2 gates, as the method gives them.
//
// Interface: dual-rail inputs a, b and output f (qdi_pkg::dr_t).
// Timing: f becomes valid only after both inputs are valid and returns to
// NULL only after both are NULL.
module dimos_or2
  import qdi_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t f
);

  logic b_any;     // B0 + B1
  logic p_a1_b;    // C(A1, B0+B1)
  logic p_a0_b1;   // C(A0, B1)
  logic p_a0_b0;   // C(A0, B0)

  assign b_any = b.r0 | b.r1;

  c_element u_c_t1 (.c1(a.r1), .c2(b_any), .q(p_a1_b));
  c_element u_c_t2 (.c1(a.r0), .c2(b.r1),  .q(p_a0_b1));
  c_element u_c_f  (.c1(a.r0), .c2(b.r0),  .q(p_a0_b0));

  assign f.r1 = p_a1_b | p_a0_b1;
  assign f.r0 = p_a0_b0;

endmodule
