// qdi_mux2: QDI 2:1 multiplexer, Out = a.Sel' + b.Sel, built with DIMOS.
//
// Two AND terms and one OR term (9 C elements, 6 OR2 gates):
//   term1 = a.Sel' : F11 = a1Sel0,  F10 = a0Sel0 + Sel1(a0+a1)
//   term2 = b.Sel  : F21 = b1Sel1,  F20 = b1Sel0 + b0(Sel1+Sel0)
//   Out            : Out1 = F20F11 + F21(F11+F10),  Out0 = F10F20
// The equations are the method's. Sel' is the select with its rails swapped.
//
// Interface: dual-rail a (chosen when sel=0), b (sel=1), sel; dual-rail out.
// Timing: no clock. out is valid only after a, b and sel are all valid (even
// the unselected input is waited for) and NULL only after all are NULL.
module qdi_mux2
  import qdi_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t sel,
  output dr_t out
);

  dr_t f1_term;   // {F11, F10}
  dr_t f2_term;   // {F21, F20}

  dimos_and2 u_a_nsel (.a(a),   .b(dr_not(sel)), .f(f1_term));
  dimos_and2 u_b_sel  (.a(sel), .b(b),           .f(f2_term));
  dimos_or2  u_or     (.a(f2_term), .b(f1_term), .f(out));

endmodule
