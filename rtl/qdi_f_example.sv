// qdi_f_example: QDI circuit for F(a,b,c) = sum of minterms (3,6,7) = ab + bc.
//
// The minimised sum of products is mapped onto DIMOS terms: one AND term per
// product and one OR term for the sum (9 C elements, 6 OR2 gates):
//   term1 = ab : F11 = a1b1,  F10 = a1b0 + a0(b0+b1)
//   term2 = bc : F21 = b1c1,  F20 = b1c0 + b0(c0+c1)
//   F          : F1 = F10F21 + F11(F20+F21),  F0 = F10F20
// These equations and the net names follow the method's worked example;
// realising them with the dimos_and2/dimos_or2 cells (operands chosen so the
// cells produce exactly these covers) is this design's way of writing them.
//
// Interface: dual-rail a, b, c in, f out. Timing: no clock; f is valid after
// a, b and c are valid, NULL after all three are NULL.
module qdi_f_example
  import qdi_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t c,
  output dr_t f
);

  dr_t f1_term;   // {F11, F10}
  dr_t f2_term;   // {F21, F20}

  // F10 = a1b0 + a0(b0+b1): the AND cell with the roles A=b, B=a.
  dimos_and2 u_ab (.a(b), .b(a), .f(f1_term));
  // F20 = b1c0 + b0(c0+c1): A=c, B=b.
  dimos_and2 u_bc (.a(c), .b(b), .f(f2_term));
  // F1 = F11(F20+F21) + F10F21, F0 = F10F20: OR cell with A=term1, B=term2.
  dimos_or2  u_or (.a(f1_term), .b(f2_term), .f(f));

endmodule
