// qdi_eq1: QDI 1-bit equality comparator (4 C elements, 2 OR2 gates).
//
//   Eq1 = A1B1 + A0B0
//   Eq0 = A1B0 + A0B1
// The canonical cover is already minimal, so DIMOS and DIMS coincide here.
//
// Interface: dual-rail a, b in; dual-rail eq (1 when a == b) out.
// Timing: no clock; eq valid after both inputs valid, NULL after both NULL.
module qdi_eq1
  import qdi_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t eq
);

  logic p11, p00, p10, p01;

  c_element u_11 (.c1(a.r1), .c2(b.r1), .q(p11));
  c_element u_00 (.c1(a.r0), .c2(b.r0), .q(p00));
  c_element u_10 (.c1(a.r1), .c2(b.r0), .q(p10));
  c_element u_01 (.c1(a.r0), .c2(b.r1), .q(p01));

  assign eq.r1 = p11 | p00;
  assign eq.r0 = p10 | p01;

endmodule
