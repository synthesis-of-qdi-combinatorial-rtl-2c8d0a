// qdi_half_adder: QDI dual-rail half adder (7 C elements, 4 OR2 gates).
//
//   S1    = A1B0 + A0B1
//   S0    = A0B0 + A1B1
//   Cout1 = A1B1
//   Cout0 = A0(B0+B1) + A1B0
// Every product is its own C element (A1B1 is built for both S0 and Cout1,
// A1B0 for both S1 and Cout0), and A0 in Cout0 is completed with B0+B1 so
// that it waits for B. These covers and the seven C elements are the
// method's; a synthesis tool may merge the duplicate products.
//
// Interface: dual-rail a, b in; dual-rail s (sum) and cout out.
// Timing: no clock; both outputs valid after both inputs valid, NULL after
// both inputs NULL.
module qdi_half_adder
  import qdi_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t s,
  output dr_t cout
);

  logic b_any;
  logic s1_p10, s1_p01, s0_p00, s0_p11, c1_p11, c0_p0x, c0_p10;

  assign b_any = b.r0 | b.r1;

  c_element u_s1_10 (.c1(a.r1), .c2(b.r0),  .q(s1_p10));
  c_element u_s1_01 (.c1(a.r0), .c2(b.r1),  .q(s1_p01));
  c_element u_s0_00 (.c1(a.r0), .c2(b.r0),  .q(s0_p00));
  c_element u_s0_11 (.c1(a.r1), .c2(b.r1),  .q(s0_p11));
  c_element u_c1_11 (.c1(a.r1), .c2(b.r1),  .q(c1_p11));
  c_element u_c0_0x (.c1(a.r0), .c2(b_any), .q(c0_p0x));
  c_element u_c0_10 (.c1(a.r1), .c2(b.r0),  .q(c0_p10));

  assign s.r1    = s1_p10 | s1_p01;
  assign s.r0    = s0_p00 | s0_p11;
  assign cout.r1 = c1_p11;
  assign cout.r0 = c0_p0x | c0_p10;

endmodule
