// qdi_full_adder: QDI dual-rail full adder in DIMOS.
//
// Two qdi_half_adder cells and one dimos_or2 term for the carry:
//   (s', c')  = HA(a, b)
//   (s,  c'') = HA(s', cin)
//   cout      = c' + c''
// 2 x (7 C, 4 OR2) + (3 C, 2 OR2) = 17 C elements and 10 OR2 gates, the
// counts reported for this benchmark. Only the function and the counts are
// known; the two-half-adder structure is this design's choice because it
// matches them exactly.
//
// Interface: dual-rail a, b, cin in; dual-rail s, cout out.
// Timing: no clock; outputs valid after all three inputs valid, NULL after
// all three NULL.
module qdi_full_adder
  import qdi_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t cin,
  output dr_t s,
  output dr_t cout
);

  dr_t s_ab, c_ab, c_sc;

  qdi_half_adder u_ha0 (.a(a),    .b(b),   .s(s_ab), .cout(c_ab));
  qdi_half_adder u_ha1 (.a(s_ab), .b(cin), .s(s),    .cout(c_sc));
  dimos_or2      u_or  (.a(c_ab), .b(c_sc), .f(cout));

endmodule
