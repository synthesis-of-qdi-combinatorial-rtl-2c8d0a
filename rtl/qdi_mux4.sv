// qdi_mux4: QDI 4:1 multiplexer in DIMOS.
//
//   out = d0.s1'.s0' + d1.s1'.s0 + d2.s1.s0' + d3.s1.s0
// Each three-literal product is two dimos_and2 terms (data with s0 literal,
// then with s1 literal) and the four products are summed by a tree of three
// dimos_or2 terms: 8 AND + 3 OR terms = 33 C elements and 22 OR2 gates, the
// counts reported for this benchmark. This flat sum-of-products structure is
// this design's choice, made because it matches those counts; a cascade of
// three 2:1 multiplexers would have 27 C elements. Complemented select
// literals are rail swaps.
//
// Interface: d[3:0] dual-rail data, sel[1:0] dual-rail select (d[i] is chosen
// when sel == i), out dual-rail.
// Timing: no clock; out valid once every input (all data and both select
// bits) is valid, NULL once every input is NULL.
module qdi_mux4
  import qdi_pkg::*;
(
  input  dr_t [3:0] d,
  input  dr_t [1:0] sel,
  output dr_t       out
);

  dr_t [3:0] p0;    // d[i] . (s0 literal of i)
  dr_t [3:0] prod;  // d[i] . (s0 literal) . (s1 literal)
  dr_t       sum_lo, sum_hi;

  for (genvar i = 0; i < 4; i++) begin : g_prod
    localparam bit S0 = i[0];
    localparam bit S1 = i[1];
    dimos_and2 u_s0 (.a(d[i]), .b(S0 ? sel[0] : dr_not(sel[0])), .f(p0[i]));
    dimos_and2 u_s1 (.a(p0[i]), .b(S1 ? sel[1] : dr_not(sel[1])), .f(prod[i]));
  end

  dimos_or2 u_or_lo  (.a(prod[0]), .b(prod[1]), .f(sum_lo));
  dimos_or2 u_or_hi  (.a(prod[2]), .b(prod[3]), .f(sum_hi));
  dimos_or2 u_or_top (.a(sum_lo),  .b(sum_hi),  .f(out));

endmodule
