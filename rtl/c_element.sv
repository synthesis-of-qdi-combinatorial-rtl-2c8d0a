// c_element: two-input Muller C element, the state-holding gate of QDI logic.
//
// The output follows the inputs when they agree and holds its last value
// when they differ:  c1 c2 = 00 -> q=0, 11 -> q=1, 01/10 -> q holds.
// That truth table is the one given for the C element in the method this
// library follows; the transistor-level (semi-static, weak keeper) circuit is
// not reproduced here, only its function.
//
// Implementation: a level-sensitive latch that is transparent while
// c1 == c2 and then loads c1. The latch is deliberate and is the whole point
// of the cell: a C element stores one bit between the data and NULL phases.
// There is no reset: driving both inputs to 0 (the NULL spacer of the
// 4-phase protocol) clears it, so an environment that starts with all
// inputs NULL initialises every C element. This is a choice of this design.
//
// Timing: no clock; q changes in the same evaluation as the input that makes
// c1 and c2 agree.
module c_element (
  input  logic c1,
  input  logic c2,
  output logic q
);

  always_latch begin
    if (c1 == c2) q = c1;
  end

endmodule
