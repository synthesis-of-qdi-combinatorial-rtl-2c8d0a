// qdi_pkg: shared types for the dual-rail QDI circuits.
//
// Every logical signal travels on two wires, r1 and r0. The code is the
// usual dual-rail one used with a 4-phase (return-to-zero) handshake:
//   {r1,r0} = 00  NULL (spacer between data words)
//   {r1,r0} = 01  data 0
//   {r1,r0} = 10  data 1
//   {r1,r0} = 11  never occurs
// The struct is packed so that its value reads the same as the rail pair
// written "A1A0". Complementing a variable is free: the rails are swapped.
package qdi_pkg;

  typedef struct packed {
    logic r1;   // true rail
    logic r0;   // false rail
  } dr_t;

  localparam dr_t DR_NULL = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_0    = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_1    = '{r1: 1'b1, r0: 1'b0};

  // Logical complement of a dual-rail signal: swap the rails (no gate).
  function automatic dr_t dr_not(dr_t x);
    return '{r1: x.r0, r0: x.r1};
  endfunction

  // Encode a plain bit as valid dual-rail data.
  function automatic dr_t dr_enc(logic v);
    return v ? DR_1 : DR_0;
  endfunction

  function automatic logic dr_is_valid(dr_t x);
    return x.r1 ^ x.r0;
  endfunction

  function automatic logic dr_is_null(dr_t x);
    return x == DR_NULL;
  endfunction

endpackage
