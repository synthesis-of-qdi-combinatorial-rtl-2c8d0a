// qdi_dimos_top: the DIMOS example circuits and benchmarks side by side.
//
// Eight independent quasi-delay-insensitive combinational circuits, each
// built only from two-input C elements and OR2 gates on dual-rail signals:
// the F = ab + bc example, a 2:1 multiplexer, a half adder, a 1-bit equality
// comparator, 4- and 8-input ANDs, a 4:1 multiplexer and a full adder. They
// share nothing; each has its own dual-rail ports.
//
// Protocol (all ports): 4-phase return-to-zero. The environment drives every
// input of a circuit to NULL, waits until every output is NULL, drives valid
// data, waits until every output is valid, and repeats. There is no clock
// and no reset: the first NULL phase clears every C element.
module qdi_dimos_top
  import qdi_pkg::*;
(
  // F(a,b,c) = ab + bc
  input  dr_t       f_a,
  input  dr_t       f_b,
  input  dr_t       f_c,
  output dr_t       f_out,
  // 2:1 multiplexer
  input  dr_t       mux2_a,
  input  dr_t       mux2_b,
  input  dr_t       mux2_sel,
  output dr_t       mux2_out,
  // half adder
  input  dr_t       ha_a,
  input  dr_t       ha_b,
  output dr_t       ha_s,
  output dr_t       ha_cout,
  // 1-bit equality comparator
  input  dr_t       eq_a,
  input  dr_t       eq_b,
  output dr_t       eq_out,
  // 4-input AND
  input  dr_t [3:0] and4_x,
  output dr_t       and4_y,
  // 8-input AND
  input  dr_t [7:0] and8_x,
  output dr_t       and8_y,
  // 4:1 multiplexer
  input  dr_t [3:0] mux4_d,
  input  dr_t [1:0] mux4_sel,
  output dr_t       mux4_out,
  // full adder
  input  dr_t       fa_a,
  input  dr_t       fa_b,
  input  dr_t       fa_cin,
  output dr_t       fa_s,
  output dr_t       fa_cout
);

  qdi_f_example  u_f    (.a(f_a), .b(f_b), .c(f_c), .f(f_out));
  qdi_mux2       u_mux2 (.a(mux2_a), .b(mux2_b), .sel(mux2_sel), .out(mux2_out));
  qdi_half_adder u_ha   (.a(ha_a), .b(ha_b), .s(ha_s), .cout(ha_cout));
  qdi_eq1        u_eq   (.a(eq_a), .b(eq_b), .eq(eq_out));
  qdi_and4       u_and4 (.x(and4_x), .y(and4_y));
  qdi_and8       u_and8 (.x(and8_x), .y(and8_y));
  qdi_mux4       u_mux4 (.d(mux4_d), .sel(mux4_sel), .out(mux4_out));
  qdi_full_adder u_fa   (.a(fa_a), .b(fa_b), .cin(fa_cin), .s(fa_s), .cout(fa_cout));

endmodule
