// tb_qdi_dimos_top: end-to-end testbench for qdi_dimos_top at its default
// (and only) configuration.
//
// All eight circuits are driven together as one dual-rail block of 31
// inputs and 10 outputs. Each handshake draws a random input word (biased so
// that the AND gates also see all-ones), then runs the 4-phase protocol with
// the inputs arriving and leaving one at a time in a random order; after
// every change the checks of qdi_tb_common.svh apply (legal codes, monotonic
// rails, no completion before the last input, correct values). The expected
// values come from plain Boolean models of each circuit.
//
// Coverage counters, each of which must be non-zero:
//   data and NULL phases completed;
//   early output changes: some outputs finishing while other inputs of the
//   top are still NULL or still valid (one circuit completing before
//   another: the weak indication seen from outside);
//   every select value of both multiplexers, a carry from both adders, an
//   equal and an unequal comparison, and a true output of F, AND4 and AND8.
module tb_qdi_dimos_top;
  import qdi_pkg::*;

  localparam int NI = 31;
  localparam int NO = 10;
  localparam int HANDSHAKES = 3000;

  dr_t [NI-1:0] din;
  dr_t [NO-1:0] dout;

  qdi_dimos_top dut (
    .f_a      (din[0]),     .f_b    (din[1]),     .f_c    (din[2]),  .f_out   (dout[0]),
    .mux2_a   (din[3]),     .mux2_b (din[4]),     .mux2_sel(din[5]), .mux2_out(dout[1]),
    .ha_a     (din[6]),     .ha_b   (din[7]),     .ha_s   (dout[2]), .ha_cout (dout[3]),
    .eq_a     (din[8]),     .eq_b   (din[9]),     .eq_out (dout[4]),
    .and4_x   (din[13:10]), .and4_y (dout[5]),
    .and8_x   (din[21:14]), .and8_y (dout[6]),
    .mux4_d   (din[25:22]), .mux4_sel(din[27:26]), .mux4_out(dout[7]),
    .fa_a     (din[28]),    .fa_b   (din[29]),    .fa_cin (din[30]),
    .fa_s     (dout[8]),    .fa_cout(dout[9])
  );

  function automatic logic [NO-1:0] ref_model(logic [NI-1:0] v);
    logic [NO-1:0] r;
    logic a, b, c;
    logic [1:0] fa;
    {c, b, a} = v[2:0];
    r[0] = (a & b) | (b & c);                 // F = sum(3,6,7) of (a,b,c)
    r[1] = v[5] ? v[4] : v[3];                // MUX2
    r[2] = v[6] ^ v[7];                       // half adder sum
    r[3] = v[6] & v[7];                       // half adder carry
    r[4] = v[8] == v[9];                      // equality
    r[5] = &v[13:10];                         // AND4
    r[6] = &v[21:14];                         // AND8
    r[7] = v[22 + int'(v[27:26])];            // MUX4
    fa   = 2'(v[28] + v[29] + v[30]);
    r[8] = fa[0];
    r[9] = fa[1];
    return r;
  endfunction

  `include "qdi_tb_common.svh"

  int cov_mux2_sel[2], cov_mux4_sel[4];
  int cov_f1 = 0, cov_ha_c = 0, cov_eq1 = 0, cov_eq0 = 0, cov_and4 = 0, cov_and8 = 0, cov_fa_c = 0;

  initial begin
    logic [NI-1:0] w;
    logic [NO-1:0] e;
    each_output_waits = 1'b0;   // outputs of different circuits complete independently
    qdi_init();
    for (int n = 0; n < HANDSHAKES; n++) begin
      w = NI'({$urandom, $urandom});
      if ($urandom_range(3, 0) == 0) w[13:10] = '1;
      if ($urandom_range(3, 0) == 0) w[21:14] = '1;
      e = ref_model(w);
      cov_mux2_sel[w[5]]++;
      cov_mux4_sel[w[27:26]]++;
      if (e[0]) cov_f1++;
      if (e[3]) cov_ha_c++;
      if (e[4]) cov_eq1++; else cov_eq0++;
      if (e[5]) cov_and4++;
      if (e[6]) cov_and8++;
      if (e[9]) cov_fa_c++;
      handshake(w);
    end
    check(n_early > 0, "no output ever completed ahead of the rest");
    check(cov_mux2_sel[0] > 0 && cov_mux2_sel[1] > 0, "MUX2 select not covered");
    check(cov_mux4_sel[0] > 0 && cov_mux4_sel[1] > 0 && cov_mux4_sel[2] > 0 && cov_mux4_sel[3] > 0,
          "MUX4 select not covered");
    check(cov_f1 > 0 && cov_ha_c > 0 && cov_eq1 > 0 && cov_eq0 > 0 && cov_and4 > 0 && cov_and8 > 0
          && cov_fa_c > 0, "an output value was never produced");
    $display("coverage: mux2 sel0/1=%0d/%0d mux4 sel=%0d/%0d/%0d/%0d F=1:%0d ha carry:%0d eq 1/0:%0d/%0d and4=1:%0d and8=1:%0d fa carry:%0d",
             cov_mux2_sel[0], cov_mux2_sel[1], cov_mux4_sel[0], cov_mux4_sel[1], cov_mux4_sel[2],
             cov_mux4_sel[3], cov_f1, cov_ha_c, cov_eq1, cov_eq0, cov_and4, cov_and8, cov_fa_c);
    finish_tb();
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
