// tb_qdi_full_adder: self-checking testbench for qdi_full_adder (full adder, v = {cin, b, a}, result {cout, s}).
//
// Every input word is applied 100 times under the 4-phase dual-rail
// protocol, each time with the inputs arriving and leaving one at a time in
// a fresh random order (see qdi_tb_common.svh for what is checked after
// every input change). Expected values come from a plain Boolean model.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_qdi_full_adder;
  import qdi_pkg::*;

  localparam int NI = 3;
  localparam int NO = 2;

  dr_t [NI-1:0] din;
  dr_t [NO-1:0] dout;

  qdi_full_adder dut (.a(din[0]), .b(din[1]), .cin(din[2]), .s(dout[0]), .cout(dout[1]));

  function automatic logic [NO-1:0] ref_model(logic [NI-1:0] v);
    return 2'(v[0] + v[1] + v[2]);
  endfunction

  `include "qdi_tb_common.svh"

  initial begin
    qdi_init();
    exhaustive(100);
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
