// tb_dimos_or2: self-checking testbench for dimos_or2 (DIMOS OR term F = A + B).
//
// Every input word is applied 200 times under the 4-phase dual-rail
// protocol, each time with the inputs arriving and leaving one at a time in
// a fresh random order (see qdi_tb_common.svh for what is checked after
// every input change). Expected values come from a plain Boolean model.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_dimos_or2;
  import qdi_pkg::*;

  localparam int NI = 2;
  localparam int NO = 1;

  dr_t [NI-1:0] din;
  dr_t [NO-1:0] dout;

  dimos_or2 dut (.a(din[0]), .b(din[1]), .f(dout[0]));

  function automatic logic [NO-1:0] ref_model(logic [NI-1:0] v);
    return v[0] | v[1];
  endfunction

  `include "qdi_tb_common.svh"

  initial begin
    qdi_init();
    exhaustive(200);
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
