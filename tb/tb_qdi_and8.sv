// tb_qdi_and8: self-checking testbench for qdi_and8 (8-input AND).
//
// Every input word is applied 4 times under the 4-phase dual-rail
// protocol, each time with the inputs arriving and leaving one at a time in
// a fresh random order (see qdi_tb_common.svh for what is checked after
// every input change). Expected values come from a plain Boolean model.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_qdi_and8;
  import qdi_pkg::*;

  localparam int NI = 8;
  localparam int NO = 1;

  dr_t [NI-1:0] din;
  dr_t [NO-1:0] dout;

  qdi_and8 dut (.x(din), .y(dout[0]));

  function automatic logic [NO-1:0] ref_model(logic [NI-1:0] v);
    return v == 8'hFF;
  endfunction

  `include "qdi_tb_common.svh"

  initial begin
    qdi_init();
    exhaustive(4);
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
