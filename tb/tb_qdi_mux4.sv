// tb_qdi_mux4: self-checking testbench for qdi_mux4 (4:1 multiplexer, v = {sel[1:0], d[3:0]}).
//
// Every input word is applied 10 times under the 4-phase dual-rail
// protocol, each time with the inputs arriving and leaving one at a time in
// a fresh random order (see qdi_tb_common.svh for what is checked after
// every input change). Expected values come from a plain Boolean model.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_qdi_mux4;
  import qdi_pkg::*;

  localparam int NI = 6;
  localparam int NO = 1;

  dr_t [NI-1:0] din;
  dr_t [NO-1:0] dout;

  qdi_mux4 dut (.d(din[3:0]), .sel(din[5:4]), .out(dout[0]));

  function automatic logic [NO-1:0] ref_model(logic [NI-1:0] v);
    return v[v[5:4]];
  endfunction

  `include "qdi_tb_common.svh"

  initial begin
    qdi_init();
    exhaustive(10);
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
