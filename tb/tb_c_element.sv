// tb_c_element: self-checking testbench for the two-input C element.
//
// Drives random input pairs, one input change at a time, and compares q with
// a reference of the C element table kept in the testbench: q follows the
// inputs when they agree and keeps its previous value when they differ.
// Also counts how often each row of the table (set, reset, hold at 0, hold
// at 1) was exercised and fails if one never was.
module tb_c_element;

  logic c1, c2, q;
  logic q_ref;
  int checks = 0, failures = 0;
  int n_set = 0, n_reset = 0, n_hold0 = 0, n_hold1 = 0;

  c_element dut (.c1(c1), .c2(c2), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic apply(input logic n1, input logic n2);
    c1 = n1;
    c2 = n2;
    #1;
    if (n1 == n2) begin
      if (n1) n_set++; else n_reset++;
      q_ref = n1;
    end else begin
      if (q_ref) n_hold1++; else n_hold0++;
    end
    check(q == q_ref, $sformatf("c1=%b c2=%b q=%b expected %b", n1, n2, q, q_ref));
  endtask

  initial begin
    q_ref = 1'b0;
    apply(1'b0, 1'b0);
    // directed walk through every row of the table
    apply(1'b1, 1'b0);   // hold 0
    apply(1'b1, 1'b1);   // set
    apply(1'b0, 1'b1);   // hold 1
    apply(1'b1, 1'b1);
    apply(1'b1, 1'b0);   // hold 1
    apply(1'b0, 1'b0);   // reset
    apply(1'b0, 1'b1);   // hold 0
    apply(1'b0, 1'b0);
    // random single-input changes
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(1, 0) == 0) apply(~c1, c2);
      else apply(c1, ~c2);
    end
    check(n_set > 0 && n_reset > 0 && n_hold0 > 0 && n_hold1 > 0, "a table row was never exercised");
    $display("set=%0d reset=%0d hold0=%0d hold1=%0d", n_set, n_reset, n_hold0, n_hold1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
