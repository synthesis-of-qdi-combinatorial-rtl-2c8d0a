// qdi_tb_common.svh: shared 4-phase dual-rail environment for the QDI
// testbenches.
//
// The including module must declare, before the include:
//   localparam int NI, NO;              number of dual-rail inputs/outputs
//   dr_t [NI-1:0] din;                  driven here
//   dr_t [NO-1:0] dout;                 from the device under test
//   function automatic logic [NO-1:0] ref_model(logic [NI-1:0] v);
//                                       expected outputs, plain binary
//
// One handshake applies a data word one input at a time, in a random order,
// and after every single input change checks that:
//   - no output ever shows the illegal code 11;
//   - in the data phase no rail falls, in the NULL phase no rail rises
//     (outputs move monotonically, no glitch);
//   - the outputs are not all valid before the last input became valid, and
//     not all NULL before the last input became NULL (the last output
//     transition indicates the whole input word: weak indication);
//   - after the last input, every output is valid with the expected value,
//     and after the NULL phase every output is NULL.
// Outputs that change before the last input arrives are counted in n_early
// (weak indication lets some outputs switch early).
// When each_output_waits is 1 (the default, for a single circuit whose every
// output depends on every input) the stronger per-output rule is checked as
// well: no single output becomes valid before the last input is valid, and
// none returns to NULL before the last input is NULL.

int checks = 0;
int failures = 0;
int n_valid_done = 0;   // data phases completed
int n_null_done  = 0;   // NULL phases completed
int n_early      = 0;   // output changes seen before the input word was complete
bit each_output_waits = 1'b1;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures <= 20) $display("FAIL at %0t: %s", $time, what);
  end
endtask

function automatic bit outs_all_valid(dr_t [NO-1:0] o);
  for (int j = 0; j < NO; j++) if (!dr_is_valid(o[j])) return 1'b0;
  return 1'b1;
endfunction

function automatic bit outs_all_null(dr_t [NO-1:0] o);
  return o == '0;
endfunction

function automatic bit outs_illegal(dr_t [NO-1:0] o);
  for (int j = 0; j < NO; j++) if (o[j].r1 && o[j].r0) return 1'b1;
  return 1'b0;
endfunction

function automatic logic [NO-1:0] outs_value(dr_t [NO-1:0] o);
  logic [NO-1:0] v;
  for (int j = 0; j < NO; j++) v[j] = o[j].r1;
  return v;
endfunction

task automatic shuffle(ref int ord[NI]);
  for (int k = 0; k < NI; k++) ord[k] = k;
  for (int k = NI - 1; k > 0; k--) begin
    int r = int'($urandom_range(k, 0));
    int t = ord[k];
    ord[k] = ord[r];
    ord[r] = t;
  end
endtask

// Bring the device to a known state: all inputs NULL clears every C element.
task automatic qdi_init();
  din = '0;
  #1;
  check(outs_all_null(dout), "outputs not NULL after initial NULL");
endtask

task automatic handshake(input logic [NI-1:0] v);
  int ord[NI];
  logic [NO-1:0] exp;
  dr_t [NO-1:0] prev;
  exp = ref_model(v);

  // data phase
  shuffle(ord);
  prev = dout;
  for (int k = 0; k < NI; k++) begin
    din[ord[k]] = dr_enc(v[ord[k]]);
    #1;
    check(!outs_illegal(dout), "illegal 11 code on an output");
    check((prev & ~dout) == '0, "a rail fell during the data phase");
    if (k < NI - 1) begin
      check(!outs_all_valid(dout), "outputs complete before the last input was valid");
      if (each_output_waits)
        for (int j = 0; j < NO; j++)
          check(!dr_is_valid(dout[j]), $sformatf("output %0d valid before the last input", j));
      if (dout != prev) n_early++;
    end
    prev = dout;
  end
  check(outs_all_valid(dout), "outputs not all valid after the data phase");
  check(outs_value(dout) == exp,
        $sformatf("wrong result for input %b: got %b expected %b", v, outs_value(dout), exp));
  n_valid_done++;

  // NULL phase
  shuffle(ord);
  for (int k = 0; k < NI; k++) begin
    din[ord[k]] = DR_NULL;
    #1;
    check(!outs_illegal(dout), "illegal 11 code on an output (NULL phase)");
    check((dout & ~prev) == '0, "a rail rose during the NULL phase");
    if (k < NI - 1) begin
      check(!outs_all_null(dout), "outputs all NULL before the last input was NULL");
      if (each_output_waits)
        for (int j = 0; j < NO; j++)
          check(dr_is_valid(dout[j]), $sformatf("output %0d left its value before the last input", j));
      if (dout != prev) n_early++;
    end
    prev = dout;
  end
  check(outs_all_null(dout), "outputs not all NULL after the NULL phase");
  n_null_done++;
endtask

// Every input word, ROUNDS times each with fresh random arrival orders.
task automatic exhaustive(input int rounds);
  for (int r = 0; r < rounds; r++)
    for (int w = 0; w < (1 << NI); w++)
      handshake(NI'(w));
endtask

task automatic finish_tb();
  check(n_valid_done > 0 && n_null_done > 0, "no handshake completed");
  $display("handshakes: data=%0d null=%0d early output changes=%0d",
           n_valid_done, n_null_done, n_early);
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
endtask
