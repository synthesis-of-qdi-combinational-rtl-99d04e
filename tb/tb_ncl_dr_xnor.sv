// Self-checking testbench for the dual-rail XNOR.
// (An output that depends on only some operands is checked against those.)
//
// Acts as the 4-phase environment. Each trial starts from all-NULL
// operands, raises the operands to DATA one at a time in a random order,
// then lowers them back to NULL one at a time in another random order.
// After every step the outputs are compared with a Boolean reference model
// written here independently of the circuit. The check enforces
// strong indication: every output must stay NULL until the last operand
// is DATA, and stay DATA until the last operand is NULL.
// All 2^2 operand combinations are run first, then random trials.
module tb_ncl_dr_xnor;
  import ncl_pkg::*;

  localparam int NI = 2;
  localparam int NO = 1;
  localparam int RANDOM_TRIALS = 300;

  dr_t in_v  [NI];
  dr_t out_v [NO];
  int  checks = 0;
  int  failures = 0;
  // inputs each output depends on; bit i = input i
  localparam logic [NI-1:0] CONE [NO] = '{NI'('1)};
  logic [NI-1:0] is_data = '0;
  int  early_data = 0;  // outputs that completed before the last operand
  int  early_null = 0;  // outputs that released before the last operand

  ncl_dr_xnor dut (
    .a(in_v[0]),
    .b(in_v[1]),
    .f(out_v[0])
  );

  function automatic logic [NO-1:0] ref_fn(input logic [NI-1:0] v);
    logic [NO-1:0] r;
    r[0] = ~(v[0] ^ v[1]);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic shuffle(ref int ord[NI]);
    for (int i = 0; i < NI; i++) ord[i] = i;
    for (int i = NI - 1; i > 0; i--) begin
      int j = int'($urandom_range(i, 0));
      int t = ord[i];
      ord[i] = ord[j];
      ord[j] = t;
    end
  endtask

  task automatic trial(input logic [NI-1:0] v);
    int ord[NI];
    logic [NO-1:0] exp_r = ref_fn(v);
    shuffle(ord);
    for (int k = 0; k < NI; k++) begin
      in_v[ord[k]] = dr_enc(v[ord[k]]);
      #1;
      is_data[ord[k]] = 1'b1;
      for (int o = 0; o < NO; o++) begin
        if (k == NI - 1 || (&(is_data | ~CONE[o]) && 1))
          check(out_v[o] == dr_enc(exp_r[o]), "DATA result");
        else if (1)
          check(dr_is_null(out_v[o]), "output stayed NULL before last operand of its cone");
        else begin
          check(dr_is_null(out_v[o]) || out_v[o] == dr_enc(exp_r[o]), "early output correct");
          if (!dr_is_null(out_v[o])) early_data++;
        end
      end
    end
    shuffle(ord);
    for (int k = 0; k < NI; k++) begin
      in_v[ord[k]] = DR_NULL;
      is_data[ord[k]] = 1'b0;
      #1;
      for (int o = 0; o < NO; o++) begin
        if (k == NI - 1 || (!(|(is_data & CONE[o])) && 1))
          check(dr_is_null(out_v[o]), "NULL after last operand of its cone");
        else if (1)
          check(out_v[o] == dr_enc(exp_r[o]), "output held DATA during NULL wavefront");
        else begin
          check(dr_is_null(out_v[o]) || out_v[o] == dr_enc(exp_r[o]), "output DATA or NULL during NULL wavefront");
          if (dr_is_null(out_v[o])) early_null++;
        end
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) in_v[i] = DR_NULL;
    #1;
    for (int o = 0; o < NO; o++) check(dr_is_null(out_v[o]), "initial NULL");
    for (int v = 0; v < (1 << NI); v++) trial(NI'(v));
    for (int t = 0; t < RANDOM_TRIALS; t++) trial(NI'($urandom));
    $display("early completions seen: %0d, early releases seen: %0d", early_data, early_null);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: every trial takes 2*NI time units.
  initial begin
    #(4 * NI * ((1 << NI) + RANDOM_TRIALS) + 100);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
