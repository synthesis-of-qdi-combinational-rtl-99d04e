// Self-checking testbench for the multi-bit NCL ALU (ripple of one-bit cells).
//
// Runs WIDTH = 4. Each operation is a full 4-phase cycle: the operands and
// selects are raised to DATA one dual-rail signal at a time in random order,
// then lowered to NULL in random order. Checks, against a reference built
// from the operation table (M=1: A or not A, plus B if S1, plus C0; M=0:
// bitwise A, not A, A xor B, A xnor B), that
//   * the carry out, whose cone holds every input, stays NULL until the
//     last input is DATA and stays DATA until the last input is NULL;
//   * each result bit, which indicates only the inputs of its own cell and
//     the carry into it, shows only NULL or its correct value meanwhile;
//   * result and carry out are right once all inputs are DATA, and all
//     outputs are NULL once all inputs are NULL.
// Also counts operations in logic and arithmetic mode and those whose carry
// rippled across at least one cell boundary; each must occur.
module tb_ncl_alu;
  import ncl_pkg::*;

  localparam int W  = 4;
  localparam int NI = 4 + 2 * W;  // m, s1, s0, cin, a[W], b[W]
  localparam int NO = W + 1;      // res[W], cout
  localparam int OPS = 600;

  dr_t in_v [NI];
  dr_t out_v [NO];
  dr_t [W-1:0] a, b, res;
  dr_t cout;
  int checks = 0, failures = 0;
  int n_logic = 0, n_arith = 0, n_ripple = 0;

  for (genvar i = 0; i < W; i++) begin : g_map
    assign a[i] = in_v[4 + i];
    assign b[i] = in_v[4 + W + i];
    assign out_v[i] = res[i];
  end
  assign out_v[W] = cout;

  ncl_alu #(.WIDTH(W)) dut (
    .m(in_v[0]), .s1(in_v[1]), .s0(in_v[2]), .cin(in_v[3]),
    .a(a), .b(b), .res(res), .cout(cout)
  );

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

  task automatic op(input logic m, input logic s1, input logic s0, input logic c0,
                    input logic [W-1:0] av, input logic [W-1:0] bv);
    logic [NI-1:0] v;
    logic [W-1:0]  x, y, exp_res;
    logic          exp_c;
    logic [W:0]    sum;
    int ord[NI];
    v = {bv, av, c0, s0, s1, m};
    x = s0 ? ~av : av;
    y = s1 ? bv : '0;
    if (m) begin
      sum = {1'b0, x} + {1'b0, y} + (W+1)'(c0);
      exp_res = sum[W-1:0];
      exp_c = sum[W];
      n_arith++;
      if (((x ^ y ^ sum[W-1:0]) & ~W'(1)) != '0) n_ripple++;  // carry into a cell above bit 0
    end else begin
      exp_res = x ^ y;
      exp_c = 1'b0;
      for (int i = 0; i < W; i++) exp_c = x[i] & y[i];  // top cell: carry in is 0
      n_logic++;
    end
    shuffle(ord);
    for (int k = 0; k < NI; k++) begin
      in_v[ord[k]] = dr_enc(v[ord[k]]);
      #1;
      if (k < NI - 1) begin
        check(dr_is_null(cout), "carry out NULL before last input");
        for (int i = 0; i < W; i++)
          check(dr_is_null(res[i]) || res[i] == dr_enc(exp_res[i]), "result bit NULL or right");
      end
    end
    for (int i = 0; i < W; i++) check(res[i] == dr_enc(exp_res[i]), "result bit");
    check(cout == dr_enc(exp_c), "carry out");
    shuffle(ord);
    for (int k = 0; k < NI; k++) begin
      in_v[ord[k]] = DR_NULL;
      #1;
      if (k < NI - 1) begin
        check(cout == dr_enc(exp_c), "carry out held DATA in NULL wavefront");
        for (int i = 0; i < W; i++)
          check(dr_is_null(res[i]) || res[i] == dr_enc(exp_res[i]), "result bit DATA or NULL");
      end else
        for (int o = 0; o < NO; o++) check(dr_is_null(out_v[o]), "output NULL after last input");
    end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) in_v[i] = DR_NULL;
    #1;
    // every select combination with a carry-propagating operand pair
    for (int s = 0; s < 16; s++) op(s[0], s[1], s[2], s[3], 4'b1111, 4'b0001);
    for (int t = 0; t < OPS; t++)
      op(1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), W'($urandom), W'($urandom));
    $display("logic ops=%0d arithmetic ops=%0d rippled=%0d", n_logic, n_arith, n_ripple);
    checks += 3;
    if (n_logic == 0)  failures++;
    if (n_arith == 0)  failures++;
    if (n_ripple == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(4 * NI * (OPS + 16) + 100);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
