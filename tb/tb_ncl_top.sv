// End-to-end testbench for ncl_top at its default parameters.
//
// Runs every part of the top at once. The dual-rail inputs of the gate
// library, the F example, the ALU and the three benchmark circuits form
// one set of 26 signals that
// goes through 4-phase cycles: raised to DATA one signal at a time in a
// random order, then lowered to NULL in another random order. In step with
// them, one input of the threshold-gate bank flips per step.
// After every step it checks, against reference models written here:
//   * every dual-rail output shows only NULL or its correct value;
//   * strong indication: the two-input library gates, F, both ALU outputs
//     and the benchmark outputs
//     stay NULL until the last signal of their own cone is DATA, and stay
//     DATA until the last one is NULL;
//   * every output is correct at the end of the DATA phase and NULL at the
//     end of the NULL phase;
//   * the threshold gates follow the set / clear / hold model.
// Mechanisms counted, each of which must occur: threshold-gate hold at 1
// and at 0, a strong-indication wait (output kept NULL with inputs
// partly DATA), a NULL wavefront held by hysteresis, AOI early completion,
// ALU logic and arithmetic operations, ALU carry out of 1, a prime found.
module tb_ncl_top;
  import ncl_pkg::*;

  // 0-3 dr_a..dr_d, 4-7 fx_a..fx_d, 8-13 m,s1,s0,cin,a,b,
  // 14-17 and4_in[3:0], 18-21 {mul_b, mul_a}, 22-25 prime_x[3:0]
  localparam int NI = 26;
  localparam int NO = 16;
  localparam int CYCLES = 400;

  dr_t in_v [NI];
  logic [NI-1:0] val;         // Boolean value of each input this cycle
  logic [NI-1:0] is_data;     // which inputs are DATA now

  logic [2:0] th23_in;
  logic       th23_z;
  logic [3:0] th_in;
  logic [4:0] th_z;
  dr_t  [6:0] dr_f;
  dr_t        fx_f;
  dr_t  [0:0] alu_a, alu_b, alu_res;
  dr_t        alu_cout;
  dr_t        and4_f, prime_f;
  dr_t  [3:0] mul_p;

  assign alu_a[0] = in_v[12];
  assign alu_b[0] = in_v[13];

  ncl_top dut (
    .th23_in(th23_in), .th23_z(th23_z), .th_in(th_in), .th_z(th_z),
    .dr_a(in_v[0]), .dr_b(in_v[1]), .dr_c(in_v[2]), .dr_d(in_v[3]), .dr_f(dr_f),
    .fx_a(in_v[4]), .fx_b(in_v[5]), .fx_c(in_v[6]), .fx_d(in_v[7]), .fx_f(fx_f),
    .alu_m(in_v[8]), .alu_s1(in_v[9]), .alu_s0(in_v[10]), .alu_cin(in_v[11]),
    .alu_a(alu_a), .alu_b(alu_b), .alu_res(alu_res), .alu_cout(alu_cout),
    .and4_in({in_v[17], in_v[16], in_v[15], in_v[14]}), .and4_f(and4_f),
    .mul_a({in_v[19], in_v[18]}), .mul_b({in_v[21], in_v[20]}), .mul_p(mul_p),
    .prime_x({in_v[25], in_v[24], in_v[23], in_v[22]}), .prime_f(prime_f)
  );

  int checks = 0, failures = 0;
  int n_hold1 = 0, n_hold0 = 0, n_wait = 0, n_nullhold = 0, n_early = 0;
  int n_logic = 0, n_arith = 0, n_carry = 0, n_prime = 0;

  // Dual-rail rule: no output may ever show the unused code 11, not even
  // in the middle of a wavefront.
  function automatic logic any_illegal();
    logic bad = dr_is_illegal(fx_f) | dr_is_illegal(alu_res[0]) | dr_is_illegal(alu_cout)
              | dr_is_illegal(and4_f) | dr_is_illegal(prime_f);
    for (int i = 0; i < 7; i++) bad |= dr_is_illegal(dr_f[i]);
    for (int i = 0; i < 4; i++) bad |= dr_is_illegal(mul_p[i]);
    return bad;
  endfunction

  always @(dr_f, fx_f, alu_res, alu_cout, and4_f, mul_p, prime_f) begin
    a_no_illegal_code: assert (!any_illegal()) else begin
      failures++;
      $display("FAIL illegal dual-rail code at %0t", $time);
    end
  end

  // threshold-gate reference state: {th23, th22, thand0, th24comp, th34w3, thxor0}
  logic [5:0] th_ref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [5:0] th_fn(input logic [2:0] t3, input logic [3:0] t4);
    logic a = t4[3], b = t4[2], c = t4[1], d = t4[0];
    return {t3[2] & t3[1] | t3[2] & t3[0] | t3[1] & t3[0],
            a & b,
            a & b | b & c | a & d,
            a & c | a & d | b & c | b & d,
            a | b & c & d,
            a & b | c & d};
  endfunction

  task automatic th_step();
    logic [5:0] f;
    logic [5:0] any1;
    if ($urandom_range(1, 0) == 0) th23_in[$urandom_range(2, 0)] ^= 1'b1;
    else                           th_in[$urandom_range(3, 0)] ^= 1'b1;
    f = th_fn(th23_in, th_in);
    any1 = {|th23_in, |th_in[3:2], {4{|th_in}}};  // TH22 sees only a, b
    for (int g = 0; g < 6; g++) begin
      if (f[g])            th_ref[g] = 1'b1;
      else if (!any1[g])   th_ref[g] = 1'b0;
      else if (th_ref[g])  n_hold1++;
      else                 n_hold0++;
    end
  endtask

  // expected Boolean outputs, from the values of this cycle
  function automatic logic [NO-1:0] ref_out(input logic [NI-1:0] v);
    logic x, y, c;
    logic [NO-1:0] r;
    r[15] = &v[17:14];
    r[14:11] = 4'(v[19:18] * v[21:20]);
    r[10] = v[25:22] inside {4'd2, 4'd3, 4'd5, 4'd7, 4'd11, 4'd13};
    r[9] = v[0] & v[1];
    r[8] = v[0] | v[1];
    r[7] = v[0] ^ v[1];
    r[6] = ~(v[0] ^ v[1]);
    r[5] = ~(v[0] & v[1]);
    r[4] = ~(v[0] | v[1]);
    r[3] = ~(v[0] & v[1] | v[2] & v[3]);
    r[2] = (v[4] ^ v[5]) | (v[6] & v[7]);
    x = v[12] ^ v[10];
    y = v[13] & v[9];
    c = v[11] & v[8];
    r[1] = x ^ y ^ c;
    r[0] = x & y | x & c | y & c;
    return r;
  endfunction

  // output k as a dual-rail value, same order as ref_out
  function automatic dr_t out_k(input int k);
    case (k)
      9, 8, 7, 6, 5, 4, 3: return dr_f[k - 3];
      15: return and4_f;
      14, 13, 12, 11: return mul_p[k - 11];
      10: return prime_f;
      2: return fx_f;
      1: return alu_res[0];
      default: return alu_cout;
    endcase
  endfunction

  // input cone of output k (AOI4 is excluded: it indicates weakly)
  function automatic logic [NI-1:0] cone(input int k);
    case (k)
      15: return NI'(26'h003c000);
      14, 13, 12: return NI'(26'h03c0000);
      11: return NI'(26'h0140000);                  // p0 = a0 b0
      10: return NI'(26'h3c00000);
      9, 8, 7, 6, 5, 4: return NI'(26'h0000003);
      3: return NI'(26'h000000f);
      2: return NI'(26'h00000f0);
      default: return NI'(26'h0003f00);
    endcase
  endfunction

  task automatic check_all(input logic [NO-1:0] exp_r, input bit rising);
    for (int k = 0; k < NO; k++) begin
      dr_t o = out_k(k);
      logic full = &(is_data | ~cone(k));   // whole cone DATA
      logic none = ~|(is_data & cone(k));   // whole cone NULL
      check(dr_is_null(o) || o == dr_enc(exp_r[k]), "output NULL or correct");
      if (k != 3) begin
        if (full)      check(o == dr_enc(exp_r[k]), "output DATA once cone DATA");
        else if (none) check(dr_is_null(o), "output NULL once cone NULL");
        else if (rising) begin
          check(dr_is_null(o), "strong indication: NULL until cone complete");
          n_wait++;
        end else begin
          check(o == dr_enc(exp_r[k]), "strong indication: DATA until cone NULL");
          n_nullhold++;
        end
      end else if (rising && !full && !dr_is_null(o)) n_early++;
    end
    check(th23_z == th_ref[5], "TH23");
    check(th_z == th_ref[4:0], "threshold gate bank");
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

  task automatic cycle(input logic [NI-1:0] v);
    int ord[NI];
    logic [NO-1:0] exp_r = ref_out(v);
    val = v;
    if (v[8]) n_arith++; else n_logic++;
    if (exp_r[0]) n_carry++;
    if (exp_r[10]) n_prime++;
    shuffle(ord);
    for (int k = 0; k < NI; k++) begin
      in_v[ord[k]] = dr_enc(v[ord[k]]);
      is_data[ord[k]] = 1'b1;
      th_step();
      #1;
      check_all(exp_r, 1'b1);
    end
    shuffle(ord);
    for (int k = 0; k < NI; k++) begin
      in_v[ord[k]] = DR_NULL;
      is_data[ord[k]] = 1'b0;
      th_step();
      #1;
      check_all(exp_r, 1'b0);
    end
  endtask

  initial begin
    for (int i = 0; i < NI; i++) in_v[i] = DR_NULL;
    is_data = '0;
    th23_in = '0;
    th_in = '0;
    th_ref = '0;
    #1;
    check_all('0, 1'b1);
    for (int t = 0; t < CYCLES; t++) cycle(NI'($urandom));
    $display("hold1=%0d hold0=%0d wait=%0d nullhold=%0d aoi_early=%0d logic=%0d arith=%0d carry=%0d prime=%0d",
             n_hold1, n_hold0, n_wait, n_nullhold, n_early, n_logic, n_arith, n_carry, n_prime);
    checks += 9;
    if (n_prime == 0)    failures++;
    if (n_hold1 == 0)    failures++;
    if (n_hold0 == 0)    failures++;
    if (n_wait == 0)     failures++;
    if (n_nullhold == 0) failures++;
    if (n_early == 0)    failures++;
    if (n_logic == 0)    failures++;
    if (n_arith == 0)    failures++;
    if (n_carry == 0)    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * NI * CYCLES * 2 + 100);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
