// Top level of the basic-gate NCL library and its example circuits.
//
// The parts stand side by side, each with its own ports; there is no clock
// and no shared state:
//   * TH23 gate on its own (th23_in -> th23_z), the gate used to compare
//     threshold-gate architectures;
//   * one each of the other threshold gates on shared inputs th_in = {a,b,c,d}:
//     th_z = {TH22(a,b), THand0, TH24comp, TH34w3, THxor0};
//   * the dual-rail gate library on operands dr_a..dr_d:
//     dr_f = {AND2, OR2, XOR, XNOR, NAND2, NOR2, AOI4}, first listed in the
//     most significant position, AND2/OR2/XOR/XNOR/NAND2/NOR2 of (a,b) and
//     AOI4 = NOT(ab + cd);
//   * the example F = (A XOR B) OR (C AND D) on fx_a..fx_d -> fx_f;
//   * the ALU_WIDTH-bit ALU (one-bit cells with ripple carry);
//   * three benchmark circuits made with the same flow: a four-input AND
//     (and4_in -> and4_f), a 2 x 2 bit multiplier (mul_a * mul_b -> mul_p)
//     and a 4-bit prime-number detector (prime_x -> prime_f).
// All dual-rail ports use ncl_pkg::dr_t ({r1, r0}: 00 NULL, 01 0, 10 1). The
// environment drives inputs in 4-phase fashion: a DATA wavefront, wait until
// every output is DATA, then a NULL wavefront, wait until every output is NULL.
// Completion detection on the outputs belongs to that environment.
// Timing: combinational with state-holding loops inside every threshold gate.
module ncl_top
  import ncl_pkg::*;
#(
  parameter int unsigned ALU_WIDTH = 1
) (
  input  logic [2:0]          th23_in,
  output logic                th23_z,
  input  logic [3:0]          th_in,
  output logic [4:0]          th_z,
  input  dr_t                 dr_a,
  input  dr_t                 dr_b,
  input  dr_t                 dr_c,
  input  dr_t                 dr_d,
  output dr_t  [6:0]          dr_f,
  input  dr_t                 fx_a,
  input  dr_t                 fx_b,
  input  dr_t                 fx_c,
  input  dr_t                 fx_d,
  output dr_t                 fx_f,
  input  dr_t                 alu_m,
  input  dr_t                 alu_s1,
  input  dr_t                 alu_s0,
  input  dr_t                 alu_cin,
  input  dr_t [ALU_WIDTH-1:0] alu_a,
  input  dr_t [ALU_WIDTH-1:0] alu_b,
  output dr_t [ALU_WIDTH-1:0] alu_res,
  output dr_t                 alu_cout,
  input  dr_t  [3:0]          and4_in,
  output dr_t                 and4_f,
  input  dr_t  [1:0]          mul_a,
  input  dr_t  [1:0]          mul_b,
  output dr_t  [3:0]          mul_p,
  input  dr_t  [3:0]          prime_x,
  output dr_t                 prime_f
);

  // Threshold gates
  ncl_th23 u_th23 (.a(th23_in[2]), .b(th23_in[1]), .c(th23_in[0]), .z(th23_z));

  ncl_th22     u_th22     (.a(th_in[3]), .b(th_in[2]),                           .z(th_z[4]));
  ncl_thand0   u_thand0   (.a(th_in[3]), .b(th_in[2]), .c(th_in[1]), .d(th_in[0]), .z(th_z[3]));
  ncl_th24comp u_th24comp (.a(th_in[3]), .b(th_in[2]), .c(th_in[1]), .d(th_in[0]), .z(th_z[2]));
  ncl_th34w3   u_th34w3   (.a(th_in[3]), .b(th_in[2]), .c(th_in[1]), .d(th_in[0]), .z(th_z[1]));
  ncl_thxor0   u_thxor0   (.a(th_in[3]), .b(th_in[2]), .c(th_in[1]), .d(th_in[0]), .z(th_z[0]));

  // Dual-rail gate library
  ncl_dr_and2 u_and2 (.a(dr_a), .b(dr_b), .f(dr_f[6]));
  ncl_dr_or2  u_or2  (.a(dr_a), .b(dr_b), .f(dr_f[5]));
  ncl_dr_xor  u_xor  (.a(dr_a), .b(dr_b), .f(dr_f[4]));
  ncl_dr_xnor u_xnor (.a(dr_a), .b(dr_b), .f(dr_f[3]));
  ncl_dr_nand2 u_nand2 (.a(dr_a), .b(dr_b), .f(dr_f[2]));
  ncl_dr_nor2 u_nor2 (.a(dr_a), .b(dr_b), .f(dr_f[1]));
  ncl_dr_aoi4 u_aoi4 (.a(dr_a), .b(dr_b), .c(dr_c), .d(dr_d), .f(dr_f[0]));

  // Example function
  ncl_f_example u_fx (.a(fx_a), .b(fx_b), .c(fx_c), .d(fx_d), .f(fx_f));

  // ALU
  ncl_alu #(.WIDTH(ALU_WIDTH)) u_alu (
    .m   (alu_m),
    .s1  (alu_s1),
    .s0  (alu_s0),
    .cin (alu_cin),
    .a   (alu_a),
    .b   (alu_b),
    .res (alu_res),
    .cout(alu_cout)
  );

  // Benchmark circuits
  ncl_and4 u_and4 (.a(and4_in[3]), .b(and4_in[2]), .c(and4_in[1]), .d(and4_in[0]), .f(and4_f));
  ncl_mult2  u_mult2  (.a(mul_a), .b(mul_b), .p(mul_p));
  ncl_prime4 u_prime4 (.x(prime_x), .f(prime_f));

endmodule
