// Dual-rail NCL 2 x 2 bit unsigned multiplier, a benchmark circuit.
//
// p = a * b with a = {a[1], a[0]}, b = {b[1], b[0]}, p 4 bits. Mapped onto
// two-input gates as a textbook array multiplier (partial products by AND,
// one half adder per column), then each gate replaced by its dual-rail NCL
// gate: six AND2 and two XOR (16 threshold gates).
//   p0 = a0 b0
//   p1 = a1 b0 XOR a0 b1,            c1 = a1 b0 AND a0 b1
//   p2 = a1 b1 XOR c1,               p3 = a1 b1 AND c1
// Every gate has strong indication. p0 indicates only a0, b0, while p3
// depends on all four input bits, so p3 DATA (and p3 NULL) marks the
// completion of the whole product. The benchmark is named by the published
// evaluation; the gate mapping is this design's.
// Timing: combinational, zero delay, no clock.
module ncl_mult2
  import ncl_pkg::*;
(
  input  dr_t [1:0] a,
  input  dr_t [1:0] b,
  output dr_t [3:0] p
);

  dr_t pp10, pp01, pp11, c1;

  ncl_dr_and2 u_pp00 (.a(a[0]), .b(b[0]), .f(p[0]));
  ncl_dr_and2 u_pp10 (.a(a[1]), .b(b[0]), .f(pp10));
  ncl_dr_and2 u_pp01 (.a(a[0]), .b(b[1]), .f(pp01));
  ncl_dr_and2 u_pp11 (.a(a[1]), .b(b[1]), .f(pp11));
  ncl_dr_xor  u_p1   (.a(pp10), .b(pp01), .f(p[1]));
  ncl_dr_and2 u_c1   (.a(pp10), .b(pp01), .f(c1));
  ncl_dr_xor  u_p2   (.a(pp11), .b(c1),   .f(p[2]));
  ncl_dr_and2 u_p3   (.a(pp11), .b(c1),   .f(p[3]));

endmodule
