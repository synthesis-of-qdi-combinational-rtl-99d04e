// Dual-rail NCL prime-number detector for a 4-bit number, a benchmark.
//
// f = 1 when x (0..15, x[0] least significant) is one of 2, 3, 5, 7, 11, 13.
// Minimised sum of products:
//   f = x3' x2' x1  +  x2 x1' x0  +  x3' x1 x0  +  x2' x1 x0
// Mapped onto two-input gates (eight AND2, three OR2; complements cost no
// gate, they are rail exchanges), then each gate replaced by its dual-rail
// NCL gate: 22 threshold gates. All gates are two-input with strong
// indication and every input reaches f, so f is DATA only after all four
// bits are DATA and NULL only after all are NULL. The benchmark is named by
// the published evaluation; the minimisation and mapping are this design's.
// Timing: combinational, zero delay, no clock.
module ncl_prime4
  import ncl_pkg::*;
(
  input  dr_t [3:0] x,
  output dr_t       f
);

  dr_t n3, n2, n1;                 // complemented bits
  dr_t t32, t0, t21, t1, t31, t2, t20, t3;
  dr_t s01, s23;

  assign n3 = dr_inv(x[3]);
  assign n2 = dr_inv(x[2]);
  assign n1 = dr_inv(x[1]);

  // x3' x2' x1
  ncl_dr_and2 u_t32 (.a(n3),   .b(n2),   .f(t32));
  ncl_dr_and2 u_t0  (.a(t32),  .b(x[1]), .f(t0));
  // x2 x1' x0
  ncl_dr_and2 u_t21 (.a(x[2]), .b(n1),   .f(t21));
  ncl_dr_and2 u_t1  (.a(t21),  .b(x[0]), .f(t1));
  // x3' x1 x0
  ncl_dr_and2 u_t31 (.a(n3),   .b(x[1]), .f(t31));
  ncl_dr_and2 u_t2  (.a(t31),  .b(x[0]), .f(t2));
  // x2' x1 x0
  ncl_dr_and2 u_t20 (.a(n2),   .b(x[1]), .f(t20));
  ncl_dr_and2 u_t3  (.a(t20),  .b(x[0]), .f(t3));

  ncl_dr_or2 u_s01 (.a(t0),  .b(t1),  .f(s01));
  ncl_dr_or2 u_s23 (.a(t2),  .b(t3),  .f(s23));
  ncl_dr_or2 u_f   (.a(s01), .b(s23), .f(f));

endmodule
