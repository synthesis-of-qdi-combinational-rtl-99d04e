// Dual-rail NCL circuit for F(A,B,C,D) = (A XOR B) OR (C AND D).
//
// This is the worked example of the synthesis flow: the minimised function
// is first mapped onto basic two-input gates (one XOR, one AND2, one OR2),
// each basic gate is then replaced by its dual-rail NCL counterpart:
//   x = THDR-XOR (A, B)
//   y = THDR-AND2(C, D)
//   F = THDR-OR2 (x, y)
// Six threshold gates in all (2 x THxor0, 2 x TH22, 2 x THand0). Because each
// stage has strong indication, F becomes DATA only after all four operands
// are DATA and NULL only after all four are NULL, so no completion detector
// is needed on the inputs. The mapping is the published one.
// Interface: four dual-rail operands in, one dual-rail result out.
// Timing: combinational, zero delay, no clock; 4-phase DATA/NULL operation.
module ncl_f_example
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t c,
  input  dr_t d,
  output dr_t f
);

  dr_t x_ab;  // A XOR B
  dr_t y_cd;  // C AND D

  ncl_dr_xor  u_xor (.a(a),    .b(b),    .f(x_ab));
  ncl_dr_and2 u_and (.a(c),    .b(d),    .f(y_cd));
  ncl_dr_or2  u_or  (.a(x_ab), .b(y_cd), .f(f));

endmodule
