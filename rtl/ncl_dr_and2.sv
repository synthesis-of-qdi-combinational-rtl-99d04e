// Dual-rail NCL AND2 gate (THDR-AND2).
//
// f = a AND b on dual-rail operands (see ncl_pkg for the code).
//   f.r1 = a1 b1                  -> TH22(a1, b1)
//   f.r0 = a0 b0 + a0 b1 + a1 b0  -> THand0(A=a0, B=b0, C=a1, D=b1),
//                                    whose function AB + BC + AD gives it.
// Both rail functions are canonical (every product names one rail of each
// operand), so f becomes DATA only after both operands are DATA and returns
// to NULL only after both are NULL: the gate has strong indication.
// The two-gate structure is the published one; the THand0 pin order is this
// design's choice of the one that yields the false-rail function.
// Timing: combinational, zero delay, no clock.
module ncl_dr_and2
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t f
);

  ncl_th22 u_t (
    .a(a.r1), .b(b.r1), .z(f.r1)
  );

  ncl_thand0 u_f (
    .a(a.r0), .b(b.r0), .c(a.r1), .d(b.r1), .z(f.r0)
  );

endmodule
