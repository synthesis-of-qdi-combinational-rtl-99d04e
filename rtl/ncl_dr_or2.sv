// Dual-rail NCL OR2 gate (THDR-OR2).
//
// f = a OR b on dual-rail operands, the dual of the AND2 gate:
//   f.r0 = a0 b0                  -> TH22(a0, b0)
//   f.r1 = a1 b1 + a1 b0 + a0 b1  -> THand0(A=a1, B=b1, C=a0, D=b0)
// Strong indication as for the AND2 gate: f is DATA only when both
// operands are DATA and NULL only when both are NULL.
// The structure is the published one; the THand0 pin order is this design's
// choice. Timing: combinational, zero delay, no clock.
module ncl_dr_or2
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t f
);

  ncl_th22 u_f (
    .a(a.r0), .b(b.r0), .z(f.r0)
  );

  ncl_thand0 u_t (
    .a(a.r1), .b(b.r1), .c(a.r0), .d(b.r0), .z(f.r1)
  );

endmodule
