// Dual-rail NCL AND-OR-INVERT gate (THDR-AOI4).
//
// f = NOT(a b + c d) on four dual-rail operands:
//   f.r0 = a1 b1 + c1 d1                      -> THxor0(a1, b1, c1, d1)
//   f.r1 = a0 c0 + a0 d0 + b0 c0 + b0 d0      -> TH24comp(a0, b0, c0, d0)
// The rail assignment is the published one. Note that, unlike the two-input
// gates, these rail functions are not canonical: f can become DATA before all
// four operands are DATA (for example a=b=1 sets f.r0 alone), so this gate
// indicates only the operands that decide the result.
// Timing: combinational, zero delay, no clock.
module ncl_dr_aoi4
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t c,
  input  dr_t d,
  output dr_t f
);

  ncl_thxor0 u_f (
    .a(a.r1), .b(b.r1), .c(c.r1), .d(d.r1), .z(f.r0)
  );

  ncl_th24comp u_t (
    .a(a.r0), .b(b.r0), .c(c.r0), .d(d.r0), .z(f.r1)
  );

endmodule
