// Dual-rail NCL XOR gate (THDR-XOR).
//
// f = a XOR b on dual-rail operands, with one THxor0 gate per rail:
//   f.r0 = a0 b0 + a1 b1   -> THxor0(a0, b0, a1, b1)
//   f.r1 = a0 b1 + a1 b0   -> THxor0(a0, b1, a1, b0)
// Every product names one rail of each operand, so the gate has strong
// indication. Structure as published; pin order chosen to give these sums.
// Timing: combinational, zero delay, no clock.
module ncl_dr_xor
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t f
);

  ncl_thxor0 u_f (
    .a(a.r0), .b(b.r0), .c(a.r1), .d(b.r1), .z(f.r0)
  );

  ncl_thxor0 u_t (
    .a(a.r0), .b(b.r1), .c(a.r1), .d(b.r0), .z(f.r1)
  );

endmodule
