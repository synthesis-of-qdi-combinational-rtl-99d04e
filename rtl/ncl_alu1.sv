// One-bit dual-rail NCL ALU cell, modelled on one slice of the 74181.
//
// Select inputs: M (1 = arithmetic, 0 = logic) and S1 S0; carry input C0.
//   S1S0   M=1, C0=0     M=1, C0=1        M=0
//   00     A             A plus 1         A
//   01     not A         not A plus 1     not A
//   10     A plus B      A plus B plus 1  A xor B
//   11     not A plus B  ... plus 1       A xnor B
// The cell is a full adder on modified operands:
//   F1 = S1 AND B      (operand Y: B or 0)
//   F2 = S0 XOR A      (operand X: A or not A)
//   F3 = C0 AND M      (carry, forced to 0 in logic mode)
//   F4 = F2 XOR F3,  F5 = F2 AND F3,  F6 = F1 AND F4
//   cout = F5 OR F6    (X c + Y (X xor c))
//   res  = F4 XOR F1   (X xor Y xor c)
// Each of the eight basic gates is its dual-rail NCL counterpart (3 x XOR,
// 4 x AND2, 1 x OR2: 16 threshold gates). Signal names follow the published
// cell. In logic mode cout carries X AND Y, which has no meaning there.
// Interface: six dual-rail inputs, dual-rail res and cout.
// Timing: combinational, zero delay, no clock; both outputs are DATA only
// once all six inputs are DATA, and NULL only once all six are NULL.
module ncl_alu1
  import ncl_pkg::*;
(
  input  dr_t m,
  input  dr_t s1,
  input  dr_t s0,
  input  dr_t a,
  input  dr_t b,
  input  dr_t cin,
  output dr_t res,
  output dr_t cout
);

  dr_t f1, f2, f3, f4, f5, f6;

  ncl_dr_and2 u_f1 (.a(s1), .b(b),   .f(f1));
  ncl_dr_xor  u_f2 (.a(s0), .b(a),   .f(f2));
  ncl_dr_and2 u_f3 (.a(cin), .b(m),  .f(f3));
  ncl_dr_xor  u_f4 (.a(f2), .b(f3),  .f(f4));
  ncl_dr_and2 u_f5 (.a(f2), .b(f3),  .f(f5));
  ncl_dr_and2 u_f6 (.a(f1), .b(f4),  .f(f6));
  ncl_dr_or2  u_cy (.a(f5), .b(f6),  .f(cout));
  ncl_dr_xor  u_rs (.a(f4), .b(f1),  .f(res));

endmodule
