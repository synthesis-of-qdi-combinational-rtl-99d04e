// WIDTH-bit dual-rail NCL ALU built from one-bit cells by carry propagation.
//
// Cell i takes bit i of A and B and the shared selects M, S1, S0; its carry
// output feeds the carry input of cell i+1 (ripple). Cell 0 takes C0. Since
// every cell ANDs its carry input with M, the carry chain is cut in logic
// mode without any further gating. The default width is the one-bit cell of
// the published case study; the ripple extension to WIDTH bits is the
// generalisation the case study points to, with its wiring chosen here.
// Interface: dual-rail vectors a, b, res (index 0 = least significant bit),
// dual-rail m, s1, s0, cin, cout.
// Timing: combinational, zero delay; in the DATA phase the result completes
// after the carry has rippled through all cells, and every output returns to
// NULL only after all inputs are NULL.
module ncl_alu
  import ncl_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  dr_t             m,
  input  dr_t             s1,
  input  dr_t             s0,
  input  dr_t             cin,
  input  dr_t [WIDTH-1:0] a,
  input  dr_t [WIDTH-1:0] b,
  output dr_t [WIDTH-1:0] res,
  output dr_t             cout
);

  dr_t [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    ncl_alu1 u_cell (
      .m   (m),
      .s1  (s1),
      .s0  (s0),
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .res (res[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
