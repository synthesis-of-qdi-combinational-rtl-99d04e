// Dual-rail NCL four-input AND, one of the benchmark circuits of the flow.
//
// f = a AND b AND c AND d, obtained by the synthesis flow: the function is
// mapped onto two-input AND gates as a balanced tree, and each of them
// becomes a dual-rail NCL AND2 (three gates, six threshold gates). Every
// AND2 has strong indication, so the tree does as well: f turns DATA only
// after all four operands are DATA, and NULL only after all are NULL.
// The benchmark is named by the published evaluation; the tree mapping is
// this design's. Timing: combinational, zero delay, no clock.
module ncl_and4
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  input  dr_t c,
  input  dr_t d,
  output dr_t f
);

  dr_t ab, cd;

  ncl_dr_and2 u_ab  (.a(a),  .b(b),  .f(ab));
  ncl_dr_and2 u_cd  (.a(c),  .b(d),  .f(cd));
  ncl_dr_and2 u_out (.a(ab), .b(cd), .f(f));

endmodule
