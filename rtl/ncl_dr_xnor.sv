// Dual-rail NCL XNOR gate.
//
// f = a XNOR b. In dual-rail logic inversion costs no gate: it is the exchange
// of the two rails. This gate is therefore the dual-rail XOR gate
// (ncl_dr_xor) with its output rails exchanged, and inherits its
// structure, its indication and its timing (combinational, zero delay, no
// clock). The library lists this gate but gives no netlist for it; the
// rail-exchange construction is this design's.
module ncl_dr_xnor
  import ncl_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t f
);

  dr_t f_pos;  // non-inverted result

  ncl_dr_xor u_pos (
    .a(a), .b(b), .f(f_pos)
  );

  assign f = dr_inv(f_pos);

endmodule
