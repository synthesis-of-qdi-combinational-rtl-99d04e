// NCL threshold gate TH22, built from basic gates only.
//
// TH22: output set when both inputs are 1; behaves as a C-element.
// Function: Z = AB. Once set, z stays 1 until all 2 inputs are 0 again
// (hysteresis), which is what lets a dual-rail circuit made of these gates
// indicate the completion of both its DATA and its NULL wavefronts.
//
// Structure (the proposed basic-gate architecture): an AND-OR network forms
// F_SET, the gate function itself; an OR of all inputs forms F_RESET; the
// shared hold stage (ncl_hold: NOR/AND request gates and a cross-coupled
// NOR pair) combines them. No clock, no reset pin: drive every input to 0 to
// clear the gate. Zero-delay model; the hold stage holds a deliberate
// combinational loop (see ncl_hold). Function and structure follow the
// published gate; the input names a..d (A..D) are this design's.
module ncl_th22 (
  input  logic a,
  input  logic b,
  output logic z
);

  logic f_set;    // F_SET: gate function
  logic f_reset;  // F_RESET: some input is 1

  assign f_set   = a & b;
  assign f_reset = a | b;

  ncl_hold u_hold (
    .set  (f_set),
    .reset(f_reset),
    .z    (z)
  );

endmodule
