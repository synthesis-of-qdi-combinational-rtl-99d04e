// NCL threshold gate TH23, built from basic gates only.
//
// TH23: output set when at least two of the three inputs are 1 (the gate characterised in the published TH23 comparison).
// Function: Z = AB + AC + BC. Once set, z stays 1 until all 3 inputs are 0 again
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
module ncl_th23 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic z
);

  logic f_set;    // F_SET: gate function
  logic f_reset;  // F_RESET: some input is 1

  assign f_set   = a & b | a & c | b & c;
  assign f_reset = a | b | c;

  ncl_hold u_hold (
    .set  (f_set),
    .reset(f_reset),
    .z    (z)
  );

endmodule
