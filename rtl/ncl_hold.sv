// Hold stage of an NCL threshold gate built from basic gates.
//
// A threshold gate (THmn) asserts its output once its set function is true,
// and releases it only when every input has returned to 0; in between it
// keeps its value (hysteresis). This stage turns the two combinational
// functions of a gate into that behaviour:
//   set   = F_SET,   the gate's Boolean function (sum of products)
//   reset = F_RESET, the OR of all gate inputs (0 only when all are 0)
// It is made of four basic gates, numbered as in the published netlist:
//   g4 = NOR(set, reset)   - asserted when every input is 0: clear request
//   g5 = AND(set, reset)   - asserted when the function is true: set request
//   z  = NOR(g4, g7)       - "Hold-1" gate, the output
//   g7 = NOR(g5, z)        - "Hold-0" gate, feeds back into the output gate
// g6/g7 form a cross-coupled NOR latch whose set and clear requests are
// mutually exclusive by construction, so the forbidden latch state never
// arises. With set=0 and reset=1 both requests are low and the latch keeps z.
//
// Interface: set, reset in; z out. Timing: purely combinational with a state-
// holding loop and no clock; in this zero-delay RTL z settles in the same
// time step as its inputs. The loop between z and g7 is the storage element
// of the gate, and is therefore reported by lint and synthesis tools as a
// combinational loop; it is intended. The circuit must be brought to a known
// state by driving all gate inputs to 0 (NULL), which clears the latch.
//
// The gate structure follows the published architecture; the delay
// constraint that makes it quasi-delay-insensitive (minimum delays through
// the latch exceed the maximum delay of g5 plus g7) is a property of the
// physical implementation and is not modelled here.
module ncl_hold (
  input  logic set,
  input  logic reset,
  output logic z
);

  logic g4_clr;   // NOR4: all inputs at 0
  logic g5_set;   // AND5: set function true
  logic g7_hold0; // NOR7: complement of z while the latch holds

  assign g4_clr   = ~(set | reset);
  assign g5_set   = set & reset;
  assign z        = ~(g4_clr | g7_hold0);
  assign g7_hold0 = ~(g5_set | z);

endmodule
