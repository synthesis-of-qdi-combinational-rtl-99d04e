// Shared types for the dual-rail NULL Convention Logic (NCL) library.
//
// Every logical signal travels on two wires. The packed struct dr_t holds
// them as {r1, r0}, so the 2-bit value reads like the usual code table:
//   2'b00  NULL   (spacer, no data)
//   2'b01  DATA0  (logical 0)
//   2'b10  DATA1  (logical 1)
//   2'b11  never produced by a correct circuit
// A 4-phase cycle alternates a DATA wavefront with a NULL wavefront. The
// helper functions are for testbenches and assertions; the gates themselves
// only ever use the two rails as plain wires.
package ncl_pkg;

  typedef struct packed {
    logic r1;  // rail asserted for logical 1
    logic r0;  // rail asserted for logical 0
  } dr_t;

  localparam dr_t DR_NULL  = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0 = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1 = '{r1: 1'b1, r0: 1'b0};

  // Encode a Boolean value as a DATA code word.
  function automatic dr_t dr_enc(input logic v);
    return v ? DR_DATA1 : DR_DATA0;
  endfunction

  function automatic logic dr_is_null(input dr_t x);
    return x == DR_NULL;
  endfunction

  function automatic logic dr_is_data(input dr_t x);
    return x.r1 ^ x.r0;
  endfunction

  function automatic logic dr_is_illegal(input dr_t x);
    return x.r1 & x.r0;
  endfunction

  // Exchange the rails: the dual-rail inverter.
  function automatic dr_t dr_inv(input dr_t x);
    return '{r1: x.r0, r0: x.r1};
  endfunction

endpackage
