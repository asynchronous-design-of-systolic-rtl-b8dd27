// ncl_pkg: shared types for the dual-rail threshold-logic adders.
//
// A dual-rail signal carries one bit on two wires. Exactly one asserted rail
// is DATA (r0 for logic 0, r1 for logic 1); both rails low is NULL, the spacer
// that must separate consecutive DATA words; both rails high is illegal. This
// encoding follows the standard dual-rail convention. Packing r1 above r0 in
// the struct is a choice of this implementation.
package ncl_pkg;

  typedef struct packed {
    logic r1;  // asserted for DATA1
    logic r0;  // asserted for DATA0
  } dr_t;

  localparam dr_t DR_NULL = '{r1: 1'b0, r0: 1'b0};

  // Encode a Boolean value as a DATA symbol.
  function automatic dr_t dr_data(input logic v);
    return '{r1: v, r0: ~v};
  endfunction

  function automatic logic dr_is_data(input dr_t d);
    return d.r1 ^ d.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t d);
    return ~(d.r1 | d.r0);
  endfunction

  function automatic logic dr_is_illegal(input dr_t d);
    return d.r1 & d.r0;
  endfunction

endpackage
