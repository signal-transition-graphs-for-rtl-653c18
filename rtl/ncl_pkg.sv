// ncl_pkg -- shared types and helpers for the dual-rail NCL cells.
//
// A logical bit travels on two wires (rails). {d1,d0} = 10 is a 1, 01 is a 0,
// and 00 is the spacer that separates two data words under the 4-phase
// (return-to-zero) protocol; 11 never occurs. The encoding and the all-zero
// spacer follow the dual-rail table of the design; the struct and the helper
// functions are this code's own packaging.
package ncl_pkg;

  typedef struct packed {
    logic d1;  // true rail
    logic d0;  // false rail
  } dr_t;


  // Dual-rail code word for a Boolean value.
  function automatic dr_t dr_encode(input logic v);
    return '{d1: v, d0: !v};
  endfunction

  // A valid data word: exactly one rail high.
  function automatic logic dr_is_data(input dr_t x);
    return x.d1 ^ x.d0;
  endfunction

  function automatic logic dr_is_spacer(input dr_t x);
    return !(x.d1 || x.d0);
  endfunction

  // The forbidden code: both rails high.
  function automatic logic dr_is_illegal(input dr_t x);
    return x.d1 && x.d0;
  endfunction

endpackage
