// vp_pkg: types and helper functions shared by the vector coprocessor.
//
// The reconfigurable FSM encodes its state as {configure bits, difference
// bits, kind}, where the two low "kind" bits tell the initial state, the two
// default states and the conventional states apart (Eq. (1) of the method:
// p = ceil(log2 n) + ceil(log2 (m-2)) + 2). The field widths depend on the
// module parameters, so only the two-bit kind is a package type; the full
// state struct is declared inside the FSM.
package vp_pkg;

  // Low two bits of an FSM state.
  typedef enum logic [1:0] {
    ST_INIT = 2'b00,  // column 1: start of a frame, nothing consumed
    ST_DEF0 = 2'b01,  // column 2 after a 0, and the default state for input 0
    ST_DEF1 = 2'b10,  // column 2 after a 1, and the default state for input 1
    ST_CONV = 2'b11   // conventional state of columns 3..m
  } state_kind_e;

  // ceil(log2(x)), but never below one bit, so that degenerate sizes
  // (n = 1, m <= 3) still give legal vector widths.
  function automatic int unsigned clog2_min1(input int unsigned x);
    int unsigned w;
    w = (x <= 1) ? 1 : $clog2(x);
    return w;
  endfunction

endpackage
