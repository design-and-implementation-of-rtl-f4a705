// kfir_pkg: constants and width helpers shared by the Karatsuba FIR filter.
//
// The defaults follow the worked example of the Karatsuba split: 16-bit
// operands cut into two 8-bit halves. The tap count is not fixed by the
// design description; eight taps is this implementation's default.
// The width functions give the operand widths of the three sub-filters
// that the Karatsuba split produces (high halves, low halves, half sums).
package kfir_pkg;

  localparam int unsigned DATA_W_DEF = 16;  // input sample width
  localparam int unsigned COEF_W_DEF = 16;  // coefficient width
  localparam int unsigned SPLIT_DEF  = 8;   // width of the low half
  localparam int unsigned TAPS_DEF   = 8;   // filter length (own choice)
  localparam int unsigned LEVELS_DEF = 1;   // Karatsuba recursion depth in each tap multiplier

  function automatic int unsigned kmax(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Signed width of the high half of a W-bit operand split at bit L.
  function automatic int unsigned hi_w(input int unsigned w, input int unsigned l);
    return w - l;
  endfunction

  // Signed width that holds the unsigned low half (one zero sign bit added).
  function automatic int unsigned lo_w(input int unsigned l);
    return l + 1;
  endfunction

  // Signed width of high half + low half.
  function automatic int unsigned mid_w(input int unsigned w, input int unsigned l);
    return kmax(w - l, l + 1) + 1;
  endfunction

  // Accumulator width of a sub-filter: full product plus growth over TAPS terms.
  function automatic int unsigned acc_w(input int unsigned xw, input int unsigned cw,
                                        input int unsigned taps);
    return xw + cw + ((taps > 1) ? $clog2(taps) : 0);
  endfunction

endpackage
