// Shared constants and helpers for the low-latency linear-computation processors.
//
// The four processors realise a single-input single-output linear time-invariant
// filter (zero initial state) in one of four transformed state-space structures.
// All of them use the same fixed-point number format and the same timing model:
// an addition takes one control step (one clock cycle) and a multiplication takes
// M control steps. The defaults below are this design's choices except where a
// comment says otherwise.
package lin_pkg;

  // Data/state word length W. The document names W but gives no value.
  localparam int unsigned DEF_W  = 16;
  // Coefficient word length and number of fraction bits (coefficients are
  // signed fixed point, value = integer / 2**DEF_CF). Not given in the document.
  localparam int unsigned DEF_CW = 16;
  localparam int unsigned DEF_CF = 12;
  // Filter order N. The largest benchmark of the document has 12 states.
  localparam int unsigned DEF_N  = 12;
  // Control steps per multiplication; the document's results use m = 1.
  localparam int unsigned DEF_M  = 1;

  // Coefficient-memory sizes of the four structures (N = filter order).
  function automatic int unsigned ncoef_mdf2(input int unsigned n);   // technique 1
    return 4 * n + 1;
  endfunction
  function automatic int unsigned ncoef_mdf2u(input int unsigned n);  // technique 2
    return 8 * n + 4;
  endfunction
  function automatic int unsigned ncoef_tdf2(input int unsigned n);   // technique 3
    return 2 * n + 1;
  endfunction
  function automatic int unsigned ncoef_tdf2u(input int unsigned n);  // technique 4
    return 4 * n + 4;
  endfunction

endpackage
