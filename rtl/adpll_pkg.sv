// adpll_pkg: constants and small helpers shared by the all-digital PLL blocks.
//
// The phase/frequency detector, time-to-digital converter (TDC) and loop filter
// exchange the TDC control word. The word is TDC_BITS+1 bits wide: the sum of a
// TDC_BITS-bit up counter that starts at zero and a TDC_BITS-bit down counter that
// starts at all ones, so a measurement with no phase error gives the mid value
// 2^TDC_BITS - 1. The 6-bit counters and 7-bit word are the published sizes; the
// signed-error helper is this design's own.
package adpll_pkg;

  // Published counter width of the TDC (6-bit up and down counters, 7-bit word).
  localparam int unsigned TDC_BITS_DEFAULT = 6;

  // Signed phase error carried by a TDC word: the word minus its mid value.
  // Returned in a 32-bit int so every caller can resize it as it needs.
  function automatic int tdc_error(input int unsigned word, input int unsigned bits);
    return int'(word) - ((1 << bits) - 1);
  endfunction

endpackage
