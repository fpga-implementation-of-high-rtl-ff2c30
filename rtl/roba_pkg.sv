// roba_pkg: constants shared by the truncated rounding-based approximate
// multiplier (TS-RoBA).
//
// The multiplier keeps only the upper columns of the 2N-bit product. N is the
// operand width (8 in the reference design). K is the number of guard columns
// kept below the output LSB while the partial results are added (0 by default,
// so every internal bus is the output width plus carry bits). The correction
// constant compensates, on average, for the bits that the truncated shifters
// never form; when guard columns exist, half an output LSB is added as well so
// that dropping them rounds to nearest instead of truncating.
package roba_pkg;

  localparam int unsigned N_DEFAULT = 8;

  // Constant added in the carry-save row, in units of the lowest kept column:
  // the correction term plus, when K > 0, the rounding term 2^(K-1).
  function automatic int unsigned corr_const(int unsigned k, int unsigned corr);
    return corr + ((k > 0) ? (32'd1 << (k - 1)) : 32'd0);
  endfunction

endpackage
