// Shared definitions for the matrix fused multiply-add (FMA) processing element.
//
// Numbers are signed fixed point with one integer (sign) bit and W-1 fraction bits, so a
// W-bit word covers [-1, 1). The element computes D' = (A*B + C) / (2N) and keeps the result
// at W bits; the true result is D = 2N * D'. Because every product lies in [-1, 1], the scaled
// sum lies in [-1, 1) for any N, so the output never overflows and needs no saturation.
// The helper functions below give the widths and shift that follow from W and N; the
// controller state type is also defined here.
package fma_pkg;

  // Number of bits needed to index N rows (at least one bit).
  function automatic int unsigned idx_bits(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // log2 of the scale factor 2N, for N a power of two.
  function automatic int unsigned scale_shift(input int unsigned n);
    return $clog2(n) + 1;
  endfunction

  // Width of the exact sum of N products of two W-bit numbers plus the aligned addend.
  function automatic int unsigned acc_bits(input int unsigned w, input int unsigned n);
    return 2 * w + $clog2(n) + 1;
  endfunction

  // Controller states: wait for operands, issue rows, wait for the last row to be written,
  // hold the result until it is taken.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_RUN   = 2'd1,
    ST_DRAIN = 2'd2,
    ST_DONE  = 2'd3
  } fma_state_e;

endpackage
