// Shared widths of the time-varying cumulant (TVC) datapath.
//
// The datapath is exact integer arithmetic: nothing is rounded or truncated.
//   x(I)              X_W-bit signed sample
//   w_n(I)            W_W-bit signed window coefficient
//   v(I) = w_n(I)x(I) V_W bits  (the entries of U_n and of the diagonal of D_n)
//   y    = u * d      Y_W bits  (entries of Y = U_n^T D_n, produced by S-MUL)
//   c    = sum y * u  c_width(N) bits (entries of C_n, accumulated by M-MUL)
// The sample and window widths are this design's own choice; the document
// gives no word lengths.
package tvc_pkg;

  localparam int unsigned X_W = 8;
  localparam int unsigned W_W = 8;
  localparam int unsigned V_W = X_W + W_W;
  localparam int unsigned Y_W = 2 * V_W;

  // Width of an accumulator that sums n products of a Y_W-bit and a
  // V_W-bit signed number without overflow.
  function automatic int unsigned c_width(input int unsigned n);
    return Y_W + V_W + ((n > 1) ? $clog2(n) : 0);
  endfunction

endpackage
