// cov_pkg: sizes and helpers shared by the single-pass covariance accelerator.
//
// The accelerator computes, in one pass over the data, the two raw moments
// from which the host derives the covariance matrix
//     K = ( XX^T - (X1)(X1)^T / n ) / n
// namely the upper triangle of XX^T (sum over samples of x_i*x_j) and the
// per-dimension sums X1 (sum over samples of x_i).
//
// Defaults that follow the original design: at most 160 dimensions, and a switch from
// the fully parallel engine to the semi-parallel one above 16 dimensions, which
// is one cache line worth of samples. Own choices (the original design gives no
// widths): 512-bit cache lines, 32-bit signed integer samples (so 16 samples
// fill one line, matching the threshold), 64-bit accumulators and a 40-bit
// sample counter.
package cov_pkg;

  localparam int unsigned CL_W_DEF    = 512;  // cache line width in bits
  localparam int unsigned DATA_W_DEF  = 32;   // one sample value
  localparam int unsigned ACC_W_DEF   = 64;   // XX^T and X1 accumulators
  localparam int unsigned MAX_DIM_DEF = 160;  // largest supported dimensionality
  localparam int unsigned CNT_W_DEF   = 40;   // number-of-samples counter

  // Position of element (i,j), i <= j, in a row-major upper triangle of an
  // n x n matrix: rows 0..i-1 hold n, n-1, ..., n-i+1 entries.
  function automatic int unsigned tri_idx(int unsigned n, int unsigned i, int unsigned j);
    return i * n - (i * (i - 1)) / 2 + (j - i);
  endfunction

  // Number of entries of an n x n upper triangle including the diagonal.
  function automatic int unsigned tri_size(int unsigned n);
    return n * (n + 1) / 2;
  endfunction

endpackage
