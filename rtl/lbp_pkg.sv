// lbp_pkg - shared sizes, types and helpers of the LBP kNN classifier.
//
// Feature words are W = 16 bits wide with the most significant bit used as
// the sign; the remaining 15 bits hold the magnitude (sign-magnitude coding).
// The default sizes are those of the Iris data set (150 elements, 4 features,
// 3 classes, k = 5), the example the design is mostly measured with.
// The word width and the Iris sizes follow the description of the scheme;
// reading the sign bit as sign-magnitude (rather than two's complement) is a
// choice of this implementation.
package lbp_pkg;

  // Word width of every memory word (features and class pointers).
  localparam int unsigned W_DEF  = 16;
  // Iris: elements, features per element, classes, neighbours.
  localparam int unsigned E_DEF  = 150;
  localparam int unsigned F_DEF  = 4;
  localparam int unsigned NC_DEF = 3;
  localparam int unsigned K_DEF  = 5;

  // Number of bits needed to index n items (at least 1).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
