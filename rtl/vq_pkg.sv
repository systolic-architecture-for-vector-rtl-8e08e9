// vq_pkg: constants and helper functions shared by the systolic vector
// quantisation (VQ) encoder.
//
// The default sizes are those of the worked example of the architecture:
// vectors of K = 3 samples and a codebook of N = 4 codewords. The sample
// width W is not fixed by the architecture; 8-bit signed samples are this
// design's choice. The distortion of eqn. (1), a sum of K squares of W+1-bit
// differences, needs 2*W + ceil(log2 K) bits to be exact.
package vq_pkg;

  parameter int unsigned K_DEFAULT = 3;  // vector dimension
  parameter int unsigned N_DEFAULT = 4;  // number of codewords
  parameter int unsigned W_DEFAULT = 8;  // sample width (design choice)

  // Distortion measure computed by the cells. Squared error is the encoder's
  // own measure; absolute error needs only a different cell function.
  typedef enum logic {
    DIST_SQUARED  = 1'b0,  // sum of (x - c)^2
    DIST_ABSOLUTE = 1'b1   // sum of |x - c|
  } dist_e;

  // Width of an exact squared-error distortion of k samples of w bits.
  function automatic int unsigned dist_width(int unsigned w, int unsigned k);
    return 2 * w + ((k > 1) ? $clog2(k) : 0);
  endfunction

  // Width of a codeword identifier / index (at least one bit).
  function automatic int unsigned id_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
