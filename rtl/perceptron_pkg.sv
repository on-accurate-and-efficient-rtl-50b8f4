// perceptron_pkg: types, constants and helper functions shared by every
// perceptron branch predictor in this library.
//
// Weights are 8-bit two's-complement numbers that saturate at -128 and +127.
// The byte-sized weight follows from the storage budgets the design is sized
// by (a 128-line, 24-weight table of 3 KB; 64 perceptrons of 8 weights in
// 512 B). The training threshold of 15 is the representative value the design
// was evaluated with. The saturation limits and the training rule's form
// (train on a misprediction or when |sum| <= threshold) are this library's
// choice, the classic perceptron-predictor rule.
package perceptron_pkg;

  localparam int unsigned WEIGHT_W = 8;
  localparam int signed   THETA    = 15;

  typedef logic signed [WEIGHT_W-1:0] weight_t;

  localparam weight_t WMAX = weight_t'(2**(WEIGHT_W-1) - 1);
  localparam weight_t WMIN = weight_t'(-(2**(WEIGHT_W-1)));

  // One saturating step of a weight: up when the input agreed with the
  // outcome, down when it disagreed.
  function automatic weight_t sat_step(weight_t w, logic up);
    if (up) return (w == WMAX) ? w : w + weight_t'(1);
    else    return (w == WMIN) ? w : w - weight_t'(1);
  endfunction

  // Bits needed for the weighted sum of n inputs plus the bias.
  function automatic int unsigned sum_width(int unsigned n);
    return WEIGHT_W + $clog2(n + 2);
  endfunction

endpackage
