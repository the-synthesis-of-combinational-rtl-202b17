// prob_tb_pkg: helpers shared by the probability-generator testbenches.
//
// A combinational generator with n independent random inputs is checked
// exactly by walking through all 2^n input words: each word occurs with the
// product of P(bit) or 1-P(bit) over its bits, and the output probability is
// the sum of those weights over the words that give a 1. row_weight returns
// that weight; close() compares two probabilities with a small tolerance.
package prob_tb_pkg;

  localparam int unsigned MAX_IN = 16;

  typedef real prob_vec_t [MAX_IN];

  // Probability of input word 'bits', where p[k] = P(bit k = 1).
  function automatic real row_weight(input logic [MAX_IN-1:0] bits,
                                     input prob_vec_t p, input int n);
    real w;
    w = 1.0;
    for (int k = 0; k < n; k++)
      w = w * (bits[k] ? p[k] : (1.0 - p[k]));
    return w;
  endfunction

  function automatic bit close(input real a, input real b, input real tol);
    real d;
    d = a - b;
    if (d < 0.0) d = -d;
    return d <= tol;
  endfunction

endpackage
