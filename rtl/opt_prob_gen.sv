// opt_prob_gen: probability generator built on the optimal non-duplicable set.
//
// With N_IN inputs whose probabilities are P(x[k]=1) = 2^(2^k)/(2^(2^k)+1)
// (2/3, 4/5, 16/17, ...), truth-table row i occurs with probability
// 2^i/M where M = 2^(2^N_IN)-1. The output probability of a lookup table
// with column cfg is then exactly cfg/M, read as an integer, so the M+1
// reachable values are evenly spaced, which minimises the mean rounding
// error over a uniformly distributed target. To produce a target q the
// column is g(q) = round(q*M).
//
// Interface: q is the target as an unsigned binary fraction q/2^QW; x the
// random inputs with the probabilities above (x[0] = 2/3); cfg the computed
// column g(q); z the random output with probability g(q)/M.
// Timing: combinational (one multiply, one add, a shift and the table).
//
// The input set, the row probabilities and the rounding rule follow the
// original method. Computing g(q) in hardware instead of offline, the fixed-point
// format of q and the round-half-up tie rule are this design's choices.
module opt_prob_gen #(
  parameter int unsigned N_IN = 2,
  parameter int unsigned QW   = 16
) (
  input  logic [QW-1:0]       q,
  input  logic [N_IN-1:0]     x,
  output logic [2**N_IN-1:0]  cfg,
  output logic                z
);
  localparam int unsigned ROWS = 2**N_IN;
  localparam int unsigned PW   = QW + ROWS;

  // M = 2^ROWS - 1, all ones
  localparam logic [ROWS-1:0] M = '1;

  // round(q * M / 2^QW): add one half LSB of the result before the shift
  always_comb
    cfg = ROWS'((PW'(q) * PW'(M) + (PW'(1) << (QW - 1))) >> QW);

  prob_lut #(.N_IN(N_IN)) u_lut (
    .cfg (cfg),
    .x   (x),
    .z   (z)
  );
endmodule
