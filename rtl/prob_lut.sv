// prob_lut: an N_IN-input lookup table used as a probability generator.
//
// Each input x[k] is an independent random bit with a fixed probability.
// Row i of the truth table (x read as an unsigned number, x[N_IN-1] as the
// most significant bit) occurs with probability r_i, the product of the
// input probabilities of that row, so the output is 1 with probability
// sum_i cfg[i]*r_i. Choosing cfg (one bit per row) selects which of the
// 2**(2**N_IN) reachable probabilities the table produces; the best cfg for
// a target is found offline by a 0-1 programme minimising |sum cfg[i] r_i - q|.
//
// Interface: cfg is the output column of the truth table, cfg[i] = z_i;
// x the random inputs; z = cfg[x].
// Timing: combinational.
//
// The table-as-generator scheme and its row order follow the original method; the
// default N_IN=2 is the size of its worked truth tables. How cfg is stored
// (FPGA configuration memory) is outside this module.
module prob_lut #(
  parameter int unsigned N_IN = 2
) (
  input  logic [2**N_IN-1:0] cfg,
  input  logic [N_IN-1:0]    x,
  output logic               z
);
  always_comb z = cfg[x];
endmodule
