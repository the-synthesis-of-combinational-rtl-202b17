// gen_0757: a circuit whose output is 1 with probability exactly 0.757.
//
// It is built from eight independent random sources taken from the pair
// {0.4, 0.5}, seven AND gates and six inverters, by peeling one decimal
// digit at a time off the target:
//   0.757 <-1- 0.243 <-x0.4- 0.6075 <-1- 0.3925 <-x0.5- 0.785 <-1- 0.215
//         <-x0.5- 0.43 <-x0.5- 0.86 <-1- 0.14 <-x0.4- 0.35 <-x0.5- 0.7
// and 0.7 = 1 - (1-0.4)*0.5. Read from the inputs this is a single chain.
//
// Interface: s[0..7] are the sources in chain order with probabilities
// 0.4, 0.5, 0.5, 0.4, 0.5, 0.5, 0.5, 0.4; taps shows the intermediate
// signals (probabilities 0.7, 0.35, 0.86, 0.43, 0.785, 0.6075, 0.757);
// z carries 0.757.
// Timing: combinational, seven AND levels.
//
// The circuit is the original worked example; the tap output is this design's.
module gen_0757 (
  input  logic [7:0] s,
  output logic [6:0] taps,
  output logic       z
);
  and_inv_chain #(
    .STAGES   (7),
    .INV_HEAD (1'b1),
    .INV_MASK (7'b1110101)
  ) u_chain (
    .head (s[0]),
    .src  (s[7:1]),
    .taps (taps),
    .z    (z)
  );
endmodule
