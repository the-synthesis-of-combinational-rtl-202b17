// and_inv_chain: the linear AND/inverter chain produced by digit reduction.
//
// A decimal target z is turned into a chain of gates from the output back
// to the inputs: each "1-z" step adds an inverter and each "z/p" step adds
// a fanin-two AND gate whose second input is a fresh random source of
// probability p (0.4 or 0.5). Read from the input end, the finished circuit
// is a head input, optionally inverted, followed by STAGES AND gates; stage
// k ANDs the running signal with src[k] and then inverts it when
// INV_MASK[k] is set. If the running probability is v, stage k yields
// v*p_k, or 1 - v*p_k when inverted.
//
// The defaults describe the 0.757 circuit: head 0.4 inverted (0.6), then
// sources 0.5, 0.5, 0.4, 0.5, 0.5, 0.5, 0.4 with inverters after stages
// 0, 2, 4, 5 and 6, giving 0.7, 0.35, 0.86, 0.43, 0.785, 0.6075, 0.757.
//
// Interface: head and src are random inputs; taps[k] is the signal after
// stage k; z = taps[STAGES-1].
// Timing: combinational, STAGES gate levels deep (balancing the AND gates
// would shorten it, but this module keeps the chain as built).
//
// The chain structure and the defaults follow the original method; describing the
// chain by a per-stage inverter mask is this design's way of parameterising it.
module and_inv_chain #(
  parameter int unsigned        STAGES   = 7,
  parameter bit                 INV_HEAD = 1'b1,
  parameter logic [STAGES-1:0]  INV_MASK = 7'b1110101
) (
  input  logic              head,
  input  logic [STAGES-1:0] src,
  output logic [STAGES-1:0] taps,
  output logic              z
);
  logic start;

  always_comb begin
    start = head ^ INV_HEAD;
    for (int k = 0; k < STAGES; k++) begin
      if (k == 0) taps[k] = (start & src[k]) ^ INV_MASK[k];
      else        taps[k] = (taps[k-1] & src[k]) ^ INV_MASK[k];
    end
    z = taps[STAGES-1];
  end
endmodule
