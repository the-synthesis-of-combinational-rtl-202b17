// single_p_decimal_gen: one-digit decimal probabilities from one value p.
//
// A single input probability p (the root in (0, 0.5) of
// 10t - 20t^2 + 20t^3 - 10t^4 - 1, p ~= 0.1295) is enough for every decimal
// fraction: two five-input functions of independent copies of p give 0.4
// and 0.5, and from the pair {0.4, 0.5} every decimal can be composed. This
// module does that for one digit: two single_source_gen instances turn
// fifteen copies of p into three independent bits of probability 0.4, 0.5
// and 0.5 (the second instance's 0.4 output is left unused), which feed
// decimal_base_gen.
//
// Interface: digit selects d (0..10); x[14:0] are fifteen independent
// sources of probability p, taken five at a time (x[4:0] make the 0.4
// source, x[9:5] and x[14:10] the two 0.5 sources); z is 1 with
// probability d/10.
// Timing: combinational; the single-source stage adds two gate levels in
// front of the base circuit.
//
// The composition follows the original proof; the assignment of source
// groups to the three derived bits is this design's choice.
module single_p_decimal_gen (
  input  logic [3:0]  digit,
  input  logic [14:0] x,
  output logic        z
);
  logic p04, p05_b, p05_c;
  logic unused_two_fifths;

  // xa feeds f1 (0.5), xb feeds f2 (0.4); each instance uses one of them
  single_source_gen u_src_a (
    .xa           (x[9:5]),
    .xb           (x[4:0]),
    .z_half       (p05_b),
    .z_two_fifths (p04)
  );

  single_source_gen u_src_c (
    .xa           (x[14:10]),
    .xb           (x[14:10]),
    .z_half       (p05_c),
    .z_two_fifths (unused_two_fifths)
  );

  decimal_base_gen u_base (
    .digit (digit),
    .a     (p04),
    .b     (p05_b),
    .c     (p05_c),
    .z     (z)
  );
endmodule
