// single_source_gen: 0.5 and 0.4 from a single input probability p.
//
// Let p be the root in (0, 0.5) of 10t - 20t^2 + 20t^3 - 10t^4 - 1
// (p ~= 0.1295), so that g2(p) = p - 2p^2 + 2p^3 - p^4 = 0.1. For five
// independent inputs of probability p:
//   f1 = (x1|x2|x3|x4|x5) & ~(x1&x2&x3&x4&x5)
// is 1 for the 30 minterms that are neither all-zero nor all-one, so
// P(f1) = 5*g2(p) = 0.5, and
//   f2 = (x1|x2|x3|x4) & (x1|x3|~x5) & (~x2|x3|~x5) & (~x1|~x2|~x4|~x5)
// has 4, 8, 8 and 4 minterms of weight 1, 2, 3 and 4, so P(f2) = 4*g2(p)
// = 0.4. With 0.4 and 0.5 available, every decimal fraction can then be
// generated from p alone.
//
// Interface: xa and xb are two groups of five independent sources of
// probability p (bit 4 is x1, bit 0 is x5); z_half = f1(xa) and
// z_two_fifths = f2(xb).
// Timing: combinational.
//
// Both functions follow the original method; giving each its own group of sources,
// so that the two outputs are independent, is this design's choice.
module single_source_gen (
  input  logic [4:0] xa,
  input  logic [4:0] xb,
  output logic       z_half,
  output logic       z_two_fifths
);
  logic x1, x2, x3, x4, x5;

  always_comb begin
    z_half = (|xa) & ~(&xa);

    {x1, x2, x3, x4, x5} = xb;
    z_two_fifths = (x1 | x2 | x3 | x4)
                 & (x1 | x3 | ~x5)
                 & (~x2 | x3 | ~x5)
                 & (~x1 | ~x2 | ~x4 | ~x5);
  end
endmodule
