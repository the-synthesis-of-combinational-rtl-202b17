// gen_049_basic: probability 0.49 by digit reduction, after AND balancing.
//
// Digit reduction gives 0.49 = 0.5 * (1 - 0.4*0.5*(0.4*0.5*0.5)), i.e. the
// steps 0.49 -> 0.98 -> 0.02 -> 0.05 -> 0.1. After the AND gates of the
// chain are regrouped into a tree the circuit has five AND gates and an AND
// depth of four:
//   p02 = s0 & s1            (0.4*0.5 = 0.2)
//   p01 = (s2 & s3) & s4     (0.5*0.5*0.4 = 0.1)
//   z   = ~(p02 & p01) & s5  ((1 - 0.02)*0.5 = 0.49)
//
// Interface: s[0..5] are random sources with probabilities
// 0.4, 0.5, 0.5, 0.5, 0.4, 0.5; z carries 0.49.
// Timing: combinational.
//
// The netlist follows the original method.
module gen_049_basic (
  input  logic [5:0] s,
  output logic       z
);
  logic p02, p025, p01, p098;

  always_comb begin
    p02  = s[0] & s[1];
    p025 = s[2] & s[3];
    p01  = p025 & s[4];
    p098 = ~(p02 & p01);
    z    = p098 & s[5];
  end
endmodule
