// gen_049_factor: probability 0.49 through the factorisation 0.49 = 0.7*0.7.
//
// Instead of peeling digits, the numerator 49 is factored as 7*7 and each
// factor 0.7 is built as a one-digit circuit, 0.7 = 1 - (1-0.4)*0.5. An AND
// of the two independent 0.7 signals gives 0.49 with three AND gates and an
// AND depth of two, against five and four for the digit-reduction circuit.
//
// Interface: s[0..3] are random sources with probabilities 0.5, 0.4, 0.4,
// 0.5; z carries 0.49.
// Timing: combinational.
//
// The netlist follows the original method.
module gen_049_factor (
  input  logic [3:0] s,
  output logic       z
);
  logic p07_a, p07_b;

  always_comb begin
    p07_a = ~(s[0] & ~s[1]);
    p07_b = ~(~s[2] & s[3]);
    z     = p07_a & p07_b;
  end
endmodule
