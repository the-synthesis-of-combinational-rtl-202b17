// basic_prob_gates: the elementary operators of probabilistic logic.
//
// When the inputs are independent random bits with P(x=1)=px and P(y=1)=py,
// an inverter outputs 1 with probability 1-px, a fanin-two AND gate with
// probability px*py, and an XOR gate with probability (1-px)*py + px*(1-py).
// With px=0.4 and py=0.5 the three outputs carry 0.6, 0.2 and 0.5.
// Every larger generator in this library is a composition of the first two.
//
// Interface: x, y are random bits; z_inv, z_and, z_xor are their functions.
// Timing: purely combinational, no clock.
//
// The three gates and their probability laws follow the original method;
// grouping them into one module is this library's choice.
module basic_prob_gates (
  input  logic x,
  input  logic y,
  output logic z_inv,
  output logic z_and,
  output logic z_xor
);
  always_comb begin
    z_inv = ~x;
    z_and = x & y;
    z_xor = x ^ y;
  end
endmodule
