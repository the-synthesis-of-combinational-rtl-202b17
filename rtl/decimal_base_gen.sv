// decimal_base_gen: one-digit decimal probabilities from the pair {0.4, 0.5}.
//
// Three independent random inputs, a (P=0.4) and b, c (P=0.5 each), are
// enough to give every probability d/10 with one decimal digit:
//   0.1 = a&b&c     0.2 = a&b      0.3 = ~a&b    0.4 = a      0.5 = b
//   0.6 = ~a        0.7 = ~(~a&b)  0.8 = ~(a&b)  0.9 = ~(a&b&c)
// plus the constants 0 and 1. These are the leaves at which the digit-by-
// digit decomposition of a longer decimal fraction ends. The AND depth is
// 2 for 0.1 and 0.9, 1 for 0.2, 0.3, 0.7, 0.8 and 0 for 0.4, 0.5, 0.6.
//
// Interface: digit selects d (0..10, where 10 gives the constant 1; codes
// 11..15 give 0); a, b, c are the random inputs; z is 1 with probability
// d/10.
// Timing: combinational.
//
// The eleven circuits follow the original method. Building all of them at once and
// choosing one with a multiplexer, so that the digit can change at run
// time, is this design's choice; a fixed target needs only its own circuit.
module decimal_base_gen (
  input  logic [3:0] digit,
  input  logic       a,
  input  logic       b,
  input  logic       c,
  output logic       z
);
  logic p01, p02, p03;

  always_comb begin
    p01 = a & b & c;
    p02 = a & b;
    p03 = ~a & b;
    unique case (digit)
      4'd0:    z = 1'b0;
      4'd1:    z = p01;
      4'd2:    z = p02;
      4'd3:    z = p03;
      4'd4:    z = a;
      4'd5:    z = b;
      4'd6:    z = ~a;
      4'd7:    z = ~p03;
      4'd8:    z = ~p02;
      4'd9:    z = ~p01;
      4'd10:   z = 1'b1;
      default: z = 1'b0;
    endcase
  end
endmodule
