// pcmos_source: behavioural model of a probabilistic CMOS switch.
//
// The real part is an inverter whose input is coupled to a noise source; its
// output is 1 with a probability set by the supply voltage. This model keeps
// only that logical effect: on every rising clock edge it draws a fresh,
// independent bit that is 1 with probability P. It is not synthesizable and
// is used by testbenches only.
module pcmos_source #(
  parameter real P = 0.5
) (
  input  logic clk,
  output logic out
);
  initial out = 1'b0;

  always @(posedge clk)
    out <= (real'($urandom) / 4294967296.0) < P;
endmodule
