// rd_activation: hard-limit activation function of a neuron.
//
// It takes the neuron's integrated input, the signed window sum of a moving-average converter,
// and returns +1 if it is zero or above and -1 below, as a digital value for the following
// digital/random-data converter (fixed point, FRAC fraction bits, +1.0 = 2^FRAC), together
// with the decision bit `a` (1 for +1). Combinational. The original description's network uses a hard
// limit whose outputs equal its +-1 target patterns; the choice of +1 at exactly zero is this
// design's own.
module rd_activation #(
  parameter int unsigned SW   = 7,
  parameter int unsigned FRAC = 8
) (
  input  logic signed [SW-1:0]   n,
  output logic                   a,
  output logic signed [FRAC+1:0] d
);
  localparam logic signed [FRAC+1:0] ONE = (FRAC+2)'(1) <<< FRAC;

  always_comb begin
    a = (n >= 0);
    d = a ? ONE : -ONE;
  end
endmodule
