// mrd_rng: random number generator that drives the random scanning of the stochastic adder
// and the dither of the digital/random-data converters.
//
// It is a 32-bit xorshift generator (shifts 13, 17, 5): a new 32-bit word every enabled
// clock, period 2^32-1, from a non-zero SEED loaded at reset. The word on `rnd` is the
// current state, so it is a registered output. The original description names a random number generator
// but not its kind; the xorshift choice, the width and the seed are this design's own.
module mrd_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [31:0] rnd
);
  logic [31:0] s, n1, n2, n3;

  always_comb begin
    n1 = s  ^ (s  << 13);
    n2 = n1 ^ (n1 >> 17);
    n3 = n2 ^ (n2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s <= (SEED == 32'd0) ? 32'h1 : SEED;
    else if (en) s <= n3;
  end

  assign rnd = s;
endmodule
