// dig_to_rd: digital/random-data converter.
//
// It turns a digital value d in [-1, +1] into a three-level random-data stream whose mean is d,
// which restores the randomness of a digital result before it is used as a random-data operand.
// It is a digital dithered quantizer: a dither U, uniform over [0, 1) in steps of 2^-FRAC, is
// added to d and the sum is rounded down to an integer level, so a d between k-1 and k gives
// k with probability d-(k-1) and k-1 otherwise. This equals adding a dither uniform over
// [-1/2, +1/2) and rounding to the nearest level, as the original description's dithered quantizer does.
// Interface: `d` is signed fixed point with FRAC fraction bits (+1.0 = 2^FRAC); one sample
// per enabled clock on `vrd`, registered. The original description gives only the function; the digital
// dither, FRAC and the seed are this design's choices.
module dig_to_rd
  import mrd_pkg::*;
#(
  parameter int unsigned FRAC = 8,
  parameter logic [31:0] SEED = 32'h1234_5679
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic signed [FRAC+1:0] d,
  output rd_t                    vrd
);
  logic [31:0]            rnd;
  logic signed [FRAC+2:0] t;
  logic signed [2:0]      lvl;

  mrd_rng #(.SEED(SEED)) u_rng (.clk, .rst_n, .en, .rnd);

  always_comb begin
    t   = (FRAC+3)'(d) + $signed({3'b000, rnd[FRAC-1:0]});
    lvl = 3'(t >>> FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  vrd <= RD_ZERO;
    else if (en) vrd <= rd_encode(int'(lvl));
  end

  initial assert (FRAC >= 1 && FRAC <= 32) else $error("dig_to_rd: FRAC out of range");
endmodule
