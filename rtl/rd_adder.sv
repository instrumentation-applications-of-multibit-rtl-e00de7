// rd_adder: stochastic adder of M random-data streams.
//
// Every clock a random number picks one of the M inputs with probability 1/M (a 1-out-of-M
// demultiplexer drives select lines S_1..S_M); each input is gated by its select line and the
// gated inputs are ORed onto the output. The output stream therefore carries
// (X_1 + ... + X_M)/M, and the random scanning also decorrelates inputs with similar patterns.
// The select index is floor(r*M/2^16) for a 16-bit random number r, which is uniform to within
// M/2^16. Interface: `x` holds one sample of each input, `z` is the selected sample
// (combinational from `x` and the registered select), `sel` the one-hot select lines.
// The gating structure follows the original description; the index mapping and the generator are this
// design's own.
module rd_adder
  import mrd_pkg::*;
#(
  parameter int unsigned M    = 30,
  parameter logic [31:0] SEED = 32'h9E37_79B9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  rd_t          x [M],
  output rd_t          z,
  output logic [M-1:0] sel
);
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  logic [31:0] rnd;
  logic [47:0] scaled;
  logic [IW-1:0] idx;

  mrd_rng #(.SEED(SEED)) u_rng (.clk, .rst_n, .en, .rnd);

  always_comb begin
    scaled = {32'd0, rnd[15:0]} * 48'(M);
    idx    = IW'(scaled >> 16);
    for (int i = 0; i < M; i++) sel[i] = (idx == IW'(i));
  end

  always_comb begin
    z = RD_ZERO;
    for (int i = 0; i < M; i++) z = z | (x[i] & {2{sel[i]}});
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));
endmodule
