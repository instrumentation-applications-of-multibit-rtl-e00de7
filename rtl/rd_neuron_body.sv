// rd_neuron_body: random-data neuron body.
//
// It collects the M post-synaptic streams DT_1j..DT_Mj. A stochastic adder (random scanning
// of one input per clock) gives a stream carrying their mean; a moving-average converter over
// its last N samples integrates it into the signed window sum `n_sum` (value n_sum/N); the
// hard-limit activation turns that into +-1; and a digital/random-data converter restores a
// random-data stream Y_j for use as a synaptic input elsewhere. Latency from a DT sample to Y:
// the sample enters the window at one edge and Y follows at the next. The chain follows the
// document; N = 32, FRAC = 8 and the seeds are this design's defaults.
module rd_neuron_body
  import mrd_pkg::*;
#(
  parameter int unsigned M      = 30,
  parameter int unsigned N      = 32,
  parameter int unsigned FRAC   = 8,
  parameter logic [31:0] SEED   = 32'h9E37_79B9,
  localparam int unsigned SW    = $clog2(N + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  rd_t                  dt [M],
  output rd_t                  sigma,   // adder output stream
  output logic signed [SW-1:0] n_sum,   // integrated input, value n_sum/N
  output logic                 a,       // hard-limit decision, 1 = +1
  output rd_t                  y
);
  logic [M-1:0]          sel;
  logic                  full;
  logic signed [FRAC+1:0] d;

  rd_adder #(.M(M), .SEED(SEED)) u_add (.clk, .rst_n, .en, .x(dt), .z(sigma), .sel);

  rd_moving_average #(.N(N)) u_avg (.clk, .rst_n, .en, .vrd(sigma), .sum(n_sum), .full);

  rd_activation #(.SW(SW), .FRAC(FRAC)) u_act (.n(n_sum), .a, .d);

  dig_to_rd #(.FRAC(FRAC), .SEED(SEED ^ 32'h5BD1_E995)) u_d2r (.clk, .rst_n, .en, .d, .vrd(y));
endmodule
