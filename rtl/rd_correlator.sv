// rd_correlator: serial-type correlator for two random-data streams.
//
// The second stream VRD2 passes an R-stage delay line, the multiplier forms
// VRD1(n) * VRD2(n-R) one sample per clock, and a moving-average converter over the last N
// products gives the correlation point COR(R*dt) as `cor_sum`/N. Timing: the product of the
// samples present at one edge enters the window at that edge, so `cor_sum` after edge n covers
// products n-N+1..n. The chain follows the original description. It gives no value for R or N: R = 8 and
// N = 32 (the window of its multiplication example) are this design's defaults. The two
// analog/random-data converters in front are separate blocks.
module rd_correlator
  import mrd_pkg::*;
#(
  parameter int unsigned R  = 8,
  parameter int unsigned N  = 32,
  localparam int unsigned SW = $clog2(N + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  rd_t                  vrd1,
  input  rd_t                  vrd2,
  output rd_t                  vrd2_delayed,
  output rd_t                  product,
  output logic signed [SW-1:0] cor_sum,
  output logic                 full
);
  rd_delay_line #(.STAGES(R), .WIDTH(2)) u_delay (
    .clk, .rst_n, .en, .d(vrd2), .q(vrd2_delayed)
  );

  rd_multiplier u_mul (.x(vrd1), .y(vrd2_delayed), .z(product));

  rd_moving_average #(.N(N)) u_avg (
    .clk, .rst_n, .en, .vrd(product), .sum(cor_sum), .full
  );
endmodule
