// rd_adc: analog/digital converter built as an analog/random-data converter followed by a
// moving-average random-data/digital converter (behavioural, since its front end is analog).
//
// The dithered quantizer turns the analog input into a three-level random-data stream; the
// moving average of its last N samples is the digital result, `sum`/N in units of DELTA, one
// new result per clock, registered. The composition follows the original description; N = 32 is the
// window of its multiplication example and is also this design's default here.
module rd_adc
  import mrd_pkg::*;
#(
  parameter real         DELTA = 1.0,
  parameter int unsigned N     = 32,
  localparam int unsigned SW   = $clog2(N + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  real                  v,
  output rd_t                  vrd,
  output logic signed [SW-1:0] sum,
  output logic                 full
);
  ard_converter #(.DELTA(DELTA)) u_ard (.clk, .rst_n, .v, .vrd);
  rd_moving_average #(.N(N)) u_avg (.clk, .rst_n, .en(1'b1), .vrd, .sum, .full);
endmodule
