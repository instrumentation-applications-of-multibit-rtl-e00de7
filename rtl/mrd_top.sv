// mrd_top: the multibit random-data instrumentation set, its three applications side by side.
//
//  * Serial correlator: two analog/random-data converters (behavioural, analog inputs v1, v2)
//    feed the correlator; cor_sum/N estimates the correlation of v1 and v2 at lag R clocks.
//  * Analog/digital converter: a third analog/random-data converter and a moving average;
//    adc_sum/N estimates v_adc (a digital voltmeter would display it).
//  * Auto-associative memory: 30 random-data neurons with 30x30 random-data synapses; the
//    weights are loaded through mode/synadd/datin and recall runs with mode high.
// All three share the clock and the active-low asynchronous reset. Because the analog front
// ends are behavioural models with `real` inputs, this top simulates but does not synthesize;
// every block below it except ard_converter and rd_adc is synthesizable.
module mrd_top
  import mrd_pkg::*;
#(
  parameter int unsigned R      = 8,
  parameter int unsigned N_COR  = 32,
  parameter int unsigned N_ADC  = 32,
  parameter int unsigned NI     = 30,
  parameter int unsigned NW     = 32,
  parameter int unsigned NAVG   = 32,
  localparam int unsigned SWC   = $clog2(N_COR + 1) + 1,
  localparam int unsigned SWA   = $clog2(N_ADC + 1) + 1,
  localparam int unsigned SWN   = $clog2(NAVG + 1) + 1,
  localparam int unsigned AW    = $clog2(NI * NI)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // correlator
  input  real                   v1,
  input  real                   v2,
  output rd_t                   vrd1,
  output rd_t                   vrd2,
  output logic signed [SWC-1:0] cor_sum,
  output logic                  cor_full,
  // analog/digital converter
  input  real                   v_adc,
  output logic signed [SWA-1:0] adc_sum,
  output logic                  adc_full,
  // auto-associative memory
  input  logic                  mode,
  input  logic [AW-1:0]         synadd,
  input  rd_t                   datin,
  input  rd_t                   x     [NI],
  output rd_t                   y     [NI],
  output logic [NI-1:0]         a,
  output logic signed [SWN-1:0] n_sum [NI]
);
  rd_t vrd2_delayed, product, vrd_adc;

  ard_converter u_ard1 (.clk, .rst_n, .v(v1), .vrd(vrd1));
  ard_converter u_ard2 (.clk, .rst_n, .v(v2), .vrd(vrd2));

  rd_correlator #(.R(R), .N(N_COR)) u_cor (
    .clk, .rst_n, .en(1'b1), .vrd1, .vrd2, .vrd2_delayed, .product, .cor_sum, .full(cor_full)
  );

  rd_adc #(.N(N_ADC)) u_adc (.clk, .rst_n, .v(v_adc), .vrd(vrd_adc), .sum(adc_sum), .full(adc_full));

  aam_network #(.NI(NI), .NW(NW), .NAVG(NAVG)) u_aam (
    .clk, .rst_n, .mode, .synadd, .datin, .x, .y, .a, .n_sum
  );
endmodule
