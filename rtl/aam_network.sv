// aam_network: auto-associative memory built from random-data synapses and neurons.
//
// NI inputs and NI neurons, fully connected through NI*NI synapses: a = hardlim(W * P). Input
// X_i is a 2-bit random-data stream (for a +-1 pattern element it is simply the constant code
// of +1 or -1). Synapse S_ij multiplies X_i by its stored weight w_ij; neuron body j adds the NI
// streams DT_ij stochastically, integrates them over NAVG samples and hard-limits the result.
// Weights are written while MODE is low: SYNADD = j*NI + i selects synapse S_ij, and NW
// successive DATIN samples (one per clock, their mean being the weight) fill its delay line.
// While MODE is high all synapses recirculate and the network recalls. Outputs: the random-data
// stream Y_j, the decision bit a_j and the window sum of every neuron.
// The 30 inputs, 30 neurons and 30x30 weights follow the original description (a 6x5 pixel grid); the
// address ordering, NW = NAVG = 32 samples and the seeds are this design's choices.
module aam_network
  import mrd_pkg::*;
#(
  parameter int unsigned NI    = 30,
  parameter int unsigned NW    = 32,
  parameter int unsigned NAVG  = 32,
  parameter int unsigned FRAC  = 8,
  localparam int unsigned NSYN = NI * NI,
  localparam int unsigned AW   = $clog2(NSYN),
  localparam int unsigned SW   = $clog2(NAVG + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mode,
  input  logic [AW-1:0]        synadd,
  input  rd_t                  datin,
  input  rd_t                  x     [NI],
  output rd_t                  y     [NI],
  output logic [NI-1:0]        a,
  output logic signed [SW-1:0] n_sum [NI]
);
  logic [NSYN-1:0] s;
  rd_t             w  [NI][NI];
  rd_t             dt [NI][NI];
  rd_t             sigma [NI];

  syn_addr_decoder #(.NSYN(NSYN)) u_dec (.synadd, .s);

  for (genvar j = 0; j < NI; j++) begin : g_neuron
    for (genvar i = 0; i < NI; i++) begin : g_syn
      rd_synapse #(.N(NW)) u_syn (
        .clk, .rst_n, .mode, .s(s[j*NI + i]), .datin, .x(x[i]), .w(w[j][i]), .dt(dt[j][i])
      );
    end

    rd_neuron_body #(
      .M(NI), .N(NAVG), .FRAC(FRAC),
      .SEED(32'h9E37_79B9 * (j + 1) + 32'h7F4A_7C15)
    ) u_body (
      .clk, .rst_n, .en(mode), .dt(dt[j]), .sigma(sigma[j]), .n_sum(n_sum[j]), .a(a[j]), .y(y[j])
    );
  end
endmodule
