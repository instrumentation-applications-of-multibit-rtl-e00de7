// rd_synapse: random-data synapse with a dynamically stored weight.
//
// The weight w_ij is not a number but N random-data samples whose mean is the weight, held in
// an N-stage delay line whose output is fed back to its input, so the samples recirculate and
// the line presents one weight sample per clock. While MODE is low and this synapse's select
// line S_ij is high, the delay line takes its input from DATIN instead, so N clocks load a new
// weight serially. The multiplier forms the post-synaptic sample DT_ij = w_ij * X_i every clock
// (combinational from the registered weight sample and the input).
// Structure and the MODE/select rule follow the original description; the shift-every-clock timing and the
// reset to a zero weight are this design's choices.
module rd_synapse
  import mrd_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mode,   // 0: load from datin when selected, 1: recall
  input  logic s,      // select line S_ij from the address decoder
  input  rd_t  datin,
  input  rd_t  x,
  output rd_t  w,
  output rd_t  dt
);
  rd_t  d;
  logic load;

  assign load = ~mode & s;
  assign d    = load ? datin : w;

  rd_delay_line #(.STAGES(N), .WIDTH(2)) u_store (
    .clk, .rst_n, .en(1'b1), .d, .q(w)
  );

  rd_multiplier u_mul (.x(w), .y(x), .z(dt));
endmodule
