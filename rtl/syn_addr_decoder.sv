// syn_addr_decoder: synapse address decoder.
//
// It turns the synapse address SYNADD into the select lines S: exactly one line, S[SYNADD],
// is high; an address of NSYN or more selects nothing. Combinational. Synapse S_ij (input i,
// neuron j, both counted from 0) has address j*NI + i in the network. The original description names the
// decoder and its lines; the binary address and this ordering are this design's choices.
module syn_addr_decoder #(
  parameter int unsigned NSYN = 900,
  localparam int unsigned AW  = $clog2(NSYN)
) (
  input  logic [AW-1:0]   synadd,
  output logic [NSYN-1:0] s
);
  always_comb s = (32'(synadd) < NSYN) ? (NSYN'(1) << synadd) : '0;
endmodule
