// ard_converter: behavioural model of the analog/random-data converter (not synthesizable).
//
// The real part is analog: an analog random signal generator adds a dither R, uniform over
// [-DELTA/2, +DELTA/2), to the analog input V, a quantizer rounds the sum VR to the nearest
// level, and the clock CLK samples the result. This model does the same with `real`
// arithmetic and $urandom, and emits three levels (-1, 0, +1 times DELTA, 2-bit code) on every
// rising clock edge. An input between two levels k-1 and k gives k with probability V/DELTA-(k-1),
// so the mean of the stream is V/DELTA; inputs beyond +-DELTA saturate. Reset forces the code
// of 0. The structure, the uniform dither and the three-level (2-bit) output follow the
// document; the reset and DELTA = 1.0 as the default full scale are this model's choices.
module ard_converter
  import mrd_pkg::*;
#(
  parameter real DELTA = 1.0
) (
  input  logic clk,
  input  logic rst_n,
  input  real  v,
  output rd_t  vrd
);
  // One conversion: dither, quantize to the nearest level, saturate.
  function automatic rd_t convert(real vin);
    real r, vr;
    r  = (real'($urandom) / 4294967296.0 - 0.5) * DELTA;
    vr = (vin + r) / DELTA + 0.5;
    // floor() of vr, written as a truncating conversion around a positive offset
    return rd_encode($rtoi(vr + 16.0) - 16);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) vrd <= RD_ZERO;
    else        vrd <= convert(v);
  end
endmodule
