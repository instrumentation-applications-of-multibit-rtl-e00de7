// mrd_pkg: shared types and helpers for the 2-bit (three-level) random-data machine.
//
// A random-data sample carries one of the three values -1, 0, +1. The code is 2-bit
// ones' complement, as the multiplier equations require: 00 = 0, 01 = +1, 10 = -1.
// 11 (ones' complement "minus zero") is never produced by any block here and is read as 0.
// The deterministic value a stream stands for is the mean of its samples.
package mrd_pkg;

  typedef logic [1:0] rd_t;

  localparam rd_t RD_ZERO = 2'b00;
  localparam rd_t RD_POS  = 2'b01;
  localparam rd_t RD_NEG  = 2'b10;

  // Signed value (-1, 0, +1) of a sample.
  function automatic logic signed [1:0] rd_value(rd_t c);
    unique case (c)
      RD_POS:  return 2'sd1;
      RD_NEG:  return -2'sd1;
      default: return 2'sd0;
    endcase
  endfunction

  // Code of a value; anything above 0 is +1, anything below is -1.
  function automatic rd_t rd_encode(int v);
    if (v > 0)      return RD_POS;
    else if (v < 0) return RD_NEG;
    else            return RD_ZERO;
  endfunction

endpackage
