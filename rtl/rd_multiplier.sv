// rd_multiplier: multiplier of two 2-bit random-data samples.
//
// One sample of each operand in, one sample of the product out, combinationally. With the
// ones' complement code (00 = 0, 01 = +1, 10 = -1) the product is two sums of products,
// exactly as the original description gives them:
//   Z_MSB = X_LSB & Y_MSB | X_MSB & Y_LSB
//   Z_LSB = X_MSB & Y_MSB | X_LSB & Y_LSB
// Because the two operand streams are statistically independent, the mean of the product
// stream is the product of the two means. No clock; zero latency.
module rd_multiplier
  import mrd_pkg::*;
(
  input  rd_t x,
  input  rd_t y,
  output rd_t z
);
  assign z[1] = (x[0] & y[1]) | (x[1] & y[0]);
  assign z[0] = (x[1] & y[1]) | (x[0] & y[0]);
endmodule
