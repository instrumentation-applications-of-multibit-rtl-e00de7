// tb_workload_multiplication: the product of two time-varying values recovered through the
// random-data chain. A "weight" and an "input" value, each constant over three 1024-clock
// segments, are turned into streams by two digital/random-data converters, multiplied
// sample by sample, and recovered by a 32-sample moving average. After the first 64 clocks of each
// segment the average of the recovered product must be within 0.08 of the true product.
module tb_workload_multiplication;
  import mrd_pkg::*;
  localparam int N = 32, FRAC = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [FRAC+1:0] dw, dx;
  rd_t w, x, z;
  logic signed [6:0] sum;
  logic full;
  always #5 clk = ~clk;

  dig_to_rd #(.FRAC(FRAC), .SEED(32'hA5A5_1234)) u_w (.clk, .rst_n, .en(1'b1), .d(dw), .vrd(w));
  dig_to_rd #(.FRAC(FRAC), .SEED(32'h0F1E_2D3C)) u_x (.clk, .rst_n, .en(1'b1), .d(dx), .vrd(x));
  rd_multiplier u_mul (.x(w), .y(x), .z);
  rd_moving_average #(.N(N)) u_avg (.clk, .rst_n, .en(1'b1), .vrd(z), .sum, .full);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real wv [3] = '{0.8, 0.4, -0.5};
    real xv [3] = '{-0.2, 0.9, 0.4};
    int  len [3] = '{1024, 1024, 1024};
    dw = 0; dx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      real acc, p;
      dw = (FRAC+2)'($rtoi(wv[s] * 256.0));
      dx = (FRAC+2)'($rtoi(xv[s] * 256.0));
      p = real'(dw) * real'(dx) / 65536.0;
      acc = 0.0;
      for (int k = 0; k < len[s]; k++) begin
        @(negedge clk);
        if (k >= 64) acc += real'(sum) / real'(N);
      end
      acc /= real'(len[s] - 64);
      $display("segment %0d: product %f recovered %f", s, p, acc);
      checks++;
      if (acc - p > 0.08 || p - acc > 0.08) begin failures++; $display("FAIL segment %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
