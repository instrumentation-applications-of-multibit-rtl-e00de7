// tb_rd_adc: constant analog inputs into the converter with its 32-sample window. Once the
// window is full, the mean of the results must be within 0.03 of the input and no single result
// may be more than 0.5 away from it; the full flag must rise after 32 clocks.
module tb_rd_adc;
  import mrd_pkg::*;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  real v;
  rd_t vrd;
  logic signed [6:0] sum;
  logic full;
  always #5 clk = ~clk;

  rd_adc #(.N(N)) dut (.clk, .rst_n, .v, .vrd, .sum, .full);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vals [5] = '{0.4, -0.7, 0.05, 0.95, -0.2};
    v = vals[0];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (N - 1) @(negedge clk);
    checks++; if (full) begin failures++; $display("FAIL full early"); end
    @(negedge clk);
    checks++; if (!full) begin failures++; $display("FAIL full late"); end
    foreach (vals[t]) begin
      real acc, est;
      int far;
      v = vals[t];
      repeat (N + 2) @(negedge clk);
      acc = 0.0; far = 0;
      for (int k = 0; k < 4000; k++) begin
        @(negedge clk);
        est = real'(sum) / real'(N);
        acc += est;
        if (est - v > 0.5 || v - est > 0.5) far++;
      end
      checks++;
      if (acc / 4000.0 - v > 0.03 || v - acc / 4000.0 > 0.03) begin failures++; $display("FAIL v=%f mean %f", v, acc / 4000.0); end
      checks++;
      if (far != 0) begin failures++; $display("FAIL v=%f: %0d results off by over 0.5", v, far); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
