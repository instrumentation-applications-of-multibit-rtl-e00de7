// tb_workload_window_error: accuracy of the moving-average converter against its window size,
// for three-level data from the dithered analog converter. Four converters with windows of 8,
// 16, 32 and 64 samples watch the same stream; for 40 constant inputs spread over [-0.95, 0.95]
// the mean absolute and mean square errors of the estimate sum/N over 256 samples (after the
// window has filled) are accumulated. The errors must fall as the window grows, and a window
// four times longer must at least halve the mean square error. The values are printed.
module tb_workload_window_error;
  import mrd_pkg::*;
  localparam int NN = 4;
  localparam int WIN [NN] = '{8, 16, 32, 64};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  real v = 0.0;
  rd_t vrd;
  logic signed [7:0] sum [NN];
  logic full [NN];
  real mae [NN], mse [NN];
  always #5 clk = ~clk;

  ard_converter u_ard (.clk, .rst_n, .v, .vrd);

  for (genvar g = 0; g < NN; g++) begin : g_win
    logic signed [$clog2(WIN[g] + 1):0] s;
    rd_moving_average #(.N(WIN[g])) u_avg (.clk, .rst_n, .en(1'b1), .vrd, .sum(s), .full(full[g]));
    assign sum[g] = 8'(s);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    for (int g = 0; g < NN; g++) begin mae[g] = 0.0; mse[g] = 0.0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      v = -0.95 + 1.9 * real'(t) / 39.0;
      repeat (64) @(negedge clk);
      for (int k = 0; k < 256; k++) begin
        @(negedge clk);
        for (int g = 0; g < NN; g++) begin
          e = real'(sum[g]) / real'(WIN[g]) - v;
          mae[g] += (e < 0.0) ? -e : e;
          mse[g] += e * e;
        end
      end
    end
    for (int g = 0; g < NN; g++) begin
      mae[g] /= 40.0 * 256.0; mse[g] /= 40.0 * 256.0;
      $display("window %0d: mean absolute error %f, mean square error %f", WIN[g], mae[g], mse[g]);
      checks++;
      if (!full[g]) begin failures++; $display("FAIL window %0d never full", WIN[g]); end
    end
    for (int g = 1; g < NN; g++) begin
      checks++;
      if (!(mae[g] < mae[g-1])) begin failures++; $display("FAIL error does not fall from window %0d to %0d", WIN[g-1], WIN[g]); end
    end
    for (int g = 2; g < NN; g++) begin
      checks++;
      if (!(mse[g] < 0.5 * mse[g-2])) begin failures++; $display("FAIL square error at window %0d not half that at %0d", WIN[g], WIN[g-2]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
