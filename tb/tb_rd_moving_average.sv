// tb_rd_moving_average: random three-level samples, some of them with a biased mean, into the
// N = 32 converter; the window sum is compared every clock with a sum of the last 32 samples
// kept by the testbench, and the full flag with the sample count.
module tb_rd_moving_average;
  import mrd_pkg::*;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  rd_t vrd;
  logic signed [6:0] sum;
  logic full;
  int hist [$];
  int ref_sum, cnt;
  always #5 clk = ~clk;

  rd_moving_average #(.N(N)) dut (.clk, .rst_n, .en, .vrd, .sum, .full);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    vrd = RD_ZERO; ref_sum = 0; cnt = 0;
    for (int i = 0; i < N; i++) hist.push_back(0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      checks++;
      if (int'(sum) != ref_sum) begin failures++; if (failures < 5) $display("FAIL k=%0d sum=%0d exp=%0d", k, sum, ref_sum); end
      checks++;
      if (full != (cnt >= N)) begin failures++; $display("FAIL full k=%0d", k); end
      en = ($urandom_range(0, 7) != 0);
      // phases of all +1, all -1 and random data
      if (k < 100)       v = 1;
      else if (k < 200)  v = -1;
      else               v = $urandom_range(0, 2) - 1;
      vrd = rd_encode(v);
      @(posedge clk);
      if (en) begin
        ref_sum += v - hist[0];
        void'(hist.pop_front()); hist.push_back(v);
        cnt++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
