// tb_rd_correlator: random three-level streams into the correlator (R = 8, N = 32). Every
// clock the delayed stream, the product and the window sum are compared with a model that
// keeps the stream histories. A second phase feeds VRD1 with VRD2 delayed by R in the
// testbench, so every product is x^2 and the sum counts the non-zero samples, the
// correlation peak at lag R.
module tb_rd_correlator;
  import mrd_pkg::*;
  localparam int R = 8, N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  rd_t vrd1, vrd2, vrd2_delayed, product;
  logic signed [6:0] cor_sum;
  logic full;
  int h2 [$], hp [$];
  int ref_sum, peak;
  always #5 clk = ~clk;

  rd_correlator #(.R(R), .N(N)) dut (.clk, .rst_n, .en, .vrd1, .vrd2, .vrd2_delayed, .product, .cor_sum, .full);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v1, v2;
    vrd1 = RD_ZERO; vrd2 = RD_ZERO; ref_sum = 0; peak = 0;
    for (int i = 0; i < R; i++) h2.push_back(0);
    for (int i = 0; i < N; i++) hp.push_back(0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; en = 1;
    for (int k = 0; k < 6000; k++) begin
      v2 = $urandom_range(0, 2) - 1;
      v1 = (k < 3000) ? $urandom_range(0, 2) - 1 : h2[0];
      vrd1 = rd_encode(v1); vrd2 = rd_encode(v2);
      #1;
      checks++;
      if (int'(rd_value(vrd2_delayed)) != h2[0] || int'(rd_value(product)) != v1 * h2[0]) begin
        failures++; if (failures < 5) $display("FAIL k=%0d delayed=%b product=%b", k, vrd2_delayed, product);
      end
      @(posedge clk);
      ref_sum += v1 * h2[0] - hp[0];
      void'(hp.pop_front()); hp.push_back(v1 * h2[0]);
      void'(h2.pop_front()); h2.push_back(v2);
      @(negedge clk);
      checks++;
      if (int'(cor_sum) != ref_sum) begin failures++; if (failures < 5) $display("FAIL k=%0d sum=%0d exp=%0d", k, cor_sum, ref_sum); end
      if (k > 3100 && cor_sum > 12) peak++;
    end
    // lag-matched random streams give about 2/3 N; uncorrelated ones about 0
    checks++;
    if (peak < 2800) begin failures++; $display("FAIL correlation peak seen only %0d times", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
