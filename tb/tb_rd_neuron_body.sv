// tb_rd_neuron_body: constant post-synaptic streams with known means into a 30-input neuron
// body (N = 32). The time average of the window sum must approach 32 times the mean of the
// inputs, the decision must be the sign of the sum every clock, and Y must be the code of that
// decision one clock later.
module tb_rd_neuron_body;
  import mrd_pkg::*;
  localparam int M = 30, N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  rd_t dt [M];
  rd_t sigma, y;
  logic signed [6:0] n_sum;
  logic a, a_q;
  always #5 clk = ~clk;

  rd_neuron_body #(.M(M), .N(N)) dut (.clk, .rst_n, .en, .dt, .sigma, .n_sum, .a, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npos [4] = '{12, 3, 20, 0};
    int nneg [4] = '{6, 15, 0, 27};
    for (int i = 0; i < M; i++) dt[i] = RD_ZERO;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; en = 1;
    foreach (npos[t]) begin
      real acc, mean_exp;
      int bad, agree;
      for (int i = 0; i < M; i++) dt[i] = (i < npos[t]) ? RD_POS : (i < npos[t] + nneg[t]) ? RD_NEG : RD_ZERO;
      mean_exp = real'(npos[t] - nneg[t]) / real'(M);
      repeat (N + 4) @(negedge clk);
      acc = 0.0; bad = 0; agree = 0;
      a_q = a;
      for (int k = 0; k < 6000; k++) begin
        @(negedge clk);
        if (y != (a_q ? RD_POS : RD_NEG)) bad++;
        if (a != (n_sum >= 0)) bad++;
        if (a == (mean_exp >= 0.0)) agree++;
        acc += real'(n_sum) / real'(N);
        a_q = a;
      end
      checks++;
      if (acc / 6000.0 - mean_exp > 0.04 || mean_exp - acc / 6000.0 > 0.04) begin
        failures++; $display("FAIL case %0d mean %f exp %f", t, acc / 6000.0, mean_exp);
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL case %0d: %0d decision/output errors", t, bad); end
      checks++;
      if (agree < 5000) begin failures++; $display("FAIL case %0d: decision right only %0d/6000", t, agree); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
