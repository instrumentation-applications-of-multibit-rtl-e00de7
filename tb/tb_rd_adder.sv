// tb_rd_adder: random input samples into the 30-input stochastic adder. Each clock the output
// must equal the input named by the one-hot select lines; over 60000 clocks every input must
// be chosen 2000 +- 250 times, and the mean of the output stream must match the mean of the
// inputs (checked with constant inputs).
module tb_rd_adder;
  import mrd_pkg::*;
  localparam int M = 30;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  rd_t x [M];
  rd_t z;
  logic [M-1:0] sel;
  int hits [M];
  int idx, acc;
  always #5 clk = ~clk;

  rd_adder #(.M(M)) dut (.clk, .rst_n, .en, .x, .z, .sel);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < M; i++) begin x[i] = RD_ZERO; hits[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; en = 1;
    for (int k = 0; k < 60000; k++) begin
      @(negedge clk);
      for (int i = 0; i < M; i++) x[i] = rd_encode($urandom_range(0, 2) - 1);
      #1;
      idx = -1;
      for (int i = 0; i < M; i++) if (sel[i]) idx = i;
      checks++;
      if (!$onehot(sel) || z !== x[idx]) begin
        failures++; if (failures < 5) $display("FAIL k=%0d sel=%h z=%b", k, sel, z);
      end else hits[idx]++;
    end
    for (int i = 0; i < M; i++) begin
      checks++;
      if (hits[i] < 1750 || hits[i] > 2250) begin failures++; $display("FAIL input %0d chosen %0d times", i, hits[i]); end
    end
    // Constant inputs: 12 at +1, 6 at -1, rest 0: mean 6/30 = 0.2
    for (int i = 0; i < M; i++) x[i] = (i < 12) ? RD_POS : (i < 18) ? RD_NEG : RD_ZERO;
    acc = 0;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      acc += int'(rd_value(z));
    end
    checks++;
    if (acc < 3400 || acc > 4600) begin failures++; $display("FAIL mean %0d/20000, expected about 4000", acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
