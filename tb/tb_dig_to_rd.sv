// tb_dig_to_rd: for a set of digital values in [-1, 1] the output must take only the two
// levels around the value, and its mean over 8000 samples must be within 0.03 of the value.
module tb_dig_to_rd;
  import mrd_pkg::*;
  localparam int FRAC = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [FRAC+1:0] d;
  rd_t vrd;
  always #5 clk = ~clk;

  dig_to_rd #(.FRAC(FRAC)) dut (.clk, .rst_n, .en, .d, .vrd);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vals [9] = '{256, -256, 0, 64, -64, 128, -200, 230, 10};
    d = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1; en = 1;
    foreach (vals[t]) begin
      int acc, bad, lo, hi;
      real m;
      d = (FRAC+2)'(vals[t]);
      acc = 0; bad = 0;
      lo = (vals[t] < 0) ? -1 : 0;
      hi = (vals[t] > 0) ? 1 : 0;
      if (vals[t] == 256) lo = 1;
      if (vals[t] == -256) hi = -1;
      repeat (2) @(negedge clk);
      for (int k = 0; k < 8000; k++) begin
        @(negedge clk);
        acc += int'(rd_value(vrd));
        if (int'(rd_value(vrd)) < lo || int'(rd_value(vrd)) > hi || vrd == 2'b11) bad++;
      end
      m = real'(acc) / 8000.0;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL d=%0d: %0d samples off the two levels", vals[t], bad); end
      checks++;
      if (m - real'(vals[t]) / 256.0 > 0.03 || real'(vals[t]) / 256.0 - m > 0.03) begin
        failures++; $display("FAIL d=%0d mean %f", vals[t], m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
