// tb_ard_converter: analog inputs across and beyond the full scale; the output must take only
// the levels next to the input, and its mean over 8000 samples must be within 0.03 of the
// input (saturated at +-1 beyond the full scale).
module tb_ard_converter;
  import mrd_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  real v;
  rd_t vrd;
  always #5 clk = ~clk;

  ard_converter dut (.clk, .rst_n, .v, .vrd);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vals [8] = '{0.0, 0.3, -0.3, 0.75, -0.9, 1.0, -1.0, 1.6};
    v = 0.0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    foreach (vals[t]) begin
      int acc, bad, lo, hi;
      real m, e;
      v = vals[t];
      e = (v > 1.0) ? 1.0 : (v < -1.0) ? -1.0 : v;
      lo = (v < 0.0) ? -1 : 0;  hi = (v > 0.0) ? 1 : 0;
      if (v >= 1.0) lo = 1;
      if (v <= -1.0) hi = -1;
      acc = 0; bad = 0;
      @(negedge clk);
      for (int k = 0; k < 8000; k++) begin
        @(negedge clk);
        acc += int'(rd_value(vrd));
        if (int'(rd_value(vrd)) < lo || int'(rd_value(vrd)) > hi || vrd == 2'b11) bad++;
      end
      m = real'(acc) / 8000.0;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL v=%f: %0d samples off the two levels", v, bad); end
      checks++;
      if (m - e > 0.03 || e - m > 0.03) begin failures++; $display("FAIL v=%f mean %f", v, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
