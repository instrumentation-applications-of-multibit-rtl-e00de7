// tb_rd_activation: every input value of a 7-bit window sum against the hard limit (+1 at and
// above zero, -1 below).
module tb_rd_activation;
  localparam int SW = 7, FRAC = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic signed [SW-1:0] n;
  logic a;
  logic signed [FRAC+1:0] d;
  always #5 clk = ~clk;

  rd_activation #(.SW(SW), .FRAC(FRAC)) dut (.n, .a, .d);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -64; k < 64; k++) begin
      n = SW'(k);
      @(posedge clk);
      checks++;
      if (a !== (k >= 0) || int'(d) != ((k >= 0) ? 256 : -256)) begin
        failures++; $display("FAIL n=%0d a=%b d=%0d", k, a, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
