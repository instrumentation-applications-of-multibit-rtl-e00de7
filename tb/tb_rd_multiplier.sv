// tb_rd_multiplier: exhaustive check of the 2-bit random-data multiplier against integer
// multiplication of the operand values (00 = 0, 01 = +1, 10 = -1, 11 read as 0).
module tb_rd_multiplier;
  import mrd_pkg::*;
  int checks = 0, failures = 0;
  rd_t x, y, z;
  logic clk = 0;
  always #5 clk = ~clk;

  rd_multiplier dut (.x, .y, .z);

  function automatic int val(rd_t c);
    return (c == 2'b01) ? 1 : (c == 2'b10) ? -1 : 0;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        x = rd_t'(a); y = rd_t'(b);
        @(posedge clk);
        checks++;
        if (val(z) != val(x) * val(y)) begin
          failures++;
          $display("FAIL x=%b y=%b z=%b", x, y, z);
        end
        // Valid operands must give a valid (non-11) product code
        if (a != 3 && b != 3) begin
          checks++;
          if (z == 2'b11) begin failures++; $display("FAIL code 11 for x=%b y=%b", x, y); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
