// tb_mrd_rng: compares the generator with an independent xorshift32 model, checks that it
// holds while disabled and that its low bits are balanced.
module tb_mrd_rng;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] rnd, ref_s;
  int ones;
  always #5 clk = ~clk;

  mrd_rng #(.SEED(32'hDEAD_BEEF)) dut (.clk, .rst_n, .en, .rnd);

  function automatic logic [31:0] step(logic [31:0] s);
    s ^= s << 13; s ^= s >> 17; s ^= s << 5;
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    ref_s = 32'hDEAD_BEEF;
    @(negedge clk);
    checks++; if (rnd !== ref_s) begin failures++; $display("FAIL seed %h", rnd); end
    en = 1;
    ones = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      ref_s = step(ref_s);
      checks++;
      if (rnd !== ref_s) begin failures++; if (failures < 5) $display("FAIL k=%0d %h vs %h", k, rnd, ref_s); end
      ones += int'(rnd[0]);
    end
    checks++;
    if (ones < 1800 || ones > 2200) begin failures++; $display("FAIL bit0 ones=%0d", ones); end
    en = 0;
    repeat (5) @(negedge clk);
    checks++; if (rnd !== ref_s) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
