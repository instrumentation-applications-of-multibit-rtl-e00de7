// tb_rd_delay_line: drives random samples with a random enable into a 32-stage line and checks
// every output against a queue model (delay of exactly 32 enabled clocks, zeros after reset).
module tb_rd_delay_line;
  localparam int S = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] d, q;
  logic [1:0] hist [$];
  always #5 clk = ~clk;

  rd_delay_line #(.STAGES(S), .WIDTH(2)) dut (.clk, .rst_n, .en, .d, .q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    for (int i = 0; i < S; i++) hist.push_back(2'b00);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      checks++;
      if (q !== hist[0]) begin failures++; if (failures < 5) $display("FAIL k=%0d q=%b exp=%b", k, q, hist[0]); end
      en = ($urandom_range(0, 3) != 0);
      d  = 2'($urandom);
      @(posedge clk);
      if (en) begin hist.push_back(d); void'(hist.pop_front()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
