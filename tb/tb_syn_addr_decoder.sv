// tb_syn_addr_decoder: every address of the 900-synapse decoder, and the unused addresses
// above it, against the expected select pattern.
module tb_syn_addr_decoder;
  localparam int NSYN = 900;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [9:0] synadd;
  logic [NSYN-1:0] s;
  always #5 clk = ~clk;

  syn_addr_decoder #(.NSYN(NSYN)) dut (.synadd, .s);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1024; k++) begin
      synadd = 10'(k);
      @(posedge clk);
      checks++;
      if (k < NSYN) begin
        if ($countones(s) != 1 || s[k] !== 1'b1) begin failures++; if (failures < 5) $display("FAIL addr %0d", k); end
      end else if (s != '0) begin
        failures++; if (failures < 5) $display("FAIL addr %0d selects something", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
