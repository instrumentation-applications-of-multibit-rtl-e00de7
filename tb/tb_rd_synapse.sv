// tb_rd_synapse: loads 32 random weight samples with MODE low and the synapse selected, then
// checks with MODE high that the samples recirculate in load order with period 32 and that
// DT = w * X every clock; also that a synapse that is not selected, or in recall, keeps its
// weight while DATIN changes, and that a second load replaces it.
module tb_rd_synapse;
  import mrd_pkg::*;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, mode = 1, s = 0;
  rd_t datin, x, w, dt;
  int wt [N];
  always #5 clk = ~clk;

  rd_synapse #(.N(N)) dut (.clk, .rst_n, .mode, .s, .datin, .x, .w, .dt);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load();
    @(negedge clk);
    mode = 0; s = 1;
    for (int k = 0; k < N; k++) begin
      wt[k] = $urandom_range(0, 2) - 1;
      datin = rd_encode(wt[k]);
      @(negedge clk);
    end
    mode = 1; s = 0;
  endtask

  // After a load, the first recall clock presents wt[0].
  task automatic check_periods(int periods, logic m, logic sl);
    mode = m; s = sl;
    for (int k = 0; k < periods * N; k++) begin
      int xv;
      xv = $urandom_range(0, 2) - 1;
      x = rd_encode(xv);
      datin = rd_encode($urandom_range(0, 2) - 1);
      #1;
      checks++;
      if (int'(rd_value(w)) != wt[k % N]) begin failures++; if (failures < 5) $display("FAIL k=%0d w=%b exp %0d", k, w, wt[k % N]); end
      checks++;
      if (int'(rd_value(dt)) != wt[k % N] * xv) begin failures++; if (failures < 5) $display("FAIL k=%0d dt=%b", k, dt); end
      @(negedge clk);
    end
  endtask

  initial begin
    datin = RD_ZERO; x = RD_ZERO;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // after reset the weight is zero
    checks++; if (w !== RD_ZERO) begin failures++; $display("FAIL reset weight"); end
    load();
    check_periods(3, 1'b1, 1'b0);   // recall
    check_periods(2, 1'b0, 1'b0);   // load mode, other synapse selected
    check_periods(2, 1'b1, 1'b1);   // recall with select high
    load();
    check_periods(2, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
