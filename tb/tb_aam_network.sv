// tb_aam_network: the auto-associative memory at full size (30 inputs, 30 neurons, 900
// synapses, 32-sample weights and windows).
//
// The three training patterns are the digits 0, 1 and 2 on a 6x5 grid (black = +1,
// white = -1), scanned column by column into 30-element vectors. The weight matrix
// W = P1 P1' + P2 P2' + P3 P3' has entries -3, -1, +1, +3; each is loaded as 32 samples whose
// mean is W/3 rounded to a multiple of 1/32 (11 non-zero samples for |W| = 1), one synapse at a
// time with MODE low. In recall the testbench feeds each stored pattern and a copy of it with
// 9 of its 30 pixels (30 %) inverted, and compares with its own model of the network,
// n_j = (1/30) sum_i w_ij x_i with the loaded weights:
//  * the time average of each window sum must be within 0.06 of n_j,
//  * the sign of that average must be the sign of n_j (neurons with |n_j| < 0.06 are not
//    judged), and the decision a_j must be +1 for most of the 1500 clocks where n_j >= 0.06
//    and -1 for most where n_j <= -0.06,
//  * for the stored patterns the recalled pattern must be the pattern itself.
// How many corrupted patterns come back as their digit is reported.
module tb_aam_network;
  import mrd_pkg::*;
  localparam int NI = 30, NW = 32, NAVG = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, mode = 0;
  logic [9:0] synadd;
  rd_t datin;
  rd_t x [NI];
  rd_t y [NI];
  logic [NI-1:0] a;
  logic signed [6:0] n_sum [NI];
  always #5 clk = ~clk;

  aam_network #(.NI(NI), .NW(NW), .NAVG(NAVG)) dut (
    .clk, .rst_n, .mode, .synadd, .datin, .x, .y, .a, .n_sum
  );

  // digit rows, top to bottom, left to right ('1' = black)
  string rows [3][6] = '{
    '{"01110", "10001", "10001", "10001", "10001", "01110"},
    '{"01100", "00100", "00100", "00100", "00100", "00100"},
    '{"11100", "00010", "00010", "01100", "01000", "01111"}
  };
  int p [3][NI];
  int wcnt [NI][NI];   // signed count of non-zero samples loaded into synapse (j, i)
  int recovered = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sample(int cnt, int k);
    // spread |cnt| non-zero samples evenly over the NW positions
    int c = (cnt < 0) ? -cnt : cnt;
    if ((((k + 1) * c) / NW) > ((k * c) / NW)) return (cnt < 0) ? -1 : 1;
    return 0;
  endfunction

  task automatic recall(int q, int pin [NI], bit stored);
    real nref [NI];
    int ones [NI];
    real acc [NI];
    int ok_pattern;
    for (int i = 0; i < NI; i++) x[i] = rd_encode(pin[i]);
    for (int j = 0; j < NI; j++) begin
      nref[j] = 0.0;
      for (int i = 0; i < NI; i++) nref[j] += real'(wcnt[j][i]) / real'(NW) * real'(pin[i]);
      nref[j] /= real'(NI);
      ones[j] = 0; acc[j] = 0.0;
    end
    repeat (2 * NAVG) @(negedge clk);
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      for (int j = 0; j < NI; j++) begin
        ones[j] += int'(a[j]);
        acc[j] += real'(n_sum[j]) / real'(NAVG);
      end
    end
    ok_pattern = 1;
    for (int j = 0; j < NI; j++) begin
      real m = acc[j] / 1500.0;
      bit maj = (m >= 0.0);
      checks++;
      if (m - nref[j] > 0.06 || nref[j] - m > 0.06) begin
        failures++; $display("FAIL pattern %0d neuron %0d mean %f model %f", q, j, m, nref[j]);
      end
      if (nref[j] >= 0.06 || nref[j] <= -0.06) begin
        checks++;
        if (maj != (nref[j] > 0.0)) begin failures++; $display("FAIL pattern %0d neuron %0d decision", q, j); end
        checks++;
        if ((ones[j] > 750) != (nref[j] > 0.0)) begin failures++; $display("FAIL pattern %0d neuron %0d a_j majority", q, j); end
      end
      if ((maj ? 1 : -1) != p[q][j]) ok_pattern = 0;
    end
    if (stored) begin
      checks++;
      if (!ok_pattern) begin failures++; $display("FAIL stored pattern %0d not recalled", q); end
    end else if (ok_pattern) recovered++;
  endtask

  initial begin
    int pin [NI];
    int wv, flipped, k;
    for (int q = 0; q < 3; q++)
      for (int c = 0; c < 5; c++)
        for (int r = 0; r < 6; r++) p[q][c*6 + r] = (rows[q][r][c] == "1") ? 1 : -1;
    for (int j = 0; j < NI; j++)
      for (int i = 0; i < NI; i++) begin
        wv = p[0][j]*p[0][i] + p[1][j]*p[1][i] + p[2][j]*p[2][i];
        wcnt[j][i] = (wv == 3) ? NW : (wv == -3) ? -NW : (wv == 1) ? 11 : -11;
      end
    for (int i = 0; i < NI; i++) x[i] = RD_ZERO;
    synadd = 0; datin = RD_ZERO;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // load all weights, MODE low
    mode = 0;
    for (int j = 0; j < NI; j++)
      for (int i = 0; i < NI; i++) begin
        synadd = 10'(j*NI + i);
        for (int k = 0; k < NW; k++) begin
          datin = rd_encode(sample(wcnt[j][i], k));
          @(negedge clk);
        end
      end
    synadd = 10'h3FF;
    mode = 1;
    for (int q = 0; q < 3; q++) recall(q, p[q], 1'b1);
    for (int q = 0; q < 3; q++) begin
      flipped = 0;
      pin = p[q];
      while (flipped < 9) begin
        k = $urandom_range(0, NI - 1);
        if (pin[k] == p[q][k]) begin pin[k] = -pin[k]; flipped++; end
      end
      recall(q, pin, 1'b0);
    end
    $display("corrupted patterns recalled as their digit: %0d of 3", recovered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
