// tb_mrd_top: end-to-end test of the whole set at its default sizes (correlator lag R = 8,
// 32-sample windows, 30-neuron auto-associative memory).
//
//  * Correlator: v2 is a square wave of +-0.9 with half-period 8 clocks. With v1 = v2 the lag-8
//    products are -0.81 on average; with v1 = v2 delayed by 8 clocks in the testbench they are
//    +0.81. With constant v1 = 0.5, v2 = -0.6 they are -0.3 (the converters' dithers are
//    independent). Each time average of cor_sum/32 must be within 0.06 of these values.
//  * A/D converter: constant inputs; the time average of adc_sum/32 within 0.03 of the input.
//  * Memory: the 900 weights W = P1 P1' + P2 P2' + P3 P3' of the digits 0, 1, 2 are loaded with
//    MODE low (32 samples each, mean W/3), then each digit is recalled with MODE high and the
//    sign of each neuron's time-averaged window sum must give the digit back; a copy with 9 of 30 pixels inverted
//    is also recalled and must agree with the testbench's exact hard-limit model where that
//    model has a margin of 0.06 or more.
// Every mechanism (weight load, recall, +1 and -1 decisions, correlation of either sign, lag
// alignment through the delay line, conversion) is counted and must occur at least once.
module tb_mrd_top;
  import mrd_pkg::*;
  localparam int NI = 30, NW = 32, NAVG = 32, N = 32, R = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  real v1 = 0.0, v2 = 0.0, v_adc = 0.0;
  rd_t vrd1, vrd2;
  logic signed [6:0] cor_sum, adc_sum;
  logic cor_full, adc_full;
  logic mode = 0;
  logic [9:0] synadd = '0;
  rd_t datin = RD_ZERO;
  rd_t x [NI];
  rd_t y [NI];
  logic [NI-1:0] a;
  logic signed [6:0] n_sum [NI];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mrd_top dut (
    .clk, .rst_n, .v1, .v2, .vrd1, .vrd2, .cor_sum, .cor_full, .v_adc, .adc_sum, .adc_full,
    .mode, .synadd, .datin, .x, .y, .a, .n_sum
  );

  // mechanism counters
  int n_load = 0, n_recall = 0, n_pos = 0, n_neg = 0, n_cor_pos = 0, n_cor_neg = 0,
      n_lag = 0, n_adc = 0, n_noisy = 0;

  string rows [3][6] = '{
    '{"01110", "10001", "10001", "10001", "10001", "01110"},
    '{"01100", "00100", "00100", "00100", "00100", "00100"},
    '{"11100", "00010", "00010", "01100", "01000", "01111"}
  };
  int p [3][NI];
  int wcnt [NI][NI];

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sq(int t);
    return (((t / 8) % 2) != 0) ? 0.9 : -0.9;
  endfunction

  function automatic int sample(int cnt, int k);
    int c = (cnt < 0) ? -cnt : cnt;
    if ((((k + 1) * c) / NW) > ((k * c) / NW)) return (cnt < 0) ? -1 : 1;
    return 0;
  endfunction

  function automatic bit near(real m, real e, real tol);
    return (m - e <= tol) && (e - m <= tol);
  endfunction

  // 0: v1 = v2 (square), 1: v1 = v2 delayed by R, 2: constants
  task automatic correlate(int kind, real e_val);
    real acc = 0.0;
    for (int k = 0; k < 3000 + 2 * N; k++) begin
      @(negedge clk);
      v2 = (kind == 2) ? -0.6 : sq(cyc);
      v1 = (kind == 2) ? 0.5 : (kind == 1) ? sq(cyc - R) : sq(cyc);
      if (k >= 2 * N) acc += real'(cor_sum) / real'(N);
    end
    acc /= 3000.0;
    checks++;
    if (!near(acc, e_val, 0.06)) begin failures++; $display("FAIL correlator case %0d: %f, expected %f", kind, acc, e_val); end
    if (acc > 0.0) n_cor_pos++; else n_cor_neg++;
    if (kind == 1) n_lag++;
  endtask

  task automatic convert(real v);
    real acc = 0.0;
    v_adc = v;
    repeat (2 * N) @(negedge clk);
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      acc += real'(adc_sum) / real'(N);
    end
    checks++;
    if (!near(acc / 2000.0, v, 0.03)) begin failures++; $display("FAIL adc %f: %f", v, acc / 2000.0); end
    checks++;
    if (!adc_full) begin failures++; $display("FAIL adc window not full"); end
    n_adc++;
  endtask

  task automatic recall(int q, int pin [NI], bit stored);
    real nref [NI];
    real acc [NI];
    bit ok;
    for (int i = 0; i < NI; i++) x[i] = rd_encode(pin[i]);
    for (int j = 0; j < NI; j++) begin
      nref[j] = 0.0;
      for (int i = 0; i < NI; i++) nref[j] += real'(wcnt[j][i]) / real'(NW) * real'(pin[i]);
      nref[j] /= real'(NI);
      acc[j] = 0.0;
    end
    repeat (2 * NAVG) @(negedge clk);
    for (int k = 0; k < 1500; k++) begin
      @(negedge clk);
      for (int j = 0; j < NI; j++) acc[j] += real'(n_sum[j]) / real'(NAVG);
    end
    ok = 1;
    for (int j = 0; j < NI; j++) begin
      bit maj = (acc[j] >= 0.0);
      if (maj) n_pos++; else n_neg++;
      if (nref[j] >= 0.06 || nref[j] <= -0.06) begin
        checks++;
        if (maj != (nref[j] > 0.0)) begin failures++; $display("FAIL pattern %0d neuron %0d", q, j); end
      end
      if ((maj ? 1 : -1) != p[q][j]) ok = 0;
    end
    if (stored) begin
      checks++;
      if (!ok) begin failures++; $display("FAIL stored digit %0d not recalled", q); end
      n_recall++;
    end else begin
      n_noisy++;
      $display("digit %0d with 9 inverted pixels recalled as the digit: %0d", q, ok);
    end
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
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // memory: load every weight while the correlator and converter run on constants
    v1 = 0.5; v2 = -0.6; v_adc = 0.25;
    mode = 0;
    for (int j = 0; j < NI; j++)
      for (int i = 0; i < NI; i++) begin
        synadd = 10'(j*NI + i);
        for (int s = 0; s < NW; s++) begin
          datin = rd_encode(sample(wcnt[j][i], s));
          @(negedge clk);
        end
        n_load++;
      end
    synadd = 10'h3FF;
    mode = 1;

    correlate(2, -0.3);
    correlate(0, -0.81);
    correlate(1, 0.81);
    convert(0.25);
    convert(-0.6);

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

    $display("mechanisms: loads=%0d recalls=%0d noisy=%0d pos=%0d neg=%0d cor+=%0d cor-=%0d lag=%0d adc=%0d",
             n_load, n_recall, n_noisy, n_pos, n_neg, n_cor_pos, n_cor_neg, n_lag, n_adc);
    checks++; if (n_load != NI * NI) begin failures++; $display("FAIL weight loads"); end
    checks++; if (n_recall == 0 || n_noisy == 0) begin failures++; $display("FAIL no recall"); end
    checks++; if (n_pos == 0 || n_neg == 0) begin failures++; $display("FAIL one decision never taken"); end
    checks++; if (n_cor_pos == 0 || n_cor_neg == 0 || n_lag == 0) begin failures++; $display("FAIL correlator mechanism missing"); end
    checks++; if (n_adc == 0) begin failures++; $display("FAIL no conversion"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
