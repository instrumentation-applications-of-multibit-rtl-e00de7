// rd_moving_average: moving-average random-data/digital converter.
//
// It estimates the value a random-data stream carries as the mean of its N most recent
// samples, updated every clock by the recursion V*_N = V*_(N-1) + (VRD_N - VRD_0)/N: the new
// sample is added and the sample that leaves the window is subtracted. The window is an
// N-stage delay line (rd_delay_line). The output `sum` is the window sum, a signed integer in
// [-N, +N]; the estimate is sum/N, so with N a power of two `sum` is the estimate in fixed
// point with log2(N) fraction bits. `sum` is registered: a sample taken at one clock edge is
// in `sum` after that edge. `full` rises once N samples have entered since reset.
// The recursion and the delay-line store follow the original description; the window N = 32 is the one its
// multiplication example uses. Clearing the window to zeros at reset is this design's choice.
module rd_moving_average
  import mrd_pkg::*;
#(
  parameter int unsigned N  = 32,
  localparam int unsigned SW = $clog2(N + 1) + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  rd_t                  vrd,
  output logic signed [SW-1:0] sum,
  output logic                 full
);
  rd_t                   oldest;
  logic [$clog2(N+1)-1:0] fill;
  logic signed [SW-1:0]  delta;

  rd_delay_line #(.STAGES(N), .WIDTH(2)) u_window (
    .clk, .rst_n, .en, .d(vrd), .q(oldest)
  );

  always_comb delta = SW'(rd_value(vrd)) - SW'(rd_value(oldest));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      fill <= '0;
    end else if (en) begin
      sum <= sum + delta;
      if (fill != N[$clog2(N+1)-1:0]) fill <= fill + 1'b1;
    end
  end

  assign full = (fill == N[$clog2(N+1)-1:0]);

  // The window sum can never leave [-N, N].
  assert property (@(posedge clk) disable iff (!rst_n) (sum <= $signed(SW'(N))) && (sum >= -$signed(SW'(N))));
endmodule
