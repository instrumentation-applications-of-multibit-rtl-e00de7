// rd_delay_line: STAGES-stage delay line of WIDTH-bit samples.
//
// A shift register held as one packed vector: on every enabled clock the sample on `d` enters stage 1 and every
// stage moves one place, so `q` is `d` delayed by STAGES enabled clocks. Reset clears all
// stages to zero, which is the code of the value 0. It serves as the r-stage delay line of
// the correlator, the N-stage weight store of a synapse and the sample window of the
// moving-average converter. The original description gives the function; the register chain, the
// enable and the reset are this design's choices.
module rd_delay_line #(
  parameter int unsigned STAGES = 32,
  parameter int unsigned WIDTH  = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  // Stage k (k = 1..STAGES) occupies bits [k*WIDTH-1 -: WIDTH]; the line shifts towards the top.
  logic [STAGES*WIDTH-1:0] line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  line <= '0;
    else if (en) line <= (STAGES*WIDTH)'({line, d});   // the top stage falls off
  end

  assign q = line[STAGES*WIDTH-1 -: WIDTH];

  initial assert (STAGES >= 1) else $error("rd_delay_line: STAGES must be at least 1");
endmodule
