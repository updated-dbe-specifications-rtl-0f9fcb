// tvg: VSI test vector generator.
//
// Produces one 32-bit test word per VSI clock (step) for substitution on the
// VSI outputs, restarting its sequence on every VSI 1PPS tick so that a
// recorder can check both bit order and time alignment. As the
// specification asks, it resets on each tick and runs at the prevailing VSI
// clock rate. The pattern itself (defined in the VSI-H standard, not
// reproduced here) is this design's stand-in: a 32-bit Galois LFSR with the
// maximal-length polynomial x^32 + x^22 + x^2 + x + 1, started from SEED on
// the tick.
//
// Timing: word is combinational and is the word for the current step: SEED
// when sync is high, otherwise the successor of the last word. The state
// advances on clocks with step high.
module tvg #(
  parameter logic [31:0] SEED = 32'hFFFF_FFFF,
  parameter logic [31:0] POLY = 32'h8020_0003
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  input  logic        sync,
  output logic [31:0] word
);
  logic [31:0] state;

  always_comb begin
    if (sync) word = SEED;
    else      word = state[0] ? ((state >> 1) ^ POLY) : (state >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= word;
  end

endmodule
