// pps_delay: the internal 1PPS tick pipelined alongside the data.
//
// The tick that resets and frames the signal chain at its input has to mark,
// at the output, the data of the sample taken on the second. Instead of
// carrying a flag through the arithmetic, the tick runs down its own shift
// register whose length equals the latency of the DSP stages it shadows
// (the specification suggests exactly this). Because that latency depends
// on the channel width (operating mode), the output tap is chosen at run
// time: out is in delayed by depth clocks, 1 <= depth <= DEPTH_MAX. The depth
// must be held steady while a tick is in flight; the channel width changes
// only on a tick, so this holds in the DBE.
module pps_delay #(
  parameter int DEPTH_MAX = 97
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in,
  input  logic [$clog2(DEPTH_MAX+1)-1:0] depth,
  output logic                         out
);
  logic [DEPTH_MAX-1:0] sr;   // sr[i] holds in delayed by i+1 clocks

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[DEPTH_MAX-2:0], in};
  end

  always_comb begin
    out = 1'b0;
    for (int i = 0; i < DEPTH_MAX; i++)
      if (int'(depth) == i + 1) out = sr[i];
  end

endmodule
