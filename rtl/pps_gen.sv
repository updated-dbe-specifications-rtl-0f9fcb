// pps_gen: internal one-pulse-per-second (INT_1PPStick) generator.
//
// The generator is armed by a command (arm, a one-clock pulse from the
// control registers), and the next rising edge of the external 1PPS input
// after arming starts it: that edge yields the first internal tick, and from
// then on a free-running counter of the sample clock yields a tick exactly
// every PERIOD clocks (1,024,000,000 at 1024 MHz), whether or not the
// external pulse is still present. Arming again while running re-synchronises
// the counter to the next external edge; ticks keep coming from the old
// counter until that edge. The arm-then-trigger scheme, the period and the
// removable external reference follow the specification; the re-arm
// behaviour and the synchroniser are this design's choices.
//
// Interface: ext_pps is asynchronous (TTL, any width of at least one sample
// clock) and passes a two-flop synchroniser, then an edge detector, so the
// first internal tick comes 3 clocks after the rising edge (a few ns, well
// under the 1 us allowed). tick is one clock wide. armed and running are
// status outputs.
module pps_gen #(
  parameter int unsigned PERIOD = dbe_pkg::PPS_PERIOD
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ext_pps,
  input  logic arm,
  output logic tick,
  output logic armed,
  output logic running
);
  localparam int CW = $clog2(PERIOD);

  logic [2:0]    sync_q;     // two synchroniser flops and the edge history
  logic          ext_rise;
  logic [CW-1:0] cnt;

  assign ext_rise = sync_q[1] & ~sync_q[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q  <= '0;
      cnt     <= '0;
      tick    <= 1'b0;
      armed   <= 1'b0;
      running <= 1'b0;
    end else begin
      sync_q <= {sync_q[1:0], ext_pps};
      tick   <= 1'b0;
      if (arm) armed <= 1'b1;
      if (armed && ext_rise) begin
        // synchronise: this edge is the new second
        armed   <= arm;
        running <= 1'b1;
        tick    <= 1'b1;
        cnt     <= '0;
      end else if (running) begin
        if (cnt == CW'(PERIOD - 1)) begin
          cnt  <= '0;
          tick <= 1'b1;
        end else begin
          cnt <= cnt + CW'(1);
        end
      end
    end
  end

  // a tick is a single-clock pulse
  logic tick_q;
  always_ff @(posedge clk) begin
    tick_q <= tick;
    if (rst_n && tick_q) a_tick_width : assert (!tick);
  end

endmodule
