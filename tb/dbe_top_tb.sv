// dbe_top_tb: end-to-end test of the DBE with a short second (3200 sample
// clocks); see dbe_env for what is driven and checked.
module dbe_top_tb;
  dbe_env #(.PERIOD(3200), .FULL(1'b0)) env ();
endmodule
