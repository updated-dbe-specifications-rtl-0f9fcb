// dbe_top_full_tb: end-to-end test of the DBE with every parameter at its
// default (a second of 1,024,000,000 sample clocks): synchronisation and the
// first words of the second; see dbe_env.
module dbe_top_full_tb;
  dbe_env #(.FULL(1'b1)) env ();
endmodule
