// pps_delay_tb: self-checking test of the 1PPS pipeline delay.
//
// Sends single-clock pulses at random times through the delay at several
// tap settings and checks that each comes out exactly depth clocks later
// and that nothing else does.
module pps_delay_tb;
  localparam int DMAX = 65;

  logic clk = 0, rst_n = 0, in = 0, out;
  logic [6:0] depth = 7'd65;

  pps_delay #(.DEPTH_MAX(DMAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  bit sent [4096];

  always @(posedge clk) begin
    if (rst_n && cyc > int'(depth)) begin
      checks++;
      if (out != sent[cyc - int'(depth)]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d depth %0d: out %b", cyc, depth, out);
      end
    end
    sent[cyc] = in;
    cyc++;
  end

  initial begin
    for (int i = 0; i < 4096; i++) sent[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (depth_list[d]) begin
      depth = 7'(depth_list[d]);
      repeat (70) @(negedge clk);       // let earlier pulses drain
      for (int i = 0; i < 600; i++) begin
        @(negedge clk);
        in = ($urandom % 23) == 0;
      end
      @(negedge clk);
      in = 0;
      repeat (70) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int depth_list [4] = '{65, 33, 1, 17};

  // pulses must not be compared across a change of depth
  always @(depth) for (int i = 0; i < 4096; i++) if (i < cyc) sent[i] = 0;

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
