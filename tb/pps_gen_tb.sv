// pps_gen_tb: self-checking test of the internal 1PPS generator.
//
// With a short period (1000 clocks) it checks that external pulses do
// nothing before arming; that after arming the first tick follows the rising
// edge of the external pulse by 3 clocks however long the pulse lasts; that
// ticks then come exactly every PERIOD clocks with the external pulse
// removed; and that arming again moves the ticks to a new external edge.
module pps_gen_tb;
  localparam int unsigned P = 1000;

  logic clk = 0, rst_n = 0, ext_pps = 0, arm = 0;
  logic tick, armed, running;

  pps_gen #(.PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  longint exp_next = -1;     // cycle of the next expected tick
  int n_ticks = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, msg);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (tick) n_ticks++;
      if (exp_next >= 0) begin
        if (cyc == exp_next) begin
          check(tick, "tick missing");
          exp_next = cyc + P;
        end else if (tick) begin
          check(1'b0, "unexpected tick");
        end
      end else if (tick) begin
        check(1'b0, "tick before synchronisation");
      end
    end
    cyc++;
  end

  // raise ext_pps before the edge of cycle c for w clocks
  task automatic ext_pulse(int w);
    @(negedge clk);
    ext_pps = 1;
    repeat (w) @(negedge clk);
    ext_pps = 0;
  endtask

  task automatic do_arm();
    @(negedge clk);
    arm = 1;
    @(negedge clk);
    arm = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    ext_pulse(5);                       // not armed: ignored
    repeat (50) @(negedge clk);
    check(!running && !armed, "running without arm");
    do_arm();
    repeat (2) @(negedge clk);
    check(armed, "armed flag");
    @(negedge clk);
    ext_pps = 1;
    exp_next = cyc + 3;                 // sampled at edge cyc, tick 3 edges later
    repeat (300) @(negedge clk);        // a long external pulse
    ext_pps = 0;
    check(running && !armed, "running after trigger");
    repeat (3 * P) @(negedge clk);      // external reference gone
    check(n_ticks == 4, $sformatf("4 ticks expected, saw %0d", n_ticks));
    // re-arm and resynchronise to an edge at a new phase
    do_arm();
    repeat (P / 3) @(negedge clk);
    ext_pps = 1;
    exp_next = cyc + 3;
    repeat (2) @(negedge clk);
    ext_pps = 0;
    repeat (2 * P + 10) @(negedge clk);
    check(n_ticks >= 6, "ticks after resync");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
