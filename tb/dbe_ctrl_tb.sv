// dbe_ctrl_tb: self-checking test of the command registers.
//
// Writes every command and checks the decoded outputs one clock later:
// mode requests (including an ignored code 0) that become the active mode
// only on a tick, single-clock arm and commit pulses, the TVG selection and
// gain writes routed to the right IF with the right channel and value.
module dbe_ctrl_tb;
  import dbe_pkg::*;

  logic clk = 0, rst_n = 0, we = 0, tick = 0;
  logic [7:0] addr = 0;
  logic [15:0] wdata = 0;
  dbe_mode_e mode_req, mode_act;
  logic arm, gain_we1, gain_we2, commit1, commit2;
  logic [1:0] tvg_sel;
  logic [4:0] gain_addr;
  logic [15:0] gain_wdata;

  dbe_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic wr(logic [7:0] a, logic [15:0] d);
    @(negedge clk);
    we = 1; addr = a; wdata = d;
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(mode_req == MODE1 && mode_act == MODE1 && !arm && tvg_sel == 0, "reset values");
    wr(8'h00, 16'd3);
    chk(mode_req == MODE3 && mode_act == MODE1, "mode 3 requested, not active");
    wr(8'h00, 16'd0);
    chk(mode_req == MODE3, "mode code 0 ignored");
    tick = 1;
    @(negedge clk);
    tick = 0;
    chk(mode_act == MODE3, "mode active after tick");
    wr(8'h01, 16'd0);
    chk(arm, "arm pulse");
    @(negedge clk);
    chk(!arm, "arm is one clock");
    wr(8'h02, 16'd2);
    chk(tvg_sel == 2'b10, "tvg select");
    for (int i = 0; i < 40; i++) begin
      automatic logic [7:0] a = 8'h40 + 8'($urandom % 64);
      automatic logic [15:0] d = 16'($urandom);
      wr(a, d);
      chk(gain_we1 == (a < 8'h60) && gain_we2 == (a >= 8'h60) && gain_addr == a[4:0] && gain_wdata == d,
          $sformatf("gain write %h", a));
      @(negedge clk);
      chk(!gain_we1 && !gain_we2, "gain write is one clock");
    end
    wr(8'h03, 16'd1);
    chk(commit1 && !commit2, "commit IF1");
    wr(8'h03, 16'd2);
    chk(!commit1 && commit2, "commit IF2");
    wr(8'h20, 16'hffff);
    chk(!gain_we1 && !gain_we2 && !arm && !commit1 && tvg_sel == 2'b10 && mode_req == MODE3, "unused address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
