// chan_gain_tb: self-checking test of the channel gain and 2-bit coding.
//
// Streams blocks of 32 channel samples (random values, some near the
// threshold) through the stage and checks every 2-bit code against
// v = (y * g) >> 8 coded 00 (v <= -T), 01 (-T < v < 0), 10 (0 <= v < T),
// 11 (v >= T), with the gain table the stage should be using: the reset
// table (1.0) until a committed new table takes over on the block that
// carries the 1PPS tick, and not before. Also checks that codes_valid comes
// 2 clocks after y_last and that pending follows commit and the tick.
module chan_gain_tb;
  import dbe_pkg::*;
  localparam int NCH = 32;
  localparam longint T = 2048;

  logic clk = 0, rst_n = 0;
  logic y_valid = 0, y_last = 0, pps_in = 0, gain_we = 0, commit = 0;
  logic [4:0] y_chan = 0, gain_addr = 0;
  logic signed [Y_W-1:0] y_data = 0;
  logic [15:0] gain_wdata = 0;
  logic pending, codes_valid;
  vlba_code_t codes [NCH];

  chan_gain dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, last_cyc = -100;
  int g_now [NCH];        // table in force for the block being sent
  int g_new [NCH];
  int ys [NCH];
  int exp_codes [$][NCH];
  int n_blocks = 0;

  function automatic int ref_code(int y, int g);
    longint v = (longint'(y) * g) >>> 8;
    if (v >= T) return 3;
    if (v >= 0) return 2;
    if (v > -T) return 1;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n && codes_valid) begin
      checks++;
      if (cyc != last_cyc + 2) begin
        failures++;
        $display("FAIL: codes_valid at %0d, y_last at %0d", cyc, last_cyc);
      end
      if (exp_codes.size() == 0) begin
        failures++;
        $display("FAIL: unexpected block");
      end else begin
        for (int k = 0; k < NCH; k++) begin
          checks++;
          if (int'(codes[k]) != exp_codes[0][k]) begin
            failures++;
            if (failures < 10) $display("FAIL block %0d ch %0d: %0d exp %0d", n_blocks, k, codes[k], exp_codes[0][k]);
          end
        end
        void'(exp_codes.pop_front());
      end
      n_blocks++;
    end
    cyc++;
  end

  task automatic send_block(bit tick);
    int e [NCH];
    for (int k = 0; k < NCH; k++) begin
      case ($urandom % 3)
        0: ys[k] = int'($urandom % 65536) - 32768;
        1: ys[k] = int'($urandom % 4096) - 2048;
        default: ys[k] = int'($urandom % 200000) - 100000;
      endcase
      if (ys[k] > 131071) ys[k] = 131071;
      if (ys[k] < -131072) ys[k] = -131072;
    end
    if (tick && pending) g_now = g_new;
    for (int k = 0; k < NCH; k++) e[k] = ref_code(ys[k], g_now[k]);
    exp_codes.push_back(e);
    for (int k = 0; k < NCH; k++) begin
      @(negedge clk);
      y_valid = 1;
      y_chan = 5'(k);
      y_last = (k == NCH - 1);
      y_data = Y_W'(ys[k]);
      pps_in = tick && (k == 0);
      if (k == NCH - 1) last_cyc = cyc;
    end
    @(negedge clk);
    y_valid = 0;
    y_last = 0;
    pps_in = 0;
  endtask

  initial begin
    for (int k = 0; k < NCH; k++) begin g_now[k] = 256; g_new[k] = 64 + int'($urandom % 2000); end
    repeat (3) @(negedge clk);
    rst_n = 1;
    send_block(0);
    send_block(1);                  // tick, nothing committed: table unchanged
    // download a new table while blocks flow
    for (int k = 0; k < NCH; k++) begin
      @(negedge clk);
      gain_we = 1; gain_addr = 5'(k); gain_wdata = 16'(g_new[k]);
    end
    @(negedge clk);
    gain_we = 0;
    send_block(0);                  // not yet in force
    @(negedge clk);
    commit = 1;
    @(negedge clk);
    commit = 0;
    @(negedge clk);
    checks++;
    if (!pending) begin failures++; $display("FAIL: pending not set"); end
    send_block(0);                  // committed but no tick yet
    send_block(1);                  // in force from this block
    checks++;
    if (pending) begin failures++; $display("FAIL: pending not cleared"); end
    for (int b = 0; b < 5; b++) send_block(0);
    repeat (5) @(negedge clk);
    checks++;
    if (n_blocks != 10 || exp_codes.size() != 0) begin failures++; $display("FAIL: %0d blocks", n_blocks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
