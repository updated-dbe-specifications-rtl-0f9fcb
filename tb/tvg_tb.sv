// tvg_tb: self-checking test of the test vector generator.
//
// Steps the generator at a VSI-like rate (one step every 32 clocks), checks
// each word against a bit-serial model of the LFSR, that the word is SEED on
// every sync (1PPS) step, that the state holds between steps, and that the
// sequence does not repeat within the test.
module tvg_tb;
  logic clk = 0, rst_n = 0, step = 0, sync = 0;
  logic [31:0] word;

  tvg dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] model = 32'hFFFF_FFFF;
  logic [31:0] seen [$];

  // one LFSR step written bit by bit: shift right, feed bit 0 back into
  // the taps of x^32 + x^22 + x^2 + x + 1
  function automatic logic [31:0] lfsr(logic [31:0] s);
    logic [31:0] n;
    for (int i = 0; i < 31; i++) n[i] = s[i+1];
    n[31] = s[0];
    n[21] = s[22] ^ s[0];
    n[1]  = s[2] ^ s[0];
    n[0]  = s[1] ^ s[0];
    return n;
  endfunction

  task automatic chk(logic [31:0] e, string what);
    checks++;
    if (word !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, word, e);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      automatic bit tick = (s % 100) == 7;
      repeat (31) @(negedge clk);
      step = 1;
      sync = tick;
      #1;
      model = tick ? 32'hFFFF_FFFF : lfsr(model);
      chk(model, tick ? "sync word" : "step word");
      if (s > 7 && s < 107) begin
        foreach (seen[i]) if (seen[i] == word) begin checks++; failures++; $display("FAIL: repeat"); end
        seen.push_back(word);
      end
      @(negedge clk);
      step = 0;
      sync = 0;
      #1;
      chk(lfsr(model), "hold");
    end
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
