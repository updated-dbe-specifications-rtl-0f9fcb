// vsi_out_tb: self-checking test of the VSI output stage.
//
// Presents a new pair of channel blocks every M clocks (M = 32, then 16 in
// mode 3) and checks: each VSI word (channel data mapped S on even, M on
// odd streams, or the test word when selected per port), vsi_pps exactly on
// the word whose pps_in was set and held through that word, vsi_stb on each
// new word, a VSI clock of one period per word that is low in the first half
// and high in the second, and the mode change taking effect on the tick word.
module vsi_out_tb;
  import dbe_pkg::*;
  localparam int NCH = 32;

  logic clk = 0, rst_n = 0, word_valid = 0, pps_in = 0;
  dbe_mode_e mode_in = MODE1;
  vlba_code_t codes1 [NCH];
  vlba_code_t codes2 [NCH];
  logic [31:0] tvg_word = 0;
  logic [1:0] tvg_sel = 0;
  logic [31:0] vsi1_data, vsi2_data;
  logic vsi_pps, vsi_clk, vsi_stb;
  dbe_mode_e mode;

  vsi_out dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %0t: %s", $time, s); end
  endtask

  function automatic logic [31:0] mapw(vlba_code_t c [NCH], vlba_code_t d [NCH], bit second, dbe_mode_e m);
    logic [31:0] w;
    for (int i = 0; i < 16; i++) begin
      vlba_code_t x = !second ? c[i] : (m == MODE1 ? c[16 + i] : d[i]);
      w[2*i] = x[1];
      w[2*i+1] = x[0];
    end
    return w;
  endfunction

  // one word period of mm clocks; checks the word during the period
  task automatic word(int mm, bit tick, dbe_mode_e m_exp);
    logic [31:0] e1, e2, tw;
    for (int k = 0; k < NCH; k++) begin codes1[k] = 2'($urandom); codes2[k] = 2'($urandom); end
    tw = $urandom;
    @(negedge clk);
    word_valid = 1;
    pps_in = tick;
    tvg_word = tw;
    e1 = tvg_sel[0] ? tw : mapw(codes1, codes2, 0, m_exp);
    e2 = tvg_sel[1] ? tw : mapw(codes1, codes2, 1, m_exp);
    @(negedge clk);
    word_valid = 0;
    pps_in = 0;
    for (int k = 0; k < NCH; k++) begin codes1[k] = 2'($urandom); codes2[k] = 2'($urandom); end
    for (int i = 0; i < mm - 1; i++) begin
      chk(vsi1_data == e1 && vsi2_data == e2, "word");
      chk(vsi_pps == tick, "vsi_pps");
      chk(vsi_stb == (i == 0), "vsi_stb");
      chk(vsi_clk == (i >= mm / 2), $sformatf("vsi_clk at %0d of %0d", i, mm));
      chk(mode == m_exp, "mode");
      if (i < mm - 2) @(negedge clk);
    end
  endtask

  initial begin
    for (int k = 0; k < NCH; k++) begin codes1[k] = 0; codes2[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 4; w++) word(32, w == 2, MODE1);
    mode_in = MODE2;
    word(32, 0, MODE1);              // no tick: mode 1 stays
    word(32, 1, MODE2);              // tick word switches
    tvg_sel = 2'b01;
    word(32, 0, MODE2);
    tvg_sel = 2'b10;
    word(32, 0, MODE2);
    tvg_sel = 2'b00;
    mode_in = MODE3;
    word(16, 1, MODE3);              // first word of the new mode
    for (int w = 0; w < 4; w++) word(16, w == 3, MODE3);
    tvg_sel = 2'b11;
    word(16, 0, MODE3);
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
