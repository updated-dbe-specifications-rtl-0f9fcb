// dbe_env: end-to-end test environment for dbe_top, shared by the reduced
// and the full-size testbench.
//
// Drives both IFs with random 8-bit samples, issues commands over the
// control bus and checks every VSI word the design delivers against a
// reference built here from first principles: for the block of M samples
// ending at cycle e, y_k = (sum_n h_k[n] x[e-n]) >> 30 by direct convolution,
// scaled by the channel gain in force (Q8.8), coded to 2 bits against the
// threshold and placed on the VSI streams as the mode routes it. The word
// carrying the sample taken on a 1PPS tick at cycle T must appear with
// vsi_pps at cycle T+3M+3, and later words every M cycles; test vectors,
// when selected, must restart from the seed on that word.
//
// With FULL = 0 the design runs with a short second (PERIOD clocks) through
// synchronisation, mode 1 -> 2 -> 3 switches, a gain table download and
// commit, test vector selection on each port, and a re-arm that moves the
// second; each of these is counted and must happen. With FULL = 1 the
// design keeps its default parameters (a second of 1,024,000,000 clocks):
// the test synchronises it and checks the first 60 words of the second.
module dbe_env #(
  parameter int unsigned PERIOD = 3200,
  parameter bit          FULL   = 1'b0
);
  import dbe_pkg::*;

  localparam int NCYC = FULL ? 4000 : 24000;
  localparam int MN   = NCH_MAX;
  localparam int MW   = NCH_WIDE;
  localparam int L    = 2 * MN * TAPS;
  localparam int LW   = 2 * MW * TAPS;
  localparam longint THRESH = 2048;

  logic clk = 0, rst_n = 0, ext_pps = 0;
  logic signed [7:0] if1_data = 0, if2_data = 0;
  logic ctl_we = 0;
  logic [7:0] ctl_addr = 0;
  logic [15:0] ctl_wdata = 0;
  logic [31:0] vsi1_data, vsi2_data;
  logic vsi_clk, vsi_pps, vsi_stb, int_pps, pps_armed, pps_running;
  logic [1:0] gain_pending;
  dbe_mode_e mode;

  if (FULL) begin : g_full
    dbe_top dut (.*);
  end else begin : g_red
    dbe_top #(.PERIOD(PERIOD)) dut (.*);
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int xs1 [NCYC], xs2 [NCYC];
  int p32 [L], p16 [LW];
  int c32 [MN][2*MN], c16 [MW][2*MW];

  // host-side model of the command state
  int mode_req_m = 1;
  int g_sh1 [MN], g_sh2 [MN], g_act1 [MN], g_act2 [MN];
  bit pend1 = 0, pend2 = 0;
  bit tvg_hist [NCYC];
  bit tvg2_hist [NCYC];
  bit tvg1_m = 0, tvg2_m = 0;

  // epochs: one per internal tick
  int n_ep = 0;
  int ep_t [16], ep_m [16], ep_mode [16];
  int ep_g1 [16][MN], ep_g2 [16][MN];
  logic [31:0] tvg_m = 32'hFFFF_FFFF;

  // mechanism counters
  int n_sync = 0, n_ticks = 0, n_marked = 0, n_words = 0, n_mode_sw = 0;
  int n_gain_swap = 0, n_tvg_words = 0, n_resync = 0, n_mode3_words = 0, n_mode2_words = 0;
  int last_tick = -1;
  int code_hist [4] = '{0, 0, 0, 0};

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL cycle %0d: %s", cyc, s);
  endtask

  function automatic logic [31:0] lfsr(logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  function automatic int ref_code(bit second_if, int e, int k, int mm, int g);
    longint acc = 0;
    longint v;
    int ll = 2 * mm * TAPS;
    for (int n = 0; n < ll; n++) begin
      longint h;
      int xv = (e - n >= 0) ? (second_if ? xs2[e - n] : xs1[e - n]) : 0;
      h = (mm == MN) ? longint'(p32[n]) * c32[k][n % (2*mm)] : longint'(p16[n]) * c16[k][n % (2*mm)];
      if (((n / (2*mm)) % 2) == 1) h = -h;
      acc += h * xv;
    end
    acc = acc >>> Y_SHIFT;
    if (acc > 131071) acc = 131071;
    if (acc < -131072) acc = -131072;
    v = (acc * g) >>> GAIN_FRAC;
    if (v >= THRESH) return 3;
    if (v >= 0) return 2;
    if (v > -THRESH) return 1;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      // ---------------------------------------------- internal ticks
      if (int_pps) begin
        n_ticks++;
        if (last_tick >= 0 && cyc - last_tick != int'(PERIOD)) n_resync++;
        if (last_tick < 0) n_sync++;
        last_tick = cyc;
        if (n_ep < 16) begin
          ep_t[n_ep] = cyc;
          ep_mode[n_ep] = mode_req_m;
          ep_m[n_ep] = (mode_req_m == 3) ? MW : MN;
          if (n_ep > 0 && ep_mode[n_ep] != ep_mode[n_ep - 1]) n_mode_sw++;
          if (pend1) begin g_act1 = g_sh1; n_gain_swap++; end
          if (pend2) begin g_act2 = g_sh2; n_gain_swap++; end
          pend1 = 0;
          pend2 = 0;
          ep_g1[n_ep] = g_act1;
          ep_g2[n_ep] = g_act2;
          n_ep++;
        end
      end
      // ---------------------------------------------- VSI words
      if (vsi_stb) begin
        automatic int ep = -1;
        for (int i = 0; i < n_ep; i++)
          if (cyc >= ep_t[i] + 3 * ep_m[i] + 3) ep = i;
        if (ep >= 0) begin
          automatic int mm = ep_m[ep];
          automatic int md = ep_mode[ep];
          automatic int e = cyc - 2 * mm - 4;
          automatic bit marked = (cyc == ep_t[ep] + 3 * mm + 3);
          automatic logic [31:0] w1, w2;
          if ((cyc - (ep_t[ep] + 3 * mm + 3)) % mm != 0) fail("word off the block grid");
          tvg_m = marked ? 32'hFFFF_FFFF : lfsr(tvg_m);
          for (int c = 0; c < VSI_CH; c++) begin
            automatic int a = ref_code(0, e, c, mm, ep_g1[ep][c]);
            automatic int b = (md == 1) ? ref_code(0, e, c + 16, mm, ep_g1[ep][c + 16])
                              : ref_code(1, e, c, mm, ep_g2[ep][c]);
            code_hist[a]++;
            code_hist[b]++;
            w1[2*c] = a[1]; w1[2*c+1] = a[0];
            w2[2*c] = b[1]; w2[2*c+1] = b[0];
          end
          if (tvg_hist[cyc - 1])  begin w1 = tvg_m; n_tvg_words++; end
          if (tvg2_hist[cyc - 1]) begin w2 = tvg_m; n_tvg_words++; end
          checks++;
          if (vsi1_data != w1 || vsi2_data != w2)
            fail($sformatf("word (mode %0d, marked %0b): %h %h expected %h %h", md, marked, vsi1_data, vsi2_data, w1, w2));
          checks++;
          if (vsi_pps != marked) fail("vsi_pps");
          if (marked) n_marked++;
          if (md == 3) n_mode3_words++;
          if (md == 2) n_mode2_words++;
          n_words++;
        end
      end else if (vsi_pps && !$past(vsi_stb) && !$past(vsi_pps)) begin
        fail("vsi_pps without a word");
      end
    end
    if (cyc + 1 < NCYC) begin
      tvg_hist[cyc + 1] = tvg1_m;
      tvg2_hist[cyc + 1] = tvg2_m;
    end
    cyc++;
  end

  task automatic drive(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if1_data = 8'(int'($urandom % 81) - 40);
      if2_data = 8'(int'($urandom % 81) - 40);
      if (cyc < NCYC) begin
        xs1[cyc] = int'(if1_data);
        xs2[cyc] = int'(if2_data);
      end
    end
  endtask

  // a control write; its effect is visible from the cycle after the write
  task automatic wr(logic [7:0] a, logic [15:0] d);
    drive(1);
    ctl_we = 1; ctl_addr = a; ctl_wdata = d;
    drive(1);
    ctl_we = 0;
  endtask

  task automatic set_mode(int m);
    wr(8'h00, 16'(m));
    mode_req_m = m;
  endtask

  task automatic set_tvg(bit v1, bit v2);
    wr(8'h02, {14'd0, v2, v1});
    tvg1_m = v1;
    tvg2_m = v2;
  endtask

  task automatic ext_edge(int width);
    drive(1);
    ext_pps = 1;
    drive(width);
    ext_pps = 0;
  endtask

  initial begin
    for (int n = 0; n < L; n++)  p32[n] = int'(18'(proto_coef(MN, L, n)));
    for (int n = 0; n < LW; n++) p16[n] = int'(18'(proto_coef(MW, LW, n)));
    for (int k = 0; k < MN; k++) for (int j = 0; j < 2*MN; j++) c32[k][j] = int'(18'(cos_coef(MN, L, k, j)));
    for (int k = 0; k < MW; k++) for (int j = 0; j < 2*MW; j++) c16[k][j] = int'(18'(cos_coef(MW, LW, k, j)));
    for (int i = 0; i < NCYC; i++) begin xs1[i] = 0; xs2[i] = 0; tvg_hist[i] = 0; tvg2_hist[i] = 0; end
    for (int k = 0; k < MN; k++) begin g_sh1[k] = 256; g_sh2[k] = 256; g_act1[k] = 256; g_act2[k] = 256; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    drive(100);
    // gain table for IF1, committed before synchronisation
    for (int k = 0; k < MN; k++) begin
      g_sh1[k] = 160 + int'($urandom % 300);
      wr(8'h40 + 8'(k), 16'(g_sh1[k]));
    end
    wr(8'h03, 16'd1);
    pend1 = 1;
    wr(8'h01, 16'd0);                           // arm
    drive(200);
    ext_edge(40);                               // synchronising edge
    if (FULL) begin
      drive(60 * MN + 150);
    end else begin
      drive(PERIOD / 2);
      set_mode(2);                              // second 1: mode 2
      drive(PERIOD / 2);
      drive(PERIOD / 4);
      set_tvg(1'b0, 1'b1);                      // test vectors on VSI2
      drive(PERIOD / 4);
      set_tvg(1'b1, 1'b0);                      // then on VSI1
      drive(PERIOD / 4);
      set_tvg(1'b0, 1'b0);
      set_mode(3);                              // second 2: mode 3
      drive(PERIOD / 4);
      drive(PERIOD / 2);
      for (int k = 0; k < MW; k++) begin        // new IF2 table for second 3
        g_sh2[k] = 100 + int'($urandom % 500);
        wr(8'h60 + 8'(k), 16'(g_sh2[k]));
      end
      wr(8'h03, 16'd2);
      pend2 = 1;
      drive(PERIOD / 2);
      drive(PERIOD / 3);
      set_mode(1);
      wr(8'h01, 16'd0);                         // re-arm: move the second
      drive(PERIOD / 3);
      ext_edge(3);
      drive(PERIOD + 200);
    end
    // ------------------------------------------------ mechanism coverage
    $display("sync %0d ticks %0d resync %0d marked words %0d words %0d mode switches %0d mode2 words %0d mode3 words %0d gain swaps %0d tvg words %0d",
             n_sync, n_ticks, n_resync, n_marked, n_words, n_mode_sw, n_mode2_words, n_mode3_words, n_gain_swap, n_tvg_words);
    $display("2-bit code counts: 00 %0d, 01 %0d, 10 %0d, 11 %0d", code_hist[0], code_hist[1], code_hist[2], code_hist[3]);
    checks++; if (code_hist[0] < n_words || code_hist[3] < n_words || code_hist[1] < n_words || code_hist[2] < n_words) fail("all four codes");
    checks++; if (n_sync != 1) fail("synchronisation");
    checks++; if (n_marked < 1 || n_words < 50) fail("marked words");
    checks++; if (n_gain_swap < 1) fail("gain table swap");
    if (!FULL) begin
      checks++; if (n_ticks < 5) fail("periodic ticks");
      checks++; if (n_resync != 1) fail("re-arm");
      checks++; if (n_mode_sw < 3 || n_mode2_words < 10 || n_mode3_words < 10) fail("mode switches");
      checks++; if (n_gain_swap < 2) fail("second gain swap");
      checks++; if (n_tvg_words < 10) fail("test vectors");
      checks++; if (n_marked != n_ticks) fail("one marked word per tick");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
