// pfb_tb: self-checking test of the polyphase filter bank.
//
// Part 1 (32 channels): random samples, a tick to set the framing, and every
// output compared with a direct-form convolution y_k = sum_n h_k[n] x[e-n]
// computed here sample by sample (the bank computes it through polyphase
// sums and a modulation matrix), including the channel index, y_last and the
// output timing: channel k of the block whose last sample arrives in cycle e
// must appear in cycle e+M+2+k, i.e. channel 0 of the tick block 2M+1 cycles
// after the tick.
// Part 2 (16 channels): the same after switching to the wide mode on a tick.
// Part 3: a tone at the centre of channel 5 must put at least 40 dB more
// power into channel 5 than into any channel two or more channels away.
module pfb_tb;
  import dbe_pkg::*;

  localparam int M  = NCH_MAX;
  localparam int MW = NCH_WIDE;
  localparam int L  = 2 * M * TAPS;
  localparam int LW = 2 * MW * TAPS;
  localparam int NCYC = 5000;

  logic clk = 0, rst_n = 0;
  logic signed [7:0] x_in = 0;
  logic pps_in = 0, wide_req = 0;
  logic wide, y_valid, y_last;
  logic [4:0] y_chan;
  logic signed [Y_W-1:0] y_data;

  pfb dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  int xs [NCYC];
  int p32 [L], p16 [LW];
  int c32 [M][2*M], c16 [MW][2*MW];
  int t_tick = -1, m_cur = M;
  int n_valid = 0;
  bit tone_mode = 0;
  real pow_ch [M];

  function automatic longint ref_y(int e, int k, int mm);
    longint acc = 0;
    int ll = 2 * mm * TAPS;
    for (int n = 0; n < ll; n++) begin
      longint h;
      int xv = (e - n >= 0) ? xs[e - n] : 0;
      h = (mm == M) ? longint'(p32[n]) * c32[k][n % (2*mm)] : longint'(p16[n]) * c16[k][n % (2*mm)];
      if (((n / (2*mm)) % 2) == 1) h = -h;
      acc += h * xv;
    end
    acc = acc >>> Y_SHIFT;
    if (acc > 131071) acc = 131071;
    if (acc < -131072) acc = -131072;
    return acc;
  endfunction

  // output monitor: sampled at each rising edge (values of the ending cycle)
  always @(posedge clk) begin
    if (rst_n && t_tick >= 0 && !tone_mode) begin
      automatic int rel = cyc - t_tick - (2 * m_cur + 1);
      if (rel >= 0 && rel < 8 * m_cur) begin
        automatic int k = rel % m_cur;
        automatic int e = cyc - m_cur - 2 - k;
        automatic longint r = ref_y(e, k, m_cur);
        checks++;
        if (!y_valid || int'(y_chan) != k || y_last != (k == m_cur - 1) || longint'(y_data) != r) begin
          failures++;
          if (failures < 10)
            $display("FAIL cyc %0d M %0d: valid %b chan %0d (exp %0d) last %b data %0d (exp %0d)",
                     cyc, m_cur, y_valid, y_chan, k, y_last, y_data, r);
        end
      end
    end
    if (tone_mode && y_valid) pow_ch[y_chan] += real'(y_data) * real'(y_data);
    if (y_valid) n_valid++;
    cyc <= cyc + 1;
  end

  task automatic drive(int n, bit tone);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (tone) x_in = 8'(int'($rtoi(100.0 * $cos(2.0 * PI * (5.5 / (2.0 * M)) * cyc + 0.3) + 100.5) - 100));
      else      x_in = 8'($urandom);
      pps_in = 0;
      xs[cyc] = int'(x_in);
    end
  endtask

  task automatic tick(int mm);
    @(negedge clk);
    x_in = 8'($urandom);
    pps_in = 1;
    xs[cyc] = int'(x_in);
    t_tick = cyc;
    m_cur = mm;
  endtask

  initial begin
    for (int n = 0; n < L; n++)  p32[n] = int'(18'(proto_coef(M, L, n)));
    for (int n = 0; n < LW; n++) p16[n] = int'(18'(proto_coef(MW, LW, n)));
    for (int k = 0; k < M; k++)  for (int j = 0; j < 2*M; j++)  c32[k][j] = int'(18'(cos_coef(M, L, k, j)));
    for (int k = 0; k < MW; k++) for (int j = 0; j < 2*MW; j++) c16[k][j] = int'(18'(cos_coef(MW, LW, k, j)));
    for (int i = 0; i < NCYC; i++) xs[i] = 0;
    for (int k = 0; k < M; k++) pow_ch[k] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    drive(37, 0);
    // part 1: narrow mode
    tick(M);
    drive(10 * M, 0);
    // part 2: wide mode, requested and taken over on a tick
    wide_req = 1;
    drive(5, 0);
    tick(MW);
    drive(10 * MW, 0);
    checks++;
    if (!wide) begin failures++; $display("FAIL: wide mode not taken"); end
    // part 3: tone in channel 5, narrow mode
    wide_req = 0;
    drive(5, 0);
    tick(M);
    drive(20 * M, 1);   // flush the random samples out of the delay line
    tone_mode = 1;
    drive(20 * M, 1);
    begin
      automatic real worst = 0.0;
      for (int k = 0; k < M; k++)
        if ((k < 4 || k > 6) && pow_ch[k] > worst) worst = pow_ch[k];
      checks++;
      $display("tone: channel 5 power %g, worst far channel %g (%0.1f dB)", pow_ch[5], worst,
               10.0 * $log10(pow_ch[5] / (worst + 1.0)));
      if (pow_ch[5] < 1.0e4 * (worst + 1.0)) begin failures++; $display("FAIL: rejection"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * (NCYC - 10));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
