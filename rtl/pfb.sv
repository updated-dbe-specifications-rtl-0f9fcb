// pfb: polyphase filter bank for one real IF.
//
// The bank divides the 0-512 MHz band of a real signal sampled at 1024 Ms/s
// into NCH real channels: 32 channels of 16 MHz (modes 1 and 2) or, when
// wide is set, 16 channels of 32 MHz (mode 3). Every channel leaves the bank
// critically sampled, as one real sample per NCH input samples (32 Ms/s or
// 64 Ms/s), which is the Nyquist rate of its band. The channel counts and
// rates follow the specification; the structure is this design's choice: a
// cosine-modulated (pseudo-QMF) filter bank,
//
//   y_k[m] = sum_n p[n] cos((pi/M)(k+1/2)(n-(L-1)/2) + (-1)^k pi/4) x[mM-n],
//
// with a Blackman-windowed sinc prototype p of L = 2*M*TAPS taps (about
// 58 dB stop-band rejection, inside the 50-60 dB the specification hopes
// for). Channel k covers k*fs/2M .. (k+1)*fs/2M; odd channels come out
// spectrally inverted, as usual for bandpass sampling.
//
// Structure. Samples shift into a delay line every clock (one sample per
// clock: clk is the sample clock). At the end of each block of M samples the
// line is copied to a snapshot. During the next M clocks the polyphase stage
// forms two of the 2M partial sums
//   u[j] = sum_t (-1)^t p[j+2Mt] x[mM-j-2Mt]
// per clock (2*TAPS multipliers) into one bank of a ping-pong buffer; during
// the M clocks after that the modulation stage produces one channel per clock
// as y_k = sum_j c_k[j] u[j] (2M multipliers) from the other bank. No
// rounding happens before the final scaling, so the result equals the direct
// convolution exactly.
//
// Framing and timing. pps_in marks the sample taken on the second tick: that
// sample becomes the first sample (phase 0) of a block, and wide_req is
// taken over at the same time (after reset the bank runs narrow), so the
// framing is the same after any reset. The channel-0 output of that block
// appears with y_valid exactly 2M+1 clocks after pps_in, channel M-1 (with
// y_last) 3M clocks after it. A change of channel width drops the blocks in
// flight.
module pfb
  import dbe_pkg::*;
#(
  parameter int NCH      = NCH_MAX,   // channels in the narrow modes
  parameter int NCH_W    = NCH_WIDE,  // channels in the wide mode
  parameter int NTAPS    = TAPS,
  parameter int CW       = COEF_W,
  parameter int XW       = SAMPLE_W,
  parameter int YW       = Y_W,
  parameter int YSHIFT   = Y_SHIFT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [XW-1:0]     x_in,
  input  logic                     pps_in,
  input  logic                     wide_req,
  output logic                     wide,
  output logic                     y_valid,
  output logic [$clog2(NCH)-1:0]   y_chan,
  output logic                     y_last,
  output logic signed [YW-1:0]     y_data
);
  localparam int L   = 2 * NCH * NTAPS;     // prototype length, narrow mode
  localparam int LW  = 2 * NCH_W * NTAPS;   // prototype length, wide mode
  localparam int UW  = XW + CW + $clog2(NTAPS);
  localparam int KW  = $clog2(NCH);
  localparam int SW  = $clog2(NCH + 1);

  // ------------------------------------------------------------ coefficients
  logic signed [CW-1:0] p_rom  [L];
  logic signed [CW-1:0] pw_rom [LW];
  logic signed [CW-1:0] c_rom  [NCH * 2 * NCH];
  logic signed [CW-1:0] cw_rom [NCH_W * 2 * NCH_W];

  for (genvar n = 0; n < L; n++) begin : g_p
    localparam logic signed [CW-1:0] V = CW'(proto_coef(NCH, L, n));
    assign p_rom[n] = V;
  end
  for (genvar n = 0; n < LW; n++) begin : g_pw
    localparam logic signed [CW-1:0] V = CW'(proto_coef(NCH_W, LW, n));
    assign pw_rom[n] = V;
  end
  for (genvar k = 0; k < NCH; k++) begin : g_ck
    for (genvar j = 0; j < 2 * NCH; j++) begin : g_cj
      localparam logic signed [CW-1:0] V = CW'(cos_coef(NCH, L, k, j));
      assign c_rom[k * 2 * NCH + j] = V;
    end
  end
  for (genvar k = 0; k < NCH_W; k++) begin : g_cwk
    for (genvar j = 0; j < 2 * NCH_W; j++) begin : g_cwj
      localparam logic signed [CW-1:0] V = CW'(cos_coef(NCH_W, LW, k, j));
      assign cw_rom[k * 2 * NCH_W + j] = V;
    end
  end

  // ------------------------------------------------------------ framing
  logic signed [XW-1:0] dl   [L];       // dl[0] is the newest sample
  logic signed [XW-1:0] snap [L];
  logic [KW-1:0]        ph, cur_ph;
  logic [KW-1:0]        m_last;         // M-1 for the current width
  logic                 blk_end;

  assign m_last  = wide ? KW'(NCH_W - 1) : KW'(NCH - 1);
  assign cur_ph  = pps_in ? '0 : ph;
  assign blk_end = (cur_ph == m_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) dl[i] <= '0;
    end else begin
      dl[0] <= x_in;
      for (int i = 1; i < L; i++) dl[i] <= dl[i-1];
    end
  end

  // ------------------------------------------------------------ stages
  logic [SW-1:0]        sc;             // clocks since block end; NCH = idle
  logic                 wb;             // bank written by the polyphase stage
  logic                 y_act;          // the other bank holds a full block
  logic signed [UW-1:0] ubank [2][2 * NCH];
  logic signed [UW-1:0] u_new [2];
  logic signed [63:0]   y_acc;
  logic signed [63:0]   y_scl;

  // polyphase partial sums u[2sc] and u[2sc+1]
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      automatic longint acc = 0;
      for (int t = 0; t < NTAPS; t++) begin
        automatic int j  = 2 * int'(sc) + i;
        automatic int ix = wide ? j + 2 * NCH_W * t : j + 2 * NCH * t;
        automatic longint pr;
        if (ix < L) begin
          pr = (wide ? longint'(pw_rom[ix % LW]) : longint'(p_rom[ix])) * longint'(snap[ix]);
          acc = ((t % 2) == 0) ? acc + pr : acc - pr;
        end
      end
      u_new[i] = UW'(acc);
    end
  end

  // modulation: channel sc from the full bank
  always_comb begin
    automatic longint acc = 0;
    for (int j = 0; j < 2 * NCH; j++) begin
      automatic int k = int'(sc) % NCH;
      if (wide) begin
        if (j < 2 * NCH_W)
          acc += longint'(cw_rom[(k % NCH_W) * 2 * NCH_W + j]) * longint'(ubank[!wb][j]);
      end else begin
        acc += longint'(c_rom[k * 2 * NCH + j]) * longint'(ubank[!wb][j]);
      end
    end
    y_acc = acc;
    y_scl = y_acc >>> YSHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph      <= '0;
      wide    <= 1'b0;
      sc      <= SW'(NCH);
      wb      <= 1'b0;
      y_act   <= 1'b0;
      y_valid <= 1'b0;
      y_chan  <= '0;
      y_last  <= 1'b0;
      y_data  <= '0;
      for (int b = 0; b < 2; b++)
        for (int j = 0; j < 2 * NCH; j++) ubank[b][j] <= '0;
      for (int i = 0; i < L; i++) snap[i] <= '0;
    end else begin
      ph <= blk_end ? '0 : cur_ph + KW'(1);

      // output of the modulation stage
      y_valid <= y_act && (sc <= SW'(m_last));
      y_chan  <= KW'(sc);
      y_last  <= y_act && (sc == SW'(m_last));
      if (y_scl > longint'(2 ** (YW - 1) - 1))   y_data <= YW'(2 ** (YW - 1) - 1);
      else if (y_scl < -longint'(2 ** (YW - 1))) y_data <= YW'(-(2 ** (YW - 1)));
      else                                        y_data <= YW'(y_scl);

      // polyphase stage writes two partial sums per clock
      if (sc <= SW'(m_last)) begin
        ubank[wb][2 * int'(sc)]     <= u_new[0];
        ubank[wb][2 * int'(sc) + 1] <= u_new[1];
      end

      if (sc < SW'(NCH)) sc <= sc + SW'(1);

      if (pps_in && (wide_req != wide)) begin
        // new channel width: restart both stages
        wide  <= wide_req;
        sc    <= SW'(NCH);
        y_act <= 1'b0;
      end else if (blk_end) begin
        snap[0] <= x_in;
        for (int i = 1; i < L; i++) snap[i] <= dl[i-1];
        sc    <= '0;
        wb    <= !wb;
        y_act <= (sc == SW'(m_last));
      end
    end
  end

endmodule
