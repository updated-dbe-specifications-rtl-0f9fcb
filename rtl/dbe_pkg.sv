// dbe_pkg: types, constants and coefficient functions shared by the VLBI
// digital back end (DBE).
//
// The DBE takes two real IFs sampled at 1024 Ms/s with 8 bits, splits each
// into 32 x 16 MHz or 16 x 32 MHz channels with a polyphase filter bank,
// scales and requantizes every channel to 2 bits and sends 16 channels to each
// of two VSI ports. The numbers below that come from the specification are the
// sample rate, the sample depth, the channel counts, the 1PPS period and the
// three operating modes. The filter prototype (window, length, coefficient
// width) and all other widths are this design's own choices.
//
// The coefficient functions use real arithmetic and are meant to be called
// with constant arguments only, so that the coefficients become constants at
// elaboration.
package dbe_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int SAMPLE_W   = 8;              // A/D depth
  localparam int NCH_MAX    = 32;             // channels per IF (modes 1, 2)
  localparam int NCH_WIDE   = 16;             // channels per IF (mode 3)
  localparam int VSI_CH     = 16;             // channels per VSI port
  localparam int VSI_W      = 2 * VSI_CH;     // bit streams per VSI port
  localparam int TAPS       = 8;              // taps per polyphase branch
  localparam int COEF_W     = 18;             // filter coefficient width
  localparam int Y_W        = 18;             // channel sample width
  localparam int GAIN_W     = 16;             // channel gain width, Q8.8
  localparam int GAIN_FRAC  = 8;              // fractional bits of the gain
  localparam int Y_SHIFT    = 30;             // PFB output scaling (right shift)
  localparam int unsigned PPS_PERIOD = 32'd1_024_000_000; // sample clocks

  // ---------------------------------------------------------------- modes
  // MODE1: IF1 ch 0-15 -> VSI1, IF1 ch 16-31 -> VSI2 (16 MHz channels)
  // MODE2: IF1 ch 0-15 -> VSI1, IF2 ch 0-15  -> VSI2 (16 MHz channels)
  // MODE3: IF1 ch 0-15 -> VSI1, IF2 ch 0-15  -> VSI2 (32 MHz channels)
  typedef enum logic [1:0] {
    MODE1 = 2'd1,
    MODE2 = 2'd2,
    MODE3 = 2'd3
  } dbe_mode_e;

  // 2-bit VLBA sample code {S, M}: 00, 01, 10, 11 from most negative to most
  // positive.
  typedef logic [1:0] vlba_code_t;

  localparam real PI = 3.14159265358979323846;

  // Prototype low-pass filter of a cosine-modulated bank with m channels and
  // l = 2*m*TAPS taps: a sinc with its cutoff at half the channel spacing,
  // shaped by a Blackman window (about 58 dB of side-lobe rejection). The
  // value is scaled so that the centre tap is close to full scale of a
  // COEF_W-bit signed number.
  function automatic int proto_coef(int m, int l, int n);
    real c, x, s, w;
    c = (l - 1) / 2.0;
    x = (n - c) / (2.0 * m);
    s = $sin(PI * x) / (PI * x);
    w = 0.42 - 0.5 * $cos(2.0 * PI * n / (l - 1)) + 0.08 * $cos(4.0 * PI * n / (l - 1));
    return int'(s * w * ((1 << (COEF_W - 1)) - 1));
  endfunction

  // Cosine modulation of channel k at polyphase index j (0 <= j < 2*m):
  // cos((pi/m)(k+1/2)(j-(l-1)/2) + (-1)^k pi/4), scaled to COEF_W bits.
  function automatic int cos_coef(int m, int l, int k, int j);
    real ph;
    ph = (PI / m) * (k + 0.5) * (j - (l - 1) / 2.0) + (((k % 2) == 0) ? PI / 4.0 : -PI / 4.0);
    return int'($cos(ph) * ((1 << (COEF_W - 1)) - 1));
  endfunction

  // VLBA 2-bit requantizer: sign bit S (1 for v >= 0) and magnitude bit M
  // (1 when |v| is at or beyond the threshold).
  function automatic vlba_code_t vlba_quant(longint v, longint th);
    logic s, m;
    s = (v >= 0);
    m = s ? (v >= th) : (v <= -th);
    return {s, s ? m : ~m};
  endfunction

endpackage
