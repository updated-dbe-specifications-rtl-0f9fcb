// dbe_top: VLBI digital back end, two IFs to two VSI ports.
//
// Two real IFs, each 512 MHz wide and sampled at 1024 Ms/s with 8 bits, are
// each split by a polyphase filter bank into 32 channels of 16 MHz or 16 of
// 32 MHz. Every channel is scaled by its own gain and cut to a 2-bit VLBA
// sample, and 16 channels go out on each of the two 32-stream VSI ports:
//   mode 1: IF1 channels 0-15 on VSI1, IF1 channels 16-31 on VSI2 (32 MHz VSI clock)
//   mode 2: IF1 channels 0-15 on VSI1, IF2 channels 0-15 on VSI2 (32 MHz VSI clock)
//   mode 3: 16 x 32 MHz channels of IF1 on VSI1, of IF2 on VSI2 (64 MHz VSI clock)
// An internal 1PPS generator, armed by command and started by the external
// 1PPS, frames the filter banks, switches modes and gain tables, restarts the
// test vector generator and, delayed through a pipeline of the same latency
// as the data, marks the output word holding the sample taken on the second.
//
// Clocking: everything runs on clk, the sample clock, one sample of each IF
// per clock. if1_data and if2_data are two's complement samples. The control
// bus (ctl_we, ctl_addr, ctl_wdata) is the register interface described in
// dbe_ctrl. The latency from a sample marked by the internal tick to the
// VSI word marked by vsi_pps is 3M+3 clocks (M = 32, or 16 in mode 3).
module dbe_top
  import dbe_pkg::*;
#(
  parameter int unsigned PERIOD = PPS_PERIOD
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       ext_pps,
  input  logic signed [SAMPLE_W-1:0] if1_data,
  input  logic signed [SAMPLE_W-1:0] if2_data,
  input  logic                       ctl_we,
  input  logic [7:0]                 ctl_addr,
  input  logic [15:0]                ctl_wdata,
  output logic [VSI_W-1:0]           vsi1_data,
  output logic [VSI_W-1:0]           vsi2_data,
  output logic                       vsi_clk,
  output logic                       vsi_pps,
  output logic                       vsi_stb,
  output logic                       int_pps,
  output logic                       pps_armed,
  output logic                       pps_running,
  output logic [1:0]                 gain_pending,
  output dbe_mode_e                  mode
);
  localparam int KW = $clog2(NCH_MAX);

  dbe_mode_e         mode_req, mode_act;
  logic              arm;
  logic [1:0]        tvg_sel;
  logic              gain_we1, gain_we2, commit1, commit2;
  logic [KW-1:0]     gain_addr;
  logic [GAIN_W-1:0] gain_wdata;

  dbe_ctrl u_ctrl (
    .clk, .rst_n,
    .we        (ctl_we),
    .addr      (ctl_addr),
    .wdata     (ctl_wdata),
    .tick      (int_pps),
    .mode_req  (mode_req),
    .mode_act  (mode_act),
    .arm       (arm),
    .tvg_sel   (tvg_sel),
    .gain_we1  (gain_we1),
    .gain_we2  (gain_we2),
    .gain_addr (gain_addr),
    .gain_wdata(gain_wdata),
    .commit1   (commit1),
    .commit2   (commit2)
  );

  pps_gen #(.PERIOD(PERIOD)) u_pps (
    .clk, .rst_n,
    .ext_pps (ext_pps),
    .arm     (arm),
    .tick    (int_pps),
    .armed   (pps_armed),
    .running (pps_running)
  );

  // ---------------------------------------------------------- filter banks
  logic                    wide1, wide2;
  logic                    y1_valid, y2_valid, y1_last, y2_last;
  logic [KW-1:0]           y1_chan, y2_chan;
  logic signed [Y_W-1:0]   y1_data, y2_data;

  pfb u_pfb1 (
    .clk, .rst_n,
    .x_in     (if1_data),
    .pps_in   (int_pps),
    .wide_req (mode_req == MODE3),
    .wide     (wide1),
    .y_valid  (y1_valid),
    .y_chan   (y1_chan),
    .y_last   (y1_last),
    .y_data   (y1_data)
  );

  pfb u_pfb2 (
    .clk, .rst_n,
    .x_in     (if2_data),
    .pps_in   (int_pps),
    .wide_req (mode_req == MODE3),
    .wide     (wide2),
    .y_valid  (y2_valid),
    .y_chan   (y2_chan),
    .y_last   (y2_last),
    .y_data   (y2_data)
  );

  // ---------------------------------------------------------- tick pipeline
  // filter bank: 2M+1 clocks to channel 0; gain stage: M+1 more to the word
  localparam int DA_MAX = 2 * NCH_MAX + 1;
  localparam int DB_MAX = NCH_MAX + 1;
  logic pps_gain, pps_word;

  pps_delay #(.DEPTH_MAX(DA_MAX)) u_dly_a (
    .clk, .rst_n,
    .in    (int_pps),
    .depth (wide1 ? 7'(2 * NCH_WIDE + 1) : 7'(2 * NCH_MAX + 1)),
    .out   (pps_gain)
  );

  pps_delay #(.DEPTH_MAX(DB_MAX)) u_dly_b (
    .clk, .rst_n,
    .in    (pps_gain),
    .depth (wide1 ? 6'(NCH_WIDE + 1) : 6'(NCH_MAX + 1)),
    .out   (pps_word)
  );

  // ---------------------------------------------------------- gain, 2 bits
  logic       codes1_valid, codes2_valid;
  vlba_code_t codes1 [NCH_MAX];
  vlba_code_t codes2 [NCH_MAX];

  chan_gain u_gain1 (
    .clk, .rst_n,
    .y_valid     (y1_valid),
    .y_chan      (y1_chan),
    .y_last      (y1_last),
    .y_data      (y1_data),
    .pps_in      (pps_gain),
    .gain_we     (gain_we1),
    .gain_addr   (gain_addr),
    .gain_wdata  (gain_wdata),
    .commit      (commit1),
    .pending     (gain_pending[0]),
    .codes_valid (codes1_valid),
    .codes       (codes1)
  );

  chan_gain u_gain2 (
    .clk, .rst_n,
    .y_valid     (y2_valid),
    .y_chan      (y2_chan),
    .y_last      (y2_last),
    .y_data      (y2_data),
    .pps_in      (pps_gain),
    .gain_we     (gain_we2),
    .gain_addr   (gain_addr),
    .gain_wdata  (gain_wdata),
    .commit      (commit2),
    .pending     (gain_pending[1]),
    .codes_valid (codes2_valid),
    .codes       (codes2)
  );

  // ---------------------------------------------------------- VSI side
  logic [31:0] tvg_word;

  tvg u_tvg (
    .clk, .rst_n,
    .step (codes1_valid),
    .sync (codes1_valid && pps_word),
    .word (tvg_word)
  );

  vsi_out u_vsi (
    .clk, .rst_n,
    .word_valid (codes1_valid),
    .pps_in     (pps_word),
    .mode_in    (mode_act),
    .codes1     (codes1),
    .codes2     (codes2),
    .tvg_word   (tvg_word),
    .tvg_sel    (tvg_sel),
    .vsi1_data  (vsi1_data),
    .vsi2_data  (vsi2_data),
    .vsi_pps    (vsi_pps),
    .vsi_clk    (vsi_clk),
    .vsi_stb    (vsi_stb),
    .mode       (mode)
  );

  // both banks share framing and width, so their blocks finish together
  always_ff @(posedge clk)
    if (rst_n) a_lockstep : assert (codes1_valid == codes2_valid && wide1 == wide2);

endmodule
