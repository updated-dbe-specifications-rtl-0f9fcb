// vsi_out: VSI output stage for both ports.
//
// Once per output word (word_valid, one clock per block of the filter bank)
// it loads the two 32-stream VSI words, taking either the channel data
// (arranged by chan_select) or, per port, the test vector (tvg_sel[0] for
// VSI1, tvg_sel[1] for VSI2; switchable at any time). vsi_pps is asserted for
// the whole word that carries the sample taken on the second: pps_in is the
// internal tick delayed to line up with word_valid of that block. The mode
// used by chan_select is taken over on that same word, so a mode change
// shows at the output exactly on the second it was applied at the input.
//
// vsi_clk is the VSI clock: one period per word (32 sample clocks, 32 MHz,
// in modes 1 and 2; 16 sample clocks, 64 MHz, in mode 3), low during the
// first half and high during the second, so a receiver sampling on its
// rising edge sees stable data. vsi_stb marks the clock in which a new word
// appears. The TVG substitution and the 1PPS marking follow the
// specification; the clock phase and the strobe are this design's choices.
module vsi_out
  import dbe_pkg::*;
#(
  parameter int NCH = NCH_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             word_valid,
  input  logic             pps_in,
  input  dbe_mode_e        mode_in,
  input  vlba_code_t       codes1 [NCH],
  input  vlba_code_t       codes2 [NCH],
  input  logic [31:0]      tvg_word,
  input  logic [1:0]       tvg_sel,
  output logic [VSI_W-1:0] vsi1_data,
  output logic [VSI_W-1:0] vsi2_data,
  output logic             vsi_pps,
  output logic             vsi_clk,
  output logic             vsi_stb,
  output dbe_mode_e        mode
);
  dbe_mode_e        mode_eff;
  logic [VSI_W-1:0] sel1, sel2;
  logic [5:0]       cnt;       // sample clocks since the last word
  logic [5:0]       half;

  assign mode_eff = (word_valid && pps_in) ? mode_in : mode;
  assign half     = (mode == MODE3) ? 6'(NCH_WIDE / 2) : 6'(NCH / 2);

  chan_select #(.NCH(NCH)) u_sel (
    .mode   (mode_eff),
    .codes1 (codes1),
    .codes2 (codes2),
    .vsi1   (sel1),
    .vsi2   (sel2)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vsi1_data <= '0;
      vsi2_data <= '0;
      vsi_pps   <= 1'b0;
      vsi_stb   <= 1'b0;
      cnt       <= '0;
      mode      <= MODE1;
    end else begin
      vsi_stb <= word_valid;
      if (word_valid) begin
        mode      <= mode_eff;
        vsi1_data <= tvg_sel[0] ? tvg_word : sel1;
        vsi2_data <= tvg_sel[1] ? tvg_word : sel2;
        vsi_pps   <= pps_in;
        cnt       <= '0;
      end else if (cnt != 6'h3f) begin
        cnt <= cnt + 6'd1;
      end
    end
  end

  assign vsi_clk = (cnt >= half);

endmodule
