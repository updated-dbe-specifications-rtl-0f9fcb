// chan_gain: per-channel gain and 2-bit requantizer for one IF.
//
// Every filter-bank output sample is multiplied by its channel's gain and
// reduced to the 2-bit VLBA code: the sign bit S and one magnitude bit M
// that is set when the scaled value is at or beyond THRESH, coded
// SM = 00, 01, 10, 11 from most negative to most positive. The host picks
// each gain from the state counts it sees at the recorder, so that the
// channel's rms sits near the threshold. Gains are unsigned Q8.8 (256 = 1.0).
//
// Gains are double buffered: gain_we writes the shadow copy of channel
// gain_addr; commit arms a transfer, and the whole shadow table becomes
// active at the next 1PPS tick (pps_in, aligned with channel 0 of the block
// taken on the second). The multiply, the sign/magnitude code and the swap on
// the tick follow the specification; the Q8.8 format, the threshold value
// and the commit register are this design's choices.
//
// Timing: the sample with y_valid in cycle n is coded at the end of cycle
// n+1; after the sample with y_last, codes holds the whole block and
// codes_valid pulses for one clock, 2 clocks after y_last.
module chan_gain
  import dbe_pkg::*;
#(
  parameter int     NCH    = NCH_MAX,
  parameter int     YW     = Y_W,
  parameter int     GW     = GAIN_W,
  parameter int     GFRAC  = GAIN_FRAC,
  parameter longint THRESH = 2048
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    y_valid,
  input  logic [$clog2(NCH)-1:0]  y_chan,
  input  logic                    y_last,
  input  logic signed [YW-1:0]    y_data,
  input  logic                    pps_in,
  input  logic                    gain_we,
  input  logic [$clog2(NCH)-1:0]  gain_addr,
  input  logic [GW-1:0]           gain_wdata,
  input  logic                    commit,
  output logic                    pending,
  output logic                    codes_valid,
  output vlba_code_t              codes [NCH]
);
  localparam int KW = $clog2(NCH);

  logic [GW-1:0]        shadow [NCH];
  logic [GW-1:0]        active [NCH];
  logic                 s1_valid, s1_last;
  logic [KW-1:0]        s1_chan;
  logic signed [YW-1:0] s1_y;
  vlba_code_t           acc [NCH];
  vlba_code_t           code;
  longint               scaled;

  assign scaled = (longint'(s1_y) * longint'({1'b0, active[s1_chan]})) >>> GFRAC;
  assign code   = vlba_quant(scaled, THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCH; k++) begin
        shadow[k] <= GW'(1 << GFRAC);
        active[k] <= GW'(1 << GFRAC);
        acc[k]    <= '0;
        codes[k]  <= '0;
      end
      pending     <= 1'b0;
      s1_valid    <= 1'b0;
      s1_last     <= 1'b0;
      s1_chan     <= '0;
      s1_y        <= '0;
      codes_valid <= 1'b0;
    end else begin
      if (gain_we) shadow[gain_addr] <= gain_wdata;

      // take the new table on the tick if a commit is waiting
      if (pps_in && pending) begin
        for (int k = 0; k < NCH; k++) active[k] <= shadow[k];
        pending <= commit;
      end else if (commit) begin
        pending <= 1'b1;
      end

      s1_valid <= y_valid;
      s1_last  <= y_valid && y_last;
      s1_chan  <= y_chan;
      s1_y     <= y_data;

      codes_valid <= 1'b0;
      if (s1_valid) begin
        acc[s1_chan] <= code;
        if (s1_last) begin
          for (int k = 0; k < NCH; k++) codes[k] <= (k == int'(s1_chan)) ? code : acc[k];
          codes_valid <= 1'b1;
        end
      end
    end
  end

endmodule
