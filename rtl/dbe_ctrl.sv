// dbe_ctrl: command registers of the DBE.
//
// A simple write bus (we, addr, wdata), meant to be driven by the serial
// command interpreter, sets up everything the host controls:
//   0x00 MODE    wdata[1:0] = 1, 2 or 3 (other values ignored)
//   0x01 ARM     any write arms the 1PPS generator for the next external tick
//   0x02 TVG     wdata[0]: test vectors on VSI1, wdata[1]: on VSI2
//   0x03 COMMIT  wdata[0]: IF1 gains, wdata[1]: IF2 gains, take effect on the
//                next 1PPS tick
//   0x40-0x5F    gain of IF1 channel addr[4:0] (unsigned Q8.8)
//   0x60-0x7F    gain of IF2 channel addr[4:0]
// mode_req is the mode asked for; the signal chain takes it over on the next
// internal tick (tick), and mode_act is the mode then in force. The list of
// commands (mode, arm, TVG, gains and commit) follows the specification; the
// addresses, the bus and applying the mode on the tick are this design's
// choices. All outputs are registered, one clock after the write.
module dbe_ctrl
  import dbe_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [7:0]        addr,
  input  logic [15:0]       wdata,
  input  logic              tick,
  output dbe_mode_e         mode_req,
  output dbe_mode_e         mode_act,
  output logic              arm,
  output logic [1:0]        tvg_sel,
  output logic              gain_we1,
  output logic              gain_we2,
  output logic [4:0]        gain_addr,
  output logic [GAIN_W-1:0] gain_wdata,
  output logic              commit1,
  output logic              commit2
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_req   <= MODE1;
      mode_act   <= MODE1;
      arm        <= 1'b0;
      tvg_sel    <= '0;
      gain_we1   <= 1'b0;
      gain_we2   <= 1'b0;
      gain_addr  <= '0;
      gain_wdata <= '0;
      commit1    <= 1'b0;
      commit2    <= 1'b0;
    end else begin
      arm      <= 1'b0;
      gain_we1 <= 1'b0;
      gain_we2 <= 1'b0;
      commit1  <= 1'b0;
      commit2  <= 1'b0;
      if (tick) mode_act <= mode_req;
      if (we) begin
        unique casez (addr)
          8'h00: if (wdata[1:0] != 2'd0) mode_req <= dbe_mode_e'(wdata[1:0]);
          8'h01: arm <= 1'b1;
          8'h02: tvg_sel <= wdata[1:0];
          8'h03: begin
            commit1 <= wdata[0];
            commit2 <= wdata[1];
          end
          8'b010?_????: begin
            gain_we1   <= 1'b1;
            gain_addr  <= addr[4:0];
            gain_wdata <= wdata;
          end
          8'b011?_????: begin
            gain_we2   <= 1'b1;
            gain_addr  <= addr[4:0];
            gain_wdata <= wdata;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
