// chan_select: channel selection and VSI bit-stream mapping.
//
// Each VSI port carries 16 channels of 2-bit samples on 32 bit streams, the
// sign bit S of channel c on stream 2c and the magnitude bit M on stream
// 2c+1. Which filter-bank channels go where depends on the operating mode:
//   mode 1: VSI1 <- IF1 channels 0-15,  VSI2 <- IF1 channels 16-31
//   mode 2: VSI1 <- IF1 channels 0-15,  VSI2 <- IF2 channels 0-15
//   mode 3: VSI1 <- IF1 channels 0-15,  VSI2 <- IF2 channels 0-15
//           (32 MHz channels: the bank then fills only channels 0-15)
// The mapping follows the specification; treating the unused mode code 0
// like mode 1 is this design's choice. Purely combinational.
module chan_select
  import dbe_pkg::*;
#(
  parameter int NCH = NCH_MAX
) (
  input  dbe_mode_e        mode,
  input  vlba_code_t       codes1 [NCH],
  input  vlba_code_t       codes2 [NCH],
  output logic [VSI_W-1:0] vsi1,
  output logic [VSI_W-1:0] vsi2
);
  always_comb begin
    for (int c = 0; c < VSI_CH; c++) begin
      vlba_code_t a, b;
      a = codes1[c];
      b = (mode == MODE2 || mode == MODE3) ? codes2[c] : codes1[c + VSI_CH];
      vsi1[2*c]   = a[1];
      vsi1[2*c+1] = a[0];
      vsi2[2*c]   = b[1];
      vsi2[2*c+1] = b[0];
    end
  end

endmodule
