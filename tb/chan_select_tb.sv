// chan_select_tb: self-checking test of channel selection and bit mapping.
//
// For random channel codes in each mode, checks every VSI bit stream:
// stream 2c must carry the sign bit and 2c+1 the magnitude bit of the
// channel the mode routes to VSI channel c.
module chan_select_tb;
  import dbe_pkg::*;
  localparam int NCH = 32;

  dbe_mode_e mode = MODE1;
  vlba_code_t codes1 [NCH];
  vlba_code_t codes2 [NCH];
  logic [31:0] vsi1, vsi2;

  chan_select dut (.*);

  int checks = 0, failures = 0;

  initial begin
    dbe_mode_e ml [3] = '{MODE1, MODE2, MODE3};
    for (int it = 0; it < 60; it++) begin
      mode = ml[it % 3];
      for (int k = 0; k < NCH; k++) begin
        codes1[k] = 2'($urandom);
        codes2[k] = 2'($urandom);
      end
      #1;
      for (int c = 0; c < 16; c++) begin
        logic [1:0] e1, e2;
        e1 = codes1[c];
        e2 = (mode == MODE1) ? codes1[16 + c] : codes2[c];
        checks++;
        if (vsi1[2*c] !== e1[1] || vsi1[2*c+1] !== e1[0] || vsi2[2*c] !== e2[1] || vsi2[2*c+1] !== e2[0]) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d ch %0d", mode, c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
