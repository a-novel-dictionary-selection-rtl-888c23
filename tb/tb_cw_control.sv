// tb_cw_control: exhaustive test of the control unit at the default sizes.
//
// For every tag, every fill level of the input queue and both values of
// `room`, the codeword length must be the format's (34, 6, 13 and 19 bits for
// uncompressed, small LUT, big LUT and bitmask codewords of a 32-bit
// instruction, 16-entry small LUT, 2048-entry big LUT and one 2-bit mask) and
// a decode must fire exactly when the codeword is complete and there is room.
module tb_cw_control;
  import clcbcc_pkg::*;
  localparam int CNT_W = 7;
  tag_e tag;
  logic [CNT_W-1:0] avail, len;
  logic room, fire;
  int checks = 0, failures = 0;
  int exp_len [4] = '{34, 6, 13, 19};

  cw_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4; t++)
      for (int a = 0; a <= 66; a++)
        for (int r = 0; r < 2; r++) begin
          tag = tag_e'(t); avail = CNT_W'(a); room = r[0];
          #1;
          checks++;
          if (int'(len) != exp_len[t] || fire != (r == 1 && a >= exp_len[t])) begin
            failures++;
            $display("FAIL tag=%0d avail=%0d room=%0d len=%0d fire=%0d", t, a, r, len, fire);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
