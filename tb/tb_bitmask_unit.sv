// tb_bitmask_unit: every mask position and value on random dictionary words.
//
// The expected instruction is built bit by bit: mask bit i (MSB first) lands
// on instruction bit INSTR_W-1 - (position*MASK_W + i), counting aligned
// groups from the most significant end, and flips it.
module tb_bitmask_unit;
  localparam int INSTR_W = 32, MASK_W = 2, POS_W = 4;
  logic [INSTR_W-1:0] dict_word, instr, expected;
  logic [POS_W-1:0] mask_pos;
  logic [MASK_W-1:0] mask_val;
  int checks = 0, failures = 0;

  bitmask_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++)
      for (int p = 0; p < (1 << POS_W); p++)
        for (int m = 0; m < (1 << MASK_W); m++) begin
          dict_word = $urandom; mask_pos = POS_W'(p); mask_val = MASK_W'(m);
          expected = dict_word;
          for (int i = 0; i < MASK_W; i++)
            if (mask_val[MASK_W-1-i]) expected[INSTR_W-1-(p*MASK_W+i)] ^= 1'b1;
          #1;
          checks++;
          if (instr !== expected) begin
            failures++;
            $display("FAIL word=%h pos=%0d mask=%b got %h want %h", dict_word, p, mask_val, instr, expected);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
