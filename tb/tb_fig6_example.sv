// tb_fig6_example: the small worked example of the encoding, run through the
// engine scaled to 8-bit instructions.
//
// Dictionaries: small LUT with one entry (00000000, so its codeword is the
// bare tag 01), big LUT with two entries (0: 01011101, 1: 11000000), one
// 2-bit mask at 4 aligned positions (2 position bits). The stream below is
// written out codeword by codeword, as the example encodes it, e.g.
// 11000100 -> "11 10 01 1": bitmask, position 2 (bits 3:2), mask 01, big
// entry 1. The engine must return the 15 original 8-bit vectors in order.
module tb_fig6_example;
  localparam int INSTR_W = 8, IN_W = 32;

  logic clk = 1'b0;
  logic rst_n = 0, clear = 0;
  logic dict_we = 0, dict_big = 0;
  logic [0:0] dict_addr = '0;
  logic [INSTR_W-1:0] dict_wdata = '0;
  logic in_valid = 0, in_ready;
  logic [IN_W-1:0] in_data = '0;
  logic out_valid, out_ready = 0;
  logic [INSTR_W-1:0] out_instr;

  clcbcc_mbsds #(.INSTR_W(8), .SMALL_DEPTH(1), .BIG_DEPTH(2), .BIG_BANKS(1),
                 .MASK_W(2), .IN_W(IN_W), .OQ_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // original vectors and their codewords (as strings of bits)
  typedef struct { logic [7:0] v; string cw; } row_t;
  row_t rows[15] = '{
    '{8'b00000000, "01"},          // A: small LUT
    '{8'b00000000, "01"},
    '{8'b00000000, "01"},
    '{8'b00000000, "01"},
    '{8'b01010101, "0001010101"},  // B: uncompressed
    '{8'b01011101, "100"},         // C: big LUT entry 0
    '{8'b01011101, "100"},
    '{8'b01011101, "100"},
    '{8'b01010111, "0001010111"},  // D: uncompressed
    '{8'b11000011, "1111111"},     // E: entry 1, mask 11 at position 3
    '{8'b00001100, "0000001100"},  // F: uncompressed
    '{8'b00001100, "0000001100"},
    '{8'b11000000, "101"},         // G: big LUT entry 1
    '{8'b11000000, "101"},
    '{8'b11000100, "1110011"}      // H: entry 1, mask 01 at position 2
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit bits[$];
    logic [IN_W-1:0] words[$];
    int wi, n_out, nbits;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); dict_we = 1; dict_big = 0; dict_addr = 0; dict_wdata = 8'b00000000;
    @(negedge clk); dict_we = 1; dict_big = 1; dict_addr = 0; dict_wdata = 8'b01011101;
    @(negedge clk); dict_we = 1; dict_big = 1; dict_addr = 1; dict_wdata = 8'b11000000;
    @(negedge clk); dict_we = 0;
    foreach (rows[r])
      for (int i = 0; i < rows[r].cw.len(); i++) bits.push_back(rows[r].cw[i] == "1");
    nbits = bits.size();
    while (bits.size() % IN_W != 0) bits.push_back(1'b0);
    while (bits.size() > 0) begin
      logic [IN_W-1:0] w;
      for (int i = IN_W - 1; i >= 0; i--) w[i] = bits.pop_front();
      words.push_back(w);
    end
    checks++;
    if (nbits != 77) begin failures++; $display("FAIL stream is %0d bits", nbits); end
    wi = 0; n_out = 0;
    while (n_out < 15) begin
      @(negedge clk);
      in_valid = (wi < words.size());
      in_data = in_valid ? words[wi] : '0;
      out_ready = 1;
      if (in_valid && in_ready) wi++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_instr != rows[n_out].v) begin
          failures++;
          $display("FAIL vector %0d: got %b want %b", n_out, out_instr, rows[n_out].v);
        end
        n_out++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
