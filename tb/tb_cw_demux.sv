// tb_cw_demux: random codewords of every type through the field splitter.
//
// Each codeword is assembled bit by bit, MSB first, from random field values
// following the format (tag, then the fields of its type), with random
// trailing bits behind it. The demultiplexer must return the same fields and
// zero in the fields the type does not use.
module tb_cw_demux;
  import clcbcc_pkg::*;
  localparam int INSTR_W = 32, SIW = 4, BIW = 11, PW = 4, MW = 2, WIN_W = 34;
  logic [WIN_W-1:0] window;
  tag_e tag;
  logic [INSTR_W-1:0] raw;
  logic [SIW-1:0] small_idx;
  logic [BIW-1:0] big_idx;
  logic [PW-1:0] mask_pos;
  logic [MW-1:0] mask_val;
  int checks = 0, failures = 0;

  cw_demux dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      automatic bit bits[$];
      automatic logic [1:0] t = 2'(n % 4);
      automatic logic [31:0] r = $urandom, s = $urandom, b = $urandom, p = $urandom, m = $urandom;
      for (int i = 1; i >= 0; i--) bits.push_back(t[i]);
      case (t)
        2'b00: for (int i = INSTR_W-1; i >= 0; i--) bits.push_back(r[i]);
        2'b01: for (int i = SIW-1; i >= 0; i--) bits.push_back(s[i]);
        2'b10: for (int i = BIW-1; i >= 0; i--) bits.push_back(b[i]);
        default: begin
          for (int i = PW-1; i >= 0; i--) bits.push_back(p[i]);
          for (int i = MW-1; i >= 0; i--) bits.push_back(m[i]);
          for (int i = BIW-1; i >= 0; i--) bits.push_back(b[i]);
        end
      endcase
      while (bits.size() < WIN_W) bits.push_back(1'($urandom));
      for (int i = 0; i < WIN_W; i++) window[WIN_W-1-i] = bits[i];
      #1;
      check(tag == tag_e'(t), "tag");
      check(raw       == ((t == 0) ? r[INSTR_W-1:0] : '0), "raw");
      check(small_idx == ((t == 1) ? s[SIW-1:0] : '0), "small index");
      check(big_idx   == ((t >= 2) ? b[BIW-1:0] : '0), "big index");
      check(mask_pos  == ((t == 3) ? p[PW-1:0] : '0), "mask position");
      check(mask_val  == ((t == 3) ? m[MW-1:0] : '0), "mask value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
