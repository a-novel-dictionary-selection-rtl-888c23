// tb_small_lut: load the whole small LUT, read it back, overwrite and re-read.
// Reads are combinational: the entry must appear without a clock edge.
module tb_small_lut;
  localparam int INSTR_W = 32, DEPTH = 16, IW = 4;
  logic clk = 1'b0;
  logic we = 0;
  logic [IW-1:0] waddr = '0, raddr = '0;
  logic [INSTR_W-1:0] wdata = '0, rdata;
  logic [INSTR_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  small_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int a = 0; a < DEPTH; a++) begin
        if (round > 0 && $urandom_range(0, 1) == 0) continue;
        @(negedge clk); we = 1; waddr = IW'(a); wdata = $urandom; model[a] = wdata;
      end
      @(negedge clk); we = 0;
      for (int n = 0; n < 64; n++) begin
        automatic int a = $urandom_range(0, DEPTH - 1);
        raddr = IW'(a);
        #1;
        checks++;
        if (rdata !== model[a]) begin
          failures++;
          $display("FAIL entry %0d got %h want %h", a, rdata, model[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
