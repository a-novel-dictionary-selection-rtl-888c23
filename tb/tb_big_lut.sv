// tb_big_lut: load all 2048 entries of the banked big LUT and read them back.
//
// Every entry gets a distinct random value; reading all of them in order and
// at random checks that the bank demultiplexer writes only the addressed bank
// and the output multiplexer returns that bank's word. A second pass rewrites
// a random subset and checks that the others are untouched.
module tb_big_lut;
  localparam int INSTR_W = 32, DEPTH = 2048, IW = 11;
  logic clk = 1'b0;
  logic we = 0;
  logic [IW-1:0] waddr = '0, raddr = '0;
  logic [INSTR_W-1:0] wdata = '0, rdata;
  logic [INSTR_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  big_lut dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < DEPTH; a++) begin
      raddr = IW'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL entry %0d got %h want %h", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = IW'(a); wdata = {a[15:0], 16'($urandom)}; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    read_all();
    for (int n = 0; n < 500; n++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      @(negedge clk); we = 1; waddr = IW'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
