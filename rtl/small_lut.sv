// small_lut: dictionary of the most frequent instructions.
//
// A flip-flop table of DEPTH entries of INSTR_W bits. Its short index keeps
// the codewords of the most frequent instructions short. Reads are
// combinational, so an entry is available in the cycle its index is
// presented; writes (loading the dictionary before a program runs) take
// effect at the clock edge. The table is not reset: it must be loaded
// before use. Flip-flop storage and the combinational read follow the
// document; the write port and the default DEPTH of 16 are this design's.
module small_lut
  import clcbcc_pkg::*;
#(
  parameter int unsigned INSTR_W = 32,
  parameter int unsigned DEPTH   = 16,
  localparam int unsigned IW_P   = at_least_1(idx_w(DEPTH))
) (
  input  logic               clk,
  input  logic               we,
  input  logic [IW_P-1:0]    waddr,
  input  logic [INSTR_W-1:0] wdata,
  input  logic [IW_P-1:0]    raddr,
  output logic [INSTR_W-1:0] rdata
);

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
