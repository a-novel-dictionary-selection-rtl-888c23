// big_lut: the large instruction dictionary, split into banks.
//
// DEPTH entries of INSTR_W bits held in flip-flops, divided into BANKS equal
// banks. The upper bits of an index pick the bank: a demultiplexer steers a
// write to that bank only, and a multiplexer picks that bank's output on a
// read. The lower bits address the entry inside the bank. Reads are
// combinational; writes (dictionary loading) take effect at the clock edge.
// The table is not reset. The entries serve both direct big-LUT codewords and
// bitmask codewords, which correct the entry read here.
// The banked structure with demultiplexer and multiplexer follows the
// document's logic diagram; the bank count and the write port are this
// design's.
module big_lut
  import clcbcc_pkg::*;
#(
  parameter int unsigned INSTR_W = 32,
  parameter int unsigned DEPTH   = 2048,
  parameter int unsigned BANKS   = 2,
  localparam int unsigned IW     = idx_w(DEPTH)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [IW-1:0]      waddr,
  input  logic [INSTR_W-1:0] wdata,
  input  logic [IW-1:0]      raddr,
  output logic [INSTR_W-1:0] rdata
);

  localparam int unsigned BANK_DEPTH = DEPTH / BANKS;
  localparam int unsigned BW  = idx_w(BANKS);       // bank select bits
  localparam int unsigned BW_P = at_least_1(BW);
  localparam int unsigned LW  = IW - BW;            // bits inside a bank

  logic [INSTR_W-1:0] bank_q [BANKS];
  logic [BW_P-1:0]    wbank, rbank;
  logic [LW-1:0]      wloc, rloc;

  always_comb begin
    wbank = (BW > 0) ? BW_P'(waddr >> LW) : '0;
    rbank = (BW > 0) ? BW_P'(raddr >> LW) : '0;
    wloc  = waddr[LW-1:0];
    rloc  = raddr[LW-1:0];
  end

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [INSTR_W-1:0] mem [BANK_DEPTH];
    always_ff @(posedge clk) begin
      if (we && (32'(wbank) == b)) mem[wloc] <= wdata;
    end
    assign bank_q[b] = mem[rloc];
  end

  assign rdata = bank_q[rbank];

  initial begin
    assert (BANKS * BANK_DEPTH == DEPTH && (1 << IW) == DEPTH && (1 << BW) == BANKS)
      else $error("big_lut: DEPTH and BANKS must be powers of two, BANKS <= DEPTH");
  end

endmodule
