// cw_demux: splits the head of the input queue into codeword fields.
//
// The codeword at the head of the decode window is MSB-first: the 2-bit tag,
// then the fields of its type:
//   00 uncompressed : instruction (INSTR_W bits)
//   01 small LUT    : small-LUT index (SMALL_IW bits, none for a 1-entry LUT)
//   10 big LUT      : big-LUT index (BIG_IW bits)
//   11 bitmask      : mask position (POS_W), mask value (MASK_W), big-LUT index
// The order of the bitmask fields (position, value, index) is that of the
// document's encoding example. The demultiplexer sends the index to the LUT
// the tag names; the big-LUT index is taken from whichever place it has in
// the codeword type. Fields not used by the current tag are driven to zero.
// Purely combinational.
module cw_demux
  import clcbcc_pkg::*;
#(
  parameter int unsigned INSTR_W  = 32,
  parameter int unsigned SMALL_IW = 4,
  parameter int unsigned BIG_IW   = 11,
  parameter int unsigned POS_W    = 4,
  parameter int unsigned MASK_W   = 2,
  parameter int unsigned WIN_W    = 34,
  // widths of the ports, at least one bit even for an absent field
  localparam int unsigned SMALL_IW_P = at_least_1(SMALL_IW)
) (
  input  logic [WIN_W-1:0]      window,
  output tag_e                  tag,
  output logic [INSTR_W-1:0]    raw,
  output logic [SMALL_IW_P-1:0] small_idx,
  output logic [BIG_IW-1:0]     big_idx,
  output logic [POS_W-1:0]      mask_pos,
  output logic [MASK_W-1:0]     mask_val
);

  localparam int unsigned BODY = WIN_W - TAG_W;  // bits after the tag
  logic [BODY-1:0] body;

  assign tag  = tag_e'(window[WIN_W-1 -: TAG_W]);
  assign body = window[BODY-1:0];

  always_comb begin
    raw       = '0;
    small_idx = '0;
    big_idx   = '0;
    mask_pos  = '0;
    mask_val  = '0;
    unique case (tag)
      TAG_UNCOMP: raw = body[BODY-1 -: INSTR_W];
      TAG_SMALL:  small_idx = (SMALL_IW > 0) ? body[BODY-1 -: SMALL_IW_P] : '0;
      TAG_BIG:    big_idx = body[BODY-1 -: BIG_IW];
      default: begin
        mask_pos = body[BODY-1 -: POS_W];
        mask_val = body[BODY-1-POS_W -: MASK_W];
        big_idx  = body[BODY-1-POS_W-MASK_W -: BIG_IW];
      end
    endcase
  end

  initial begin
    assert (BODY >= INSTR_W && BODY >= POS_W + MASK_W + BIG_IW && BODY >= SMALL_IW_P)
      else $error("cw_demux: window narrower than the longest codeword");
  end

endmodule
