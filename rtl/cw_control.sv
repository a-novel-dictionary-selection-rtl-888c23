// cw_control: control unit of the decompression engine.
//
// It looks at the 2-bit tag at the head of the input queue, works out the
// length of that codeword from the codeword format, and fires a decode when
// the whole codeword is in the queue and the output side can take one more
// instruction (`room`). On a fire it tells the input queue how many bits to
// shift out and passes the tag on to select the path of the codeword
// (uncompressed, small LUT, big LUT or bitmask). One codeword is decoded per
// cycle at most, which gives the 32 bits/cycle decompression bandwidth of the
// engine.
//
// Interface: `tag` comes from the top of the decode window, `avail` is the
// number of valid bits in the input queue. Purely combinational. The length
// rule follows the document's format; the `room` condition is this design's.
module cw_control
  import clcbcc_pkg::*;
#(
  parameter int unsigned INSTR_W  = 32,
  parameter int unsigned SMALL_IW = 4,
  parameter int unsigned BIG_IW   = 11,
  parameter int unsigned POS_W    = 4,
  parameter int unsigned MASK_W   = 2,
  parameter int unsigned CNT_W    = 7
) (
  input  tag_e             tag,
  input  logic [CNT_W-1:0] avail,
  input  logic             room,
  output logic             fire,
  output logic [CNT_W-1:0] len
);

  localparam int unsigned LEN_UNCOMP  = TAG_W + INSTR_W;
  localparam int unsigned LEN_SMALL   = TAG_W + SMALL_IW;
  localparam int unsigned LEN_BIG     = TAG_W + BIG_IW;
  localparam int unsigned LEN_BITMASK = TAG_W + POS_W + MASK_W + BIG_IW;

  always_comb begin
    unique case (tag)
      TAG_UNCOMP: len = CNT_W'(LEN_UNCOMP);
      TAG_SMALL:  len = CNT_W'(LEN_SMALL);
      TAG_BIG:    len = CNT_W'(LEN_BIG);
      default:    len = CNT_W'(LEN_BITMASK);
    endcase
    // The tag itself must be valid before its length means anything.
    fire = room && (avail >= CNT_W'(TAG_W)) && (avail >= len);
  end

endmodule
