// clcbcc_pkg: types and helpers shared by the decompression engine.
//
// Every codeword of the compressed stream starts with a 2-bit tag that names
// its type. The four tag values are the ones of the CLCBCC/MBSDS encoding:
// an uncompressed instruction, a hit in the small LUT, a hit in the big LUT,
// or a big-LUT entry corrected by a bitmask. The fields that follow the tag
// depend on the type (see cw_demux). The helper functions compute field
// widths from the dictionary sizes so that every module agrees on them.
package clcbcc_pkg;

  typedef enum logic [1:0] {
    TAG_UNCOMP  = 2'b00,  // tag + raw instruction
    TAG_SMALL   = 2'b01,  // tag + small-LUT index
    TAG_BIG     = 2'b10,  // tag + big-LUT index
    TAG_BITMASK = 2'b11   // tag + mask position + mask value + big-LUT index
  } tag_e;

  localparam int unsigned TAG_W = 2;

  // Index width of a table with n entries; 0 for a single-entry table.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 0;
  endfunction

  // Width of a signal that carries a field of width w, at least one bit.
  function automatic int unsigned at_least_1(input int unsigned w);
    return (w > 0) ? w : 1;
  endfunction

  // Length in bits of each codeword type.
  function automatic int unsigned cw_len(input tag_e tag, input int unsigned instr_w,
                                         input int unsigned small_iw, input int unsigned big_iw,
                                         input int unsigned pos_w, input int unsigned mask_w);
    unique case (tag)
      TAG_UNCOMP: return TAG_W + instr_w;
      TAG_SMALL:  return TAG_W + small_iw;
      TAG_BIG:    return TAG_W + big_iw;
      default:    return TAG_W + pos_w + mask_w + big_iw;
    endcase
  endfunction

endpackage
