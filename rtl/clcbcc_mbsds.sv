// clcbcc_mbsds: decompression engine for bitmask/dictionary compressed code.
//
// Programs are compressed offline into variable-length codewords that each
// stand for one INSTR_W-bit instruction. A 2-bit tag starts each codeword:
//   00 + instruction                      instruction stored uncompressed
//   01 + small index                      entry of the small LUT (frequent
//                                         instructions, short codeword)
//   10 + big index                        entry of the big LUT
//   11 + position + mask + big index      big-LUT entry with one MASK_W-bit
//                                         group flipped by the mask
// The engine turns that stream back into instructions:
//   input queue -> control unit + demultiplexer -> [stage register] ->
//   small LUT / big LUT (banked) / bitmask unit / uncompressed path ->
//   output queue.
// Decode (stage 1) takes the codeword at the head of the input queue, splits
// it into fields and shifts it out. The next cycle (stage 2) reads the LUTs
// and, in parallel, shifts the mask into place; the bitmask XOR is applied to
// the big-LUT word, and the selected result is written to the output queue.
// Up to one codeword is decoded per cycle, one INSTR_W-bit instruction per
// cycle (32 bits/cycle at the defaults), as long as the input supplies enough
// bits: an uncompressed codeword is longer than an input word, so runs of
// them are limited by the input bandwidth.
//
// Interfaces (all valid-ready except the dictionary port):
//   dict_*   : load port for the LUTs, used before a program runs
//              (dict_big selects the big LUT, else the small LUT).
//   in_*     : IN_W-bit words of the compressed stream, MSB first.
//   out_*    : decompressed instructions in program order.
//   clear    : empties both queues and the pipeline (start of a new stream).
// Latency: a codeword whose last bit is in the input queue at the start of
// cycle n is decoded in n, its instruction is in the output queue from n+2.
//
// From the document: the tag encoding, the field order of the bitmask
// codeword, one 2-bit mask at aligned positions, 32-bit instructions, a
// 2048-entry big LUT split into banks with a demultiplexer and multiplexer,
// flip-flop LUTs, input and output queues and the 32 bits/cycle bandwidth.
// This design's choices: the two-stage pipeline, the 16-entry small LUT, the
// 2 banks, the queue sizes, the handshakes, the dictionary load port and the
// clear input.
module clcbcc_mbsds
  import clcbcc_pkg::*;
#(
  parameter int unsigned INSTR_W     = 32,
  parameter int unsigned SMALL_DEPTH = 16,
  parameter int unsigned BIG_DEPTH   = 2048,
  parameter int unsigned BIG_BANKS   = 2,
  parameter int unsigned MASK_W      = 2,
  parameter int unsigned IN_W        = 32,
  parameter int unsigned OQ_DEPTH    = 4,
  localparam int unsigned SMALL_IW   = idx_w(SMALL_DEPTH),
  localparam int unsigned SMALL_IW_P = at_least_1(SMALL_IW),
  localparam int unsigned BIG_IW     = idx_w(BIG_DEPTH),
  localparam int unsigned POS_W      = $clog2(INSTR_W / MASK_W),
  localparam int unsigned BODY_W     = (INSTR_W > POS_W + MASK_W + BIG_IW) ?
                                       INSTR_W : POS_W + MASK_W + BIG_IW,
  localparam int unsigned WIN_W      = TAG_W + BODY_W,
  localparam int unsigned BUF_W      = 2 * IN_W + WIN_W,
  localparam int unsigned CNT_W      = $clog2(BUF_W + 1),
  localparam int unsigned DADDR_W    = (BIG_IW > SMALL_IW_P) ? BIG_IW : SMALL_IW_P
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  // dictionary load
  input  logic               dict_we,
  input  logic               dict_big,
  input  logic [DADDR_W-1:0] dict_addr,
  input  logic [INSTR_W-1:0] dict_wdata,
  // compressed code from storage
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [IN_W-1:0]    in_data,
  // decompressed instructions to the processor or cache
  output logic               out_valid,
  input  logic               out_ready,
  output logic [INSTR_W-1:0] out_instr
);

  // ---------------- stage 1: input queue, control, demultiplexer ----------
  logic [WIN_W-1:0] window;
  logic [CNT_W-1:0] avail, len;
  logic             fire, room;
  tag_e             tag;
  logic [INSTR_W-1:0]    f_raw;
  logic [SMALL_IW_P-1:0] f_small;
  logic [BIG_IW-1:0]     f_big;
  logic [POS_W-1:0]      f_pos;
  logic [MASK_W-1:0]     f_mask;
  logic [$clog2(OQ_DEPTH+1)-1:0] oq_count;

  typedef struct packed {
    logic                  valid;
    tag_e                  tag;
    logic [INSTR_W-1:0]    raw;
    logic [SMALL_IW_P-1:0] small_idx;
    logic [BIG_IW-1:0]     big_idx;
    logic [POS_W-1:0]      mask_pos;
    logic [MASK_W-1:0]     mask_val;
  } stage_t;

  stage_t s2_q;

  cw_input_queue #(.IN_W(IN_W), .BUF_W(BUF_W), .WIN_W(WIN_W)) u_inq (
    .clk, .rst_n, .clear,
    .in_valid, .in_ready, .in_data,
    .window, .avail,
    .consume(fire), .consume_len(len)
  );

  cw_demux #(.INSTR_W(INSTR_W), .SMALL_IW(SMALL_IW), .BIG_IW(BIG_IW),
             .POS_W(POS_W), .MASK_W(MASK_W), .WIN_W(WIN_W)) u_demux (
    .window, .tag, .raw(f_raw), .small_idx(f_small), .big_idx(f_big),
    .mask_pos(f_pos), .mask_val(f_mask)
  );

  // A decode may start only if its instruction will find a free slot:
  // the one in stage 2 is already on its way.
  assign room = (32'(oq_count) + 32'(s2_q.valid)) < OQ_DEPTH;

  cw_control #(.INSTR_W(INSTR_W), .SMALL_IW(SMALL_IW), .BIG_IW(BIG_IW),
               .POS_W(POS_W), .MASK_W(MASK_W), .CNT_W(CNT_W)) u_ctrl (
    .tag, .avail, .room, .fire, .len
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2_q <= '0;
    end else if (clear) begin
      s2_q <= '0;
    end else begin
      s2_q.valid <= fire;
      if (fire) begin
        s2_q.tag       <= tag;
        s2_q.raw       <= f_raw;
        s2_q.small_idx <= f_small;
        s2_q.big_idx   <= f_big;
        s2_q.mask_pos  <= f_pos;
        s2_q.mask_val  <= f_mask;
      end
    end
  end

  // ---------------- stage 2: LUTs, bitmask unit, output select ------------
  logic [INSTR_W-1:0] small_word, big_word, masked_word, result;

  small_lut #(.INSTR_W(INSTR_W), .DEPTH(SMALL_DEPTH)) u_small (
    .clk,
    .we(dict_we && !dict_big), .waddr(dict_addr[SMALL_IW_P-1:0]), .wdata(dict_wdata),
    .raddr(s2_q.small_idx), .rdata(small_word)
  );

  big_lut #(.INSTR_W(INSTR_W), .DEPTH(BIG_DEPTH), .BANKS(BIG_BANKS)) u_big (
    .clk,
    .we(dict_we && dict_big), .waddr(dict_addr[BIG_IW-1:0]), .wdata(dict_wdata),
    .raddr(s2_q.big_idx), .rdata(big_word)
  );

  bitmask_unit #(.INSTR_W(INSTR_W), .MASK_W(MASK_W)) u_bitmask (
    .dict_word(big_word), .mask_pos(s2_q.mask_pos), .mask_val(s2_q.mask_val),
    .instr(masked_word)
  );

  always_comb begin
    unique case (s2_q.tag)
      TAG_UNCOMP: result = s2_q.raw;
      TAG_SMALL:  result = small_word;
      TAG_BIG:    result = big_word;
      default:    result = masked_word;
    endcase
  end

  out_queue #(.W(INSTR_W), .DEPTH(OQ_DEPTH)) u_outq (
    .clk, .rst_n, .clear,
    .push(s2_q.valid), .push_data(result),
    .out_valid, .out_ready, .out_data(out_instr),
    .count(oq_count)
  );

endmodule
