// cw_input_queue: shift buffer between code storage and the decoder.
//
// The compressed program is a stream of variable-length codewords packed
// MSB-first into IN_W-bit words. This queue collects those words from storage
// and keeps the valid bits left-aligned in a BUF_W-bit register: buf_q[BUF_W-1]
// is always the oldest bit not yet decoded, and bits below the valid count are
// kept at zero. The top WIN_W bits are shown to the decoder as `window`, with
// `avail` telling how many of them (and beyond) are valid. When the decoder
// has used a codeword it pulses `consume` with the codeword length, and the
// buffer shifts left by that amount in the same clock edge at which a new
// word may be appended behind the remaining bits.
//
// Interface: in_valid/in_ready/in_data is a valid-ready handshake with the
// storage side; a word is taken on a clock edge where both are high.
// in_ready is high while at least IN_W bits are free. `clear` empties the
// queue (used to restart on a new stream).
//
// Timing: a word taken at edge n is visible in `window` after edge n. The
// shift after decode and the fill from storage are the document's; the
// buffer width, the handshake and the clear input are this design's choices.
module cw_input_queue #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned BUF_W = 98,
  parameter int unsigned WIN_W = 34
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  // storage side
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [IN_W-1:0]            in_data,
  // decoder side
  output logic [WIN_W-1:0]           window,
  output logic [$clog2(BUF_W+1)-1:0] avail,
  input  logic                       consume,
  input  logic [$clog2(BUF_W+1)-1:0] consume_len
);

  localparam int unsigned CNT_W = $clog2(BUF_W + 1);

  logic [BUF_W-1:0] buf_q, buf_d;
  logic [CNT_W-1:0] cnt_q, cnt_d;
  logic [BUF_W-1:0] shifted, appended;
  logic [CNT_W-1:0] left;
  logic             take;

  assign in_ready = (cnt_q <= CNT_W'(BUF_W - IN_W));
  assign take     = in_valid && in_ready;
  assign window   = buf_q[BUF_W-1 -: WIN_W];
  assign avail    = cnt_q;

  always_comb begin
    shifted  = consume ? (buf_q << consume_len) : buf_q;
    left     = consume ? (cnt_q - consume_len) : cnt_q;
    appended = {in_data, {(BUF_W-IN_W){1'b0}}} >> left;
    buf_d    = take ? (shifted | appended) : shifted;
    cnt_d    = take ? (left + CNT_W'(IN_W)) : left;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      buf_q <= buf_d;
      cnt_q <= cnt_d;
    end
  end

  // The decoder never consumes more bits than are valid.
  assert property (@(posedge clk) disable iff (!rst_n) consume |-> consume_len <= cnt_q)
    else $error("cw_input_queue: consume_len %0d exceeds valid bits %0d", consume_len, cnt_q);

  initial begin
    assert (BUF_W >= IN_W + WIN_W) else $error("cw_input_queue: BUF_W too small");
  end

endmodule
