// out_queue: FIFO of decompressed instructions.
//
// Holds up to DEPTH instructions between the decoder and the processor or
// cache. The write side has no handshake: the control unit only starts a
// decode when a slot is free, which it learns from `count`. The read side is
// valid-ready: the head word leaves on a clock edge where out_valid and
// out_ready are both high. A write and a read may happen in the same cycle.
// The queue itself follows the document; its depth and handshake are this
// design's.
module out_queue #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  logic [W-1:0]  push_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data,
  output logic [CW-1:0] count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [CW-1:0] cnt_q;
  logic          pop;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign out_valid = (cnt_q != '0);
  assign out_data  = mem[rd_q];
  assign count     = cnt_q;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wr_q] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else if (clear) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= inc(wr_q);
      if (pop)  rd_q <= inc(rd_q);
      cnt_q <= cnt_q + CW'(push) - CW'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (cnt_q < CW'(DEPTH)) || pop)
    else $error("out_queue: push into a full queue");

endmodule
