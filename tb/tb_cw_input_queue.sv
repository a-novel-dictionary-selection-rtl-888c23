// tb_cw_input_queue: random fill/consume test of the input shift buffer.
//
// A reference bit queue mirrors every word accepted and every codeword
// consumed. Each cycle the test checks that `avail` equals the reference
// length, that every valid bit of `window` equals the reference bits (oldest
// first) and that in_ready is high exactly when a full word fits. Words arrive
// with random gaps; consume lengths are random between 1 and what is valid.
// Stimulus is applied at the falling edge, so the handshake seen there is the
// one the rising edge will take.
module tb_cw_input_queue;
  localparam int IN_W = 32, BUF_W = 98, WIN_W = 34;
  localparam int CNT_W = $clog2(BUF_W + 1);

  logic clk = 1'b0;
  logic rst_n = 0, clear = 0;
  logic in_valid = 0, in_ready;
  logic [IN_W-1:0] in_data = '0;
  logic [WIN_W-1:0] window;
  logic [CNT_W-1:0] avail;
  logic consume = 0;
  logic [CNT_W-1:0] consume_len = '0;
  int checks = 0, failures = 0;
  bit ref_q[$];

  cw_input_queue dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int took = 0, consumed = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // compare state with the model
      check(int'(avail) == ref_q.size(), "avail");
      check(in_ready == (ref_q.size() <= BUF_W - IN_W), "in_ready");
      for (int i = 0; i < WIN_W && i < ref_q.size(); i++)
        check(window[WIN_W-1-i] == ref_q[i], "window bit");
      // drive the next cycle
      consume = (ref_q.size() > 0) && ($urandom_range(0, 3) != 0);
      consume_len = consume ? CNT_W'($urandom_range(1, (ref_q.size() < WIN_W) ? ref_q.size() : WIN_W)) : '0;
      in_valid = ($urandom_range(0, 2) != 0);
      in_data = $urandom;
      if (cyc == 2500) begin
        clear = 1; consume = 0; in_valid = 0;
      end else clear = 0;
      // update the model with what the coming edge does
      if (clear) ref_q.delete();
      else begin
        if (consume) begin
          repeat (consume_len) void'(ref_q.pop_front());
          consumed++;
        end
        if (in_valid && in_ready) begin
          for (int i = IN_W - 1; i >= 0; i--) ref_q.push_back(in_data[i]);
          took++;
        end
      end
    end
    check(took > 1000 && consumed > 1000, "activity");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
