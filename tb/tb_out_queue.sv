// tb_out_queue: random pushes and pops against a reference queue.
//
// Pushes happen only when the queue has room, as the engine guarantees.
// Order, out_valid, the count and simultaneous push and pop on a full and on
// an empty queue are checked, and `clear` must empty it.
module tb_out_queue;
  localparam int W = 32, DEPTH = 4;
  logic clk = 1'b0;
  logic rst_n = 0, clear = 0, push = 0, out_valid, out_ready = 0;
  logic [W-1:0] push_data = '0, out_data;
  logic [2:0] count;
  logic [W-1:0] model[$];
  int checks = 0, failures = 0, full_seen = 0;

  out_queue dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      check(int'(count) == model.size(), "count");
      check(out_valid == (model.size() > 0), "out_valid");
      if (model.size() > 0) check(out_data == model[0], "head data");
      if (model.size() == DEPTH) full_seen++;
      clear = (cyc == 2000);
      out_ready = ($urandom_range(0, 2) == 0) || (cyc > 3000);
      push = ($urandom_range(0, 1) == 1) && ((model.size() < DEPTH) || out_ready);
      push_data = $urandom;
      if (clear) model.delete();
      else begin
        if (out_valid && out_ready) void'(model.pop_front());
        if (push) model.push_back(push_data);
      end
    end
    check(full_seen > 0, "queue never filled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
