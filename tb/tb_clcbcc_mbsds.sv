// tb_clcbcc_mbsds: end-to-end test of the decompression engine at its
// default sizes (32-bit instructions, 16-entry small LUT, 2048-entry big LUT
// in 2 banks, one 2-bit mask, 32-bit input words).
//
// The test loads both LUTs with random instructions through the dictionary
// port, then compresses programs itself: for each instruction it picks a
// codeword type, writes the codeword bits MSB first (2-bit tag, then
//   00: instruction | 01: small index | 10: big index |
//   11: mask position, mask value, big index)
// and packs the stream into 32-bit words, zero padded. The expected output
// is the instruction list it started from, computed without the engine.
//
//   phase 1  random mix of all four codeword types, random gaps on the input
//            and random back-pressure on the output; then a clear.
//   phase 2  only dictionary and bitmask codewords, input always valid and
//            output always ready: one instruction per cycle must leave the
//            engine (32 bits/cycle), and the first instruction must appear
//            three edges after the first word is taken.
//   phase 3  uncompressed codewords only: the engine is input bound.
// It counts how often each mechanism occurred (each codeword type, a full
// input queue, a full output queue holding back a decode, back-pressure from
// the consumer, a clear) and fails if any never did.
// Stimulus is applied at the falling edge; a handshake seen there is the one
// the next rising edge takes.
module tb_clcbcc_mbsds;
  import clcbcc_pkg::*;
  localparam int INSTR_W = 32, SMALL_N = 16, BIG_N = 2048, SIW = 4, BIW = 11;
  localparam int POS_W = 4, MASK_W = 2, IN_W = 32;

  logic clk = 1'b0;
  logic rst_n = 0, clear = 0;
  logic dict_we = 0, dict_big = 0;
  logic [BIW-1:0] dict_addr = '0;
  logic [INSTR_W-1:0] dict_wdata = '0;
  logic in_valid = 0, in_ready;
  logic [IN_W-1:0] in_data = '0;
  logic out_valid, out_ready = 0;
  logic [INSTR_W-1:0] out_instr;

  clcbcc_mbsds dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [INSTR_W-1:0] small_d [SMALL_N];
  logic [INSTR_W-1:0] big_d [BIG_N];

  bit stream[$];
  logic [IN_W-1:0] words[$];
  logic [INSTR_W-1:0] expected[$];

  // mechanism counters
  int n_tag[4] = '{0, 0, 0, 0};
  int n_in_full = 0, n_oq_full = 0, n_backpressure = 0, n_clear = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe the engine's decode decisions.
  always @(negedge clk) if (rst_n) begin
    if (dut.fire) n_tag[dut.tag]++;
    if (!dut.room && int'(dut.avail) >= 2) n_oq_full++;
  end

  function automatic void put(input logic [63:0] v, input int w);
    for (int i = w - 1; i >= 0; i--) stream.push_back(v[i]);
  endfunction

  // Append one instruction of the given codeword type to the program.
  function automatic void add(input int kind);
    logic [INSTR_W-1:0] instr;
    int s, b, p, m;
    case (kind)
      0: begin
        instr = $urandom;
        put(2'b00, 2); put(64'(instr), INSTR_W);
      end
      1: begin
        s = $urandom_range(0, SMALL_N - 1);
        instr = small_d[s];
        put(2'b01, 2); put(64'(s), SIW);
      end
      2: begin
        b = $urandom_range(0, BIG_N - 1);
        instr = big_d[b];
        put(2'b10, 2); put(64'(b), BIW);
      end
      default: begin
        b = $urandom_range(0, BIG_N - 1);
        p = $urandom_range(0, (1 << POS_W) - 1);
        m = $urandom_range(1, (1 << MASK_W) - 1);
        instr = big_d[b];
        for (int i = 0; i < MASK_W; i++)
          if (m[MASK_W-1-i]) instr[INSTR_W-1-(p*MASK_W+i)] ^= 1'b1;
        put(2'b11, 2); put(64'(p), POS_W); put(64'(m), MASK_W); put(64'(b), BIW);
      end
    endcase
    expected.push_back(instr);
  endfunction

  function automatic void pack();
    while (stream.size() % IN_W != 0) stream.push_back(1'b0);
    while (stream.size() > 0) begin
      logic [IN_W-1:0] w;
      for (int i = IN_W - 1; i >= 0; i--) w[i] = stream.pop_front();
      words.push_back(w);
    end
  endfunction

  // Feed `words` and collect `expected`; returns the cycles of the first
  // input handshake, first output and last output.
  task automatic run(input int p_in, input int p_out,
                     output longint t_first_in, output longint t_first_out,
                     output longint t_last_out);
    int wi = 0, n_out = 0, total = expected.size();
    t_first_in = -1; t_first_out = -1; t_last_out = -1;
    while (n_out < total) begin
      @(negedge clk);
      in_valid  = (wi < words.size()) && ($urandom_range(1, 100) <= p_in);
      in_data   = (wi < words.size()) ? words[wi] : '0;
      out_ready = ($urandom_range(1, 100) <= p_out);
      if (in_valid && !in_ready) n_in_full++;
      if (out_valid && !out_ready) n_backpressure++;
      if (in_valid && in_ready) begin
        if (t_first_in < 0) t_first_in = cyc;
        wi++;
      end
      if (out_valid && out_ready) begin
        check(out_instr == expected[n_out], $sformatf("instruction %0d", n_out));
        if (t_first_out < 0) t_first_out = cyc;
        t_last_out = cyc;
        n_out++;
      end
    end
    @(negedge clk);
    in_valid = 0; out_ready = 0;
    check(wi == words.size(), "all input words taken");
  endtask

  task automatic do_clear();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    n_clear++;
    check(!out_valid && dut.avail == 0, "clear empties the engine");
  endtask

  initial begin
    longint t0, t1, t2;
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // load the dictionaries
    for (int a = 0; a < SMALL_N; a++) begin
      @(negedge clk); dict_we = 1; dict_big = 0; dict_addr = BIW'(a);
      dict_wdata = $urandom; small_d[a] = dict_wdata;
    end
    for (int a = 0; a < BIG_N; a++) begin
      @(negedge clk); dict_we = 1; dict_big = 1; dict_addr = BIW'(a);
      dict_wdata = $urandom; big_d[a] = dict_wdata;
    end
    @(negedge clk); dict_we = 0;

    // phase 1: random mix with random handshakes
    for (int i = 0; i < 4000; i++) add($urandom_range(0, 3));
    pack();
    run(70, 60, t0, t1, t2);
    words.delete(); expected.delete();
    // leave junk behind, then clear it
    @(negedge clk); in_valid = 1; in_data = 32'h5A5A_5A5A;
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    do_clear();

    // phase 2: dictionary codewords only at full speed
    n = 2000;
    for (int i = 0; i < n; i++) add($urandom_range(1, 3));
    pack();
    run(100, 100, t0, t1, t2);
    words.delete(); expected.delete();
    check(t2 - t1 == n - 1, $sformatf("rate: %0d instructions took %0d cycles", n, t2 - t1 + 1));
    check(t1 - t0 == 3, $sformatf("latency %0d cycles, expected 3", t1 - t0));

    do_clear();

    // phase 3: uncompressed only, input bound (34 bits per 32-bit word)
    n = 500;
    for (int i = 0; i < n; i++) add(0);
    pack();
    run(100, 100, t0, t1, t2);
    words.delete(); expected.delete();
    check(t2 - t1 >= n - 1 + (n * 2) / IN_W - 2, "uncompressed stream is input bound");

    $display("mechanisms: uncompressed=%0d small=%0d big=%0d bitmask=%0d input_full=%0d output_full=%0d backpressure=%0d clear=%0d",
             n_tag[0], n_tag[1], n_tag[2], n_tag[3], n_in_full, n_oq_full, n_backpressure, n_clear);
    check(n_tag[0] > 0, "uncompressed codeword decoded");
    check(n_tag[1] > 0, "small-LUT codeword decoded");
    check(n_tag[2] > 0, "big-LUT codeword decoded");
    check(n_tag[3] > 0, "bitmask codeword decoded");
    check(n_in_full > 0, "input queue full");
    check(n_oq_full > 0, "output queue full stalls decode");
    check(n_backpressure > 0, "consumer back-pressure");
    check(n_clear > 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
