// tb_large_benchmark: a 40,000-instruction program through the engine at its
// default sizes (2048-entry big LUT, 16-entry small LUT, one 2-bit mask).
//
// The program is synthetic: its instruction values are random, only its size
// and codeword mix are set. The mix models a program where 10% of the
// instructions find no exact dictionary match, of which 60% are then
// recovered with a bitmask: 4% stay uncompressed and 6% use a bitmask. The
// rest is split 30% small LUT and 60% big LUT (this split is an assumption).
// The consumer is always ready and the input always valid. The test checks
// every instruction, reports the compression ratio (compressed stream bits
// over 32 bits per instruction), and checks that throughput stays at one
// instruction per cycle except for the extra input cycles the 34-bit
// uncompressed codewords cost: at most N - 1 + U cycles from first to last
// output for N instructions of which U are uncompressed.
module tb_large_benchmark;
  localparam int INSTR_W = 32, SMALL_N = 16, BIG_N = 2048, SIW = 4, BIW = 11;
  localparam int POS_W = 4, MASK_W = 2, IN_W = 32, N = 40000;

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
  int n_kind[4] = '{0, 0, 0, 0};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void put(input logic [63:0] v, input int w);
    for (int i = w - 1; i >= 0; i--) stream.push_back(v[i]);
  endfunction

  function automatic void add(input int kind);
    logic [INSTR_W-1:0] instr;
    int s, b, p, m;
    n_kind[kind]++;
    case (kind)
      0: begin instr = $urandom; put(64'd0, 2); put(64'(instr), INSTR_W); end
      1: begin
        s = $urandom_range(0, SMALL_N - 1); instr = small_d[s];
        put(64'd1, 2); put(64'(s), SIW);
      end
      2: begin
        b = $urandom_range(0, BIG_N - 1); instr = big_d[b];
        put(64'd2, 2); put(64'(b), BIW);
      end
      default: begin
        b = $urandom_range(0, BIG_N - 1);
        p = $urandom_range(0, (1 << POS_W) - 1);
        m = $urandom_range(1, (1 << MASK_W) - 1);
        instr = big_d[b];
        for (int i = 0; i < MASK_W; i++)
          if (m[MASK_W-1-i]) instr[INSTR_W-1-(p*MASK_W+i)] ^= 1'b1;
        put(64'd3, 2); put(64'(p), POS_W); put(64'(m), MASK_W); put(64'(b), BIW);
      end
    endcase
    expected.push_back(instr);
  endfunction

  initial begin
    automatic int wi = 0, n_out = 0, nbits;
    automatic longint t_first = -1, t_last = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < SMALL_N; a++) begin
      @(negedge clk); dict_we = 1; dict_big = 0; dict_addr = BIW'(a);
      dict_wdata = $urandom; small_d[a] = dict_wdata;
    end
    for (int a = 0; a < BIG_N; a++) begin
      @(negedge clk); dict_we = 1; dict_big = 1; dict_addr = BIW'(a);
      dict_wdata = $urandom; big_d[a] = dict_wdata;
    end
    @(negedge clk); dict_we = 0;

    for (int i = 0; i < N; i++) begin
      automatic int r = $urandom_range(0, 99);
      add(r < 4 ? 0 : r < 10 ? 3 : r < 40 ? 1 : 2);
    end
    nbits = stream.size();
    while (stream.size() % IN_W != 0) stream.push_back(1'b0);
    while (stream.size() > 0) begin
      logic [IN_W-1:0] w;
      for (int i = IN_W - 1; i >= 0; i--) w[i] = stream.pop_front();
      words.push_back(w);
    end

    while (n_out < N) begin
      @(negedge clk);
      in_valid = (wi < words.size());
      in_data = in_valid ? words[wi] : '0;
      out_ready = 1;
      if (in_valid && in_ready) wi++;
      if (out_valid) begin
        checks++;
        if (out_instr != expected[n_out]) begin
          failures++;
          if (failures < 10) $display("FAIL instruction %0d", n_out);
        end
        if (t_first < 0) t_first = cyc;
        t_last = cyc;
        n_out++;
      end
    end
    $display("mix: uncompressed=%0d small=%0d big=%0d bitmask=%0d", n_kind[0], n_kind[1], n_kind[2], n_kind[3]);
    $display("compressed %0d bits for %0d bits: CR = %0.2f%%", nbits, N * INSTR_W, 100.0 * nbits / (N * INSTR_W));
    $display("%0d instructions out in %0d cycles", N, t_last - t_first + 1);
    checks++;
    if (t_last - t_first > N - 1 + n_kind[0] || t_last - t_first < N - 1) begin
      failures++;
      $display("FAIL throughput");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
