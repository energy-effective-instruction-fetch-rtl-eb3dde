// tb_icache: random test of the subbanked I-cache at its default geometry
// (256 sets, 4 ways, 8 x 32-bit subbanks per line). Lines from a few sets are
// filled on demand; a reference model tracks which line sits in which way
// (first invalid way, else the set's round-robin pointer) and the memory image
// gives the expected words. Each cycle a random per-way enable mask is applied:
// hit, way, every enabled word, the zeros of disabled subbanks, the subbank
// count, the probe port and the replacement report are checked.
`timescale 1ns/1ps
module tb_icache;
  import fetch_pkg::*;
  localparam int unsigned N = 8, SETS = 256, W = 4, EW = 3, LAW = 27;
  int unsigned checks = 0, failures = 0, cycles = 0, hits = 0, fills = 0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [LAW-1:0] f_line, p_line, fill_line;
  logic [W-1:0][N-1:0] f_en;
  logic f_hit, p_hit, fill_valid, repl_valid;
  logic [1:0] f_way, p_way, repl_way;
  instr_t [N-1:0] f_words, fill_words;
  logic [N-1:0] f_word_valid;
  logic [5:0] active_subbanks;
  logic [7:0] repl_set;

  icache dut (.*);

  logic            rv  [SETS][W];
  logic [LAW-1:0]  rl  [SETS][W];
  int unsigned     rr  [SETS];

  function automatic instr_t word_of(input logic [LAW-1:0] l, input int unsigned k);
    return {l[15:0], 13'(l[26:16]), k[2:0]} ^ 32'h5A5A_1234;
  endfunction
  function automatic logic [LAW-1:0] rand_line();
    return LAW'(($urandom % 3) + SETS * ($urandom % 7));
  endfunction
  function automatic int find(input logic [LAW-1:0] l);
    int s;
    s = int'(l) % SETS;
    for (int w = 0; w < W; w++) if (rv[s][w] && rl[s][w] == l) return w;
    return -1;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycles, what); end
  endtask

  initial begin
    f_line = 0; p_line = 0; fill_line = 0; fill_valid = 0; f_en = '0; fill_words = '0;
    for (int s = 0; s < SETS; s++) begin rr[s] = 0; for (int w = 0; w < W; w++) rv[s][w] = 0; end
    #5 rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int hw, pw, cnt;
      @(negedge clk);
      cycles++;
      f_line = rand_line();
      p_line = rand_line();
      for (int w = 0; w < W; w++) f_en[w] = N'($urandom);
      hw = find(f_line);
      pw = find(p_line);
      fill_valid = (hw < 0) && (($urandom % 2) == 0);
      fill_line  = f_line;
      for (int k = 0; k < N; k++) fill_words[k] = word_of(f_line, k);
      #0.1;
      check(f_hit == (hw >= 0), "hit");
      check(p_hit == (pw >= 0), "probe hit");
      if (pw >= 0) check(p_way == 2'(pw), "probe way");
      cnt = 0;
      for (int w = 0; w < W; w++) cnt += $countones(f_en[w]);
      check(active_subbanks == 6'(cnt), "subbank count");
      if (hw >= 0) begin
        hits++;
        check(f_way == 2'(hw), "way");
        for (int k = 0; k < N; k++) begin
          check(f_word_valid[k] == f_en[hw][k], "word valid");
          check(f_words[k] == (f_en[hw][k] ? word_of(f_line, k) : 32'h0), "word");
        end
      end else check(f_word_valid == '0, "no valid words on miss");
      if (fill_valid) begin
        int s, v;
        s = int'(fill_line) % SETS;
        v = -1;
        for (int w = W - 1; w >= 0; w--) if (!rv[s][w]) v = w;
        if (v < 0) v = int'(rr[s]);
        check(repl_valid && repl_set == 8'(s) && repl_way == 2'(v), "replacement report");
        @(posedge clk);
        rv[s][v] = 1'b1; rl[s][v] = fill_line; rr[s] = (rr[s] + 1) % W;
        fills++;
      end else check(!repl_valid, "no replacement");
    end
    check(hits > 1000 && fills > 100, "coverage");
    $display("hits %0d fills %0d", hits, fills);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
