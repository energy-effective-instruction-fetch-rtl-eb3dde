// tb_fetch_buffer: random test of the prefetch buffer (8-wide, 32 entries)
// against a reference queue. Runs of slots of a fetch line are pushed, a random
// number of entries is popped and the buffer is flushed now and then. Checks
// the head entries, that a line is accepted exactly when a whole line fits, and
// the successor address carried by each entry.
`timescale 1ns/1ps
module tb_fetch_buffer;
  import fetch_pkg::*;
  localparam int unsigned N = 8, DEPTH = 32, EW = 3;
  int unsigned checks = 0, failures = 0, cycles = 0, full = 0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic flush, push_valid, push_ready;
  addr_t push_line_pc, push_last_npc;
  logic [EW-1:0] push_first, push_last;
  instr_t [N-1:0] push_words;
  logic [N-1:0] out_valid;
  fb_entry_t [N-1:0] out_entry;
  logic [EW:0] pop_count;

  fetch_buffer dut (.*);

  fb_entry_t q [$];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycles, what); end
  endtask

  initial begin
    flush = 0; push_valid = 0; push_line_pc = 0; push_last_npc = 0; push_first = 0;
    push_last = 0; push_words = '0; pop_count = 0;
    #5 rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int a, b, pops;
      @(negedge clk);
      cycles++;
      a = $urandom % N;
      b = a + ($urandom % (N - a));
      push_valid    = ($urandom % 4) != 0;
      push_line_pc  = {$urandom, 5'b0};
      push_first    = EW'(a);
      push_last     = EW'(b);
      push_last_npc = $urandom & ~32'h3;
      for (int k = 0; k < N; k++) push_words[k] = $urandom;
      pops      = ((n / 300) % 2) ? ($urandom % 3) : ($urandom % (N + 1));
      pop_count = (EW+1)'(pops);
      flush     = ($urandom % 97) == 0;
      #0.1;
      check(push_ready == ((DEPTH - q.size()) >= N), "push_ready");
      if (!push_ready) full++;
      for (int j = 0; j < N; j++) begin
        check(out_valid[j] == (j < q.size()), "out_valid");
        if (j < q.size()) check(out_entry[j] == q[j], $sformatf("entry %0d", j));
      end
      @(posedge clk);
      if (flush) q.delete();
      else begin
        for (int j = 0; j < pops && q.size() > 0; j++) void'(q.pop_front());
        if (push_valid && push_ready)
          for (int s = a; s <= b; s++) begin
            addr_t pc;
            pc = push_line_pc + addr_t'(s * 4);
            q.push_back('{instr: push_words[s], pc: pc,
                          pred_npc: (s == b) ? push_last_npc : pc + 4});
          end
      end
    end
    check(full > 100, "buffer full seen");
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
