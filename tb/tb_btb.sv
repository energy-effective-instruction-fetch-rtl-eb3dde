// tb_btb: random test of the BTB at its default size (1024 entries, 2-way,
// 8-wide lines). A reference model keeps, per set, the two resident lines with
// their slot, kind and target and the most recently used way (true LRU for two
// ways). Lines are drawn from a few sets so that entries are overwritten and
// evicted. Every cycle one lookup is compared with the model and one taken
// branch may be written.
`timescale 1ns/1ps
module tb_btb;
  import fetch_pkg::*;
  localparam int unsigned EW = 3, LAW = 27, SETS = 512;
  int unsigned checks = 0, failures = 0, cycles = 0, hits = 0, evictions = 0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [LAW-1:0] lk_line;
  logic lk_hit, lk_cond, upd_valid, upd_cond;
  logic [EW-1:0] lk_slot;
  addr_t lk_target, upd_pc, upd_target;

  btb dut (.*);

  typedef struct { logic v; logic [LAW-1:0] line; logic [EW-1:0] slot; logic cond; addr_t tgt; } rent_t;
  rent_t ref_t [SETS][2];
  int    mru   [SETS];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycles, what); end
  endtask

  function automatic logic [LAW-1:0] rand_line();
    return LAW'(($urandom % 4) + SETS * ($urandom % 5));   // 4 sets, 5 tags each
  endfunction

  initial begin
    upd_valid = 0; upd_pc = 0; upd_target = 0; upd_cond = 0; lk_line = 0;
    for (int s = 0; s < SETS; s++) begin mru[s] = 0; ref_t[s][0].v = 0; ref_t[s][1].v = 0; end
    #5 rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      int s, hw;
      logic [LAW-1:0] ul;
      @(negedge clk);
      cycles++;
      lk_line    = rand_line();
      upd_valid  = ($urandom % 3) == 0;
      ul         = rand_line();
      upd_pc     = {ul, EW'($urandom), 2'b00};
      upd_cond   = $urandom;
      upd_target = $urandom & ~32'h3;
      #0.1;
      s  = int'(lk_line) % SETS;
      hw = -1;
      for (int w = 0; w < 2; w++) if (ref_t[s][w].v && ref_t[s][w].line == lk_line) hw = w;
      check(lk_hit == (hw >= 0), "hit");
      if (hw >= 0) begin
        hits++;
        check(lk_slot == ref_t[s][hw].slot && lk_target == ref_t[s][hw].tgt &&
              lk_cond == ref_t[s][hw].cond, "entry contents");
      end
      @(posedge clk);
      if (hw >= 0 && !(upd_valid && int'(ul) % SETS == s)) mru[s] = hw;
      if (upd_valid) begin
        int us, vw;
        us = int'(ul) % SETS;
        vw = -1;
        for (int w = 0; w < 2; w++) if (ref_t[us][w].v && ref_t[us][w].line == ul) vw = w;
        if (vw < 0) begin
          if (!ref_t[us][0].v) vw = 0;
          else if (!ref_t[us][1].v) vw = 1;
          else begin vw = 1 - mru[us]; evictions++; end
        end
        ref_t[us][vw] = '{1'b1, ul, upd_pc[EW+1:2], upd_cond, upd_target};
        mru[us] = vw;
      end
    end
    check(hits > 1000 && evictions > 100, "coverage");
    $display("hits %0d evictions %0d", hits, evictions);
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
