// tb_mask_table: random test of the Mask Table at its default size (1024
// entries of 3 bits). A reference array follows the rules: all ones after
// reset and after a line replacement; at commit the branch slot if it will be
// predicted taken and was not mispredicted, otherwise all ones; replacement wins
// over an update of the same entry. Every cycle one random set is read and
// compared with the reference.
`timescale 1ns/1ps
module tb_mask_table;
  localparam int unsigned N = 8, SETS = 256, W = 4, EW = 3, SW = 8, WW = 2;
  int unsigned checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic [SW-1:0] rd_set, repl_set, upd_set;
  logic [W-1:0][EW-1:0] rd_entry;
  logic repl_valid, upd_valid, upd_taken_next, upd_mispredict;
  logic [WW-1:0] repl_way, upd_way;
  logic [EW-1:0] upd_slot;
  logic [EW-1:0] ref_mt [SETS][W];

  mask_table #(.ISSUE_WIDTH(N), .SETS(SETS), .WAYS(W)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycles, what); end
  endtask

  initial begin
    repl_valid = 0; upd_valid = 0; rd_set = 0; repl_set = 0; upd_set = 0;
    repl_way = 0; upd_way = 0; upd_slot = 0; upd_taken_next = 0; upd_mispredict = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < W; w++) ref_mt[s][w] = 3'd7;
    #5 rst_n = 1;
    // after reset every entry reads all ones
    for (int s = 0; s < SETS; s++) begin
      rd_set = SW'(s); #0.1;
      for (int w = 0; w < W; w++) check(rd_entry[w] == 3'd7, "reset value");
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      cycles++;
      // small set range so that entries are hit repeatedly
      repl_valid     = ($urandom % 5) == 0;
      repl_set       = SW'($urandom % 16);
      repl_way       = WW'($urandom);
      upd_valid      = ($urandom % 2) == 0;
      upd_set        = (($urandom % 4) == 0) ? repl_set : SW'($urandom % 16);
      upd_way        = (($urandom % 2) == 0) ? repl_way : WW'($urandom);
      upd_slot       = EW'($urandom);
      upd_taken_next = ($urandom % 3) != 0;
      upd_mispredict = ($urandom % 6) == 0;
      rd_set         = SW'($urandom % 16);
      #0.1;
      for (int w = 0; w < W; w++) check(rd_entry[w] == ref_mt[rd_set][w], "read");
      @(posedge clk);
      if (upd_valid) ref_mt[upd_set][upd_way] = (upd_taken_next && !upd_mispredict) ? upd_slot : 3'd7;
      if (repl_valid) ref_mt[repl_set][repl_way] = 3'd7;
    end
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
