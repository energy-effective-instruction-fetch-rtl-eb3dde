// tb_pas_predictor: test of the PAs predictor at its default size (2048 x
// 12-bit histories, 32 x 4096 two-bit counters). Checks that the table clear
// takes exactly PHT size cycles (131072) before `ready`, then drives random
// branches from a small address pool with a reference model of both levels and
// compares the lookup prediction and the next-prediction output every cycle.
`timescale 1ns/1ps
module tb_pas_predictor;
  import fetch_pkg::*;
  localparam int unsigned BHT = 2048, H = 12, PS = 32, PHT = PS << H;
  int unsigned checks = 0, failures = 0, cycles = 0, ntaken_next = 0;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic ready, lk_taken, upd_valid, upd_taken, upd_next_taken;
  addr_t lk_pc, upd_pc;

  pas_predictor dut (.*);

  logic [H-1:0] rbht [BHT];
  logic [1:0]   rpht [PHT];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycles, what); end
  endtask

  function automatic int unsigned pidx(input addr_t pc, input logic [H-1:0] h);
    return ((int'(pc[31:2]) % PS) << H) | int'(h);
  endfunction

  function automatic addr_t rand_pc();
    return addr_t'((($urandom % 24) * 4) + (($urandom % 3) * 32'h2000));
  endfunction

  int unsigned wait_cycles;
  initial begin
    upd_valid = 0; upd_pc = 0; upd_taken = 0; lk_pc = 0;
    for (int i = 0; i < BHT; i++) rbht[i] = '0;
    for (int i = 0; i < PHT; i++) rpht[i] = 2'b01;
    #4 rst_n = 1;
    wait_cycles = 0;
    while (!ready) begin @(posedge clk); #0.1; wait_cycles++; end
    check(wait_cycles == PHT, $sformatf("clear took %0d cycles", wait_cycles));
    for (int n = 0; n < 40000; n++) begin
      int unsigned b, io, inew;
      logic [H-1:0] hn;
      logic [1:0] cn;
      logic exp_next;
      @(negedge clk);
      cycles++;
      lk_pc     = rand_pc();
      upd_valid = ($urandom % 2) == 0;
      upd_pc    = rand_pc();
      // branches biased by address so that counters saturate both ways
      upd_taken = (upd_pc[3]) ? (($urandom % 8) != 0) : (($urandom % 8) == 0);
      #0.1;
      check(lk_taken == rpht[pidx(lk_pc, rbht[int'(lk_pc[31:2]) % BHT])][1], "lookup");
      b    = int'(upd_pc[31:2]) % BHT;
      io   = pidx(upd_pc, rbht[b]);
      hn   = {rbht[b][H-2:0], upd_taken};
      inew = pidx(upd_pc, hn);
      cn   = rpht[io];
      if (upd_taken && cn != 3) cn++;
      if (!upd_taken && cn != 0) cn--;
      exp_next = (inew == io) ? cn[1] : rpht[inew][1];
      if (upd_valid) begin
        check(upd_next_taken == exp_next, "next prediction");
        if (exp_next) ntaken_next++;
      end
      @(posedge clk);
      if (upd_valid) begin rpht[io] = cn; rbht[b] = hn; end
    end
    check(ntaken_next > 1000, "taken next predictions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
