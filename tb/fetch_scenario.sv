// fetch_scenario: one run of the synthetic-program scenario against a fetch unit
// of fetch width N with an I-cache of IC_SETS sets (4 ways, line = N
// instructions), for use by tb_fetch_widths. Program placement, back end,
// memory and checks are those of tb_fetch_unit: a program of PROG_LINES lines,
// twelve per cache set, one branch per line, a back end that checks every
// instruction against the architectural path and redirects on mispredictions,
// delayed commits, a check of the one-line-per-cycle stream, a comparison of
// the subbanks read with the slots used, and a count of every fetch mechanism,
// each of which must occur. done rises when the run ends; checks and failures
// are its totals.
`timescale 1ns/1ps
module fetch_scenario #(
  parameter int unsigned N       = 8,
  parameter int unsigned IC_SETS = 256
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);
  import fetch_pkg::*;

  localparam int unsigned EW         = $clog2(N);
  localparam int unsigned IC_WAYS    = 4;
  localparam int unsigned PROG_LINES = 96;
  localparam int unsigned GROUP      = 8;       // consecutive lines per group
  localparam int unsigned MEM_LAT    = 6;
  localparam int unsigned TARGET_INS = 30000;
  localparam int unsigned WATCHDOG   = 600000;
  localparam int unsigned COMMIT_LAT = 12;      // resolve-to-commit delay of a branch

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #1 clk = ~clk;

  logic                     ready;
  logic                     redirect_valid;
  addr_t                    redirect_pc;
  commit_t                  commit;
  logic                     mem_req_valid;
  logic [XLEN-EW-3:0]       mem_req_line;
  logic                     mem_resp_valid;
  instr_t [N-1:0]           mem_resp_words;
  logic                     fb_flush;
  logic [N-1:0]             out_valid;
  fb_entry_t [N-1:0]        out_entry;
  logic [EW:0]              pop_count;
  logic [N-1:0]             fetch_mask;
  logic [$clog2(IC_WAYS*N+1)-1:0] subbanks_read;
  logic ev_fetch, ev_taken, ev_branch_into, ev_branch_out, ev_fallback, ev_miss,
        ev_buffer_stall, ev_mask_replay, ev_mt_update, ev_mt_skip, ev_mispredict;

  fetch_unit #(.ISSUE_WIDTH(N), .IC_SETS(IC_SETS)) dut (.*);

  // ---------------- program model ----------------
  function automatic logic [31:0] hash(input logic [31:0] x, input logic [31:0] salt);
    logic [31:0] h;
    h = x * 32'h9E3779B1 + salt * 32'h85EBCA77;
    h = h ^ (h >> 15);
    h = h * 32'hC2B2AE3D;
    return h ^ (h >> 13);
  endfunction

  function automatic instr_t imem(input addr_t a);
    return hash(a, 32'd7) ^ 32'h0BAD_F00D;
  endfunction

  function automatic logic [XLEN-EW-3:0] line_addr(input int unsigned i);
    return (XLEN-EW-2)'((i % GROUP) + (i / GROUP) * IC_SETS);
  endfunction

  // program line index of a line address, or -1
  function automatic int prog_index(input addr_t pc);
    logic [XLEN-EW-3:0] la;
    int unsigned s, g;
    la = pc[XLEN-1:EW+2];
    s  = int'(la) % IC_SETS;
    g  = int'(la) / IC_SETS;
    if (s < GROUP && g < PROG_LINES / GROUP) return int'(g * GROUP + s);
    return -1;
  endfunction

  // kind: 0 none, 1 unconditional, 2 always taken, 3 never taken, 4 loop,
  // 5 data dependent (taken with probability 3/4)
  function automatic int br_kind(input int unsigned i);
    int unsigned h;
    if (i % GROUP == GROUP - 1) return 1;     // group end: always leave the group
    h = hash(i, 1) % 8;
    case (h)
      0:       return 0;
      1:       return 2;
      2:       return 3;
      3:       return 4;
      default: return 5;
    endcase
  endfunction
  function automatic int unsigned br_slot(input int unsigned i);
    if (i % GROUP == GROUP - 1) return N - 1;  // reached from any entry slot
    return hash(i, 2) % N;
  endfunction
  function automatic addr_t br_target(input int unsigned i);
    int unsigned j;
    j = hash(i, 3) % PROG_LINES;
    return {line_addr(j), EW'(hash(i, 4) % N), 2'b00};
  endfunction

  int unsigned exec_cnt [PROG_LINES];
  commit_t     commit_pipe [COMMIT_LAT];

  // ---------------- memory model ----------------
  int unsigned        mem_wait;
  logic               mem_busy;
  logic [XLEN-EW-3:0] mem_line;

  // ---------------- counters ----------------
  int unsigned cycles;
  int unsigned n_fetch, n_taken, n_into, n_out, n_fallback, n_miss, n_stall, n_replay,
               n_mt_upd, n_mt_skip, n_mispred, n_fill, n_consumed, n_branches;
  longint unsigned subbanks, subbanks_full, hit_way_reads, oracle_reads;
  logic  prev_fetch;
  addr_t arch_pc;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  // Sample DUT events at the clock edge.
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (ev_fetch) begin
      n_fetch++;
      check((dut.need & ~fetch_mask) == '0, "fetch mask misses a needed slot");
      hit_way_reads += $countones(fetch_mask);
      oracle_reads  += $countones(dut.need);
    end
    // 1-cycle hit: a fetch follows a fetch unless something stops it
    if (prev_fetch && !ev_fetch)
      check(ev_miss || ev_buffer_stall || ev_mask_replay || redirect_valid,
            "fetch stream paused without a cause");
    prev_fetch = ev_fetch;
    if (ev_taken)        n_taken++;
    if (ev_branch_into)  n_into++;
    if (ev_branch_out)   n_out++;
    if (ev_fallback)     n_fallback++;
    if (ev_miss)         n_miss++;
    if (ev_buffer_stall) n_stall++;
    if (ev_mask_replay)  n_replay++;
    if (ev_mt_update)    n_mt_upd++;
    if (ev_mt_skip)      n_mt_skip++;
    if (ev_mispredict)   n_mispred++;
    if (subbanks_read != 0) begin
      subbanks      += subbanks_read;
      subbanks_full += IC_WAYS * N;
    end
  end

  // Memory and back end drive their outputs half a cycle after the edge.
  always @(negedge clk) begin
    redirect_valid <= 1'b0;
    fb_flush       <= 1'b0;
    commit         <= commit_pipe[COMMIT_LAT-1];
    for (int k = COMMIT_LAT - 1; k > 0; k--) commit_pipe[k] <= commit_pipe[k-1];
    commit_pipe[0] <= '0;
    pop_count      <= '0;
    mem_resp_valid <= 1'b0;
    if (rst_n) begin
      // memory
      if (mem_busy) begin
        if (mem_wait == 0) begin
          mem_resp_valid <= 1'b1;
          for (int unsigned k = 0; k < N; k++)
            mem_resp_words[k] <= imem({mem_line, EW'(k), 2'b00});
          mem_busy <= 1'b0;
          n_fill++;
        end else mem_wait--;
      end
      // back end
      if (ready) begin
        int unsigned limit, took;
        limit = ((cycles / 500) % 4 == 3) ? ($urandom % 2) : ($urandom % (N + 1));
        took  = 0;
        for (int unsigned j = 0; j < N; j++) begin
          if (took < limit && out_valid[j]) begin
            fb_entry_t e;
            int  pi;
            int  kind;
            logic is_br, tk;
            addr_t anpc;
            e  = out_entry[j];
            check(e.pc == arch_pc, $sformatf("pc %h expected %h", e.pc, arch_pc));
            check(e.instr == imem(e.pc), $sformatf("instr at %h wrong", e.pc));
            pi    = prog_index(e.pc);
            kind  = (pi >= 0) ? br_kind(pi) : 0;
            is_br = (pi >= 0) && kind != 0 && e.pc[EW+1:2] == EW'(br_slot(pi));
            tk    = 1'b0;
            if (is_br) begin
              case (kind)
                1, 2:    tk = 1'b1;
                3:       tk = 1'b0;
                4:       tk = (exec_cnt[pi] % 4) != 3;
                default: tk = ($urandom % 4) != 0;
              endcase
              exec_cnt[pi]++;
            end
            anpc = tk ? br_target(pi) : e.pc + 4;
            took++;
            n_consumed++;
            arch_pc = anpc;
            if (is_br) begin
              n_branches++;
              commit_pipe[0] <= '{valid: 1'b1, pc: e.pc, cond: kind != 1, taken: tk,
                          target: br_target(pi), mispredict: e.pred_npc != anpc};
            end else begin
              check(e.pred_npc == anpc, $sformatf("non-branch %h predicted to %h", e.pc, e.pred_npc));
            end
            if (e.pred_npc != anpc) begin
              redirect_valid <= 1'b1;
              redirect_pc    <= anpc;
              fb_flush       <= 1'b1;
              break;
            end
            if (is_br) break;          // one commit per cycle
          end
        end
        if (!fb_flush) pop_count <= (EW+1)'(took);
      end
    end
  end

  always @(posedge clk) if (rst_n && mem_req_valid) begin
    check(!mem_busy, "second outstanding request");
    mem_busy <= 1'b1;
    mem_line <= mem_req_line;
    mem_wait <= MEM_LAT;
  end

  initial begin
    done = 1'b0; checks = 0; failures = 0; cycles = 0;
    n_fetch = 0; n_taken = 0; n_into = 0; n_out = 0; n_fallback = 0; n_miss = 0;
    n_stall = 0; n_replay = 0; n_mt_upd = 0; n_mt_skip = 0; n_mispred = 0; n_fill = 0;
    n_consumed = 0; n_branches = 0; subbanks = 0; subbanks_full = 0;
    hit_way_reads = 0; oracle_reads = 0; prev_fetch = 1'b0;
    arch_pc = '0;
    mem_busy = 1'b0; mem_wait = 0; mem_line = '0;
    redirect_valid = 1'b0; redirect_pc = '0; fb_flush = 1'b0; commit = '0;
    pop_count = '0; mem_resp_valid = 1'b0; mem_resp_words = '0;
    for (int i = 0; i < PROG_LINES; i++) exec_cnt[i] = 0;
    for (int i = 0; i < COMMIT_LAT; i++) commit_pipe[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_consumed >= TARGET_INS);
    repeat (2) @(posedge clk);
    $display("%0d-wide: consumed %0d instr, %0d branches, %0d cycles", N, n_consumed, n_branches, cycles);
    $display("fetches %0d taken %0d into %0d out %0d fallback %0d miss %0d fill %0d stall %0d replay %0d",
             n_fetch, n_taken, n_into, n_out, n_fallback, n_miss, n_fill, n_stall, n_replay);
    $display("mt_update %0d mt_skip %0d mispredict %0d", n_mt_upd, n_mt_skip, n_mispred);
    $display("subbanks read %0d of %0d (%0d%%)", subbanks, subbanks_full,
             subbanks_full ? (subbanks * 100 / subbanks_full) : 0);
    $display("hitting way: %0d subbanks read, %0d used, %0d for full lines",
             hit_way_reads, oracle_reads, n_fetch * N);
    check(hit_way_reads * 100 <= oracle_reads * 105, "hitting-way reads more than 5% above the used slots");
    check(n_taken > 0,    "no taken branch fetched");
    check(n_into > 0,     "no branch-into mask");
    check(n_out > 0,      "no branch-out mask from the MT");
    check(n_fallback > 0, "no zero-mask fallback");
    check(n_miss > 0 && n_fill == n_miss, "misses and fills do not match");
    check(n_stall > 0,    "prefetch buffer never full");
    check(n_mt_upd > 0,   "no MT update");
    check(n_mt_skip > 0,  "no MT update skipped for an evicted line");
    check(n_mispred > 0,  "no misprediction");
    check(subbanks < subbanks_full, "no subbank saved");
    check(n_replay * 100 < n_fetch, "fetch masks disagree with the prediction too often");
    done = 1'b1;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog: consumed %0d", n_consumed);
    done = 1'b1;
  end

endmodule
