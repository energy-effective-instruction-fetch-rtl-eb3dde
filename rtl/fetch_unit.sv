// fetch_unit: energy-saving instruction fetch stage for a wide-issue processor.
//
// Each cycle the stage reads one fetch line (ISSUE_WIDTH instructions) from a
// subbanked I-cache, but switches on only the subbanks named by a fetch mask
// that the Fetch Mask Determination unit (fmd) built in the previous cycle:
//   * branch into - when the previous line ended in a predicted-taken branch (or
//     fetch was redirected), slots before the target are not read;
//   * branch out  - the Mask Table (mask_table) remembers, per cached line, the
//     slot of a branch that the predictor will predict taken next time; slots
//     after it are not read.
// The mask for the line at the next PC is computed in the same cycle as that PC
// (BTB + predictor, then MT read, then AND) and registered; one mask is kept per
// way of the set and the hitting way uses its own.
//
// Per cycle (state RUN): the BTB (per-line, one taken branch per line) and the
// PAs predictor decide whether the line holds a taken branch at or after the
// entry slot; the used slots entry..branch (or entry..end) go to the prefetch
// buffer together with the predicted successor address. The next PC is the
// predicted target or the next sequential line. An I-cache miss sends one line
// request (mem_req_*), waits for mem_resp_*, fills the line (its MT entry goes to
// all ones), spends one cycle recomputing the mask and resumes.
// Commit port: a committed branch updates the predictor and, if taken, the BTB;
// if its line is still cached (second tag port) its MT entry is set from the
// predictor's next prediction, or to all ones when it was mispredicted.
// Commits are ignored until the predictor tables are cleared (ready).
// redirect_* restarts fetch at a new address (misprediction recovery); the
// caller flushes the buffer with it.
//
// Safety net (this design's addition): if the registered mask does not cover
// every slot the current prediction needs, which can happen when BTB or
// predictor state changes behind the MT's back (BTB replacement, aliasing in the
// pattern tables), the line is not used; the needed mask is loaded and the line
// is read again in the next cycle (ev_mask_replay). The published scheme states
// that the mask always agrees with the predictor and has no such case.
//
// The ev_* outputs pulse once per event and subbanks_read gives the number of
// data-array subbanks switched on in the cycle, for energy accounting.
module fetch_unit #(
  parameter int unsigned      ISSUE_WIDTH = 8,
  parameter int unsigned      IC_SETS     = 256,
  parameter int unsigned      IC_WAYS     = 4,
  parameter int unsigned      BTB_ENTRIES = 1024,
  parameter int unsigned      BTB_WAYS    = 2,
  parameter int unsigned      BHT_ENTRIES = 2048,
  parameter int unsigned      HIST        = 12,
  parameter int unsigned      PHT_SETS    = 32,
  parameter int unsigned      FB_DEPTH    = 32,
  parameter fetch_pkg::addr_t RESET_PC    = '0,
  localparam int unsigned     EW          = $clog2(ISSUE_WIDTH),
  localparam int unsigned     LINE_AW     = fetch_pkg::XLEN - EW - 2,
  localparam int unsigned     WW          = $clog2(IC_WAYS),
  localparam int unsigned     SBW         = $clog2(IC_WAYS*ISSUE_WIDTH+1)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  output logic                                   ready,          // predictor tables cleared
  // misprediction recovery
  input  logic                                   redirect_valid,
  input  fetch_pkg::addr_t                       redirect_pc,
  // branch commit
  input  fetch_pkg::commit_t                     commit,
  // next memory level (one outstanding line request)
  output logic                                   mem_req_valid,
  output logic [LINE_AW-1:0]                     mem_req_line,
  input  logic                                   mem_resp_valid,
  input  fetch_pkg::instr_t [ISSUE_WIDTH-1:0]    mem_resp_words,
  // decode side of the prefetch buffer
  input  logic                                   fb_flush,
  output logic [ISSUE_WIDTH-1:0]                 out_valid,
  output fetch_pkg::fb_entry_t [ISSUE_WIDTH-1:0] out_entry,
  input  logic [EW:0]                            pop_count,
  // observation
  output logic [ISSUE_WIDTH-1:0]                 fetch_mask,     // mask of the hitting way
  output logic [SBW-1:0]                         subbanks_read,
  output logic                                   ev_fetch,
  output logic                                   ev_taken,
  output logic                                   ev_branch_into,
  output logic                                   ev_branch_out,
  output logic                                   ev_fallback,
  output logic                                   ev_miss,
  output logic                                   ev_buffer_stall,
  output logic                                   ev_mask_replay,
  output logic                                   ev_mt_update,
  output logic                                   ev_mt_skip,
  output logic                                   ev_mispredict
);
  import fetch_pkg::*;

  typedef enum logic [1:0] {RUN, MISS, REPLAY} state_e;

  state_e                              state;
  addr_t                               pc, npc;
  logic [LINE_AW-1:0]                  miss_line;
  logic [IC_WAYS-1:0][ISSUE_WIDTH-1:0] fmask_q, fmask_d;
  logic [IC_WAYS-1:0]                  fallback_q, cut_q;

  // ---------------- current line ----------------
  logic [LINE_AW-1:0] line;
  logic [EW-1:0]      off;
  assign line = pc[XLEN-1:EW+2];
  assign off  = pc[EW+1:2];

  logic                                ic_hit;
  logic [WW-1:0]                       ic_way;
  instr_t [ISSUE_WIDTH-1:0]            ic_words;
  logic [ISSUE_WIDTH-1:0]              ic_word_valid;
  logic [SBW-1:0]                      ic_active;
  logic                                ic_p_hit;
  logic [WW-1:0]                       ic_p_way;
  logic                                repl_valid;
  logic [$clog2(IC_SETS)-1:0]          repl_set;
  logic [WW-1:0]                       repl_way;
  logic                                fill_valid;

  logic          btb_hit, btb_cond;
  logic [EW-1:0] btb_slot;
  addr_t         btb_target;
  logic          bp_taken, bp_next_taken, bp_ready;

  logic                    taken;
  logic [EW-1:0]           last;
  logic [ISSUE_WIDTH-1:0]  need;
  logic                    mask_ok, can_fetch, access, fire, mask_replay;
  logic                    fb_ready;
  addr_t                   npc_pred;

  logic [MAX_WIDTH-1:0] from_m, upto_m;
  assign from_m = from_slot_mask(int'(off));
  assign upto_m = upto_slot_mask(int'(last));

  assign taken       = btb_hit && (!btb_cond || bp_taken) && (btb_slot >= off);
  assign last        = taken ? btb_slot : EW'(ISSUE_WIDTH - 1);
  assign need        = from_m[ISSUE_WIDTH-1:0] & upto_m[ISSUE_WIDTH-1:0];
  assign mask_ok     = (need & ~fmask_q[ic_way]) == '0;
  assign can_fetch   = (state == RUN) && bp_ready && !redirect_valid;
  assign access      = can_fetch && fb_ready;
  assign fire        = access && ic_hit && mask_ok;
  assign mask_replay = access && ic_hit && !mask_ok;
  assign npc_pred    = taken ? btb_target : {line + LINE_AW'(1), {(EW+2){1'b0}}};

  // ---------------- next PC and next fetch mask ----------------
  logic                                fmd_taken;
  logic [EW-1:0]                       fmd_slot;
  logic [IC_WAYS-1:0][EW-1:0]          mt_entry;
  logic [ISSUE_WIDTH-1:0]              target_mask;
  logic [IC_WAYS-1:0][ISSUE_WIDTH-1:0] mop, nfm;
  logic [IC_WAYS-1:0]                  fb;
  logic [IC_WAYS-1:0]                  cut;

  always_comb begin
    if (redirect_valid) begin
      npc       = redirect_pc;
      fmd_taken = 1'b1;
    end else if (fire) begin
      npc       = npc_pred;
      fmd_taken = taken;
    end else begin
      npc       = pc;          // same line again: its own entry slot is the target
      fmd_taken = 1'b1;
    end
    fmd_slot = npc[EW+1:2];
  end

  always_comb begin
    for (int unsigned w = 0; w < IC_WAYS; w++) cut[w] = !fb[w] && (mop[w] != '1);
  end

  always_comb begin
    if (redirect_valid || fire || state != RUN) fmask_d = nfm;
    else if (mask_replay)                        fmask_d = {IC_WAYS{need}};
    else                                         fmask_d = fmask_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= RUN;
      pc         <= RESET_PC;
      miss_line  <= '0;
      fmask_q    <= '1;
      fallback_q <= '0;
      cut_q      <= '0;
    end else begin
      pc      <= npc;
      fmask_q <= fmask_d;
      if (redirect_valid || fire || state != RUN) begin
        fallback_q <= fb;
        cut_q      <= cut;
      end else if (mask_replay) begin
        fallback_q <= '0;
        cut_q      <= '0;
      end
      unique case (state)
        RUN:    if (access && !ic_hit) begin
                  state     <= MISS;
                  miss_line <= line;
                end
        MISS:   if (mem_resp_valid) state <= REPLAY;
        REPLAY: state <= RUN;
        default: state <= RUN;
      endcase
    end
  end

  // Commits are taken once the predictor tables are cleared.
  logic commit_ok;
  assign commit_ok = commit.valid && bp_ready;

  assign mem_req_valid = access && !ic_hit;
  assign mem_req_line  = line;
  assign fill_valid    = (state == MISS) && mem_resp_valid;

  // ---------------- blocks ----------------
  icache #(.ISSUE_WIDTH(ISSUE_WIDTH), .SETS(IC_SETS), .WAYS(IC_WAYS)) u_icache (
    .clk, .rst_n,
    .f_line(line), .f_en(fmask_q), .f_hit(ic_hit), .f_way(ic_way),
    .f_words(ic_words), .f_word_valid(ic_word_valid), .active_subbanks(ic_active),
    .p_line(commit.pc[XLEN-1:EW+2]), .p_hit(ic_p_hit), .p_way(ic_p_way),
    .fill_valid, .fill_line(miss_line), .fill_words(mem_resp_words),
    .repl_valid, .repl_set, .repl_way
  );

  btb #(.ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS), .ISSUE_WIDTH(ISSUE_WIDTH)) u_btb (
    .clk, .rst_n,
    .lk_line(line), .lk_hit(btb_hit), .lk_slot(btb_slot), .lk_target(btb_target),
    .lk_cond(btb_cond),
    .upd_valid(commit_ok && commit.taken), .upd_pc(commit.pc), .upd_cond(commit.cond),
    .upd_target(commit.target)
  );

  pas_predictor #(.BHT_ENTRIES(BHT_ENTRIES), .HIST(HIST), .PHT_SETS(PHT_SETS)) u_bp (
    .clk, .rst_n, .ready(bp_ready),
    .lk_pc({line, btb_slot, 2'b00}), .lk_taken(bp_taken),
    .upd_valid(commit_ok && commit.cond), .upd_pc(commit.pc), .upd_taken(commit.taken),
    .upd_next_taken(bp_next_taken)
  );

  mask_table #(.ISSUE_WIDTH(ISSUE_WIDTH), .SETS(IC_SETS), .WAYS(IC_WAYS)) u_mt (
    .clk, .rst_n,
    .rd_set(npc[EW+2 +: $clog2(IC_SETS)]), .rd_entry(mt_entry),
    .repl_valid, .repl_set, .repl_way,
    .upd_valid(commit_ok && ic_p_hit), .upd_set(commit.pc[EW+2 +: $clog2(IC_SETS)]),
    .upd_way(ic_p_way), .upd_slot(commit.pc[EW+1:2]),
    .upd_taken_next(commit.cond ? bp_next_taken : 1'b1),
    .upd_mispredict(commit.mispredict)
  );

  fmd #(.ISSUE_WIDTH(ISSUE_WIDTH), .WAYS(IC_WAYS)) u_fmd (
    .taken(fmd_taken), .target_slot(fmd_slot), .mt_entry,
    .target_mask, .mask_of_predictions(mop), .next_fetch_mask(nfm), .fallback(fb)
  );

  fetch_buffer #(.ISSUE_WIDTH(ISSUE_WIDTH), .DEPTH(FB_DEPTH)) u_fb (
    .clk, .rst_n, .flush(fb_flush),
    .push_valid(fire), .push_ready(fb_ready),
    .push_line_pc({line, {(EW+2){1'b0}}}), .push_first(off), .push_last(last),
    .push_last_npc(npc_pred), .push_words(ic_words),
    .out_valid, .out_entry, .pop_count
  );

  // ---------------- observation ----------------
  assign ready           = bp_ready;
  assign fetch_mask      = fmask_q[ic_way];
  assign subbanks_read   = access ? ic_active : '0;
  assign ev_fetch        = fire;
  assign ev_taken        = fire && taken;
  assign ev_branch_into  = fire && (off != '0);
  assign ev_branch_out   = fire && cut_q[ic_way];
  assign ev_fallback     = fire && fallback_q[ic_way];
  assign ev_miss         = mem_req_valid;
  assign ev_buffer_stall = can_fetch && !fb_ready;
  assign ev_mask_replay  = mask_replay;
  assign ev_mt_update    = commit_ok && ic_p_hit;
  assign ev_mt_skip      = commit_ok && !ic_p_hit;
  assign ev_mispredict   = commit_ok && commit.mispredict;

  // Every slot handed to the buffer must have been read from its subbank.
  a_mask_covers: assert property (@(posedge clk) disable iff (!rst_n)
                                  fire |-> ((need & ~ic_word_valid) == '0));

endmodule
