// icache: set-associative instruction cache with one subbank per instruction.
//
// The data array of every way is split into ISSUE_WIDTH subbanks, each one
// instruction (32 bits) wide. A fetch drives a per-way, per-slot enable mask;
// only enabled subbanks are read, so energy scales with the number of set bits
// (active_subbanks reports that count for the cycle). Disabled slots read as 0
// and are flagged invalid in f_word_valid. All ways are read in parallel with
// the tag compare, as in a conventional single-cycle cache.
//
// Ports
//   fetch : f_line (line address), f_en (enables per way) -> f_hit, f_way,
//           f_words / f_word_valid of the hitting way. Combinational (1-cycle hit).
//   probe : p_line -> p_hit, p_way. Second tag port, used at branch commit to find
//           whether and where the branch's line is cached.
//   fill  : fill_valid writes fill_words as line fill_line at the clock edge into
//           the first invalid way of the set, else the way named by the set's
//           round-robin pointer. repl_valid/repl_set/repl_way report the written
//           line in that same cycle so its Mask Table entry can be reset.
// Default geometry follows the evaluated cache: 32 KB, 4-way, a line as wide as
// the fetch (8 x 32-bit = 32 bytes), 256 sets. Round-robin replacement and the
// fill interface are choices of this design.
module icache #(
  parameter int unsigned ISSUE_WIDTH = 8,
  parameter int unsigned SETS        = 256,
  parameter int unsigned WAYS        = 4,
  localparam int unsigned EW         = $clog2(ISSUE_WIDTH),
  localparam int unsigned LINE_AW    = fetch_pkg::XLEN - EW - 2,
  localparam int unsigned SW         = $clog2(SETS),
  localparam int unsigned WW         = $clog2(WAYS),
  localparam int unsigned TW         = LINE_AW - SW
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // fetch
  input  logic [LINE_AW-1:0]                     f_line,
  input  logic [WAYS-1:0][ISSUE_WIDTH-1:0]       f_en,
  output logic                                   f_hit,
  output logic [WW-1:0]                          f_way,
  output fetch_pkg::instr_t [ISSUE_WIDTH-1:0]    f_words,
  output logic [ISSUE_WIDTH-1:0]                 f_word_valid,
  output logic [$clog2(WAYS*ISSUE_WIDTH+1)-1:0]  active_subbanks,
  // probe
  input  logic [LINE_AW-1:0]                     p_line,
  output logic                                   p_hit,
  output logic [WW-1:0]                          p_way,
  // fill
  input  logic                                   fill_valid,
  input  logic [LINE_AW-1:0]                     fill_line,
  input  fetch_pkg::instr_t [ISSUE_WIDTH-1:0]    fill_words,
  output logic                                   repl_valid,
  output logic [SW-1:0]                          repl_set,
  output logic [WW-1:0]                          repl_way
);
  import fetch_pkg::*;

  logic [TW-1:0] tags  [SETS][WAYS];
  logic          valid [SETS][WAYS];
  instr_t        data  [SETS][WAYS][ISSUE_WIDTH];   // [way][slot] = one subbank
  logic [WW-1:0] rr    [SETS];

  logic [SW-1:0] f_set, p_set, fl_set;
  logic [TW-1:0] f_tag, p_tag, fl_tag;
  logic [WAYS-1:0] f_match, p_match;
  logic [WW-1:0] victim;

  assign f_set  = f_line[SW-1:0];
  assign f_tag  = f_line[LINE_AW-1:SW];
  assign p_set  = p_line[SW-1:0];
  assign p_tag  = p_line[LINE_AW-1:SW];
  assign fl_set = fill_line[SW-1:0];
  assign fl_tag = fill_line[LINE_AW-1:SW];

  always_comb begin
    f_way = '0;
    p_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      f_match[w] = valid[f_set][w] && tags[f_set][w] == f_tag;
      p_match[w] = valid[p_set][w] && tags[p_set][w] == p_tag;
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (f_match[w]) f_way = w[WW-1:0];
      if (p_match[w]) p_way = w[WW-1:0];
    end
  end
  assign f_hit = |f_match;
  assign p_hit = |p_match;

  // Subbank reads of the hitting way.
  always_comb begin
    for (int unsigned i = 0; i < ISSUE_WIDTH; i++) begin
      f_word_valid[i] = f_hit && f_en[f_way][i];
      f_words[i]      = f_word_valid[i] ? data[f_set][f_way][i] : '0;
    end
  end

  // Subbanks switched on this cycle, over all ways of the set.
  always_comb begin
    active_subbanks = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      for (int unsigned i = 0; i < ISSUE_WIDTH; i++)
        active_subbanks = active_subbanks + $bits(active_subbanks)'(f_en[w][i]);
  end

  always_comb begin
    logic found;
    found  = 1'b0;
    victim = rr[fl_set];
    for (int w = 0; w < WAYS; w++)
      if (!found && !valid[fl_set][w]) begin victim = w[WW-1:0]; found = 1'b1; end
  end

  assign repl_valid = fill_valid;
  assign repl_set   = fl_set;
  assign repl_way   = victim;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
      end
    end else if (fill_valid) begin
      valid[fl_set][victim] <= 1'b1;
      rr[fl_set]            <= rr[fl_set] + WW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      tags[fl_set][victim] <= fl_tag;
      for (int unsigned i = 0; i < ISSUE_WIDTH; i++)
        data[fl_set][victim][i] <= fill_words[i];
    end
  end

endmodule
