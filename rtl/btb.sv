// btb: Branch Target Buffer, set-associative, one entry per fetch line.
//
// The fetch unit allows one taken branch per fetch cycle, so an entry describes
// the taken branch of one fetch line: its slot within the line, whether it is
// conditional (then the direction predictor decides) and its target.
// lookup: combinational. lk_line (line address = byte address without the line
// offset) gives hit, the branch slot and the target address.
// update: at the clock edge, for a committed taken branch. If the line already
// has an entry, slot and target are overwritten; otherwise the least recently
// used way of the set is allocated. Lookup hits and updates refresh LRU.
// Entry count and associativity follow the evaluated configuration (1024
// entries, 2-way); line-granular entries and LRU replacement are choices of
// this design.
module btb #(
  parameter int unsigned ENTRIES     = 1024,
  parameter int unsigned WAYS        = 2,
  parameter int unsigned ISSUE_WIDTH = 8,
  localparam int unsigned EW         = $clog2(ISSUE_WIDTH),
  localparam int unsigned LINE_AW    = fetch_pkg::XLEN - EW - 2,   // line address width
  localparam int unsigned SETS       = ENTRIES / WAYS,
  localparam int unsigned SW         = $clog2(SETS),
  localparam int unsigned TW         = LINE_AW - SW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [LINE_AW-1:0]   lk_line,
  output logic                 lk_hit,
  output logic [EW-1:0]        lk_slot,
  output fetch_pkg::addr_t     lk_target,
  output logic                 lk_cond,
  input  logic                 upd_valid,
  input  fetch_pkg::addr_t     upd_pc,
  input  logic                 upd_cond,
  input  fetch_pkg::addr_t     upd_target
);
  import fetch_pkg::*;

  typedef struct packed {
    logic          valid;
    logic [TW-1:0] tag;
    logic [EW-1:0] slot;
    logic          cond;
    addr_t         target;
  } entry_t;

  entry_t               tbl [SETS][WAYS];
  logic [WAYS-1:0]      age [SETS];        // bit w set: way w used more recently than the other half

  logic [SW-1:0]        lk_set, up_set;
  logic [TW-1:0]        lk_tag, up_tag;
  logic [WAYS-1:0]      lk_match, up_match;
  logic [$clog2(WAYS)-1:0] lk_way, up_way;
  logic                 up_hit;
  logic [LINE_AW-1:0]   up_line;

  assign lk_set  = lk_line[SW-1:0];
  assign lk_tag  = lk_line[LINE_AW-1:SW];
  assign up_line = upd_pc[XLEN-1:EW+2];
  assign up_set  = up_line[SW-1:0];
  assign up_tag  = up_line[LINE_AW-1:SW];

  always_comb begin
    logic found;
    found    = 1'b0;
    lk_match = '0;
    up_match = '0;
    lk_way   = '0;
    up_way   = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      lk_match[w] = tbl[lk_set][w].valid && tbl[lk_set][w].tag == lk_tag;
      up_match[w] = tbl[up_set][w].valid && tbl[up_set][w].tag == up_tag;
    end
    for (int w = WAYS - 1; w >= 0; w--) if (lk_match[w]) lk_way = w[$clog2(WAYS)-1:0];
    up_hit = |up_match;
    if (up_hit) begin
      for (int w = WAYS - 1; w >= 0; w--) if (up_match[w]) up_way = w[$clog2(WAYS)-1:0];
    end else begin
      // victim: first invalid way, else first way not marked recently used
      for (int w = 0; w < WAYS; w++)
        if (!found && !tbl[up_set][w].valid) begin up_way = w[$clog2(WAYS)-1:0]; found = 1'b1; end
      for (int w = 0; w < WAYS; w++)
        if (!found && !age[up_set][w]) begin up_way = w[$clog2(WAYS)-1:0]; found = 1'b1; end
    end
  end

  assign lk_hit    = |lk_match;
  assign lk_slot   = tbl[lk_set][lk_way].slot;
  assign lk_target = tbl[lk_set][lk_way].target;
  assign lk_cond   = tbl[lk_set][lk_way].cond;

  // Mark way w most recently used; clear the others once all would be set.
  function automatic logic [WAYS-1:0] touch(input logic [WAYS-1:0] a, input int unsigned w);
    logic [WAYS-1:0] n;
    n = a | (WAYS'(1) << w);
    if (&n) n = WAYS'(1) << w;
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++) begin
        age[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) tbl[s][w] <= '0;
      end
    end else begin
      if (lk_hit && !(upd_valid && up_set == lk_set))
        age[lk_set] <= touch(age[lk_set], 32'(lk_way));
      if (upd_valid) begin
        tbl[up_set][up_way] <= '{valid: 1'b1, tag: up_tag,
                                 slot: upd_pc[EW+1:2], cond: upd_cond,
                                 target: upd_target};
        age[up_set] <= touch(age[up_set], 32'(up_way));
      end
    end
  end

endmodule
